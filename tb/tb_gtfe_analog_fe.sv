// tb_gtfe_analog_fe: checks the behavioural amplifier/discriminator model.
//
// Random strip amplitudes against a threshold; then a calibration strobe
// with a mask on every third channel, which must lift exactly those
// channels above threshold for CAL_PULSE_LEN clocks and then stop.
module tb_gtfe_analog_fe;
  import gtfe_pkg::*;

  localparam int unsigned PL = 6;

  logic clk = 1'b0;
  logic rst, cal_strobe;
  logic [AMP_W-1:0] strip_amp [NCH];
  logic [NCH-1:0]   cal_mask, disc;
  logic [AMP_W-1:0] cal_level, thr_level;

  int checks = 0, failures = 0;

  gtfe_analog_fe #(.CAL_PULSE_LEN(PL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; cal_strobe = 1'b0; cal_mask = '0;
    cal_level = 16'd3608; thr_level = 16'd3076;
    for (int ch = 0; ch < 64; ch++) strip_amp[ch] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // Strip signals only.
    for (int r = 0; r < 20; r++) begin
      for (int ch = 0; ch < 64; ch++) strip_amp[ch] = 16'($urandom_range(0, 6000));
      #1;
      for (int ch = 0; ch < 64; ch++)
        check(disc[ch] == (strip_amp[ch] > thr_level), $sformatf("strip ch%0d", ch));
    end
    // Exactly at threshold is not above it.
    strip_amp[5] = thr_level; #1 check(!disc[5], "equal to threshold is no hit");
    for (int ch = 0; ch < 64; ch++) strip_amp[ch] = '0;
    for (int ch = 0; ch < 64; ch++) cal_mask[ch] = (ch % 3 == 1);
    #1 check(disc == '0, "quiet before strobe");
    @(negedge clk) cal_strobe = 1'b1;
    @(negedge clk) cal_strobe = 1'b0;
    for (int t = 0; t < int'(PL); t++) begin
      check(disc == cal_mask, $sformatf("pulse on masked channels, cycle %0d", t));
      @(negedge clk);
    end
    check(disc == '0, "pulse ends after CAL_PULSE_LEN clocks");
    // Calibration level below threshold: no hits.
    cal_level = 16'd100;
    @(negedge clk) cal_strobe = 1'b1;
    @(negedge clk) cal_strobe = 1'b0;
    check(disc == '0, "small pulse below threshold");
    // Small pulse adds to a strip signal just below threshold.
    strip_amp[1] = thr_level - 16'd50;
    strip_amp[2] = thr_level - 16'd50;
    #1 check(disc[1] && !disc[2], "pulse adds to strip signal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
