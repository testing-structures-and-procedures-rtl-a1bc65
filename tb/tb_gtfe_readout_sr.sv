// tb_gtfe_readout_sr: checks the data output shift register.
//
// Three registers are chained as on a hybrid: the first has hits, the second
// none (zero suppressed), the third has hits, and a known pattern is fed
// into the first. The serial output of the last one must be its 65 bits,
// the second's single 0, the first's 65 bits, then the input pattern, one
// bit per readout clock, and must pause while the readout clock is off.
// Then an end-read after 30 clocks must turn the output to 0 for good.
module tb_gtfe_readout_sr;
  import gtfe_pkg::*;

  logic clk = 1'b0;
  logic rst, soft_rst, load, stop, shift_en, din0;
  logic [EVT_W-1:0] ld [3];
  logic d01, d12, dout;
  logic [2:0] active;
  int checks = 0, failures = 0;

  gtfe_readout_sr u0 (.clk, .rst, .soft_rst, .load, .load_data(ld[0]), .stop, .shift_en,
                      .din(din0), .dout(d01), .active(active[0]));
  gtfe_readout_sr u1 (.clk, .rst, .soft_rst, .load, .load_data(ld[1]), .stop, .shift_en,
                      .din(d01), .dout(d12), .active(active[1]));
  gtfe_readout_sr u2 (.clk, .rst, .soft_rst, .load, .load_data(ld[2]), .stop, .shift_en,
                      .din(d12), .dout(dout), .active(active[2]));

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

  logic exp_q [$];
  logic [19:0] pat;

  initial begin
    rst = 1; soft_rst = 0; load = 0; stop = 0; shift_en = 0; din0 = 0;
    ld[0] = {$urandom, $urandom, 1'b1};
    ld[1] = '0;
    ld[2] = {$urandom, $urandom, 1'b1};
    pat = 20'hB38E5;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(dout == 0, "idle output is 0");
    // Expected stream out of the last register.
    for (int i = 0; i < 65; i++) exp_q.push_back(ld[2][i]);
    exp_q.push_back(1'b0);
    for (int i = 0; i < 65; i++) exp_q.push_back(ld[0][i]);
    for (int i = 0; i < 20; i++) exp_q.push_back(pat[i]);
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    check(active == 3'b111, "all registers active after load");
    begin
      automatic int sent = 0, t = 0;
      while (exp_q.size() > 0) begin
        shift_en = (t % 7 != 3);       // readout clock with gaps
        din0 = (sent < 20) ? pat[sent] : 1'b0;
        check(dout == exp_q[0], $sformatf("stream bit, %0d left", exp_q.size()));
        @(negedge clk);
        if (shift_en) begin
          void'(exp_q.pop_front());
          sent++;  // u0 takes one din bit per readout clock
        end
        t++;
        if (t > 400) break;
      end
    end
    shift_en = 0;
    // Stop after 30 bits.
    ld[2] = '1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0; shift_en = 1;
    for (int i = 0; i < 30; i++) begin check(dout == 1'b1, "bits before end read"); @(negedge clk); end
    stop = 1; @(negedge clk); stop = 0;
    for (int i = 0; i < 70; i++) begin check(dout == 1'b0, "zeros after end read"); @(negedge clk); end
    check(active == 3'b000, "inactive after end read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
