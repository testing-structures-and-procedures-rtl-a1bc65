// tb_gtfe_ctrl_reg: self-checking test of the 207-bit control register.
//
// Loads two random 207-bit strings. During the second load the serial output
// must return the first string, oldest bit first. After each load every
// decoded field (three masks, two DAC codes, direction) is compared with the
// bit positions of the serial string. Finally the reset-chip input must
// bring back the all-zero default (direction left).
module tb_gtfe_ctrl_reg;
  import gtfe_pkg::*;

  logic clk = 1'b0;
  logic rst, soft_rst, shift_en, shift_in, ser_out;
  gtfe_cfg_t cfg;

  int checks = 0, failures = 0;

  gtfe_ctrl_reg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // p[k-1] is serial bit k.
  task automatic check_fields(input logic [CREG_LEN-1:0] p, input string tag);
    for (int ch = 0; ch < 64; ch++) begin
      check(cfg.cal_mask[ch]  == p[ch],            $sformatf("%s cal mask ch%0d", tag, ch));
      check(cfg.chan_mask[ch] == p[64 + 63 - ch],  $sformatf("%s chan mask ch%0d", tag, ch));
      check(cfg.trig_mask[ch] == p[128 + ch],      $sformatf("%s trig mask ch%0d", tag, ch));
    end
    check(cfg.cal_dac == p[198:192], {tag, " cal dac"});
    check(cfg.thr_dac == p[205:199], {tag, " thr dac"});
    check(cfg.dir == gtfe_dir_e'(p[206]), {tag, " direction"});
  endtask

  task automatic load(input logic [CREG_LEN-1:0] p, input logic [CREG_LEN-1:0] expect_out);
    for (int i = 0; i < int'(CREG_LEN); i++) begin
      shift_en = 1'b1;
      shift_in = p[i];
      #1;
      check(ser_out == expect_out[i], $sformatf("serial output bit %0d", i + 1));
      @(posedge clk);
      #1;
    end
    shift_en = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [CREG_LEN-1:0] p1, p2;

  initial begin
    rst = 1'b1; soft_rst = 1'b0; shift_en = 1'b0; shift_in = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check_fields('0, "default");
    for (int i = 0; i < int'(CREG_LEN); i++) begin p1[i] = 1'($urandom); p2[i] = 1'($urandom); end
    p1[206] = 1'b1;
    load(p1, '0);
    check_fields(p1, "first load");
    // Idle cycles must not shift.
    repeat (5) @(posedge clk);
    #1 check_fields(p1, "hold");
    load(p2, p1);
    check_fields(p2, "second load");
    soft_rst = 1'b1; @(posedge clk); #1 soft_rst = 1'b0;
    check_fields('0, "after reset chip");
    load(p1, '0);
    rst = 1'b1; #2 rst = 1'b0; #1;
    check_fields('0, "after reset pad");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
