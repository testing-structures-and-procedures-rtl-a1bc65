// tb_gtfe_trigger: checks the masked fast-OR and its direction routing.
//
// For random hit and mask patterns and chain inputs, the output on the side
// of the control direction must be OR(hit & mask) | chain input of that
// side, and the other side's output must stay 0.
module tb_gtfe_trigger;
  import gtfe_pkg::*;

  logic [NCH-1:0] disc, trig_mask;
  gtfe_dir_e dir;
  logic tri_r, tli_l, tro_r, tlo_l, local_or;
  int checks = 0, failures = 0;

  gtfe_trigger dut (.*);

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
    for (int i = 0; i < 2000; i++) begin
      logic exp_or;
      disc = '0; trig_mask = '0;
      // sparse hits so that both outcomes occur often
      for (int k = 0; k < 2; k++) disc[$urandom_range(0, 63)] = 1'b1;
      trig_mask = {$urandom, $urandom};
      dir = gtfe_dir_e'(i[0]);
      tri_r = ($urandom_range(0, 3) == 0);
      tli_l = ($urandom_range(0, 3) == 0);
      #1;
      exp_or = 1'b0;
      for (int ch = 0; ch < 64; ch++) exp_or |= disc[ch] & trig_mask[ch];
      check(local_or == exp_or, "local fast-OR");
      if (dir == DIR_RIGHT) begin
        check(tro_r == (exp_or | tri_r), "right output");
        check(tlo_l == 1'b0, "left output idle");
      end else begin
        check(tlo_l == (exp_or | tli_l), "left output");
        check(tro_r == 1'b0, "right output idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
