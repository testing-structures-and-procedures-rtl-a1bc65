// tb_gtfe_dac: checks the two DAC transfer functions for every 7-bit code.
//
// Calibration DAC: 6.2 + 6.0*value, threshold DAC: 5.4 + 5.5*value, both
// times 4 when the range bit (code[0]) is 1; value is code[6:1] with code[1]
// as least significant bit. Outputs are in tenths.
module tb_gtfe_dac;
  logic [6:0]  code;
  logic [15:0] cal, thr;
  int checks = 0, failures = 0;

  gtfe_dac #(.OFF_X10(62), .SLOPE_X10(60)) u_cal (.code, .level_x10(cal));
  gtfe_dac #(.OFF_X10(54), .SLOPE_X10(55)) u_thr (.code, .level_x10(thr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      int v, ec, et;
      code = 7'(c);
      #1;
      // value bits arrive LSB first after the range bit
      v = 0;
      for (int b = 0; b < 6; b++) v += ((c >> (b + 1)) & 1) << b;
      ec = 62 + 60 * v;
      et = 54 + 55 * v;
      if ((c & 1) != 0) begin ec *= 4; et *= 4; end
      checks += 2;
      if (cal != 16'(ec)) begin failures++; $display("FAIL cal code %0d: %0d != %0d", c, cal, ec); end
      if (thr != 16'(et)) begin failures++; $display("FAIL thr code %0d: %0d != %0d", c, thr, et); end
    end
    // Document example: threshDac 13 high, calibDac 14 high.
    code = {6'd13, 1'b1}; #1; checks++; if (thr != 16'd3076) failures++;
    code = {6'd14, 1'b1}; #1; checks++; if (cal != 16'd3608) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
