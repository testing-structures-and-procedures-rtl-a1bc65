// gtfe_dac: behavioural model of one 7-bit DAC of the GTFE64 (analog part).
//
// The chip has two: the calibration DAC, whose output is the charge pulse put
// on calibration-masked channels, and the threshold DAC, which sets the
// discriminator level. Both take a 7-bit string from the control register:
// the first bit multiplies the output by 4, the remaining six bits are a
// binary value sent least significant bit first. The output follows
//   V = OFF + SLOPE * value        (x4 when the range bit is 1)
// with OFF/SLOPE = 6.2/6.0 for calibration and 5.4/5.5 for the threshold, as
// the document gives them (its voltage unit is not stated, so the model uses
// "DAC units"). The result is given in tenths, as an integer, and has no
// delay: the real DAC settles in analog time.
//
// code[0] is the range bit (serial bit 1 of the field), code[1] the value
// LSB, code[6] the value MSB. With the calibration defaults every level is
// even, so bit 0 of level_x10 is constant in that instance.
module gtfe_dac
  import gtfe_pkg::*;
#(
  parameter int unsigned OFF_X10   = 62,  // offset in tenths (calibration DAC)
  parameter int unsigned SLOPE_X10 = 60   // step in tenths
) (
  input  logic [6:0]       code,
  output logic [AMP_W-1:0] level_x10
);

  logic [AMP_W-1:0] base;

  always_comb begin
    base      = AMP_W'(OFF_X10) + AMP_W'(SLOPE_X10) * AMP_W'(code[6:1]);
    level_x10 = code[0] ? (base << 2) : base;
  end

endmodule
