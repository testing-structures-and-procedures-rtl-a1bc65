// gtfe_analog_fe: behavioural model of the 64 amplifier/discriminator
// channels of the GTFE64, including calibration charge injection.
//
// Each channel amplifies its strip signal; the discriminator output is 1
// while the amplified signal is above the threshold DAC level. A calibration
// strobe puts the calibration DAC level onto every calibration-masked channel
// for CAL_PULSE_LEN clocks, which is how hits are simulated without a
// particle. All amplitudes are integers in tenths of a DAC unit; strip_amp is
// the already amplified signal.
//
// From the document: one discriminator per channel, output on when the input
// is above the threshold, calibration pulse on masked channels at the
// calibration DAC level. Own choices: the amplifier has no shaping (the
// strip amplitude is used as is), the calibration pulse adds to the strip
// signal and lasts CAL_PULSE_LEN clocks (long enough for a trigger
// acknowledge sent 12 clocks after the strobe, as in the chip tests).
//
// Timing: cal_strobe is sampled at a rising edge; the pulse is seen on disc
// from the next cycle on. disc is combinational in strip_amp.
module gtfe_analog_fe
  import gtfe_pkg::*;
#(
  parameter int unsigned CAL_PULSE_LEN = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [AMP_W-1:0]     strip_amp [NCH],
  input  logic                 cal_strobe,
  input  logic [NCH-1:0]       cal_mask,
  input  logic [AMP_W-1:0]     cal_level,
  input  logic [AMP_W-1:0]     thr_level,
  output logic [NCH-1:0]       disc
);

  logic [7:0] pulse_cnt;
  logic       pulse_on;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                  pulse_cnt <= '0;
    else if (cal_strobe)      pulse_cnt <= 8'(CAL_PULSE_LEN);
    else if (pulse_cnt != '0) pulse_cnt <= pulse_cnt - 8'd1;
  end

  assign pulse_on = (pulse_cnt != '0);

  always_comb begin
    for (int ch = 0; ch < int'(NCH); ch++) begin
      logic [AMP_W:0] a;
      a = {1'b0, strip_amp[ch]};
      if (pulse_on && cal_mask[ch]) a = a + {1'b0, cal_level};
      disc[ch] = (a > {1'b0, thr_level});
    end
  end

endmodule
