// gtfe_ctrl_reg: the 207-bit control register of the GTFE64.
//
// A plain shift register: every accepted data bit of a "load control
// register" command enters at one end and the oldest bit leaves at the
// other, where it drives the control-register output pad. After a full
// 207-bit load, serial bit k (1-based) sits in sr[k-1]. The settings are
// decoded from the live register contents:
//   bits   1..64  calibration mask, bit 1 = channel 0, 1 = inject charge
//   bits  65..128 channel mask, bit 65 = channel 63 ... bit 128 = channel 0,
//                 1 = data enabled, 0 = channel always reads "no hit"
//   bits 129..192 trigger mask, bit 129 = channel 0, 1 = may trigger
//   bits 193..199 calibration DAC: range bit, then 6-bit value LSB first
//   bits 200..206 threshold DAC, same layout
//   bit  207      control direction, 0 = left, 1 = right
// The field layout, shift behaviour and direction default 0 follow the
// document. The default of every other bit (0) is this design's choice.
//
// Timing: shift_en samples shift_in at a rising clock edge; ser_out always
// shows the bit that the next shift pushes out. rst (pad, asynchronous) and
// soft_rst (reset chip command, synchronous) restore the defaults.
module gtfe_ctrl_reg
  import gtfe_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      soft_rst,
  input  logic      shift_en,
  input  logic      shift_in,
  output logic      ser_out,
  output gtfe_cfg_t cfg
);

  logic [CREG_LEN-1:0] sr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           sr <= '0;
    else if (soft_rst) sr <= '0;
    else if (shift_en) sr <= {shift_in, sr[CREG_LEN-1:1]};
  end

  assign ser_out = sr[0];

  always_comb begin
    for (int ch = 0; ch < int'(NCH); ch++) begin
      cfg.cal_mask[ch]  = sr[CAL_MASK_FIRST - 1 + ch];
      cfg.chan_mask[ch] = sr[CHAN_MASK_FIRST - 1 + (NCH - 1 - ch)];
      cfg.trig_mask[ch] = sr[TRIG_MASK_FIRST - 1 + ch];
    end
    cfg.cal_dac = sr[CAL_DAC_FIRST - 1 +: 7];
    cfg.thr_dac = sr[THR_DAC_FIRST - 1 +: 7];
    cfg.dir     = gtfe_dir_e'(sr[DIR_BIT - 1]);
  end

endmodule
