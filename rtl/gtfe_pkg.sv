// gtfe_pkg: constants and types shared by the GTFE64 front-end chip model.
//
// The chip has 64 channels, a 207-bit control register, an 8-event FIFO of
// 65-bit lines (one "any hit" flag plus 64 channel bits) and a 3-bit command
// set. Control-register bit numbers below are the 1-based positions in the
// serial data string, bit 1 being the first bit sent after the command.
// All of these numbers are the chip's own; only the analog scale (signal
// amplitudes in tenths of a DAC volt unit) is a choice of this model.
package gtfe_pkg;

  localparam int unsigned NCH       = 64;   // channels per chip
  localparam int unsigned CREG_LEN  = 207;  // control register bits
  localparam int unsigned EVT_W     = NCH + 1; // FIFO line: hit flag + channels
  localparam int unsigned FIFO_DEPTH = 8;   // events held by the FIFO
  localparam int unsigned ADDR_W    = 5;    // chip address width
  localparam int unsigned CMD_W     = 3;    // command width
  localparam logic [ADDR_W-1:0] BCAST_ADDR = 5'b11111;

  // Amplitudes (signal, calibration pulse, threshold) in units of 0.1.
  localparam int unsigned AMP_W = 16;

  // Control register field positions (1-based serial bit numbers).
  localparam int unsigned CAL_MASK_FIRST  = 1;    // bit 1 -> channel 0
  localparam int unsigned CHAN_MASK_FIRST = 65;   // bit 65 -> channel 63 (reversed)
  localparam int unsigned TRIG_MASK_FIRST = 129;  // bit 129 -> channel 0
  localparam int unsigned CAL_DAC_FIRST   = 193;  // 193 range, 194..199 value LSB first
  localparam int unsigned THR_DAC_FIRST   = 200;  // 200 range, 201..206 value LSB first
  localparam int unsigned DIR_BIT         = 207;  // 0 = left, 1 = right

  // Commands, written as printed: first bit sent is the leftmost digit.
  typedef enum logic [CMD_W-1:0] {
    CMD_NOP        = 3'b000,
    CMD_LOAD_CREG  = 3'b001,
    CMD_READ_EVENT = 3'b010,
    CMD_CAL_STROBE = 3'b011,
    CMD_CLEAR_EVT  = 3'b100,
    CMD_RESET_CHIP = 3'b101,
    CMD_RESET_FIFO = 3'b110,
    CMD_END_READ   = 3'b111
  } gtfe_cmd_e;

  typedef enum logic { DIR_LEFT = 1'b0, DIR_RIGHT = 1'b1 } gtfe_dir_e;

  // Decoded settings held by the control register.
  typedef struct packed {
    logic [NCH-1:0] cal_mask;   // 1 = inject calibration charge
    logic [NCH-1:0] chan_mask;  // 1 = channel data enabled
    logic [NCH-1:0] trig_mask;  // 1 = channel may trigger
    logic [6:0]     cal_dac;    // [0] range (x4), [6:1] value, [1] = LSB
    logic [6:0]     thr_dac;    // same layout
    gtfe_dir_e      dir;        // controller direction
  } gtfe_cfg_t;

endpackage
