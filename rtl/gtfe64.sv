// gtfe64: the GLAST Tracker Front End 64-channel chip.
//
// The chip amplifies the signals of 64 silicon strips, turns them into hits
// with one discriminator per channel, sends a fast-OR trigger down a daisy
// chain towards its controller, stores the hit pattern in an 8-event FIFO
// when the controller acknowledges a trigger, and on request shifts an event
// out serially along a second daisy chain. It can work with a controller at
// either end of the chain: every control input exists twice (suffix _l for
// the left controller, _r for the right one) and the direction bit of the
// control register chooses which set the chip obeys and which chain it
// drives.
//
// Commands (start bit, 5-bit address LSB first, 3-bit command):
//   001 load control register (207 data bits follow) - accepted from either
//       command line, since it is the command that sets the direction
//   010 read event     011 calibration strobe   100 clear event
//   101 reset chip     110 reset FIFO           111 end read event
// All other commands are obeyed only from the selected side.
//
// Interface: clk is the common clock; rst_pad the reset pad (asynchronous,
// active high, same effect as command 101). chip_addr are the five hard-wired
// address pads. tack_* (trigger acknowledge) writes one event per rising
// edge. rdclk_* enables the readout shift register, one bit per clock. The
// trigger chains are tri_r->tro_r and tli_l->tlo_l, the data chains dri->dro
// and dli->dlo. creg_out is the control register's serial output.
//
// What follows the document: command set and frame, address and broadcast
// rule, control register layout, masks, DAC equations, fast-OR, FIFO and
// zero-suppressed readout. Own choices: one clock domain (the readout clock
// is a clock enable), the trigger acknowledge acts on its rising edge, and
// the analog front end is a behavioural model (see gtfe_analog_fe).
// The FIFO status, decoder busy and local fast-OR signals are internal only:
// the chip has no pins for them, so lint reports them as unused.
module gtfe64
  import gtfe_pkg::*;
#(
  parameter int unsigned CAL_PULSE_LEN = 20
) (
  input  logic              clk,
  input  logic              rst_pad,
  input  logic [ADDR_W-1:0] chip_addr,
  input  logic              cmd_l,
  input  logic              cmd_r,
  input  logic              tack_l,
  input  logic              tack_r,
  input  logic              rdclk_l,
  input  logic              rdclk_r,
  input  logic [AMP_W-1:0]  strip_amp [NCH],
  input  logic              tri_r,
  output logic              tro_r,
  input  logic              tli_l,
  output logic              tlo_l,
  input  logic              dri,
  output logic              dro,
  input  logic              dli,
  output logic              dlo,
  output logic              creg_out
);

  // ---------------- command decoders ----------------
  logic      l_cv, r_cv, l_dv, r_dv, l_db, r_db, l_busy, r_busy;
  gtfe_cmd_e l_cmd, r_cmd;

  gtfe_cmd_decoder u_dec_l (
    .clk, .rst(rst_pad), .cmd_in(cmd_l), .chip_addr,
    .cmd_valid(l_cv), .cmd(l_cmd), .data_valid(l_dv), .data_bit(l_db), .busy(l_busy)
  );
  gtfe_cmd_decoder u_dec_r (
    .clk, .rst(rst_pad), .cmd_in(cmd_r), .chip_addr,
    .cmd_valid(r_cv), .cmd(r_cmd), .data_valid(r_dv), .data_bit(r_db), .busy(r_busy)
  );

  // ---------------- control register ----------------
  gtfe_cfg_t cfg;
  logic      soft_rst;
  logic      creg_shift, creg_in;

  // Data of a 001 command is taken from whichever line carries it; if both
  // do at once, the line of the current direction wins.
  always_comb begin
    creg_shift = l_dv | r_dv;
    if (l_dv && r_dv) creg_in = (cfg.dir == DIR_RIGHT) ? r_db : l_db;
    else              creg_in = r_dv ? r_db : l_db;
  end

  gtfe_ctrl_reg u_creg (
    .clk, .rst(rst_pad), .soft_rst, .shift_en(creg_shift), .shift_in(creg_in),
    .ser_out(creg_out), .cfg
  );

  // ---------------- command execution ----------------
  logic      sel_cv;
  gtfe_cmd_e sel_cmd;
  logic      do_read, do_strobe, do_clear, do_fifo_rst, do_end_read;

  assign sel_cv  = (cfg.dir == DIR_RIGHT) ? r_cv  : l_cv;
  assign sel_cmd = (cfg.dir == DIR_RIGHT) ? r_cmd : l_cmd;

  assign do_read     = sel_cv && (sel_cmd == CMD_READ_EVENT);
  assign do_strobe   = sel_cv && (sel_cmd == CMD_CAL_STROBE);
  assign do_clear    = sel_cv && (sel_cmd == CMD_CLEAR_EVT);
  assign soft_rst    = sel_cv && (sel_cmd == CMD_RESET_CHIP);
  assign do_fifo_rst = sel_cv && (sel_cmd == CMD_RESET_FIFO);
  assign do_end_read = sel_cv && (sel_cmd == CMD_END_READ);

  // ---------------- analog front end and DACs ----------------
  logic [AMP_W-1:0] cal_level, thr_level;
  logic [NCH-1:0]   disc;

  gtfe_dac #(.OFF_X10(62), .SLOPE_X10(60)) u_cal_dac (.code(cfg.cal_dac), .level_x10(cal_level));
  gtfe_dac #(.OFF_X10(54), .SLOPE_X10(55)) u_thr_dac (.code(cfg.thr_dac), .level_x10(thr_level));

  gtfe_analog_fe #(.CAL_PULSE_LEN(CAL_PULSE_LEN)) u_afe (
    .clk, .rst(rst_pad), .strip_amp, .cal_strobe(do_strobe), .cal_mask(cfg.cal_mask),
    .cal_level, .thr_level, .disc
  );

  // ---------------- trigger ----------------
  logic local_or;

  gtfe_trigger u_trig (
    .disc, .trig_mask(cfg.trig_mask), .dir(cfg.dir),
    .tri_r, .tli_l, .tro_r, .tlo_l, .local_or
  );

  // ---------------- event FIFO ----------------
  logic              tack_sel, tack_q, tack_rise;
  logic [NCH-1:0]    hits;
  logic [EVT_W-1:0]  evt_line, rd_line;
  logic [3:0]        fifo_count;
  logic              fifo_full, fifo_empty;

  assign tack_sel  = (cfg.dir == DIR_RIGHT) ? tack_r : tack_l;
  assign hits      = disc & cfg.chan_mask;
  assign evt_line  = {hits, |hits};

  always_ff @(posedge clk or posedge rst_pad) begin
    if (rst_pad) begin
      tack_q <= 1'b0;
    end else begin
      tack_q <= tack_sel;
      // Both controllers loading the control register in the same cycle
      // means the two ends disagree; the current direction wins.
      a_one_loader: assert (!(l_dv && r_dv))
        else $warning("control register data from both controllers at once");
    end
  end
  assign tack_rise = tack_sel & ~tack_q;

  gtfe_event_fifo u_fifo (
    .clk, .rst(rst_pad), .soft_rst, .wr_en(tack_rise), .wr_data(evt_line),
    .rd_en(do_read), .clr_en(do_clear), .ptr_rst(do_fifo_rst),
    .rd_data(rd_line), .count(fifo_count), .full(fifo_full), .empty(fifo_empty)
  );

  // ---------------- readout ----------------
  logic sr_din, sr_dout, sr_active, rdclk_sel;

  assign rdclk_sel = (cfg.dir == DIR_RIGHT) ? rdclk_r : rdclk_l;
  assign sr_din    = (cfg.dir == DIR_RIGHT) ? dri : dli;

  gtfe_readout_sr u_rosr (
    .clk, .rst(rst_pad), .soft_rst, .load(do_read), .load_data(rd_line),
    .stop(do_end_read), .shift_en(rdclk_sel), .din(sr_din),
    .dout(sr_dout), .active(sr_active)
  );

  assign dro = (cfg.dir == DIR_RIGHT) ? sr_dout : 1'b0;
  assign dlo = (cfg.dir == DIR_LEFT)  ? sr_dout : 1'b0;

endmodule
