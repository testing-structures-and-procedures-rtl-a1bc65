// gtfe_plane: readout of one tracker plane, NCHIPS GTFE64 chips in a row.
//
// A plane is five ladders of 320 strips, each read by five 64-channel chips,
// so 25 chips in all, each given its index as hard-wired address. A
// controller sits at each end. Each controller's command line, trigger
// acknowledge and readout clock are bussed to all chips; triggers and
// serial data are daisy-chained chip to chip towards the controller each
// chip has been told to work with. Chip i's right-going outputs (tro_r,
// dro) feed chip i+1; chip i's left-going outputs (tlo_l, dlo) feed chip
// i-1. The chain ends are ports: tro_r/dro leave the last chip, tlo_l/dlo
// leave chip 0, and tri_end/dri_end (chip 0) and tli_end/dli_end (last chip)
// are the open inputs at the far ends. The controllers themselves are not
// part of this module.
//
// From the document: 25 chips, 5-bit addresses, bussed commands and
// daisy-chained trigger and data. Own choices: chip index order from left
// to right equals the address, one common clock.
module gtfe_plane
  import gtfe_pkg::*;
#(
  parameter int unsigned NCHIPS        = 25,
  parameter int unsigned CAL_PULSE_LEN = 20
) (
  input  logic             clk,
  input  logic             rst_pad,
  input  logic             cmd_l,
  input  logic             cmd_r,
  input  logic             tack_l,
  input  logic             tack_r,
  input  logic             rdclk_l,
  input  logic             rdclk_r,
  input  logic [AMP_W-1:0] strip_amp [NCHIPS][NCH],
  input  logic             tri_end,
  input  logic             dri_end,
  input  logic             tli_end,
  input  logic             dli_end,
  output logic             tro_r,
  output logic             dro,
  output logic             tlo_l,
  output logic             dlo,
  output logic [NCHIPS-1:0] creg_out
);

  // Right-going chain: r_t[i]/r_d[i] enter chip i, r_t[i+1]/r_d[i+1] leave it.
  // Left-going chain: l_t[i+1]/l_d[i+1] enter chip i, l_t[i]/l_d[i] leave it.
  logic [NCHIPS:0] r_t, r_d, l_t, l_d;

  assign r_t[0]      = tri_end;
  assign r_d[0]      = dri_end;
  assign l_t[NCHIPS] = tli_end;
  assign l_d[NCHIPS] = dli_end;
  assign tro_r = r_t[NCHIPS];
  assign dro   = r_d[NCHIPS];
  assign tlo_l = l_t[0];
  assign dlo   = l_d[0];

  for (genvar i = 0; i < int'(NCHIPS); i++) begin : g_chip
    gtfe64 #(.CAL_PULSE_LEN(CAL_PULSE_LEN)) u_chip (
      .clk, .rst_pad,
      .chip_addr(ADDR_W'(i)),
      .cmd_l, .cmd_r, .tack_l, .tack_r, .rdclk_l, .rdclk_r,
      .strip_amp(strip_amp[i]),
      .tri_r(r_t[i]),   .tro_r(r_t[i+1]),
      .tli_l(l_t[i+1]), .tlo_l(l_t[i]),
      .dri(r_d[i]),     .dro(r_d[i+1]),
      .dli(l_d[i+1]),   .dlo(l_d[i]),
      .creg_out(creg_out[i])
    );
  end

  initial assert (NCHIPS < 32) else $error("NCHIPS must leave address 31 for broadcast");

endmodule
