// gtfe_readout_sr: data output shift register of the GTFE64, with zero
// suppression and the serial daisy chain.
//
// load copies one FIFO line (bit 0 = hit flag, bits 1..64 = channels 0..63)
// into the register and starts the readout. While the readout runs, every
// clock with shift_en (the readout clock from the controller) moves the
// register one place towards dout, and the bit on din (the data output of
// the previous chip in the chain) enters behind the chip's own data. So the
// chip sends its flag, then channels 0..63, and then passes on whatever the
// chips before it send. When the flag is 0 (no hit) the register acts as a
// single bit: the chip sends one 0 and then passes din on at once (zero
// suppression). stop (end read event command) disables the readout clock:
// dout returns to 0 and the register holds.
//
// From the document: 64+1 bit register, flag first, the daisy chain, zero
// suppression to a single 0, end read making the chip ignore the readout
// clock. Own choice: dout is 0 while no readout runs; channel 0 is sent
// right after the flag.
//
// Timing: dout is a register output, so the bit entering on din appears on
// dout after LEN clocks of shift_en, LEN being 65 or 1.
module gtfe_readout_sr
  import gtfe_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             soft_rst,
  input  logic             load,
  input  logic [EVT_W-1:0] load_data,
  input  logic             stop,
  input  logic             shift_en,
  input  logic             din,
  output logic             dout,
  output logic             active
);

  logic [EVT_W-1:0] sr;
  logic             full_len;  // 1: 65-bit register, 0: zero-suppressed single bit

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr       <= '0;
      full_len <= 1'b0;
      active   <= 1'b0;
    end else if (soft_rst) begin
      sr       <= '0;
      full_len <= 1'b0;
      active   <= 1'b0;
    end else if (load) begin
      sr       <= load_data;
      full_len <= load_data[0];
      active   <= 1'b1;
    end else if (stop) begin
      active <= 1'b0;
    end else if (active && shift_en) begin
      if (full_len) sr <= {din, sr[EVT_W-1:1]};
      else          sr[0] <= din;
    end
  end

  assign dout = active & sr[0];

endmodule
