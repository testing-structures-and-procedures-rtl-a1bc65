// gtfe_event_fifo: the 8-event buffer of the GTFE64.
//
// Each line is 65 bits: bit 0 says whether the chip saw any hit, bits 1..64
// are channels 0..63. A write (on trigger acknowledge) stores a line at the
// write pointer and advances it. A read (read event command) presents the
// line at the read pointer on rd_data and advances the read pointer; a
// clear (clear event command) advances the read pointer without using the
// line. Reset FIFO sets both pointers to line 0 without erasing any line.
// The occupancy count stops writes once 8 events are held.
//
// From the document: 8 events of 65 bits, the two pointers, the write on
// trigger acknowledge, read, clear event and reset FIFO. Own choices:
// reset FIFO puts both pointers at line 0; read and clear move the read
// pointer also when no event is counted (the chip tests read back an old
// event after a FIFO reset and two clear events, which needs this); a write
// into a full FIFO is dropped; the chip reset (pad or command) also clears
// the lines.
//
// Timing: rd_data is combinational from the read pointer, so a consumer
// takes it in the same cycle as rd_en. All updates happen at the rising edge.
module gtfe_event_fifo
  import gtfe_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  parameter int unsigned WIDTH = EVT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             soft_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic             clr_en,
  input  logic             ptr_rst,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic             full,
  output logic             empty
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en || clr_en;
  assign rd_data = mem[rptr];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (soft_rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (ptr_rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      // The occupancy can never pass the depth.
      a_count_bound: assert (count <= CW'(DEPTH)) else $error("FIFO count above depth");
      if (do_wr) begin
        mem[wptr] <= wr_data;
        wptr      <= inc(wptr);
      end
      if (do_rd) rptr <= inc(rptr);
      if (do_wr && !(do_rd && !empty))      count <= count + 1'b1;
      else if (!do_wr && do_rd && !empty)   count <= count - 1'b1;
    end
  end

endmodule
