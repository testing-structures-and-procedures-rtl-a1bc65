// gtfe_cmd_decoder: serial command decoder of one command line.
//
// The GTFE64 has two of these, one on the command line from the left
// controller and one on the line from the right one. A command is sent one
// bit per clock: a start bit of 1, the 5-bit chip address least significant
// bit first, then the 3-bit command. The command "load control register"
// (001) is followed by 207 data bits. The decoder accepts a command when the
// address equals the chip's hard-wired address or the broadcast address 11111.
// The 207 data bits that follow a 001 command are always consumed, also when
// the command was for another chip, so that they are never taken for a new
// start bit.
//
// Interface and timing: cmd_in is sampled on every rising clock edge. One
// cycle after the last command bit, cmd_valid pulses for one cycle with the
// command in cmd (only for a matching address). Each data bit of an accepted
// 001 command appears on data_bit with data_valid one cycle after it is
// sampled. rst is the chip's reset pad (asynchronous, active high).
//
// From the document: frame format, address rule, 207-bit data length.
// Own choices: commands are sent with the printed leftmost digit first, and
// the first data bit follows the last command bit without a gap.
module gtfe_cmd_decoder
  import gtfe_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              cmd_in,
  input  logic [ADDR_W-1:0] chip_addr,
  output logic              cmd_valid,
  output gtfe_cmd_e         cmd,
  output logic              data_valid,
  output logic              data_bit,
  output logic              busy
);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_CMD, S_DATA} state_e;

  state_e            state;
  logic [7:0]        cnt;
  logic [ADDR_W-1:0] addr_sr;
  logic [CMD_W-1:0]  cmd_sr;
  logic              match;

  // Address bits arrive LSB first: shift in from the top.
  assign match = (addr_sr == chip_addr) || (addr_sr == BCAST_ADDR);
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      addr_sr    <= '0;
      cmd_sr     <= '0;
      cmd_valid  <= 1'b0;
      cmd        <= CMD_NOP;
      data_valid <= 1'b0;
      data_bit   <= 1'b0;
    end else begin
      // A frame delivers either its command or one of its data bits in a cycle.
      a_cmd_or_data: assert (!(cmd_valid && data_valid))
        else $error("command and data reported in the same cycle");
      cmd_valid  <= 1'b0;
      data_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_in) begin
            state <= S_ADDR;
            cnt   <= '0;
          end
        end
        S_ADDR: begin
          addr_sr <= {cmd_in, addr_sr[ADDR_W-1:1]};
          if (cnt == 8'(ADDR_W - 1)) begin
            state <= S_CMD;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_CMD: begin
          cmd_sr <= {cmd_sr[CMD_W-2:0], cmd_in};
          if (cnt == 8'(CMD_W - 1)) begin
            cnt <= '0;
            if (match) begin
              cmd_valid <= 1'b1;
              cmd       <= gtfe_cmd_e'({cmd_sr[CMD_W-2:0], cmd_in});
            end
            if ({cmd_sr[CMD_W-2:0], cmd_in} == CMD_LOAD_CREG) state <= S_DATA;
            else                                              state <= S_IDLE;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_DATA: begin
          data_valid <= match;
          data_bit   <= cmd_in;
          if (cnt == 8'(CREG_LEN - 1)) state <= S_IDLE;
          else                        cnt   <= cnt + 8'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
