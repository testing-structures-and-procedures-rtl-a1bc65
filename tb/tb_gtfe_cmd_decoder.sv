// tb_gtfe_cmd_decoder: self-checking test of the serial command decoder.
//
// Sends command frames (start bit, address LSB first, 3 command bits, and
// 207 data bits after a 001) to a decoder with address 17 and checks:
// every command to address 17 or 31 is reported exactly one clock after its
// last bit, commands to other addresses are ignored, the 207 data bits of a
// load are delivered in order, and data sent to another chip (full of 1s)
// is skipped without being taken for new commands.
module tb_gtfe_cmd_decoder;
  import gtfe_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic cmd_in;
  logic [ADDR_W-1:0] chip_addr;
  logic cmd_valid, data_valid, data_bit, busy;
  gtfe_cmd_e cmd;

  int checks = 0, failures = 0;
  int cyc = 0;

  gtfe_cmd_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // What was observed.
  gtfe_cmd_e got_cmd [$];
  int        got_cyc [$];
  logic      got_data [$];

  always @(posedge clk) begin
    if (cmd_valid) begin got_cmd.push_back(cmd); got_cyc.push_back(cyc); end
    if (data_valid) got_data.push_back(data_bit);
  end

  task automatic send_bit(input logic b);
    cmd_in = b;
    @(posedge clk);
    #1;
  endtask

  int last_bit_cyc;

  task automatic send_cmd(input logic [4:0] a, input logic [2:0] c);
    send_bit(1'b1);
    for (int i = 0; i < 5; i++) send_bit(a[i]);
    for (int i = 2; i >= 0; i--) begin
      if (i == 0) last_bit_cyc = cyc;
      send_bit(c[i]);
    end
  endtask

  task automatic send_data(input logic [CREG_LEN-1:0] d);
    for (int i = 0; i < int'(CREG_LEN); i++) send_bit(d[i]);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_cmd(input logic [2:0] c, input string what);
    repeat (2) @(posedge clk);
    #1;
    check(got_cmd.size() == 1, {what, ": one command reported"});
    if (got_cmd.size() == 1) begin
      check(got_cmd[0] == gtfe_cmd_e'(c), {what, ": command code"});
      check(got_cyc[0] == last_bit_cyc + 1, {what, ": reported one clock after last bit"});
    end
    got_cmd.delete(); got_cyc.delete();
  endtask

  task automatic expect_none(input string what);
    repeat (2) @(posedge clk);
    #1;
    check(got_cmd.size() == 0, {what, ": no command reported"});
    got_cmd.delete(); got_cyc.delete();
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [CREG_LEN-1:0] pattern;
  int other_addr [8] = '{0, 1, 2, 4, 8, 16, 19, 30};

  initial begin
    chip_addr = 5'd17;
    cmd_in = 1'b0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    got_cmd.delete(); got_cyc.delete(); got_data.delete();

    // Every command except 001 to own address.
    for (int c = 2; c < 8; c++) begin
      send_cmd(5'd17, 3'(c));
      send_bit(1'b0);
      expect_cmd(3'(c), $sformatf("own address cmd %0d", c));
    end
    // Broadcast.
    send_cmd(5'd31, 3'b010); send_bit(1'b0);
    expect_cmd(3'b010, "broadcast read event");
    // Other addresses: 0, single-1 addresses, 16, 19.
    foreach (other_addr[k]) begin
      automatic int a = other_addr[k];
      send_cmd(5'(a), 3'b011); send_bit(1'b0);
      expect_none($sformatf("address %0d ignored", a));
    end
    // Load for another chip with all-ones data: must be skipped.
    send_cmd(5'd3, 3'b001);
    send_data('1);
    send_bit(1'b0);
    expect_none("load for other chip");
    check(got_data.size() == 0, "no data bits for other chip's load");
    check(!busy, "decoder idle after skipped data");
    // A command straight after must still decode.
    send_cmd(5'd17, 3'b110); send_bit(1'b0);
    expect_cmd(3'b110, "command after skipped load");
    // Load for this chip: random pattern.
    for (int i = 0; i < int'(CREG_LEN); i++) pattern[i] = 1'($urandom);
    send_cmd(5'd17, 3'b001);
    send_data(pattern);
    send_bit(1'b0);
    expect_cmd(3'b001, "load command");
    check(got_data.size() == int'(CREG_LEN), "207 data bits delivered");
    if (got_data.size() == int'(CREG_LEN))
      for (int i = 0; i < int'(CREG_LEN); i++)
        check(got_data[i] == pattern[i], $sformatf("data bit %0d", i + 1));
    // Reset in the middle of a frame.
    send_bit(1'b1); send_bit(1'b1);
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    check(!busy, "reset returns decoder to idle");
    send_cmd(5'd17, 3'b100); send_bit(1'b0);
    expect_cmd(3'b100, "command after reset");

    // Address bit order: chip 6 (00110) must not answer 12 (01100).
    chip_addr = 5'd6;
    send_cmd(5'd6, 3'b011); send_bit(1'b0);
    expect_cmd(3'b011, "address 6, LSB first");
    send_cmd(5'd12, 3'b011); send_bit(1'b0);
    expect_none("address 12 ignored by chip 6");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
