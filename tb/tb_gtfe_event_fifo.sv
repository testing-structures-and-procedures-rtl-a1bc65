// tb_gtfe_event_fifo: checks the 8-event FIFO.
//
// Directed part: eight events are written and read back in order, a ninth
// write into the full FIFO is dropped, and after a FIFO reset two clear
// events and one read return the third stored event (lines are kept by the
// reset). Random part: random writes, reads, clears and resets against a
// reference model of the pointers and lines.
module tb_gtfe_event_fifo;
  import gtfe_pkg::*;

  logic clk = 1'b0;
  logic rst, soft_rst, wr_en, rd_en, clr_en, ptr_rst, full, empty;
  logic [EVT_W-1:0] wr_data, rd_data;
  logic [3:0] count;
  int checks = 0, failures = 0;

  gtfe_event_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference model.
  logic [EVT_W-1:0] m_mem [8];
  int m_w, m_r, m_n;

  task automatic step(input logic w, input logic r, input logic c, input logic p,
                      input logic [EVT_W-1:0] d);
    wr_en = w; rd_en = r; clr_en = c; ptr_rst = p; wr_data = d;
    #1;
    if (r) check(rd_data == m_mem[m_r], $sformatf("read data at line %0d", m_r));
    check(full == (m_n == 8), "full flag");
    check(empty == (m_n == 0), "empty flag");
    check(int'(count) == m_n, "count");
    @(posedge clk);
    if (p) begin m_w = 0; m_r = 0; m_n = 0; end
    else begin
      automatic bit dw = w && (m_n < 8);
      automatic bit dr = r || c;
      if (dw) begin m_mem[m_w] = d; m_w = (m_w + 1) % 8; end
      if (dr) m_r = (m_r + 1) % 8;
      if (dw && !(dr && m_n > 0)) m_n++;
      else if (!dw && dr && m_n > 0) m_n--;
    end
    #1;
    wr_en = 0; rd_en = 0; clr_en = 0; ptr_rst = 0;
  endtask

  function automatic logic [EVT_W-1:0] rnd_line();
    return {$urandom, $urandom, 1'($urandom)};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [EVT_W-1:0] ev [9];

  initial begin
    rst = 1'b1; soft_rst = 0; wr_en = 0; rd_en = 0; clr_en = 0; ptr_rst = 0; wr_data = '0;
    for (int i = 0; i < 8; i++) m_mem[i] = '0;
    m_w = 0; m_r = 0; m_n = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // Fill with 8 events plus one that must be dropped.
    for (int i = 0; i < 9; i++) begin ev[i] = rnd_line(); step(1, 0, 0, 0, ev[i]); end
    check(full, "full after 8 events");
    for (int i = 0; i < 8; i++) begin
      wr_en = 0; #1;
      check(rd_data == ev[i], $sformatf("event %0d read in order", i));
      step(0, 1, 0, 0, '0);
    end
    check(empty, "empty after 8 reads");
    // Reset FIFO, skip two, read the third.
    step(0, 0, 0, 1, '0);
    step(0, 0, 1, 0, '0);
    step(0, 0, 1, 0, '0);
    #1 check(rd_data == ev[2], "third event after reset and two clears");
    // Random operations.
    for (int i = 0; i < 3000; i++) begin
      automatic int k = $urandom_range(0, 99);
      step(k < 45, k >= 45 && k < 80, k >= 80 && k < 95, k >= 98, rnd_line());
    end
    // Reset chip clears lines and pointers.
    soft_rst = 1; @(posedge clk); #1 soft_rst = 0;
    check(rd_data == '0 && empty, "reset chip clears FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
