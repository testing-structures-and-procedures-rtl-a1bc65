// tb_gtfe_plane: end-to-end test of a full plane of 25 GTFE64 chips at the
// default size, played from both ends of the hybrid.
//
// The testbench acts as the controller. For each direction (right, then
// left) it resets the plane, loads every chip's control register by its own
// address (different masks per chip, some chips with every channel masked
// so that they send only the zero-suppression bit), and then runs:
//   - a strip-signal event on the chip farthest from the controller and on
//     a middle chip: the trigger must ripple down the whole chain,
//   - a broadcast calibration strobe event,
//   - a broadcast read of each event through the full data daisy chain,
//     compared bit by bit with an independent model, followed by the
//     pattern fed into the far end of the chain,
//   - nine acknowledged events into the 8-event FIFOs (the ninth dropped),
//     read back in order, and a wrap-around read,
//   - a read stopped by end read after 30 clocks, a FIFO reset and clear
//     events.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_gtfe_plane;
  import gtfe_pkg::*;

  localparam int N = 25;

  logic clk = 1'b0;
  logic rst_pad, cmd_l, cmd_r, tack_l, tack_r, rdclk_l, rdclk_r;
  logic [AMP_W-1:0] strip_amp [N][NCH];
  logic tri_end, dri_end, tli_end, dli_end, tro_r, dro, tlo_l, dlo;
  logic [N-1:0] creg_out;

  int checks = 0, failures = 0;

  gtfe_plane dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("split-plane runs %0d", n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit right;
  logic [63:0] c_cal [N], c_chan [N], c_trig [N];
  localparam int CAL_X10 = 4 * (62 + 60 * 14);  // calibration DAC 14, range x4
  localparam int THR_X10 = 4 * (54 + 55 * 13);  // threshold DAC 13, range x4

  int n_trig_chain = 0, n_zero_supp = 0, n_broadcast = 0, n_fifo_full = 0;
  int n_stop_read = 0, n_fifo_reset = 0, n_clear = 0, n_dir_switch = 0, n_chain_read = 0;

  task automatic cbit(input logic b);
    if (right) cmd_r = b; else cmd_l = b;
    @(negedge clk);
    cmd_r = 0; cmd_l = 0;
  endtask

  task automatic send_cmd(input int a, input logic [2:0] c);
    cbit(1);
    for (int i = 0; i < 5; i++) cbit(1'(a >> i));
    for (int i = 2; i >= 0; i--) cbit(c[i]);
    cbit(0);
    if (a == 31) n_broadcast++;
  endtask

  task automatic load_chip(input int a);
    logic [206:0] p;
    for (int ch = 0; ch < 64; ch++) begin
      p[ch] = c_cal[a][ch]; p[127 - ch] = c_chan[a][ch]; p[128 + ch] = c_trig[a][ch];
    end
    p[198:192] = {6'd14, 1'b1};
    p[205:199] = {6'd13, 1'b1};
    p[206] = right;
    cbit(1);
    for (int i = 0; i < 5; i++) cbit(1'(a >> i));
    for (int i = 2; i >= 0; i--) cbit(i == 0);
    for (int i = 0; i < 207; i++) cbit(p[i]);
    cbit(0);
  endtask

  task automatic tack();
    if (right) tack_r = 1; else tack_l = 1;
    @(negedge clk);
    tack_r = 0; tack_l = 0;
  endtask

  // Expected serial stream at the controller for per-chip hit patterns.
  function automatic void exp_stream(input logic [63:0] h [N], input logic [19:0] pat,
                                     ref logic q [$]);
    q.delete();
    for (int k = 0; k < N; k++) begin
      int c = right ? (N - 1 - k) : k;     // nearest chip first
      if (h[c] != '0) begin
        q.push_back(1'b1);
        for (int ch = 0; ch < 64; ch++) q.push_back(h[c][ch]);
      end else q.push_back(1'b0);
    end
    for (int i = 0; i < 20; i++) q.push_back(pat[i]);
  endfunction

  // Broadcast read event, nclk readout clocks, end read; returns samples.
  task automatic read_event(input int nclk, input logic [19:0] pat, ref logic q [$]);
    int s = 0;
    q.delete();
    if (right) rdclk_r = 1; else rdclk_l = 1;
    send_cmd(31, 3'b010);
    for (int i = 0; i < nclk; i++) begin
      if (right) dri_end = (s < 20) ? pat[s] : 1'b0;
      else       dli_end = (s < 20) ? pat[s] : 1'b0;
      q.push_back(right ? dro : dlo);
      @(negedge clk);
      s++;
    end
    dri_end = 0; dli_end = 0;
    send_cmd(31, 3'b111);
  endtask

  task automatic read_check(input logic [63:0] h [N], input string tag);
    logic e [$], q [$];
    logic [19:0] pat = 20'h9E3B1;
    int zs = 0;
    exp_stream(h, pat, e);
    read_event(e.size() + 10, pat, q);
    for (int i = 0; i < e.size(); i++) check(q[i] == e[i], $sformatf("%s bit %0d", tag, i));
    for (int i = e.size(); i < q.size(); i++) check(q[i] == 1'b0, $sformatf("%s tail %0d", tag, i));
    for (int c = 0; c < N; c++) if (h[c] == '0) zs++;
    if (zs > 0) n_zero_supp++;
    n_chain_read++;
  endtask

  function automatic logic [63:0] seq(input int a, input int s);
    logic [63:0] m = '0;
    for (int ch = a; ch < 64; ch += s) m[ch] = 1'b1;
    return m;
  endfunction

  task automatic clear_strips();
    for (int c = 0; c < N; c++) for (int ch = 0; ch < 64; ch++) strip_amp[c][ch] = '0;
  endtask

  task automatic run(input bit r);
    logic [63:0] hA [N], hB [N], hF [9][N], none [N];
    logic q [$];
    int far = r ? 0 : N - 1;
    right = r;
    rst_pad = 1; @(negedge clk); rst_pad = 0; @(negedge clk);
    // per-chip settings
    for (int c = 0; c < N; c++) begin
      c_cal[c]  = seq(c % 3, 3);
      c_chan[c] = (c % 4 == 1) ? '0 : '1;
      c_trig[c] = '1;
      load_chip(c);
    end
    send_cmd(31, 3'b110);  n_fifo_reset++;
    for (int c = 0; c < N; c++) none[c] = '0;

    // Event A: strip signals on the far chip and on chip 12.
    clear_strips();
    strip_amp[far][7] = 16'(THR_X10 + 200);
    strip_amp[far][40] = 16'(THR_X10 + 1);
    strip_amp[12][63] = 16'(THR_X10 + 500);
    strip_amp[12][0] = 16'(THR_X10);        // at threshold: no hit
    @(negedge clk);
    check((r ? tro_r : tlo_l) == 1'b1, "trigger at the chain end");
    check((r ? tlo_l : tro_r) == 1'b0, "no trigger at the other end");
    n_trig_chain++;
    for (int c = 0; c < N; c++) hA[c] = '0;
    hA[far][7] = 1; hA[far][40] = 1; hA[12][63] = 1;
    for (int c = 0; c < N; c++) hA[c] &= c_chan[c];
    tack();
    clear_strips();
    @(negedge clk);
    check(tro_r == 0 && tlo_l == 0, "trigger gone with the signal");

    // Event B: broadcast calibration strobe.
    send_cmd(31, 3'b011);
    repeat (3) @(negedge clk);
    check((r ? tro_r : tlo_l) == 1'b1, "calibration trigger at the chain end");
    repeat (9) @(negedge clk);
    tack();
    for (int c = 0; c < N; c++) hB[c] = (CAL_X10 > THR_X10) ? (c_cal[c] & c_chan[c]) : '0;
    repeat (25) @(negedge clk);

    read_check(hA, "event A");
    read_check(hB, "event B");

    // Stopped read of event A again after FIFO reset: 30 clocks then zeros.
    send_cmd(31, 3'b110); n_fifo_reset++;
    begin
      logic e [$];
      exp_stream(hA, 20'h0, e);
      read_event(30, 20'h0, q);
      for (int i = 0; i < 30; i++) check(q[i] == e[i], $sformatf("stopped read bit %0d", i));
      if (r) rdclk_r = 1; else rdclk_l = 1;
      for (int i = 0; i < 70; i++) begin
        check((r ? dro : dlo) == 1'b0, "zeros after end read");
        @(negedge clk);
      end
      n_stop_read++;
    end
    // Clear event: skip A (now at line 1), read B.
    send_cmd(31, 3'b110); n_fifo_reset++;
    send_cmd(31, 3'b100); n_clear++;
    read_check(hB, "event B after clear event");

    // FIFO: nine events, each with one hit on chip e, channel 5*e.
    send_cmd(31, 3'b110); n_fifo_reset++;
    for (int e = 0; e < 9; e++) begin
      int c = (e * 3) % N;
      if (c % 4 == 1) c++;   // skip chips whose channels are masked
      clear_strips();
      strip_amp[c][5 * e] = 16'(THR_X10 + 100);
      for (int k = 0; k < N; k++) hF[e][k] = '0;
      hF[e][c][5 * e] = 1;
      @(negedge clk);
      tack();
    end
    clear_strips();
    n_fifo_full++;
    for (int e = 0; e < 8; e++) read_check(hF[e], $sformatf("FIFO event %0d", e));
    // ninth write was dropped: the next read wraps to line 0
    read_check(hF[0], "FIFO wrap: ninth event dropped");
  endtask

  // Split plane: chips 0..SPLIT-1 work to the left, the rest to the right,
  // as after a broken link in the middle of the hybrid. Each half is
  // strobed, acknowledged and read by its own controller.
  localparam int SPLIT = 12;
  int n_split = 0;

  task automatic split_run();
    logic q [$], e [$];
    rst_pad = 1; @(negedge clk); rst_pad = 0; @(negedge clk);
    for (int c = 0; c < N; c++) begin
      right = (c >= SPLIT);
      c_cal[c] = seq((c + 1) % 3, 3); c_chan[c] = (c % 5 == 2) ? '0 : '1; c_trig[c] = '1;
      load_chip(c);
    end
    for (int side = 0; side < 2; side++) begin
      right = (side == 1);
      send_cmd(31, 3'b110);
      send_cmd(31, 3'b011);
      repeat (3) @(negedge clk);
      check((right ? tro_r : tlo_l) == 1'b1, "split: trigger at own end");
      repeat (9) @(negedge clk);
      tack();
      repeat (25) @(negedge clk);
    end
    for (int side = 0; side < 2; side++) begin
      right = (side == 1);
      e.delete();
      for (int k = 0; k < N; k++) begin
        int c = right ? (N - 1 - k) : k;
        if ((c >= SPLIT) != right) continue;  // other half adds nothing
        if ((c_cal[c] & c_chan[c]) != '0) begin
          e.push_back(1'b1);
          for (int ch = 0; ch < 64; ch++) e.push_back(c_cal[c][ch] & c_chan[c][ch]);
        end else e.push_back(1'b0);
      end
      read_event(e.size() + 40, 20'hFFFFF, q);
      for (int i = 0; i < e.size(); i++) check(q[i] == e[i], $sformatf("split side %0d bit %0d", side, i));
      // the far-end input is cut off by the other half of the plane
      for (int i = e.size(); i < q.size(); i++) check(q[i] == 1'b0, $sformatf("split side %0d tail %0d", side, i));
    end
    n_split++;
  endtask

  initial begin
    rst_pad = 1; cmd_l = 0; cmd_r = 0; tack_l = 0; tack_r = 0; rdclk_l = 0; rdclk_r = 0;
    tri_end = 0; dri_end = 0; tli_end = 0; dli_end = 0;
    clear_strips();
    repeat (3) @(negedge clk);
    rst_pad = 0;
    run(1'b1);
    n_dir_switch++;
    run(1'b0);
    // chain-end trigger inputs pass through the whole plane
    tli_end = 1; @(negedge clk);
    check(tlo_l == 1'b1, "left chain end trigger input reaches chip 0 output");
    tli_end = 0; @(negedge clk);
    check(tlo_l == 1'b0, "left chain end trigger input released");
    split_run();

    begin
      int m [10];
      m = '{n_trig_chain, n_zero_supp, n_broadcast, n_fifo_full, n_stop_read,
            n_fifo_reset, n_clear, n_dir_switch, n_chain_read, n_split};
      foreach (m[i]) check(m[i] > 0, $sformatf("mechanism %0d exercised", i));
    end
    $display("trigger chain %0d, zero-suppressed reads %0d, broadcasts %0d, FIFO full %0d,",
             n_trig_chain, n_zero_supp, n_broadcast, n_fifo_full);
    $display("stopped reads %0d, FIFO resets %0d, clear events %0d, direction switches %0d, chain reads %0d",
             n_stop_read, n_fifo_reset, n_clear, n_dir_switch, n_chain_read);
    $display("split-plane runs %0d", n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
