// tb_gtfe64: chip-level test of the GTFE64, following the wafer test
// sequence used for the chip, once with the chip working towards the right
// controller and once towards the left one.
//
// For each direction: control register load and read-back through the
// control register output, reset chip, calibration-mask test (every third
// channel, three offsets), channel-mask test (zero suppression), trigger-mask
// test, DAC high/low test, stopped readout (end read after 30 clocks), FIFO
// test (eight events with different channel masks, then FIFO reset, two
// clear events and a read of the third), trigger chain input to output, and
// address decoding (single-1 addresses, all zeros, broadcast). Expected data
// comes from an independent model of masks and DAC levels in this file.
module tb_gtfe64;
  import gtfe_pkg::*;

  logic clk = 1'b0;
  logic rst_pad;
  logic [4:0] chip_addr;
  logic cmd_l, cmd_r, tack_l, tack_r, rdclk_l, rdclk_r;
  logic [AMP_W-1:0] strip_amp [NCH];
  logic tri_r, tro_r, tli_l, tlo_l, dri, dro, dli, dlo, creg_out;

  int checks = 0, failures = 0;

  gtfe64 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test-program state ----------------
  bit        side_right;      // commandOn / ctrlDir
  int        send_addr;       // address: NN
  logic [63:0] m_cal, m_chan, m_trig;
  int        cal_val, thr_val;
  bit        cal_hi, thr_hi;

  // Independent model of the DAC equations (in tenths).
  function automatic int cal_x10();
    int v = 62 + 60 * cal_val; return cal_hi ? 4 * v : v;
  endfunction
  function automatic int thr_x10();
    int v = 54 + 55 * thr_val; return thr_hi ? 4 * v : v;
  endfunction

  // Serial string, p[k-1] = bit k.
  function automatic logic [206:0] creg_string();
    logic [206:0] p;
    for (int ch = 0; ch < 64; ch++) begin
      p[ch]            = m_cal[ch];
      p[64 + 63 - ch]  = m_chan[ch];
      p[128 + ch]      = m_trig[ch];
    end
    p[192] = cal_hi;
    for (int b = 0; b < 6; b++) p[193 + b] = 1'((cal_val >> b) & 1);
    p[199] = thr_hi;
    for (int b = 0; b < 6; b++) p[200 + b] = 1'((thr_val >> b) & 1);
    p[206] = side_right;
    return p;
  endfunction

  // "mask: x a-b-s" : 1 on every s-th channel from a to b
  function automatic logic [63:0] seq(input int a, input int b, input int s);
    logic [63:0] m = '0;
    for (int ch = a; ch <= b; ch += s) m[ch] = 1'b1;
    return m;
  endfunction

  task automatic drive_cmd_bit(input logic b);
    if (side_right) cmd_r = b; else cmd_l = b;
    @(negedge clk);
    cmd_r = 1'b0; cmd_l = 1'b0;
  endtask

  task automatic send_cmd(input logic [2:0] c);
    drive_cmd_bit(1'b1);
    for (int i = 0; i < 5; i++) drive_cmd_bit(1'(send_addr >> i));
    for (int i = 2; i >= 0; i--) drive_cmd_bit(c[i]);
    drive_cmd_bit(1'b0);     // command executes during this clock
  endtask

  // "register:" - returns what came out of the control register output.
  task automatic register_cmd(output logic [206:0] old_bits);
    logic [206:0] p = creg_string();
    drive_cmd_bit(1'b1);
    for (int i = 0; i < 5; i++) drive_cmd_bit(1'(send_addr >> i));
    for (int i = 2; i >= 0; i--) drive_cmd_bit(i == 0);
    for (int i = 0; i < 207; i++) begin
      if (side_right) cmd_r = p[i]; else cmd_l = p[i];
      @(negedge clk);
      // data bit i is shifted in one clock later; the bit it pushes out is
      // on the output now
      old_bits[i] = creg_out;
    end
    cmd_r = 0; cmd_l = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic pulse_tack();
    if (side_right) tack_r = 1; else tack_l = 1;
    @(negedge clk);
    tack_r = 0; tack_l = 0;
  endtask

  // strobe, watch the trigger for 12 clocks, then trigger acknowledge
  task automatic strobe_and_tack(output int trig_cycles, output int wrong_side);
    trig_cycles = 0; wrong_side = 0;
    send_cmd(3'b011);
    for (int t = 0; t < 12; t++) begin
      if (side_right ? tro_r : tlo_l) trig_cycles++;
      if (side_right ? tlo_l : tro_r) wrong_side++;
      @(negedge clk);
    end
    pulse_tack();
    repeat (25) @(negedge clk);   // calibration pulse over
  endtask

  // read event with a data-input pattern, nclk readout clocks, end read
  task automatic read_event(input int nclk, input logic [19:0] pat, output logic q [$]);
    int shifts = 0;
    q.delete();
    if (side_right) rdclk_r = 1; else rdclk_l = 1;
    send_cmd(3'b010);
    // the readout register is loaded at the end of send_cmd's last clock
    for (int i = 0; i < nclk; i++) begin
      if (side_right) dri = (shifts < 20) ? pat[shifts] : 1'b0;
      else            dli = (shifts < 20) ? pat[shifts] : 1'b0;
      q.push_back(side_right ? dro : dlo);
      check((side_right ? dlo : dro) == 1'b0, "other data output idle");
      @(negedge clk);
      shifts++;
    end
    dri = 0; dli = 0;
    send_cmd(3'b111);
  endtask

  // expected hits of a calibration strobe
  function automatic logic [63:0] exp_hits();
    logic [63:0] h = '0;
    for (int ch = 0; ch < 64; ch++)
      h[ch] = m_cal[ch] && (cal_x10() > thr_x10()) && m_chan[ch];
    return h;
  endfunction

  function automatic int exp_trig();
    for (int ch = 0; ch < 64; ch++)
      if (m_cal[ch] && (cal_x10() > thr_x10()) && m_trig[ch]) return 1;
    return 0;
  endfunction

  task automatic check_stream(input logic q [$], input logic [63:0] h, input logic [19:0] pat,
                              input string tag);
    logic e [$];
    if (h != '0) begin
      e.push_back(1'b1);
      for (int ch = 0; ch < 64; ch++) e.push_back(h[ch]);
    end else e.push_back(1'b0);
    for (int i = 0; i < 20; i++) e.push_back(pat[i]);
    check(q.size() >= e.size(), {tag, ": enough bits"});
    for (int i = 0; i < e.size() && i < q.size(); i++)
      check(q[i] == e[i], $sformatf("%s: bit %0d", tag, i));
    for (int i = e.size(); i < q.size(); i++)
      check(q[i] == 1'b0, $sformatf("%s: trailing bit %0d", tag, i));
  endtask

  // one strobe-tack-read cycle with checks
  task automatic strobe_read_check(input string tag);
    int tc, ws;
    logic q [$];
    logic [19:0] pat = 20'h5A1C3;
    strobe_and_tack(tc, ws);
    check((tc > 0) == (exp_trig() == 1), {tag, ": trigger seen as expected"});
    check(ws == 0, {tag, ": no trigger on the other side"});
    read_event(100, pat, q);
    check_stream(q, exp_hits(), pat, tag);
  endtask

  task automatic set_default_refs();
    m_cal = '0; m_chan = '1; m_trig = '1;
    cal_val = 14; cal_hi = 1; thr_val = 13; thr_hi = 1;
  endtask

  int mech_zero_supp = 0, mech_full_fifo = 0, mech_stop_read = 0, mech_broadcast = 0;

  task automatic run_direction(input bit right);
    logic [206:0] out1, out2, p;
    logic q [$];
    int tc, ws;
    string d = right ? "R" : "L";

    side_right = right;
    send_addr  = 17;
    chip_addr  = 5'd17;
    set_default_refs();
    m_cal = seq(0, 63, 3); m_chan = seq(1, 63, 3); m_trig = seq(2, 36, 3);

    // --- control register ---
    rst_pad = 1; @(negedge clk); rst_pad = 0; @(negedge clk);
    register_cmd(out1);
    check(out1 == '0, {d, " creg: default settings read back"});
    p = creg_string();
    register_cmd(out2);
    check(out2 == p, {d, " creg: loaded pattern read back"});
    send_cmd(3'b101);   // reset chip
    register_cmd(out1);
    check(out1 == '0, {d, " creg: reset chip restores defaults"});

    // --- calibration mask ---
    for (int k = 0; k < 3; k++) begin
      set_default_refs(); m_cal = seq(k, 63, 3);
      register_cmd(out1);
      send_cmd(3'b110);
      repeat (20) @(negedge clk);
      strobe_read_check($sformatf("%s calib mask %0d", d, k));
    end
    // --- channel mask (zero suppression) ---
    for (int k = 0; k < 3; k++) begin
      set_default_refs(); m_cal = seq(k, 63, 3); m_chan = ~m_cal;
      register_cmd(out1);
      send_cmd(3'b110);
      strobe_read_check($sformatf("%s chan mask %0d", d, k));
      mech_zero_supp++;
    end
    // --- trigger mask ---
    for (int k = 0; k < 3; k++) begin
      set_default_refs(); m_cal = seq(k, 63, 3); m_trig = ~m_cal;
      register_cmd(out1);
      send_cmd(3'b110);
      strobe_read_check($sformatf("%s trig mask %0d", d, k));
    end
    // --- DACs: high calibration, then calibration below threshold ---
    set_default_refs(); m_cal = '1; cal_val = 40;
    register_cmd(out1); send_cmd(3'b110);
    strobe_read_check({d, " DAC high"});
    set_default_refs(); m_cal = '1; cal_val = 2; cal_hi = 0;
    register_cmd(out1); send_cmd(3'b110);
    strobe_read_check({d, " DAC low"});

    // --- stop read event ---
    set_default_refs(); m_cal = seq(0, 63, 3);
    register_cmd(out1); send_cmd(3'b110);
    strobe_and_tack(tc, ws);
    read_event(30, 20'h0, q);
    begin
      logic [63:0] h = exp_hits();
      check(q[0] == 1'b1, {d, " stop read: flag"});
      for (int i = 1; i < 30; i++) check(q[i] == h[i-1], $sformatf("%s stop read: ch%0d", d, i-1));
    end
    // readout clock keeps running for 70 more clocks: output stays 0
    if (side_right) rdclk_r = 1; else rdclk_l = 1;
    for (int i = 0; i < 70; i++) begin
      check((side_right ? dro : dlo) == 1'b0, {d, " stop read: zeros"});
      @(negedge clk);
    end
    mech_stop_read++;
    // reset FIFO and read the whole event again
    send_cmd(3'b110);
    read_event(100, 20'h0, q);
    check_stream(q, exp_hits(), 20'h0, {d, " stop read: full re-read"});

    // --- FIFO: eight events with distinct channel masks ---
    send_cmd(3'b110);
    for (int e = 0; e < 8; e++) begin
      set_default_refs(); m_cal = '1; m_chan = seq(e, 63, 8);
      register_cmd(out1);
      strobe_and_tack(tc, ws);
    end
    // a ninth acknowledge is dropped by the full FIFO
    set_default_refs(); m_cal = '1;
    register_cmd(out1);
    strobe_and_tack(tc, ws);
    mech_full_fifo++;
    for (int e = 0; e < 8; e++) begin
      read_event(100, 20'h0, q);
      check_stream(q, seq(e, 63, 8), 20'h0, $sformatf("%s FIFO event %0d", d, e));
    end
    send_cmd(3'b110);
    send_cmd(3'b100);
    send_cmd(3'b100);
    read_event(100, 20'h0, q);
    check_stream(q, seq(2, 63, 8), 20'h0, {d, " FIFO reset, skip two, read third"});

    // --- trigger chain input to output ---
    set_default_refs();
    register_cmd(out1);
    for (int i = 0; i < 16; i++) begin
      logic [15:0] tp = 16'hA5C3;
      logic b = tp[i];
      if (side_right) tri_r = b; else tli_l = b;
      @(negedge clk);
      check((side_right ? tro_r : tlo_l) == b, {d, " trigger input to output"});
      check((side_right ? tlo_l : tro_r) == 1'b0, {d, " other trigger idle"});
    end
    tri_r = 0; tli_l = 0;

    // --- addressing ---
    begin
      int addrs [6] = '{0, 1, 2, 4, 8, 16};
      foreach (addrs[i]) begin
        chip_addr = 5'(addrs[i]);
        send_addr = addrs[i];
        set_default_refs(); m_cal = seq(i % 3, 63, 3);
        register_cmd(out1);
        send_cmd(3'b110);
        strobe_read_check($sformatf("%s address %0d responds", d, addrs[i]));
        // commands to 17 must be ignored
        send_addr = 17;
        send_cmd(3'b011);
        repeat (12) @(negedge clk);
        check((side_right ? tro_r : tlo_l) == 1'b0, $sformatf("%s address %0d ignores 17", d, addrs[i]));
        repeat (25) @(negedge clk);
      end
      // broadcast: chip 17, commands to 31
      chip_addr = 5'd17;
      send_addr = 31;
      set_default_refs(); m_cal = seq(1, 63, 3);
      register_cmd(out1);
      send_cmd(3'b110);
      strobe_read_check({d, " broadcast address"});
      mech_broadcast++;
    end

    // --- the other command line is ignored except for 001 ---
    send_addr = 17;
    side_right = !right;
    send_cmd(3'b011);
    repeat (12) @(negedge clk);
    check(tro_r == 0 && tlo_l == 0, {d, " strobe from the other controller ignored"});
    side_right = right;
    repeat (25) @(negedge clk);
  endtask

  initial begin
    rst_pad = 1; chip_addr = 17; cmd_l = 0; cmd_r = 0; tack_l = 0; tack_r = 0;
    rdclk_l = 0; rdclk_r = 0; tri_r = 0; tli_l = 0; dri = 0; dli = 0;
    for (int ch = 0; ch < 64; ch++) strip_amp[ch] = '0;
    repeat (3) @(negedge clk);
    rst_pad = 0;
    run_direction(1'b1);
    run_direction(1'b0);
    check(mech_zero_supp > 0 && mech_full_fifo > 0 && mech_stop_read > 0 && mech_broadcast > 0,
          "all mechanisms exercised");
    $display("zero-suppressed reads %0d, full-FIFO drops %0d, stopped reads %0d, broadcasts %0d",
             mech_zero_supp, mech_full_fifo, mech_stop_read, mech_broadcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
