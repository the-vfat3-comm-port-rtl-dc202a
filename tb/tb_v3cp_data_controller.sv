// tb_v3cp_data_controller: drives decoded characters, one per 40 MHz
// period, and the two uplink sources.
// Downlink: every command character, both commas, corrected characters
// and detected errors are sent in random order, with and without sync;
// at each 40 MHz strobe the command outputs must match the command of the
// previous character (table below) and the mode flag must follow
// SCOnly / RunMode. A run of SC0/SC1 characters must deliver one slow
// control bit per 40 MHz period.
// Uplink: the bytes sent at each strobe are collected and compared with
// the expected frames: headers, payloads in order, fillers when idle,
// tracking first when both sources wait, and no tracking packet while in
// slow-control-only mode.
module tb_v3cp_data_controller;
  import v3cp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, synced = 1'b0;
  logic [2:0] cnt = '0;
  logic ce40;
  rx_char_t char_in = '0;
  logic lv1a, eco, bco, calpulse, resync, sc_only, sc_bit, sc_bit_valid, resc;
  logic sc_tx_valid = 0, sc_tx_last = 0, sc_tx_ready;
  logic [7:0] sc_tx_data = '0;
  logic df_valid = 0, df_last = 0, df_ready;
  logic [7:0] df_data = '0;
  logic [7:0] tx_word;
  logic sec_event, ded_event;
  int checks = 0, failures = 0;

  v3cp_data_controller dut (.*);

  always #1.5625ns clk = ~clk;
  always_ff @(posedge clk) cnt <= cnt + 3'd1;
  assign ce40 = (cnt == 3'd7);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    #400us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- downlink driver
  rx_char_t cmd_q[$];
  rx_char_t last_char = '0;
  bit       last_synced = 0;
  bit       mode_model = 0;

  // {lv1a, eco, bco, calpulse, resync, resc, sc_bit_valid, sc_bit}
  function automatic logic [7:0] expect_bits(rx_char_t c, bit s);
    if (!s || c.kind != CHAR_DATA) return 8'b0;
    unique case (c.data)
      4'h1: return 8'b0100_0000;  // ECO
      4'h2: return 8'b0010_0000;  // BCO
      4'h3: return 8'b0001_0000;  // CalPulse
      4'h4: return 8'b0000_1000;  // ReSync
      4'h7: return 8'b1000_0000;  // LV1A
      4'h8: return 8'b0000_0010;  // SC0
      4'h9: return 8'b0000_0011;  // SC1
      4'hA: return 8'b0000_0100;  // ReSC
      4'hB: return 8'b1100_0000;  // LV1A+ECO
      4'hC: return 8'b1010_0000;  // LV1A+BCO
      4'hD: return 8'b1110_0000;  // LV1A+ECO+BCO
      4'hE: return 8'b0110_0000;  // ECO+BCO
      default: return 8'b0;       // A, F, G, P
    endcase
  endfunction

  int n_cmd_checked = 0, n_sc_bits = 0;
  logic sc_bit_hold = 0;

  // outputs for the previous character, checked just before the next
  task automatic check_outputs();
    logic [7:0] e, got;
    e = expect_bits(last_char, last_synced);
    got = {lv1a, eco, bco, calpulse, resync, resc, sc_bit_valid, sc_bit};
    if (!e[1]) got[0] = 1'b0;   // sc_bit only meaningful when valid
    check(got == e, $sformatf("char k%0d d%h s%b: outputs %b want %b",
          last_char.kind, last_char.data, last_synced, got, e));
    check(sc_only == mode_model, "sc_only mode flag");
    check(sec_event == (last_synced && last_char.kind == CHAR_DATA && last_char.corrected), "sec_event");
    check(ded_event == (last_synced && last_char.kind == CHAR_ERROR), "ded_event");
    if (sc_bit_valid) n_sc_bits++;
    n_cmd_checked++;
  endtask

  // one character per period, valid two cycles after the strobe cycle
  // (as the decoder delivers it); outputs of the previous character are
  // checked just before
  always @(posedge clk) begin
    if (rst_n && cnt == 3'd0) begin
      rx_char_t c;
      check_outputs();
      if (cmd_q.size() > 0) c = cmd_q.pop_front();
      else begin c = '0; c.kind = CHAR_DATA; c.data = 4'h0; end
      last_char = c;
      last_synced = synced;
      if (synced && c.kind == CHAR_DATA && c.data == 4'h5) mode_model = 1;
      if (synced && c.kind == CHAR_DATA && c.data == 4'h6) mode_model = 0;
      char_in <= '{valid: 1'b1, kind: c.kind, data: c.data, corrected: c.corrected};
    end else begin
      char_in <= '0;
    end
  end

  task automatic push_data(logic [3:0] d, bit corr = 0);
    rx_char_t c;
    c = '0; c.kind = CHAR_DATA; c.data = d; c.corrected = corr;
    cmd_q.push_back(c);
  endtask

  task automatic drain();
    wait (cmd_q.size() == 0);
    repeat (20) @(posedge clk);
  endtask

  // ------------------------------------------------------ uplink sources
  logic [7:0] df_q[$][$];
  logic [7:0] sc_q[$][$];

  always @(posedge clk) begin
    if (df_valid && df_ready) df_q[0].pop_front();
    if (df_q.size() > 0 && df_q[0].size() == 0) void'(df_q.pop_front());
    if (sc_tx_valid && sc_tx_ready) sc_q[0].pop_front();
    if (sc_q.size() > 0 && sc_q[0].size() == 0) void'(sc_q.pop_front());
    df_valid   <= (df_q.size() > 0);
    df_data    <= (df_q.size() > 0) ? df_q[0][0] : 8'h00;
    df_last    <= (df_q.size() > 0) && (df_q[0].size() == 1);
    sc_tx_valid <= (sc_q.size() > 0);
    sc_tx_data  <= (sc_q.size() > 0) ? sc_q[0][0] : 8'h00;
    sc_tx_last  <= (sc_q.size() > 0) && (sc_q[0].size() == 1);
  end

  // uplink monitor: byte chosen at each strobe
  logic [7:0] tx_seen[$];
  bit tx_record = 0;
  always @(posedge clk) if (ce40) begin
    #0.1ns;
    if (tx_record) tx_seen.push_back(tx_word);
  end

  task automatic expect_frames(logic [7:0] exp[$], string what);
    int i;
    i = 0;
    while (i < tx_seen.size() && tx_seen[i] == TX_FILLER) i++;
    for (int k = 0; k < exp.size(); k++) begin
      check(i + k < tx_seen.size() && tx_seen[i + k] == exp[k],
            $sformatf("%s byte %0d", what, k));
    end
    for (int k = i + exp.size(); k < tx_seen.size(); k++)
      check(tx_seen[k] == TX_FILLER, $sformatf("%s: filler after frames", what));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (8) @(posedge clk);

    // commands ignored while not synchronised
    for (int d = 0; d < 16; d++) push_data(4'(d));
    drain();
    check(!sc_only, "mode changed without sync");

    synced <= 1'b1;
    repeat (16) @(posedge clk);
    // every character, commas and an error, in random order, twice
    for (int r = 0; r < 2; r++) begin
      rx_char_t pool[$];
      for (int d = 0; d < 16; d++) begin
        rx_char_t c; c = '0; c.kind = CHAR_DATA; c.data = 4'(d);
        c.corrected = ($urandom_range(0, 3) == 0);
        pool.push_back(c);
      end
      begin rx_char_t c; c = '0; c.kind = CHAR_COMMA_A; pool.push_back(c); end
      begin rx_char_t c; c = '0; c.kind = CHAR_COMMA_B; pool.push_back(c); end
      begin rx_char_t c; c = '0; c.kind = CHAR_ERROR; c.data = 4'h7; pool.push_back(c); end
      pool.shuffle();
      foreach (pool[i]) cmd_q.push_back(pool[i]);
    end
    drain();

    // slow control bits at one per 40 MHz period
    begin
      logic [15:0] bits;
      int n_before;
      bits = 16'($urandom);
      n_before = n_sc_bits;
      for (int i = 15; i >= 0; i--) push_data(bits[i] ? 4'h9 : 4'h8);
      drain();
      check(n_sc_bits - n_before == 16, $sformatf("sc bits %0d", n_sc_bits - n_before));
    end

    // ---------------- uplink: both sources waiting, run mode
    push_data(4'h6);  // RunMode
    drain();
    tx_seen.delete();
    tx_record = 1;
    begin
      logic [7:0] t[$], s[$], exp[$];
      repeat (4) t.push_back(8'($urandom));
      repeat (3) s.push_back(8'($urandom));
      df_q.push_back(t);
      sc_q.push_back(s);
      repeat (200) @(posedge clk);
      exp = {HDR_TRACKING, t, HDR_SLOW_CONTROL, s};
      expect_frames(exp, "run mode");
    end
    tx_record = 0;

    // ---------------- slow-control-only mode holds tracking data back
    push_data(4'h5);  // SCOnly
    drain();
    tx_seen.delete();
    tx_record = 1;
    begin
      logic [7:0] t[$], s[$], exp[$];
      repeat (5) t.push_back(8'($urandom));
      repeat (2) s.push_back(8'($urandom));
      df_q.push_back(t);
      sc_q.push_back(s);
      repeat (200) @(posedge clk);
      exp = {HDR_SLOW_CONTROL, s};
      expect_frames(exp, "sc-only mode");
      check(df_q.size() == 1, "tracking packet held back");
      tx_seen.delete();
      push_data(4'h6);  // RunMode
      drain();
      repeat (100) @(posedge clk);
      exp = {HDR_TRACKING, t};
      expect_frames(exp, "after RunMode");
    end
    tx_record = 0;

    check(n_cmd_checked > 60, "enough periods checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
