// tb_v3cp_core: end-to-end test of one (non-triplicated) copy of the comm
// port through its serial pins. Same link model and sequence as the test
// of the triplicated top: sync at an arbitrary phase and CC-B check, every
// command character, a slow-control bit stream, one corrected and one
// detected error, a phase slip, and uplink framing in run mode and in
// slow-control-only mode, and the fixed trigger latency. Each mechanism
// must occur at least once.
module tb_v3cp_core;
  import v3cp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, data_in = 1'b0;
  logic data_out, clk40, ce40;
  logic lv1a, eco, bco, calpulse, resync, sc_only, sc_bit, sc_bit_valid, resc;
  logic sc_tx_valid = 0, sc_tx_last = 0, sc_tx_ready;
  logic [7:0] sc_tx_data = '0;
  logic df_valid = 0, df_last = 0, df_ready;
  logic [7:0] df_data = '0;
  logic synced, sync_verified, sync_slip, sec_event, ded_event;
  int checks = 0, failures = 0;
  // downlink latency in 320 MHz cycles, counted from the clock period in
  // which the last bit of a trigger character is on DATA_IN to the edge
  // that first sees LV1A high: sampling edge 1, then receiver 1, decoder 1,
  // data controller 1, and the observing edge 1
  localparam int LATENCY = 5;

  v3cp_core dut (.*);

  always #1.5625ns clk = ~clk;   // 320 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------- downlink
  logic bit_q[$];
  bit   mark_q[$];   // set on the last bit of a character that triggers
  task automatic send_char(codeword_t c);
    bit trig;
    trig = (c == encode4to8(4'h7)) || (c == encode4to8(4'hB)) ||
           (c == encode4to8(4'hC)) || (c == encode4to8(4'hD));
    for (int i = 7; i >= 0; i--) begin
      bit_q.push_back(c[i]);
      mark_q.push_back(trig && i == 0);
    end
  endtask
  task automatic send_cmd(logic [3:0] v);
    send_char(encode4to8(v));
    send_char(encode4to8(4'h0));   // idle between commands
  endtask
  task automatic wait_sent();
    wait (bit_q.size() == 0);
    repeat (40) @(posedge clk);
  endtask
  // idle characters keep whole characters going when nothing is queued;
  // `boundary` is the bit count (mod 8) at which a character starts
  int unsigned bit_count = 0, boundary = 0;
  // fixed latency: fast-clock cycles from the period in which the last
  // bit of a trigger character is driven to the edge that sees LV1A high
  int cyc = 0;
  int trig_sent_q[$];
  int latencies[$];
  logic lv1a_d = 1'b0;
  always @(posedge clk) begin
    cyc++;
    lv1a_d <= lv1a;
    if (lv1a && !lv1a_d && trig_sent_q.size() > 0)
      latencies.push_back(cyc - trig_sent_q.pop_front());
  end
  task automatic shift_phase(int n);
    repeat (n) begin bit_q.push_back(1'b0); mark_q.push_back(1'b0); end
    boundary = (boundary + n) % 8;
  endtask
  always @(negedge clk) begin
    if (bit_q.size() == 0 && bit_count % 8 == boundary)
      repeat (8) begin bit_q.push_back(1'b0); mark_q.push_back(1'b0); end  // character A
    if (bit_q.size() > 0) begin
      data_in <= bit_q.pop_front();
      if (mark_q.pop_front()) trig_sent_q.push_back(cyc);
    end else data_in <= 1'b0;
    bit_count++;
  end

  // ----------------------------------------------- command observation
  // sampled once per 40 MHz period, at the strobe
  int n_lv1a = 0, n_eco = 0, n_bco = 0, n_cal = 0, n_resync = 0, n_resc = 0;
  int n_verified = 0, n_slip = 0, n_sec = 0, n_ded = 0, n_sc_only_periods = 0;
  logic sc_rx_q[$];
  always @(posedge clk) if (rst_n && ce40) begin
    if (lv1a) n_lv1a++;
    if (eco) n_eco++;
    if (bco) n_bco++;
    if (calpulse) n_cal++;
    if (resync) n_resync++;
    if (resc) n_resc++;
    if (sec_event) n_sec++;
    if (ded_event) n_ded++;
    if (sc_only) n_sc_only_periods++;
    if (sc_bit_valid) sc_rx_q.push_back(sc_bit);
  end
  always @(posedge clk) if (rst_n) begin
    if (sync_verified) n_verified++;
    if (sync_slip) n_slip++;
  end

  // ------------------------------------------------------------ uplink
  logic [7:0] up_sr = '0;
  logic [7:0] up_q[$];
  bit up_record = 0;
  always @(posedge clk) begin
    logic [7:0] nsr;
    nsr = {up_sr[6:0], data_out};
    up_sr <= nsr;
    if (ce40 && up_record) up_q.push_back(nsr);
  end

  logic [7:0] df_q[$][$];
  logic [7:0] sc_q[$][$];
  always @(posedge clk) begin
    if (df_valid && df_ready) df_q[0].pop_front();
    if (df_q.size() > 0 && df_q[0].size() == 0) void'(df_q.pop_front());
    if (sc_tx_valid && sc_tx_ready) sc_q[0].pop_front();
    if (sc_q.size() > 0 && sc_q[0].size() == 0) void'(sc_q.pop_front());
    df_valid    <= (df_q.size() > 0);
    df_data     <= (df_q.size() > 0) ? df_q[0][0] : 8'h00;
    df_last     <= (df_q.size() > 0) && (df_q[0].size() == 1);
    sc_tx_valid <= (sc_q.size() > 0);
    sc_tx_data  <= (sc_q.size() > 0) ? sc_q[0][0] : 8'h00;
    sc_tx_last  <= (sc_q.size() > 0) && (sc_q[0].size() == 1);
  end

  int n_track_pkts = 0, n_sc_pkts = 0, n_fillers = 0;
  // parse the recorded uplink against the expected frames
  task automatic expect_uplink(logic [7:0] exp[$], string what);
    int i;
    i = 0;
    while (i < up_q.size() && up_q[i] == TX_FILLER) begin i++; n_fillers++; end
    foreach (exp[k]) begin
      check(i + k < up_q.size() && up_q[i + k] == exp[k],
            $sformatf("%s uplink byte %0d", what, k));
      if (exp[k] == HDR_TRACKING && k == 0) n_track_pkts++;
      if (exp[k] == HDR_SLOW_CONTROL) n_sc_pkts++;
    end
    for (int k = i + exp.size(); k < up_q.size(); k++) begin
      check(up_q[k] == TX_FILLER, $sformatf("%s: filler after frames", what));
      n_fillers++;
    end
  endtask

  initial begin
    int e_lv1a, e_eco, e_bco;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);

    // ---- arbitrary phase, commands before sync are ignored
    shift_phase($urandom_range(1, 7));
    send_cmd(4'h7);
    wait_sent();
    check(!synced, "synced without the pattern");
    check(n_lv1a == 0, "command executed before sync");

    // ---- synchronise, verify with CC-B
    send_char(CC_A); send_char(CC_A); send_char(CC_A);
    send_char(encode4to8(4'h0));
    send_char(CC_B);
    wait_sent();
    check(synced, "synced after 3 x CC-A");
    check(n_verified == 1, $sformatf("CC-B check %0d", n_verified));

    // ---- every command character
    trig_sent_q.delete();
    for (int v = 1; v <= 14; v++) send_cmd(4'(v));
    wait_sent();
    check(n_lv1a == 4, $sformatf("LV1A count %0d", n_lv1a));
    check(n_eco == 4, $sformatf("ECO count %0d", n_eco));
    check(n_bco == 4, $sformatf("BCO count %0d", n_bco));
    check(n_cal == 1, "CalPulse count");
    check(n_resync == 1, "ReSync count");
    check(n_resc == 1, "ReSC count");
    check(sc_rx_q.size() == 2 && sc_rx_q[0] == 1'b0 && sc_rx_q[1] == 1'b1, "SC0 / SC1");
    check(n_sc_only_periods == 2, $sformatf("SCOnly lasted %0d periods", n_sc_only_periods));
    check(!sc_only, "RunMode left slow-control-only mode");

    // ---- slow control stream at one bit per 40 MHz period
    begin
      logic [31:0] bits;
      sc_rx_q.delete();
      bits = $urandom;
      for (int i = 31; i >= 0; i--) send_char(encode4to8(bits[i] ? 4'h9 : 4'h8));
      wait_sent();
      check(sc_rx_q.size() == 32, $sformatf("SC bits received %0d", sc_rx_q.size()));
      for (int i = 0; i < 32 && i < sc_rx_q.size(); i++)
        check(sc_rx_q[i] == bits[31 - i], $sformatf("SC bit %0d", i));
    end

    // ---- single error corrected, double error detected
    e_lv1a = n_lv1a;
    send_char(encode4to8(4'h7) ^ (8'h01 << $urandom_range(0, 7)));
    send_char(encode4to8(4'h0));
    send_char(encode4to8(4'h7) ^ 8'h03);   // two bits flipped
    send_char(encode4to8(4'h0));
    wait_sent();
    check(n_sec == 1, $sformatf("corrected errors %0d", n_sec));
    check(n_ded == 1, $sformatf("detected errors %0d", n_ded));
    check(n_lv1a == e_lv1a + 1, "corrected LV1A executed, corrupted one dropped");

    // ---- phase slip: shift by three bits, resynchronise
    shift_phase(3);
    send_char(CC_A); send_char(CC_A); send_char(CC_A);
    e_eco = n_eco; e_bco = n_bco;
    send_cmd(4'hE);
    wait_sent();
    check(n_slip == 1, $sformatf("slips %0d", n_slip));
    check(n_eco == e_eco + 1 && n_bco == e_bco + 1, "ECO+BCO after resync");

    // ---- uplink, run mode: tracking first, then the slow-control reply
    up_q.delete();
    up_record = 1;
    begin
      logic [7:0] t[$], s[$], exp[$];
      repeat (6) t.push_back(8'($urandom));
      repeat (3) s.push_back(8'($urandom));
      df_q.push_back(t);
      sc_q.push_back(s);
      repeat (300) @(posedge clk);
      exp = {HDR_TRACKING, t, HDR_SLOW_CONTROL, s};
      expect_uplink(exp, "run mode");
    end
    // ---- slow-control-only mode holds tracking data back
    send_cmd(4'h5);
    wait_sent();
    check(sc_only, "in slow-control-only mode");
    up_q.delete();
    begin
      logic [7:0] t[$], s[$], exp[$];
      repeat (4) t.push_back(8'($urandom));
      repeat (2) s.push_back(8'($urandom));
      df_q.push_back(t);
      sc_q.push_back(s);
      repeat (300) @(posedge clk);
      exp = {HDR_SLOW_CONTROL, s};
      expect_uplink(exp, "sc-only mode");
      check(df_q.size() == 1, "tracking packet waited");
      up_q.delete();
      send_cmd(4'h6);
      wait_sent();
      repeat (200) @(posedge clk);
      exp = {HDR_TRACKING, t};
      expect_uplink(exp, "after RunMode");
    end
    up_record = 0;

    // ---- fixed latency of the command path
    check(latencies.size() >= 4, $sformatf("latency samples %0d", latencies.size()));
    foreach (latencies[i])
      check(latencies[i] == LATENCY, $sformatf("trigger latency %0d cycles, want %0d", latencies[i], LATENCY));

    // ---- every mechanism happened
    check(n_verified > 0, "mechanism: sync check");
    check(n_slip > 0, "mechanism: phase slip");
    check(n_sec > 0, "mechanism: single error corrected");
    check(n_ded > 0, "mechanism: double error detected");
    check(n_sc_only_periods > 0, "mechanism: slow-control-only mode");
    check(n_track_pkts >= 2, "mechanism: tracking packets");
    check(n_sc_pkts >= 2, "mechanism: slow-control packets");
    check(n_fillers > 0, "mechanism: fillers");
    $display("mechanisms: verified=%0d slip=%0d sec=%0d ded=%0d sc_only_periods=%0d track=%0d sc=%0d fill=%0d ",
             n_verified, n_slip, n_sec, n_ded, n_sc_only_periods, n_track_pkts, n_sc_pkts, n_fillers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
