// tb_v3cp_receiver: drives the serial downlink bit by bit. Random data
// characters come first at an arbitrary bit phase (the receiver must not
// declare sync), then the sync pattern (three CC-A), then a run of data
// characters with some CC-B; every character must come out whole and in
// order, and each CC-B on the boundary must be reported as a sync check.
// Then the line is shifted by three bits and re-synchronised: one slip
// must be reported and the characters must again come out whole.
// The 40 MHz strobe is produced by a counter in the testbench that
// restarts on `align`, as the clock divider is specified to.
module tb_v3cp_receiver;
  import v3cp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, data_in = 1'b0;
  logic ce40, align, synced, word_valid, sync_verified, sync_slip;
  codeword_t word;
  int checks = 0, failures = 0;

  v3cp_receiver dut (.clk, .rst_n, .data_in, .ce40, .align, .synced,
                     .word, .word_valid, .sync_verified, .sync_slip);

  always #1.5625ns clk = ~clk;

  // reference 40 MHz strobe
  logic [2:0] cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     cnt <= '0;
    else if (align) cnt <= '0;
    else            cnt <= cnt + 3'd1;
  assign ce40 = (cnt == 3'd7);

  codeword_t exp_q[$];
  bit expect_on = 0;
  int n_ccb_sent = 0, n_verified = 0, n_slip = 0, n_words = 0;
  logic [31:0] hist = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_bit(logic b);
    @(negedge clk);
    data_in = b;
    hist = {hist[30:0], b};
  endtask

  task automatic send_byte(codeword_t w);
    for (int i = 7; i >= 0; i--) send_bit(w[i]);
  endtask

  // a random data character (or CC-B) that cannot form the sync pattern
  // across character boundaries with what was already sent
  function automatic codeword_t pick(bit allow_ccb);
    codeword_t c;
    logic [39:0] win;
    bit bad;
    do begin
      if (allow_ccb && $urandom_range(0, 5) == 0) c = CC_B;
      else c = encode4to8(4'($urandom));
      win = {hist, c};
      bad = 0;
      for (int k = 0; k < 8; k++)
        if (win[k +: 24] == SYNC_PATTERN) bad = 1;
    end while (bad);
    return c;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (align) expect_on = 1;
      if (sync_verified) n_verified++;
      if (sync_slip) n_slip++;
      if (word_valid && expect_on && word != CC_A && n_words < 80) begin
        n_words++;
        if (exp_q.size() == 0) check(0, "unexpected word");
        else begin
          codeword_t e;
          e = exp_q.pop_front();
          check(word == e, $sformatf("word %02h want %02h", word, e));
        end
      end
    end
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sync_and_run(int nwords);
    exp_q.delete();
    expect_on = 0;
    send_byte(CC_A); send_byte(CC_A); send_byte(CC_A);
    for (int n = 0; n < nwords; n++) begin
      codeword_t c;
      c = pick(1);
      if (c == CC_B) n_ccb_sent++;
      exp_q.push_back(c);
      send_byte(c);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // unsynchronised: random phase, no pattern
    repeat ($urandom_range(1, 7)) send_bit(1'b0);
    repeat (12) send_byte(pick(0));
    check(!synced, "synced without pattern");
    sync_and_run(40);
    check(synced, "not synced after pattern");
    // shift the line by three bits and resynchronise
    repeat (3) send_bit(1'b1);
    sync_and_run(40);
    repeat (24) send_bit(1'b0);
    check(exp_q.size() == 0, $sformatf("%0d words never came out", exp_q.size()));
    check(n_words == 80, $sformatf("words out %0d", n_words));
    check(n_verified == n_ccb_sent && n_ccb_sent > 0,
          $sformatf("sync checks %0d for %0d CC-B", n_verified, n_ccb_sent));
    check(n_slip == 1, $sformatf("slips %0d", n_slip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
