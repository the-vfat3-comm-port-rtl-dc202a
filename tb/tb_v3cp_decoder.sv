// tb_v3cp_decoder: all 256 input bytes against a reference decoder.
// The reference builds the 16 codewords from the four generator rows of
// the code (values 8, 4, 2, 1 map to 96, 55, 33, 0F hex; the others are
// XORs of these) and classifies each byte by its distance to them.
// It also checks that the result comes one clock after the input.
module tb_v3cp_decoder;
  import v3cp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  codeword_t in_word = '0;
  rx_char_t out;
  int checks = 0, failures = 0;
  int n_corr = 0, n_err = 0, n_exact = 0;

  v3cp_decoder dut (.clk, .rst_n, .in_valid, .in_word, .out);

  always #1.5625ns clk = ~clk;

  function automatic logic [7:0] ref_code(logic [3:0] v);
    logic [7:0] r;
    r = '0;
    if (v[3]) r ^= 8'h96;
    if (v[2]) r ^= 8'h55;
    if (v[1]) r ^= 8'h33;
    if (v[0]) r ^= 8'h0F;
    return r;
  endfunction

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int x = 0; x < 256; x++) begin
      char_kind_e ek;
      logic [3:0] ed;
      logic ec;
      int best;
      ek = CHAR_ERROR; ed = '0; ec = 1'b0;
      if (x == 8'h17)      ek = CHAR_COMMA_A;
      else if (x == 8'hE8) ek = CHAR_COMMA_B;
      else
        for (int v = 0; v < 16; v++) begin
          best = $countones(8'(x) ^ ref_code(4'(v)));
          if (best <= 1) begin ek = CHAR_DATA; ed = 4'(v); ec = (best == 1); end
        end
      in_word  <= 8'(x);
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      #0.5ns;
      checks++;
      if (!out.valid || out.kind != ek || (ek == CHAR_DATA && (out.data != ed || out.corrected != ec))) begin
        failures++;
        $display("FAIL %02h: got v%b k%0d d%h c%b, want k%0d d%h c%b", x, out.valid,
                 out.kind, out.data, out.corrected, ek, ed, ec);
      end
      if (ek == CHAR_DATA && ec) n_corr++;
      if (ek == CHAR_DATA && !ec) n_exact++;
      if (ek == CHAR_ERROR) n_err++;
      @(posedge clk);
      #0.5ns;
      checks++;
      if (out.valid) begin failures++; $display("FAIL valid not a single strobe"); end
    end
    // 16 exact, 16*8 single errors, the rest (minus 2 commas) detected
    checks++;
    if (n_exact != 16 || n_corr != 128 || n_err != 110) begin
      failures++;
      $display("FAIL class counts %0d %0d %0d", n_exact, n_corr, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
