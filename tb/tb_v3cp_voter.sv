// tb_v3cp_voter: random triples, one copy often corrupted; the output must
// equal the majority computed bit by bit, and `mismatch` must flag any
// disagreement.
module tb_v3cp_voter;
  localparam int W = 19;
  logic [W-1:0] a, b, c, y;
  logic mismatch;
  int checks = 0, failures = 0;

  v3cp_voter #(.W(W)) dut (.a, .b, .c, .y, .mismatch);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] good, exp;
      good = W'($urandom);
      a = good; b = good; c = good;
      unique case (n % 4)
        0: ;
        1: a = W'($urandom);
        2: b = W'($urandom);
        default: begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
      endcase
      #1ns;
      for (int i = 0; i < W; i++) begin
        int ones;
        ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
        exp[i] = (ones >= 2);
      end
      checks++;
      if (y !== exp) begin failures++; $display("FAIL y=%h exp=%h", y, exp); end
      checks++;
      if (mismatch !== ((a != b) || (b != c))) begin failures++; $display("FAIL mismatch"); end
      if (n % 4 == 0) begin
        checks++;
        if (y !== good) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
