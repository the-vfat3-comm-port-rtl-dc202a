// tb_v3cp_transmitter: checks the uplink serializer. A strobe every 8
// cycles loads a random byte; the 8 following line bits must be that byte,
// most significant bit first, with no gap between bytes.
module tb_v3cp_transmitter;
  logic clk = 1'b0, rst_n = 1'b0, ce40 = 1'b0, data_out;
  logic [7:0] tx_word = '0;
  int checks = 0, failures = 0;

  v3cp_transmitter dut (.clk, .rst_n, .ce40, .tx_word, .data_out);

  always #1.5625ns clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cur, nxt;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    nxt = 8'($urandom);
    tx_word <= nxt;
    ce40 <= 1'b1;
    for (int w = 0; w < 64; w++) begin
      @(posedge clk);           // byte nxt loaded here
      cur = nxt;
      ce40 <= 1'b0;
      nxt = 8'($urandom);
      tx_word <= nxt;
      for (int b = 7; b >= 0; b--) begin
        #0.5ns;
        checks++;
        if (data_out !== cur[b]) begin
          failures++;
          $display("FAIL word %0d bit %0d: got %b want %b", w, b, data_out, cur[b]);
        end
        if (b == 0) ce40 <= 1'b1;
        if (b > 0) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
