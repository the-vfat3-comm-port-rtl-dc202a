// v3cp_decoder: the 8-to-4-bit decoder of the downlink code.
//
// The sixteen data characters are codewords of an [8,4,4] code, so a
// received byte is at Hamming distance 0 or 1 from at most one of them.
// The decoder compares the byte with all sixteen codewords at once:
//   - equal to CC-A or CC-B          -> comma
//   - distance 0 from a codeword     -> that codeword's 4-bit value
//   - distance 1 from a codeword     -> that value, `corrected` set
//   - anything else                  -> CHAR_ERROR (double error detected)
// Commas are only recognised exactly: they lie at distance 2 from data
// codewords, so a comma with one flipped bit is ambiguous and is reported
// as whatever the data comparison gives (a corrected data character or an
// error).
//
// Timing: the result is registered; `out.valid` follows `in_valid` by one
// clock. The code table and the single-error-correct / double-error-detect
// behaviour follow the port's description; the parallel distance search
// is this design's choice.
module v3cp_decoder
  import v3cp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  codeword_t in_word,
  output rx_char_t  out
);
  rx_char_t   dec;
  logic [3:0] hd [16];  // Hamming distance to each data codeword

  for (genvar i = 0; i < 16; i++) begin : g_dist
    assign hd[i] = 4'($countones(in_word ^ encode4to8(nibble_t'(i))));
  end

  always_comb begin
    dec       = '0;
    dec.valid = in_valid;
    dec.kind  = CHAR_ERROR;
    if (in_word == CC_A) begin
      dec.kind = CHAR_COMMA_A;
    end else if (in_word == CC_B) begin
      dec.kind = CHAR_COMMA_B;
    end else begin
      for (int i = 0; i < 16; i++) begin
        if (hd[i] <= 4'd1) begin
          dec.kind      = CHAR_DATA;
          dec.data      = nibble_t'(i);
          dec.corrected = (hd[i] == 4'd1);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= dec;
  end

endmodule
