// v3cp_clock_divider: derives the 40 MHz chip clock from the 320 MHz
// e-link clock, with its phase set by the downlink synchronisation.
//
// A DIV-state counter (DIV = 320/40 = 8) runs on the fast clock. When the
// receiver sees the synchronisation pattern it pulses `align` in the cycle
// that holds the last bit of a character; the counter is then cleared, so
// that the next word boundary falls exactly DIV cycles later. This is how
// the internal 40 MHz phase is locked to the machine clock carried by the
// downlink.
//
// Outputs:
//   ce40  - one fast-clock cycle high per 40 MHz period, in the cycle that
//           holds the last bit of each character (counter == DIV-1).
//   clk40 - the divided clock, registered, 50 % duty cycle; it rises in the
//           cycle after a word boundary.
// The divide ratio and the alignment to the sync pattern follow the port's
// description; the counter, the strobe and the duty cycle are this design's
// choice.
module v3cp_clock_divider #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,     // 320 MHz
  input  logic rst_n,
  input  logic align,   // word boundary is now: restart the phase
  output logic ce40,
  output logic clk40
);
  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt, cnt_next;

  always_comb begin
    if (align || cnt == CW'(DIV - 1)) cnt_next = '0;
    else                              cnt_next = cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      clk40 <= 1'b0;
    end else begin
      cnt   <= cnt_next;
      clk40 <= (cnt_next < CW'(DIV / 2));
    end
  end

  assign ce40 = (cnt == CW'(DIV - 1));

endmodule
