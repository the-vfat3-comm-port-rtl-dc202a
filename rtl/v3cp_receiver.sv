// v3cp_receiver: deserialises the 320 Mb/s downlink and finds the
// character boundary.
//
// DATA_IN is sampled on every rising edge of the 320 MHz clock and shifted,
// first bit into the most significant position, into a 24-bit register.
// When the register holds the synchronisation pattern (three consecutive
// CC-A commas) the receiver pulses `align`, which restarts the clock
// divider so that the current cycle becomes the word boundary, and the
// port is marked synchronised. From then on, at each `ce40` strobe of the
// divider, the last eight bits are handed on as one character
// (`word`, `word_valid`), the cycle after the strobe.
//
// A CC-B comma received on the word boundary while synchronised confirms
// the synchronisation (`sync_verified` pulse). A sync pattern found at a
// different bit phase while synchronised realigns the port and is
// reported with `sync_slip`.
//
// The sync pattern and the CC-B check follow the port's description; the
// shift-register search, the slip report and the absence of any automatic
// loss-of-sync rule are this design's choice.
module v3cp_receiver
  import v3cp_pkg::*;
(
  input  logic      clk,          // 320 MHz
  input  logic      rst_n,
  input  logic      data_in,      // serial downlink, one bit per clock
  input  logic      ce40,         // from the clock divider
  output logic      align,        // sync pattern complete in this cycle
  output logic      synced,
  output codeword_t word,
  output logic      word_valid,
  output logic      sync_verified,
  output logic      sync_slip
);
  logic [SYNC_BITS-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[SYNC_BITS-2:0], data_in};
  end

  assign align = (sr == SYNC_PATTERN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synced        <= 1'b0;
      word          <= '0;
      word_valid    <= 1'b0;
      sync_verified <= 1'b0;
      sync_slip     <= 1'b0;
    end else begin
      if (align) synced <= 1'b1;
      word_valid    <= ce40 && synced;
      if (ce40) word <= sr[7:0];
      sync_verified <= ce40 && synced && (sr[7:0] == CC_B);
      sync_slip     <= align && synced && !ce40;
    end
  end

endmodule
