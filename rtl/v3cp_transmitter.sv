// v3cp_transmitter: serialises one byte per 40 MHz period onto the
// 320 Mb/s uplink (DATA_OUT).
//
// At each `ce40` strobe the byte offered by the data controller is loaded
// into an 8-bit shift register; on the following eight 320 MHz cycles its
// bits leave most significant bit first. `data_out` is driven straight
// from the register, so the first bit of a byte appears one clock after the
// strobe that loaded it, and consecutive bytes follow with no gap.
// The line rate follows the port's description; the bit order is this
// design's choice (it matches the receiver's).
module v3cp_transmitter (
  input  logic       clk,       // 320 MHz
  input  logic       rst_n,
  input  logic       ce40,
  input  logic [7:0] tx_word,
  output logic       data_out
);
  logic [7:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (ce40) sr <= tx_word;
    else           sr <= {sr[6:0], 1'b0};
  end

  assign data_out = sr[7];

endmodule
