// v3cp_core: one copy of the VFAT3 comm port.
//
// Receiver -> 8-to-4-bit decoder -> data controller -> transmitter, with
// the clock divider giving every block its 40 MHz strobe. All blocks run
// on the 320 MHz e-link clock; the 40 MHz rate is a clock enable (`ce40`)
// plus the divided clock `clk40` brought out for the rest of the chip.
//
// Latency on the downlink: the last bit of a character is sampled in
// cycle t (`ce40` high); the receiver presents the byte at t+1, the decoder
// at t+2 and the data controller's command outputs change at t+3 and hold
// for eight cycles. On the uplink a byte chosen at one `ce40` strobe is
// loaded into the serializer at the next and leaves on the eight cycles
// after that. The block split follows the port's block diagram; the
// single fast clock domain is this design's choice.
module v3cp_core
  import v3cp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       data_in,
  output logic       data_out,
  output logic       clk40,
  output logic       ce40,
  // control logic
  output logic       lv1a,
  output logic       eco,
  output logic       bco,
  output logic       calpulse,
  output logic       resync,
  output logic       sc_only,
  // slow control
  output logic       sc_bit,
  output logic       sc_bit_valid,
  output logic       resc,
  input  logic       sc_tx_valid,
  input  logic [7:0] sc_tx_data,
  input  logic       sc_tx_last,
  output logic       sc_tx_ready,
  // data formatter
  input  logic       df_valid,
  input  logic [7:0] df_data,
  input  logic       df_last,
  output logic       df_ready,
  // status
  output logic       synced,
  output logic       sync_verified,
  output logic       sync_slip,
  output logic       sec_event,
  output logic       ded_event
);
  logic      align;
  codeword_t rx_word;
  logic      rx_word_valid;
  rx_char_t  rx_char;
  logic [7:0] tx_word;

  v3cp_clock_divider u_div (
    .clk, .rst_n, .align, .ce40, .clk40
  );

  v3cp_receiver u_rx (
    .clk, .rst_n, .data_in, .ce40, .align, .synced,
    .word(rx_word), .word_valid(rx_word_valid), .sync_verified, .sync_slip
  );

  v3cp_decoder u_dec (
    .clk, .rst_n, .in_valid(rx_word_valid), .in_word(rx_word), .out(rx_char)
  );

  v3cp_data_controller u_dc (
    .clk, .rst_n, .ce40, .synced, .char_in(rx_char),
    .lv1a, .eco, .bco, .calpulse, .resync, .sc_only,
    .sc_bit, .sc_bit_valid, .resc, .sc_tx_valid, .sc_tx_data, .sc_tx_last, .sc_tx_ready,
    .df_valid, .df_data, .df_last, .df_ready,
    .tx_word, .sec_event, .ded_event
  );

  v3cp_transmitter u_tx (
    .clk, .rst_n, .ce40, .tx_word, .data_out
  );

endmodule
