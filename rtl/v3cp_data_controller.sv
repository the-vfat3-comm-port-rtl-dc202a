// v3cp_data_controller: the VFAT3-specific part of the comm port.
//
// Downlink side: every data character received while the port is
// synchronised is a Fast Synchronous Control Command (FSCC). The command
// is decoded into the outputs below, which are updated two clocks after
// the decoder's strobe and then held for one whole 40 MHz period, so that
// logic clocked by the divided 40 MHz clock samples each command exactly
// once:
//   B ECO, C BCO, D CalPulse, E ReSync, H LV1A, K ReSC,
//   L LV1A+ECO, M LV1A+BCO, N LV1A+ECO+BCO, O ECO+BCO  -> pulse outputs
//   I SC0, J SC1 -> one slow-control bit (`sc_bit`, `sc_bit_valid`),
//                   giving the slow control 40 Mb/s
//   F SCOnly / G RunMode -> set / clear the `sc_only` mode flag
//   A, P, commas, and characters with a detected double error -> nothing
// Single corrected errors and detected double errors are reported on
// `sec_event` / `ded_event` for the same period.
//
// Uplink side: one byte per 40 MHz period goes to the transmitter. Data
// arrive as packets on two valid/ready byte streams, tracking data from the
// data formatter and replies from the slow control, each packet ending
// with `last`. The controller prefixes each packet with a header byte
// that names its type and sends filler bytes when there is nothing to
// send. In slow-control-only mode no new tracking packet is started.
// `tx_word` changes at a `ce40` strobe and is taken by the transmitter at
// the next strobe. A ready output is high only in a `ce40` cycle; a byte
// moves when valid and ready are both high.
//
// The command table, the 40 Mb/s slow-control path and the three uplink
// data types follow the port's description. The header and filler values,
// the packet handshake, the priority of tracking data over slow-control
// replies in run mode, the filler byte sent if a source runs dry inside a
// packet, and leaving ReSync as an output only (the framer is not reset)
// are this design's choice. The two assertions check the source side of
// the handshake; they are disabled by the same asynchronous reset that
// clears the registers, which lint tools report as a reset used both
// synchronously and asynchronously.
module v3cp_data_controller
  import v3cp_pkg::*;
(
  input  logic       clk,            // 320 MHz
  input  logic       rst_n,
  input  logic       ce40,
  input  logic       synced,
  input  rx_char_t   char_in,
  // to the control logic
  output logic       lv1a,
  output logic       eco,
  output logic       bco,
  output logic       calpulse,
  output logic       resync,
  output logic       sc_only,
  // to / from the slow control
  output logic       sc_bit,
  output logic       sc_bit_valid,
  output logic       resc,
  input  logic       sc_tx_valid,
  input  logic [7:0] sc_tx_data,
  input  logic       sc_tx_last,
  output logic       sc_tx_ready,
  // from the data formatter
  input  logic       df_valid,
  input  logic [7:0] df_data,
  input  logic       df_last,
  output logic       df_ready,
  // to the transmitter
  output logic [7:0] tx_word,
  // link status
  output logic       sec_event,
  output logic       ded_event
);

  // ---------------------------------------------------------------- FSCCs
  logic  cmd_ok;
  fscc_e cmd;

  assign cmd_ok = char_in.valid && synced && (char_in.kind == CHAR_DATA);
  assign cmd    = fscc_e'(char_in.data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lv1a <= 1'b0; eco <= 1'b0; bco <= 1'b0; calpulse <= 1'b0;
      resync <= 1'b0; resc <= 1'b0; sc_bit <= 1'b0; sc_bit_valid <= 1'b0;
      sc_only <= 1'b0; sec_event <= 1'b0; ded_event <= 1'b0;
    end else if (!synced) begin
      lv1a <= 1'b0; eco <= 1'b0; bco <= 1'b0; calpulse <= 1'b0;
      resync <= 1'b0; resc <= 1'b0; sc_bit_valid <= 1'b0;
      sec_event <= 1'b0; ded_event <= 1'b0;
    end else if (char_in.valid) begin
      lv1a         <= cmd_ok && (cmd inside {FSCC_LV1A, FSCC_LV1A_ECO,
                                             FSCC_LV1A_BCO, FSCC_LV1A_ECO_BCO});
      eco          <= cmd_ok && (cmd inside {FSCC_ECO, FSCC_LV1A_ECO,
                                             FSCC_LV1A_ECO_BCO, FSCC_ECO_BCO});
      bco          <= cmd_ok && (cmd inside {FSCC_BCO, FSCC_LV1A_BCO,
                                             FSCC_LV1A_ECO_BCO, FSCC_ECO_BCO});
      calpulse     <= cmd_ok && (cmd == FSCC_CALPULSE);
      resync       <= cmd_ok && (cmd == FSCC_RESYNC);
      resc         <= cmd_ok && (cmd == FSCC_RESC);
      sc_bit_valid <= cmd_ok && (cmd inside {FSCC_SC0, FSCC_SC1});
      if (cmd_ok && (cmd inside {FSCC_SC0, FSCC_SC1}))
        sc_bit <= (cmd == FSCC_SC1);
      if (cmd_ok && cmd == FSCC_SCONLY)  sc_only <= 1'b1;
      if (cmd_ok && cmd == FSCC_RUNMODE) sc_only <= 1'b0;
      sec_event    <= (char_in.kind == CHAR_DATA) && char_in.corrected;
      ded_event    <= (char_in.kind == CHAR_ERROR);
    end
  end

  // ---------------------------------------------------------- uplink framer
  typedef enum logic [1:0] {TX_IDLE, TX_TRACK, TX_SC} tx_state_e;
  tx_state_e state;

  assign df_ready    = ce40 && (state == TX_TRACK);
  assign sc_tx_ready = ce40 && (state == TX_SC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= TX_IDLE;
      tx_word <= TX_FILLER;
    end else if (ce40) begin
      unique case (state)
        TX_IDLE: begin
          if (df_valid && !sc_only) begin
            tx_word <= HDR_TRACKING;
            state   <= TX_TRACK;
          end else if (sc_tx_valid) begin
            tx_word <= HDR_SLOW_CONTROL;
            state   <= TX_SC;
          end else begin
            tx_word <= TX_FILLER;
          end
        end
        TX_TRACK: begin
          if (df_valid) begin
            tx_word <= df_data;
            if (df_last) state <= TX_IDLE;
          end else begin
            tx_word <= TX_FILLER;
          end
        end
        TX_SC: begin
          if (sc_tx_valid) begin
            tx_word <= sc_tx_data;
            if (sc_tx_last) state <= TX_IDLE;
          end else begin
            tx_word <= TX_FILLER;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  // A source holds its byte until it is taken.
  a_df_hold : assert property (@(posedge clk) disable iff (!rst_n)
    df_valid && !df_ready |=> df_valid && $stable(df_data) && $stable(df_last));
  a_sc_hold : assert property (@(posedge clk) disable iff (!rst_n)
    sc_tx_valid && !sc_tx_ready |=> sc_tx_valid && $stable(sc_tx_data) && $stable(sc_tx_last));

endmodule
