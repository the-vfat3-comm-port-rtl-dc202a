// v3cp: the VFAT3 comm port, triplicated for robustness against single
// event upsets.
//
// The port is the chip's only link to the GBTX: a 320 MHz clock, a
// 320 Mb/s downlink carrying SEC-DED coded commands and a 320 Mb/s uplink
// carrying tracking data, slow-control replies and fillers. Three
// identical copies of the port (v3cp_core) receive the same inputs; every
// output is the bitwise two-out-of-three majority of the three copies, so
// an upset in any one copy does not reach the chip. `tmr_mismatch` is high
// while the copies disagree.
//
// Interface and timing are those of v3cp_core, plus no extra latency: the
// voters are combinational. Triplication follows the port's description;
// triplicating whole copies and voting only their outputs (the copies do
// not re-vote their internal state) is this design's choice.
module v3cp
  import v3cp_pkg::*;
(
  input  logic       clk,            // 320 MHz e-link clock
  input  logic       rst_n,
  input  logic       data_in,        // DATA_IN e-link
  output logic       data_out,       // DATA_OUT e-link
  output logic       clk40,          // internal 40 MHz clock
  output logic       ce40,           // 40 MHz strobe in the 320 MHz domain
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
  output logic       ded_event,
  output logic       tmr_mismatch
);
  localparam int unsigned NOUT = 19;

  logic [NOUT-1:0] copy_out [3];
  logic [NOUT-1:0] voted;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    logic c_data_out, c_clk40, c_ce40, c_lv1a, c_eco, c_bco, c_calpulse,
          c_resync, c_sc_only, c_sc_bit, c_sc_bit_valid, c_resc, c_sc_tx_ready,
          c_df_ready, c_synced, c_sync_verified, c_sync_slip, c_sec_event,
          c_ded_event;

    v3cp_core u_core (
      .clk, .rst_n, .data_in,
      .data_out(c_data_out), .clk40(c_clk40), .ce40(c_ce40),
      .lv1a(c_lv1a), .eco(c_eco), .bco(c_bco), .calpulse(c_calpulse),
      .resync(c_resync), .sc_only(c_sc_only),
      .sc_bit(c_sc_bit), .sc_bit_valid(c_sc_bit_valid), .resc(c_resc),
      .sc_tx_valid, .sc_tx_data, .sc_tx_last, .sc_tx_ready(c_sc_tx_ready),
      .df_valid, .df_data, .df_last, .df_ready(c_df_ready),
      .synced(c_synced), .sync_verified(c_sync_verified), .sync_slip(c_sync_slip),
      .sec_event(c_sec_event), .ded_event(c_ded_event)
    );

    assign copy_out[k] = {c_data_out, c_clk40, c_ce40, c_lv1a, c_eco,
                          c_bco, c_calpulse, c_resync, c_sc_only, c_sc_bit,
                          c_sc_bit_valid, c_resc, c_sc_tx_ready, c_df_ready,
                          c_synced, c_sync_verified, c_sync_slip, c_sec_event,
                          c_ded_event};
  end

  v3cp_voter #(.W(NOUT)) u_vote (
    .a(copy_out[0]), .b(copy_out[1]), .c(copy_out[2]),
    .y(voted), .mismatch(tmr_mismatch)
  );

  assign {data_out, clk40, ce40, lv1a, eco, bco, calpulse, resync, sc_only,
          sc_bit, sc_bit_valid, resc, sc_tx_ready, df_ready, synced,
          sync_verified, sync_slip, sec_event, ded_event} = voted;

endmodule
