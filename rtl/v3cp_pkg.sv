// v3cp_pkg: types and constants shared by the VFAT3 comm-port blocks.
//
// The downlink (GBTX -> chip) carries one 8-bit character per 40 MHz
// period on a 320 Mb/s serial line. Sixteen data characters carry a 4-bit
// value each; two further comma characters (CC-A, CC-B) mark the word
// boundary. The sixteen data characters form a linear [8,4,4] code
// (an extended Hamming code): any two differ in at least four bits, so one
// flipped bit can be corrected and two flipped bits detected. The
// character values below are those of the published code table.
//
// The data characters B..O are the Fast Synchronous Control Commands of
// the VFAT3 use of the port; A (0000) and P (1111) carry no command.
//
// Chosen by this design, not by the port's specification: the uplink
// header byte values and the filler byte.
package v3cp_pkg;

  typedef logic [7:0] codeword_t;
  typedef logic [3:0] nibble_t;

  // Comma characters.
  localparam codeword_t CC_A = 8'b0001_0111;
  localparam codeword_t CC_B = 8'b1110_1000;

  // Synchronisation pattern: three consecutive CC-A.
  localparam int unsigned SYNC_BITS = 24;
  localparam logic [SYNC_BITS-1:0] SYNC_PATTERN = {CC_A, CC_A, CC_A};

  // 4-bit value -> 8-bit character (code table of the downlink).
  function automatic codeword_t encode4to8(nibble_t n);
    unique case (n)
      4'h0: return 8'b0000_0000;  // A
      4'h1: return 8'b0000_1111;  // B
      4'h2: return 8'b0011_0011;  // C
      4'h3: return 8'b0011_1100;  // D
      4'h4: return 8'b0101_0101;  // E
      4'h5: return 8'b0101_1010;  // F
      4'h6: return 8'b0110_0110;  // G
      4'h7: return 8'b0110_1001;  // H
      4'h8: return 8'b1001_0110;  // I
      4'h9: return 8'b1001_1001;  // J
      4'hA: return 8'b1010_0101;  // K
      4'hB: return 8'b1010_1010;  // L
      4'hC: return 8'b1100_0011;  // M
      4'hD: return 8'b1100_1100;  // N
      4'hE: return 8'b1111_0000;  // O
      default: return 8'b1111_1111;  // P
    endcase
  endfunction

  // Fast Synchronous Control Commands, by the 4-bit value of the character.
  typedef enum logic [3:0] {
    FSCC_NOP_A        = 4'h0,  // A: no command
    FSCC_ECO          = 4'h1,  // B: reset event counter
    FSCC_BCO          = 4'h2,  // C: reset bunch-crossing counter
    FSCC_CALPULSE     = 4'h3,  // D: calibration pulse
    FSCC_RESYNC       = 4'h4,  // E: reset all state machines
    FSCC_SCONLY       = 4'h5,  // F: enter slow-control-only mode
    FSCC_RUNMODE      = 4'h6,  // G: leave slow-control-only mode
    FSCC_LV1A         = 4'h7,  // H: level-1 trigger
    FSCC_SC0          = 4'h8,  // I: slow-control bit 0
    FSCC_SC1          = 4'h9,  // J: slow-control bit 1
    FSCC_RESC         = 4'hA,  // K: reset slow control
    FSCC_LV1A_ECO     = 4'hB,  // L: LV1A + ECO
    FSCC_LV1A_BCO     = 4'hC,  // M: LV1A + BCO
    FSCC_LV1A_ECO_BCO = 4'hD,  // N: LV1A + ECO + BCO
    FSCC_ECO_BCO      = 4'hE,  // O: ECO + BCO
    FSCC_NOP_P        = 4'hF   // P: no command
  } fscc_e;

  // What the decoder made of one received character.
  typedef enum logic [1:0] {
    CHAR_DATA    = 2'd0,  // one of the 16 data characters (maybe corrected)
    CHAR_COMMA_A = 2'd1,
    CHAR_COMMA_B = 2'd2,
    CHAR_ERROR   = 2'd3   // two or more bit errors detected
  } char_kind_e;

  typedef struct packed {
    logic       valid;      // one-cycle strobe, once per received character
    char_kind_e kind;
    nibble_t    data;       // 4-bit value when kind == CHAR_DATA
    logic       corrected;  // one bit error was corrected
  } rx_char_t;

  // Uplink (chip -> GBTX) framing bytes: design choice.
  localparam logic [7:0] HDR_TRACKING     = 8'h1E;
  localparam logic [7:0] HDR_SLOW_CONTROL = 8'h5C;
  localparam logic [7:0] TX_FILLER        = 8'hF0;

endpackage
