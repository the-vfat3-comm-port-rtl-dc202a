// v3cp_voter: bitwise two-out-of-three majority voter for the
// triplicated comm port.
//
// Each output bit is the majority of the three copies' bits, so a single
// copy upset by a radiation-induced error is outvoted. `mismatch` is high
// while any bit of the three copies disagrees. Purely combinational.
// Triplication follows the port's description; the voting of outputs only
// is this design's choice.
module v3cp_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  assign y        = (a & b) | (a & c) | (b & c);
  assign mismatch = (a != b) || (a != c);
endmodule
