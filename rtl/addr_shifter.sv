// addr_shifter: the 10-bit arithmetic shifter of the path-history address
// generators.
//
// The 6-bit stage counter C is extended with four zero bits on the left and
// shifted left by sh (0..4), so that one RAM row per trellis stage is followed
// by as many rows as the mode has 8-state segments. Structure and shift amounts
// follow the source architecture. Combinational.
module addr_shifter (
  input  logic [5:0] c,
  input  logic [2:0] sh,
  output logic [9:0] y
);

  assign y = {4'b0000, c} << sh;

endmodule
