// 8-bit adder made of two multiplexer-based 4-bit adders.
//
// Stage 1: the low nibbles and the high nibbles are added at the same time
// by two `mux_adder4` instances. Stage 2: a 4-bit `incrementer` adds the
// low nibble's carry to the high nibble's sum. Stage 3: the incrementer's
// carry is ORed with the high nibble's carry to give `cout` (they are never
// both 1, since a 4-bit sum of 15 cannot carry). The longest path is one
// 4-bit table lookup and one 4-bit increment, not an 8-bit ripple.
//
// Interface: `a8` + `b8` = {`cout`, `s8`}. No carry input. Combinational.
// Structure and port names follow the reference adder diagram and
// schematic.
module mux_adder8
  import mult_pkg::*;
(
  input  logic [2*NIB_W-1:0] a8,
  input  logic [2*NIB_W-1:0] b8,
  output logic [2*NIB_W-1:0] s8,
  output logic               cout
);
  logic [NIB_W-1:0] s_lo, s_hi;
  logic             c_lo, c_hi;

  mux_adder4 u_add_lo (
    .a    ({b8[NIB_W-1:0], a8[NIB_W-1:0]}),
    .s    (s_lo),
    .cout (c_lo)
  );

  mux_adder4 u_add_hi (
    .a    ({b8[2*NIB_W-1:NIB_W], a8[2*NIB_W-1:NIB_W]}),
    .s    (s_hi),
    .cout (c_hi)
  );

  logic [NIB_W-1:0] s_hi_inc;

  incrementer #(.WIDTH(NIB_W)) u_inc (
    .its   (s_hi),
    .itc   (c_lo),
    .itc1  (c_hi),
    .is8   (s_hi_inc),
    .icout (cout)
  );

  always_comb s8 = {s_hi_inc, s_lo};
endmodule
