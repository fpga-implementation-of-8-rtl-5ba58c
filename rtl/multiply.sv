// Unsigned 8x8 multiplier whose additions are done by multiplexer adders.
//
// Eight `and_row` instances form the partial-product rows pp[i] =
// mlr & mnd[i]; row i carries weight 2^i. The rows are then summed in a
// balanced tree of seven 8-bit `mux_adder8` additions, so that every level
// works in parallel:
//
//   level 1  r[k] = (pp[2k] >> 1) + pp[2k+1],  k = 0..3   (four adders)
//            pp[2k][0] is already a final bit of pair k; r[k] is 9 bits
//            with weight 2^(2k+1).
//   level 2  x1 = r[0][8:1] + {r[1][6:0], pp[2][0]}        (weight 2^2)
//            x2 = r[2][8:1] + {r[3][6:0], pp[6][0]}        (weight 2^6)
//            The carry of x1 lands on the column of r[1][7] and is merged
//            with r[1][7] and r[1][8] by a 1-bit incrementer-with-OR; the
//            same is done for x2 with r[3][7] and r[3][8]. A 9-bit r never
//            exceeds 127 + 255 = 382, so r[8] and r[7] are never both 1 and
//            the OR is exact.
//   level 3  f  = {g1[11:4]} + {x2[5:0], r[2][0], pp[4][0]}  (weight 2^4)
//            where g1 is group 1's sum; f's carry increments the four top
//            bits of group 2 through a 4-bit incrementer, whose carry out
//            is product bit 16.
//
// Product bits 0..3 are pp[0][0], r[0][0], x1[0], x1[1]; bits 4..11 come
// from f, bits 12..16 from the top incrementer.
//
// Interface: `mlr` and `mnd` are the unsigned operands, `p` the 17-bit
// product; p[16] is always 0 for 8-bit operands and is kept to match the
// 17 product pins of the reference implementation. Fully combinational,
// no clock: the product is valid one propagation delay after the operands.
//
// The grouping of partial products, the seven 8-bit adders and the names
// mlr, mnd, p and pp follow the reference design. How carries that fall
// above each 8-bit adder are absorbed (the 1-bit and 4-bit incrementers)
// is drawn only loosely there and is this design's own.
module multiply
  import mult_pkg::*;
(
  input  logic [MUL_W-1:0]  mlr,  // multiplier operand
  input  logic [MUL_W-1:0]  mnd,  // multiplicand operand
  output logic [PROD_W-1:0] p     // product
);
  // ---- partial products ------------------------------------------------
  logic [MUL_W-1:0] pp [MUL_W];

  for (genvar i = 0; i < MUL_W; i++) begin : g_rows
    and_row #(.WIDTH(MUL_W)) u_row (
      .mlr      (mlr),
      .mndcheck (mnd[i]),
      .tp       (pp[i])
    );
  end

  // ---- level 1: four pair sums -----------------------------------------
  logic [MUL_W:0] r [MUL_W/2];   // {carry, sum}

  for (genvar k = 0; k < MUL_W/2; k++) begin : g_pairs
    mux_adder8 u_add (
      .a8   ({1'b0, pp[2*k][MUL_W-1:1]}),
      .b8   (pp[2*k+1]),
      .s8   (r[k][MUL_W-1:0]),
      .cout (r[k][MUL_W])
    );
  end

  // ---- level 2: two group sums -----------------------------------------
  logic [MUL_W-1:0] x1, x2;
  logic             cx1, cx2;
  logic             g1_10, g1_11;   // group 1, product columns 10 and 11
  logic             g2_14, g2_15;   // group 2, product columns 14 and 15

  mux_adder8 u_add_x1 (
    .a8   (r[0][MUL_W:1]),
    .b8   ({r[1][MUL_W-2:0], pp[2][0]}),
    .s8   (x1),
    .cout (cx1)
  );

  incrementer #(.WIDTH(1)) u_merge1 (
    .its   (r[1][MUL_W-1]),
    .itc   (cx1),
    .itc1  (r[1][MUL_W]),
    .is8   (g1_10),
    .icout (g1_11)
  );

  mux_adder8 u_add_x2 (
    .a8   (r[2][MUL_W:1]),
    .b8   ({r[3][MUL_W-2:0], pp[6][0]}),
    .s8   (x2),
    .cout (cx2)
  );

  incrementer #(.WIDTH(1)) u_merge2 (
    .its   (r[3][MUL_W-1]),
    .itc   (cx2),
    .itc1  (r[3][MUL_W]),
    .is8   (g2_14),
    .icout (g2_15)
  );

  // ---- level 3: final sum ----------------------------------------------
  logic [MUL_W-1:0] f;
  logic             cf;

  mux_adder8 u_add_f (
    .a8   ({g1_11, g1_10, x1[MUL_W-1:2]}),
    .b8   ({x2[MUL_W-3:0], r[2][0], pp[4][0]}),
    .s8   (f),
    .cout (cf)
  );

  logic [NIB_W-1:0] top;
  logic             p16;

  incrementer #(.WIDTH(NIB_W)) u_inc_top (
    .its   ({g2_15, g2_14, x2[MUL_W-1:MUL_W-2]}),
    .itc   (cf),
    .itc1  (1'b0),
    .is8   (top),
    .icout (p16)
  );

  always_comb p = {p16, top, f, x1[1:0], r[0][0], pp[0][0]};
endmodule
