// One row of partial products.
//
// Every bit of the multiplier operand `mlr` is ANDed with one bit of the
// multiplicand, `mndcheck`, giving the row `tp`. The multiplier instantiates
// eight rows, one per multiplicand bit, and all of them work in parallel.
// Purely combinational; the row is valid one gate delay after its inputs.
// The port names and the single AND stage follow the published schematic of
// this row; the width parameter is this design's own.
module and_row #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] mlr,       // multiplier operand
  input  logic             mndcheck,  // one multiplicand bit
  output logic [WIDTH-1:0] tp         // partial-product row
);
  always_comb tp = mlr & {WIDTH{mndcheck}};
endmodule
