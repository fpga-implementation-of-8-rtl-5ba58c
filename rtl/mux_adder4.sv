// 4-bit adder built from multiplexers instead of a carry chain.
//
// The whole 4-bit addition is a 256-row truth table indexed by the eight
// input bits. Six of the inputs, the upper three bits of each operand, drive
// the select lines of one 64:1 multiplexer per output bit (four sum bits and
// the carry). Each of the 64 data inputs of such a multiplexer is the
// corresponding truth-table column restricted to the two remaining inputs,
// the operands' bit 0, so it is a small function of those two bits. No carry
// ever ripples: every output is one table lookup deep.
//
// Interface: `a` packs both operands the way the published adder schematic
// labels its input, a[3:0] is operand A and a[7:4] is operand B. `s` is the
// 4-bit sum and `cout` the carry. There is no carry input. Combinational.
//
// The truth-table construction and the 64:1 multiplexer with six select
// lines follow the reference design. Which six inputs act as selects is not
// stated there; the choice of the upper three bits of each operand is this
// design's own. The table is computed at elaboration from its definition
// (row index {B,A} holds {carry, sum} = A + B).
module mux_adder4 (
  input  logic [7:0] a,     // {operand B, operand A}
  output logic [3:0] s,     // sum
  output logic       cout   // carry out
);
  typedef logic [4:0] tt_row_t;           // {carry, sum[3:0]}
  typedef tt_row_t [255:0] truth_table_t;

  function automatic truth_table_t build_table();
    truth_table_t t;
    for (int i = 0; i < 256; i++) begin
      t[i] = tt_row_t'({1'b0, i[3:0]} + {1'b0, i[7:4]});
    end
    return t;
  endfunction

  localparam truth_table_t TT = build_table();

  // The table regrouped for the multiplexers: COLS[k][j] is the 4-entry
  // function of {B0, A0} that feeds data input j of the multiplexer for
  // output bit k, where j = {B3, B2, B1, A3, A2, A1}.
  typedef logic [4:0][63:0][3:0] mux_columns_t;

  function automatic mux_columns_t build_columns(truth_table_t t);
    mux_columns_t c;
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 64; j++)
        for (int l = 0; l < 4; l++) begin
          logic [5:0] js;
          logic [1:0] ls;
          js = j[5:0];
          ls = l[1:0];
          c[k][j][l] = t[{js[5:3], ls[1], js[2:0], ls[0]}][k];
        end
    return c;
  endfunction

  localparam mux_columns_t COLS = build_columns(TT);

  // Select lines: {B3, B2, B1, A3, A2, A1}; data-side inputs: {B0, A0}.
  logic [5:0] sel;
  logic [1:0] low;
  always_comb sel = {a[7:5], a[3:1]};
  always_comb low = {a[4], a[0]};

  // data[k][j] is data input j of the multiplexer for output bit k.
  logic [4:0][63:0] data;
  always_comb begin
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 64; j++)
        data[k][j] = COLS[k][j][low];
  end

  // Five 64:1 multiplexers.
  logic [4:0] y;
  always_comb begin
    for (int k = 0; k < 5; k++) y[k] = data[k][sel];
  end

  always_comb {cout, s} = y;
endmodule
