// Incrementer with an ORed carry, the carry-merging stage of the
// multiplexer adder.
//
// `is8` = `its` + `itc` (modulo 2^WIDTH). The carry of that increment is
// ORed with `itc1` to form `icout`. In the 8-bit adder `its` is the high
// nibble's sum, `itc` the low nibble's carry and `itc1` the high nibble's
// carry; the two carries can never both be 1, so the OR is an exact sum.
// The increment is written as a prefix AND: bit i flips when `itc` is set
// and every lower bit of `its` is 1, so no adder is needed.
//
// Combinational. Port names follow the published adder schematic; the
// reference design gives only the function of the incrementer, so the
// prefix-AND form and the WIDTH parameter (default 4, the reference size)
// are this design's own. The multiplier also uses WIDTH = 1 where the same
// increment-and-OR merges two carries above an 8-bit adder.
module incrementer #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] its,    // value to increment
  input  logic             itc,    // increment (carry in)
  input  logic             itc1,   // carry ORed into the carry out
  output logic [WIDTH-1:0] is8,    // incremented value
  output logic             icout   // (carry of the increment) OR itc1
);
  always_comb begin
    logic run;  // itc and every lower bit of its are 1
    run = itc;
    for (int i = 0; i < WIDTH; i++) begin
      is8[i] = its[i] ^ run;
      run    = run & its[i];
    end
    icout = run | itc1;
  end
endmodule
