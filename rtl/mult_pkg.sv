// Shared sizes of the multiplexer-adder multiplier.
//
// The multiplier takes two 8-bit unsigned operands and brings out a 17-bit
// product (bit 16 is the carry out of the last incrementer and is always 0
// for 8-bit operands, but it is kept so that the product port matches the
// 17 output pins of the reference implementation). The adders split every
// 8-bit addition into two 4-bit nibbles.
package mult_pkg;
  localparam int unsigned MUL_W  = 8;            // operand width
  localparam int unsigned NIB_W  = 4;            // width of one multiplexer adder
  localparam int unsigned PROD_W = 2*MUL_W + 1;  // product width, 17
endpackage
