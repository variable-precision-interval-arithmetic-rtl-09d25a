// vp_adder: W-bit (2M-bit in the coprocessor) adder with carry in and carry
// out, able to subtract.
//
// With sub = 0 it forms a + b + cin; with sub = 1 it forms a + ~b + cin, which
// is a - b when cin = 1 and a - b - 1 (a borrow taken in) when cin = 0. cout is
// the carry out of the most significant bit; when subtracting it is 1 when no
// borrow leaves the word. Purely combinational. The carry chaining between
// successive additions follows the published addition algorithm; the
// subtract input is this design's way of doing borrows with the same adder.
module vp_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] bx;
  assign bx = sub ? ~b : b;
  assign {cout, s} = {1'b0, a} + {1'b0, bx} + {{W{1'b0}}, cin};
endmodule
