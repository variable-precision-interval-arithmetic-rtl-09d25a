// vp_selector: operand selector and word comparator.
//
// Holds four W-bit input words (from the register file, the long accumulator
// and the multiplier) and routes two of them, chosen by sel_a and sel_b, to
// its outputs, which feed the adder and the shifter. It also compares the two
// selected words as unsigned numbers (lt, eq, gt). Comparing two
// variable-precision numbers word by word from the most significant word down
// uses this comparator. Combinational. The four-word width follows the
// published hardware table; the select encoding is this design's own.
module vp_selector #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  input  logic [1:0]   sel_a,
  input  logic [1:0]   sel_b,
  output logic [W-1:0] out_a,
  output logic [W-1:0] out_b,
  output logic         lt,
  output logic         eq,
  output logic         gt
);
  logic [W-1:0] w [4];
  assign w[0] = in0;
  assign w[1] = in1;
  assign w[2] = in2;
  assign w[3] = in3;
  assign out_a = w[sel_a];
  assign out_b = w[sel_b];
  assign lt = (out_a < out_b);
  assign eq = (out_a == out_b);
  assign gt = (out_a > out_b);
endmodule
