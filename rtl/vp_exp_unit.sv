// vp_exp_unit: 16-bit exponent adder/subtractor.
//
// Adds (sub = 0) or subtracts (sub = 1) two biased 16-bit exponents and
// removes or restores the bias, so that the result is again a biased
// exponent: a product's exponent is ea + eb - 32768, a quotient's would be
// ea - eb + 32768. It also compares the two exponents (the operation that
// picks the operand with the larger exponent in an addition). The result is
// given wide and signed so that overflow and underflow are visible: ovf when
// it exceeds 65535, unf when it is below 0. Combinational.
module vp_exp_unit (
  input  logic [15:0]        ea,
  input  logic [15:0]        eb,
  input  logic               sub,
  output logic signed [18:0] e,
  output logic               ovf,
  output logic               unf,
  output logic               a_gt_b,
  output logic               a_eq_b
);
  always_comb begin
    if (sub) e = 19'($signed({3'b000, ea})) - 19'($signed({3'b000, eb})) + 19'sd32768;
    else     e = 19'($signed({3'b000, ea})) + 19'($signed({3'b000, eb})) - 19'sd32768;
  end
  assign ovf    = (e > 19'sd65535);
  assign unf    = (e < 19'sd0);
  assign a_gt_b = (ea > eb);
  assign a_eq_b = (ea == eb);
endmodule
