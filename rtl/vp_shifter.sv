// vp_shifter: W-bit (2M-bit in the coprocessor) logical shifter.
//
// Shifts the input right (dir = 1) or left (dir = 0) by 0 to W bit positions;
// a shift by W gives zero. Zeros are shifted in. Combinational. It aligns a
// 2M-bit addend with the segments of the long accumulator: the part that lands
// in segment j is the addend shifted right by the bit offset, the part that
// lands in segment j+1 is the addend shifted left by W minus the offset.
module vp_shifter #(
  parameter int unsigned W = 64,
  localparam int unsigned SW = $clog2(W + 1)
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] amt,
  input  logic          dir,
  output logic [W-1:0]  dout
);
  always_comb begin
    if (amt >= SW'(W))  dout = '0;
    else if (dir)       dout = din >> amt;
    else                dout = din << amt;
  end
endmodule
