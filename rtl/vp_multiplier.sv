// vp_multiplier: M-bit by M-bit unsigned significand multiplier, two cycles.
//
// The first stage generates the M partial products and reduces them with a
// chain of 3:2 carry-save adders to two numbers (a sum vector and a carry
// vector) which are registered. The second stage adds those two numbers with
// a carry-propagate adder and registers the 2M-bit product. A product whose
// operands are presented with in_valid in cycle t appears with out_valid in
// cycle t+2; a new multiplication can start every cycle. The two-cycle split
// (reduction, then final addition) follows the published timing; the reduction
// in the document is a Reduced Area Multiplier, here a plain carry-save array,
// which computes the same sum.
module vp_multiplier #(
  parameter int unsigned M = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic           out_valid,
  output logic [2*M-1:0] p
);
  logic [2*M-1:0] s_comb, c_comb;
  logic [2*M-1:0] s_q, c_q;
  logic           v1_q;

  // Carry-save reduction of the partial products a * b[i] << i.
  always_comb begin
    logic [2*M-1:0] pp, s_n, c_n;
    s_comb = '0;
    c_comb = '0;
    for (int i = 0; i < M; i++) begin
      pp     = b[i] ? ({{M{1'b0}}, a} << i) : '0;
      s_n    = s_comb ^ c_comb ^ pp;
      c_n    = ((s_comb & c_comb) | (s_comb & pp) | (c_comb & pp)) << 1;
      s_comb = s_n;
      c_comb = c_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q       <= '0;
      c_q       <= '0;
      v1_q      <= 1'b0;
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      s_q       <= s_comb;
      c_q       <= c_comb;
      v1_q      <= in_valid;
      p         <= s_q + c_q;
      out_valid <= v1_q;
    end
  end
endmodule
