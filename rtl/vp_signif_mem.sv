// vp_signif_mem: the significand half of the VPIAC register file, 256 words
// of M bits.
//
// A register's significand words F[0] (most significant) .. F[L] are stored at
// consecutive addresses starting at the index held in its header. Two words
// are read per cycle (combinational read) and one is written on the rising
// clock edge. Size and port count follow the published register file; the
// read timing is this design's choice (see vp_regfile).
module vp_signif_mem #(
  parameter int unsigned M      = 32,
  parameter int unsigned NWORDS = 256
) (
  input  logic                      clk,
  input  logic [$clog2(NWORDS)-1:0] ra0,
  output logic [M-1:0]              rd0,
  input  logic [$clog2(NWORDS)-1:0] ra1,
  output logic [M-1:0]              rd1,
  input  logic                      we,
  input  logic [$clog2(NWORDS)-1:0] wa,
  input  logic [M-1:0]              wd
);
  vp_regfile #(.DEPTH(NWORDS), .WIDTH(M)) u_mem (
    .clk, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd
  );
endmodule
