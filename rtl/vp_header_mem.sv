// vp_header_mem: the header half of the VPIAC register file, 64 words of 32
// bits (one vp_hdr_t per variable-precision register).
//
// Two headers are read per cycle (combinational read) and one is written on
// the rising clock edge. The size and port count follow the published
// register file; the read timing is this design's choice (see vp_regfile).
module vp_header_mem
  import vpiac_pkg::*;
#(
  parameter int unsigned NWORDS = 64
) (
  input  logic                      clk,
  input  logic [$clog2(NWORDS)-1:0] ra0,
  output vp_hdr_t                   rd0,
  input  logic [$clog2(NWORDS)-1:0] ra1,
  output vp_hdr_t                   rd1,
  input  logic                      we,
  input  logic [$clog2(NWORDS)-1:0] wa,
  input  vp_hdr_t                   wd
);
  logic [31:0] r0, r1;

  vp_regfile #(.DEPTH(NWORDS), .WIDTH(32)) u_mem (
    .clk, .ra0, .rd0(r0), .ra1, .rd1(r1), .we, .wa, .wd(wd)
  );

  assign rd0 = vp_hdr_t'(r0);
  assign rd1 = vp_hdr_t'(r1);
endmodule
