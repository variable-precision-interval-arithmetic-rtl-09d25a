// vpiac: variable-precision, interval arithmetic coprocessor (VPIAC) with an
// M-bit significand data path (M = 32 by default, the 32-bit design; 16 and 64
// are the other two published sizes).
//
// The coprocessor sits beside a host processor. The host loads operands into
// the register file, issues instructions, and reads results back:
//  * register file: a 64 x 32-bit header memory (exponent, sign, type, length,
//    index of the first significand word) and a 256 x M-bit significand
//    memory, each with two read ports and one write port;
//  * vp_interval_seq decodes an instruction into point micro-operations;
//  * vp_dp_ctrl runs each micro-operation with the M x M multiplier, the
//    operand selector, the 16-bit exponent unit, the long accumulator
//    (64 segments of 2M bits, with all-ones/all-zeros flags) and the
//    divider / square-root unit.
//
// Host interface: while busy is low, the host may write a header
// (hdr_we/hdr_addr/hdr_wdata) or a significand word (sig_we/...), and read one
// of each combinationally (hdr_addr -> hdr_rdata, sig_addr -> sig_rdata). The
// host must not access the register file in the cycle it raises start or
// while busy. An instruction (op, dst, srca, srcb, rmode, prec) is taken with
// start when busy is low; done pulses when it has finished. prec is the length
// field L of the result (L+1 words). Status: cmp_res of the last comparison,
// empty after an empty intersection, and the inexact/overflow/underflow/invalid
// flags of the last rounded result, rel the outcome of the last interval
// relational instruction (X_EQ, X_SUBSET, X_SUPSET, X_INSIDE, X_DISJ).
//
// Division and square root use a bit-serial divider (vp_divsqrt) in place of
// the published short-reciprocal algorithm. Interval dot products are built
// from ACCCLR, X_DOTLO (or X_DOTHI) per element and ACCRND rounding down (up).
//
// rst_n is an asynchronous reset in the blocks below and is also used
// synchronously here, as the disable condition of the two handshake
// assertions at the end; lint reports that mix, which is intended.
module vpiac
  import vpiac_pkg::*;
#(
  parameter int unsigned M    = 32,
  parameter int unsigned NSEG = 64,
  parameter int unsigned NREG = 64,
  parameter int unsigned NSW  = 256,
  localparam int unsigned RB  = $clog2(NREG),
  localparam int unsigned IB  = $clog2(NSW)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access to the register file
  input  logic          hdr_we,
  input  logic [RB-1:0] hdr_addr,
  input  vp_hdr_t       hdr_wdata,
  output vp_hdr_t       hdr_rdata,
  input  logic          sig_we,
  input  logic [IB-1:0] sig_addr,
  input  logic [M-1:0]  sig_wdata,
  output logic [M-1:0]  sig_rdata,
  // instructions
  input  logic          start,
  input  vp_op_e        op,
  input  logic [RB-1:0] dst,
  input  logic [RB-1:0] srca,
  input  logic [RB-1:0] srcb,
  input  vp_rmode_e     rmode,
  input  logic [4:0]    prec,
  output logic          busy,
  output logic          done,
  output vp_cmp_e       cmp_res,
  output logic          empty,
  output logic          rel,
  output logic          inexact,
  output logic          exc_ovf,
  output logic          exc_unf,
  output logic          exc_inv
);
  // ---------------- sequencer ----------------
  logic          u_start, u_abs, u_done;
  vp_uop_e       u_op;
  logic [RB-1:0] u_dst, u_a, u_b;
  vp_rmode_e     u_rm;
  logic [4:0]    u_prec;
  vp_cmp_e       u_cmp;
  logic [2:0]    u_cls_a, u_cls_b;
  logic          seq_busy, dp_busy;

  vp_interval_seq #(.NREG(NREG)) u_seq (
    .clk, .rst_n, .start, .op, .dst, .srca, .srcb, .rmode, .prec,
    .busy(seq_busy), .done, .empty, .rel,
    .u_start, .u_op, .u_dst, .u_a, .u_b, .u_rm, .u_prec, .u_abs,
    .u_done, .u_cmp, .u_cls_a, .u_cls_b
  );

  // ---------------- data path ----------------
  logic [RB-1:0] c_hra0, c_hra1, c_hwa;
  vp_hdr_t       hrd0, hrd1, c_hwd;
  logic          c_hwe;
  logic [IB-1:0] c_sra0, c_sra1, c_swa;
  logic [M-1:0]  srd0, srd1, c_swd;
  logic          c_swe;

  vp_dp_ctrl #(.M(M), .NSEG(NSEG), .NREG(NREG), .NSW(NSW)) u_dp (
    .clk, .rst_n,
    .start(u_start), .uop(u_op), .dst(u_dst), .srca(u_a), .srcb(u_b),
    .rmode(u_rm), .prec(u_prec), .cmp_abs(u_abs),
    .busy(dp_busy), .done(u_done), .cmp_res(u_cmp), .cls_a(u_cls_a), .cls_b(u_cls_b),
    .inexact, .exc_ovf, .exc_unf, .exc_inv,
    .hra0(c_hra0), .hrd0, .hra1(c_hra1), .hrd1, .hwe(c_hwe), .hwa(c_hwa), .hwd(c_hwd),
    .sra0(c_sra0), .srd0, .sra1(c_sra1), .srd1, .swe(c_swe), .swa(c_swa), .swd(c_swd)
  );

  assign busy    = seq_busy;
  assign cmp_res = u_cmp;

  // ---------------- register file, shared with the host when idle ----------------
  logic host;
  assign host = !seq_busy && !start;

  logic [RB-1:0] h_ra0, h_wa;
  vp_hdr_t       h_wd;
  logic          h_we;
  logic [IB-1:0] s_ra0, s_wa;
  logic [M-1:0]  s_wd;
  logic          s_we;

  always_comb begin
    if (host) begin
      h_ra0 = hdr_addr; h_we = hdr_we; h_wa = hdr_addr; h_wd = hdr_wdata;
      s_ra0 = sig_addr; s_we = sig_we; s_wa = sig_addr; s_wd = sig_wdata;
    end else begin
      h_ra0 = c_hra0;   h_we = c_hwe;  h_wa = c_hwa;    h_wd = c_hwd;
      s_ra0 = c_sra0;   s_we = c_swe;  s_wa = c_swa;    s_wd = c_swd;
    end
  end

  vp_header_mem #(.NWORDS(NREG)) u_hmem (
    .clk, .ra0(h_ra0), .rd0(hrd0), .ra1(c_hra1), .rd1(hrd1),
    .we(h_we), .wa(h_wa), .wd(h_wd)
  );

  vp_signif_mem #(.M(M), .NWORDS(NSW)) u_smem (
    .clk, .ra0(s_ra0), .rd0(srd0), .ra1(c_sra1), .rd1(srd1),
    .we(s_we), .wa(s_wa), .wd(s_wd)
  );

  assign hdr_rdata = hrd0;
  assign sig_rdata = srd0;

  // the data path only starts while the sequencer is busy
  assert property (@(posedge clk) disable iff (!rst_n) u_start |-> seq_busy);
  // the host does not write while an instruction runs
  assert property (@(posedge clk) disable iff (!rst_n) seq_busy |-> !(hdr_we || sig_we));
  logic unused;
  assign unused = dp_busy;
endmodule
