// vp_dp_ctrl: data path and data path control unit of the VPIAC. It executes
// one point micro-operation (vp_uop_e) at a time on variable-precision numbers
// held in the register file, using the multiplier, the operand selector, the
// exponent unit and the long accumulator, which it instantiates.
//
// How an operation runs. The headers of the two sources are read in the first
// cycle and the destination header in the second. Special operands (zero,
// infinity, not-a-number) are decided from the headers alone. Otherwise:
//  * ADD/SUB/MID: the accumulator is cleared and its weight set from the larger
//    exponent; the significand words of both operands are added into it two
//    words (one 2M-bit addend) at a time, each with its own sign, so that the
//    sum is exact in the accumulator.
//  * MUL: M x M partial products F_A[i] * F_B[j] are formed least significant
//    column first and added into the accumulator at position (i+j)*M.
//    SQR forms only the products with i <= j and adds those with i < j twice
//    (one bit position higher), i.e. (n^2+n)/2 products.
//  * MAC adds the exact product into the accumulator without clearing it (dot
//    products), ACCADD adds one number the same way; ACCRND rounds what the
//    accumulator holds.
//  * DIV/SQRT load the significands into vp_divsqrt, which produces
//    (prec+1)*M + 2 result bits one per cycle; these are added into the
//    cleared accumulator W bits at a time, a non-zero remainder adds a sticky
//    one below them, and the result is rounded like any other. The quotient's
//    exponent is E_A - E_B, the root's (E_A - (E_A odd)) / 2 with the radicand
//    doubled for an odd exponent. INF writes -inf (rmode down) or +inf.
// The result is then normalised and rounded: the leading one of the
// accumulator's magnitude fixes the exponent; the last kept bit, the guard bit
// and a sticky bit (all lower bits, helped by the segment flags) decide with
// the rounding mode whether one unit in the last place is added (for a
// negative value: subtracted) in the accumulator itself; the (prec+1) words
// after the leading one are then written to the destination's significand
// area, followed by its header. Rounding carries into a new leading bit are
// handled by re-reading the leading-one position after the increment.
// CMP compares sign, type and exponent, then the significand words from the
// most significant down with the selector's comparator. MOV copies a number
// word by word. CLS reports the signs and types of both sources.
//
// Interface: start with uop/dst/srca/srcb/rmode/prec is taken when busy is
// low; done pulses for one cycle at the end. Register-file ports are wired to
// the header and significand memories (combinational reads). Results land at
// the significand index the destination header already holds; prec is the
// result's length field L (L+1 words).
//
// Following the document: the header/significand split, the operations done
// in the long accumulator, least-significant-first partial products, the
// symmetric square, MID by decrementing the exponent, word-serial comparison.
// This design's own choices: the exact order of cycles (so the cycle counts
// differ from the published ones), rounding by adding an ulp in the
// accumulator, the accumulator weight for dot products (the first product is
// placed NSEG/4 segments below the top), +0 for exact zero results, and
// infinity/zero on exponent overflow/underflow, and the bit-serial divider in
// place of the published short-reciprocal division (so division and square
// root take about one cycle per result bit).
module vp_dp_ctrl
  import vpiac_pkg::*;
#(
  parameter int unsigned M    = 32,
  parameter int unsigned NSEG = 64,
  parameter int unsigned NREG = 64,
  parameter int unsigned NSW  = 256,
  localparam int unsigned W   = 2 * M,
  localparam int unsigned RB  = $clog2(NREG),
  localparam int unsigned IB  = $clog2(NSW),
  localparam int unsigned SB  = $clog2(NSEG),
  localparam int unsigned PB  = $clog2(NSEG * W) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // micro-operation
  input  logic          start,
  input  vp_uop_e       uop,
  input  logic [RB-1:0] dst,
  input  logic [RB-1:0] srca,
  input  logic [RB-1:0] srcb,
  input  vp_rmode_e     rmode,
  input  logic [4:0]    prec,
  input  logic          cmp_abs,
  output logic          busy,
  output logic          done,
  output vp_cmp_e       cmp_res,
  output logic [2:0]    cls_a,      // {sign, type} of srca
  output logic [2:0]    cls_b,      // {sign, type} of srcb
  output logic          inexact,    // last rounded result was inexact
  output logic          exc_ovf,    // exponent overflow (result set to infinity)
  output logic          exc_unf,    // exponent underflow (result set to zero)
  output logic          exc_inv,    // invalid operation (result set to NaN)
  // header memory
  output logic [RB-1:0] hra0,
  input  vp_hdr_t       hrd0,
  output logic [RB-1:0] hra1,
  input  vp_hdr_t       hrd1,
  output logic          hwe,
  output logic [RB-1:0] hwa,
  output vp_hdr_t       hwd,
  // significand memory
  output logic [IB-1:0] sra0,
  input  logic [M-1:0]  srd0,
  output logic [IB-1:0] sra1,
  input  logic [M-1:0]  srd1,
  output logic          swe,
  output logic [IB-1:0] swa,
  output logic [M-1:0]  swd
);
  typedef enum logic [4:0] {
    S_IDLE, S_HDR, S_DST, S_DISP, S_SPEC, S_AW, S_AWW, S_PPR, S_PPM, S_PPA,
    S_PPW, S_RND, S_RNDW, S_WR, S_HW, S_CMPW, S_MOVW, S_MOVH, S_FIN,
    S_DLD, S_DGO, S_DWT, S_DDEP, S_DDW, S_DSTK, S_DSTW
  } st_e;

  localparam int BIAS = 32768;
  localparam int HEAD = int'(NSEG / 4);

  st_e        st;
  vp_uop_e    op_q;
  logic [RB-1:0] dst_q, srca_q, srcb_q;
  vp_rmode_e  rm_q;
  logic [4:0] prec_q;
  logic       abs_q;
  vp_hdr_t    ha, hb, hd;
  int         acc_exp;      // unbiased weight exponent of accumulator bit position 0
  logic       acc_valid;    // a dot product has set acc_exp
  logic       opnd_q;       // 0: operand A, 1: operand B
  logic [5:0] k_q;          // word index
  logic [5:0] i_q, j_q;     // partial product indices
  logic       spec_sign;
  vp_type_e   spec_type;

  // ---------------- functional units ----------------
  logic          la_clr, la_req, la_sub, la_busy, la_done;
  logic [W-1:0]  la_val;
  logic signed [31:0] la_pos;
  logic [SB:0]   la_ri0, la_ri1;
  logic [W-1:0]  la_m0, la_m1;
  logic          la_neg, la_zero, la_lost, la_ovf;
  logic [PB-1:0] la_lead;
  logic [SB-1:0] la_low;

  vp_long_acc #(.M(M), .NSEG(NSEG)) u_la (
    .clk, .rst_n, .clr(la_clr),
    .add_req(la_req), .add_val(la_val), .add_pos(la_pos), .add_sub(la_sub),
    .busy(la_busy), .done(la_done),
    .rd_idx0(la_ri0), .rd_mag0(la_m0), .rd_idx1(la_ri1), .rd_mag1(la_m1),
    .neg(la_neg), .zero(la_zero), .lead_pos(la_lead), .low_seg(la_low),
    .lost(la_lost), .ovf(la_ovf)
  );

  logic          mul_v, mul_ov;
  logic [W-1:0]  mul_p;
  vp_multiplier #(.M(M)) u_mul (
    .clk, .rst_n, .in_valid(mul_v), .a(srd0), .b(srd1), .out_valid(mul_ov), .p(mul_p)
  );

  // divider / square-root unit; its result bits are moved into the
  // accumulator W bits at a time, then rounded like any other result
  localparam int unsigned QW = M * 32 + 4;
  localparam int unsigned CW = $clog2(QW + 1);
  logic          dv_clr, dv_we, dv_aen, dv_ben, dv_start, dv_sqrt, dv_odd;
  logic          dv_busy, dv_done, dv_rnz;
  logic [CW-1:0] dv_nq;
  logic [QW-1:0] dv_q;
  vp_divsqrt #(.M(M), .MAXW(32)) u_div (
    .clk, .rst_n, .clr(dv_clr), .ld_we(dv_we), .ld_idx(k_q[4:0]),
    .ld_a_en(dv_aen), .ld_a(srd0), .ld_b_en(dv_ben), .ld_b(srd1),
    .start(dv_start), .sqrt_mode(dv_sqrt), .odd(dv_odd), .nq(dv_nq),
    .busy(dv_busy), .done(dv_done), .q(dv_q), .rem_nz(dv_rnz)
  );
  logic          dv_rnz_q;
  logic [QW+W-1:0] dv_qa;                  // result bits aligned to the top
  logic [CW-1:0]   dv_nch;                 // number of W-bit chunks
  assign dv_sqrt = (op_q == U_SQRT);
  assign dv_nq   = CW'((32'(prec_q) + 32'd1) * 32'(M) + 32'd2);
  assign dv_qa   = {dv_q, {W{1'b0}}} << (QW - int'(dv_nq));
  assign dv_nch  = CW'((32'(dv_nq) + 32'(W) - 32'd1) / 32'(W));

  logic signed [18:0] ex_e;
  logic ex_ovf, ex_unf, ex_agtb, ex_aeqb;
  vp_exp_unit u_exp (
    .ea(ha.exp), .eb(hb.exp), .sub(1'b0), .e(ex_e), .ovf(ex_ovf), .unf(ex_unf),
    .a_gt_b(ex_agtb), .a_eq_b(ex_aeqb)
  );

  // selector: in0 = register-file word pair, in1 = second operand's word,
  // in2 = accumulator segment, in3 = multiplier product
  logic [1:0]   sel_a, sel_b;
  logic [W-1:0] sel_in0, sel_in1, sel_oa, sel_ob;
  logic         sel_lt, sel_eq, sel_gt;
  vp_selector #(.W(W)) u_sel (
    .in0(sel_in0), .in1(sel_in1), .in2(la_m0), .in3(mul_p),
    .sel_a, .sel_b, .out_a(sel_oa), .out_b(sel_ob),
    .lt(sel_lt), .eq(sel_eq), .gt(sel_gt)
  );

  // ---------------- helpers ----------------
  vp_hdr_t hx;                         // current operand of an addition
  assign hx = opnd_q ? hb : ha;

  logic eff_sub_b;                     // B enters with inverted sign
  assign eff_sub_b = (op_q == U_SUB);

  function automatic int unb(input logic [15:0] e);
    return int'({16'd0, e}) - BIAS;
  endfunction

  logic a_norm, b_norm;
  assign a_norm = (ha.vtype == T_NORMAL);
  assign b_norm = (hb.vtype == T_NORMAL);

  // last significand word index of the current loop
  logic [5:0] lastk;
  assign lastk = {1'b0, hx.len};

  // partial product loop bounds for column s = i + j
  logic [5:0] la_len, lb_len;
  assign la_len = {1'b0, ha.len};
  assign lb_len = {1'b0, hb.len};
  logic [6:0] col;
  assign col = {1'b0, i_q} + {1'b0, j_q};
  logic sqr_mode;
  assign sqr_mode = (op_q == U_SQR);

  // rounding
  logic [31:0] nbits;
  logic [31:0] pu, pg;
  logic        r_lsb, r_guard, r_sticky, r_up;
  logic [W-1:0] gmask;
  assign nbits = (32'(prec_q) + 32'd1) * 32'(M);
  assign pu    = 32'(la_lead) + nbits - 32'd1;
  assign pg    = pu + 32'd1;

  // result word extraction
  logic [31:0] pw;
  logic [2*W-1:0] win;
  assign pw  = 32'(la_lead) + 32'(k_q) * 32'(M);
  assign win = {la_m0, la_m1} << (pw % W);

  // exponent of the result
  logic signed [31:0] e_res;
  assign e_res = acc_exp - int'(la_lead) + BIAS - ((op_q == U_MID) ? 1 : 0);

  // ---------------- combinational port drive ----------------
  always_comb begin
    hra0 = srca_q; hra1 = srcb_q;
    hwe = 1'b0; hwa = dst_q; hwd = '0;
    sra0 = '0; sra1 = '0; swe = 1'b0; swa = '0; swd = '0;
    la_clr = 1'b0; la_req = 1'b0; la_val = '0; la_pos = '0; la_sub = 1'b0;
    la_ri0 = '0; la_ri1 = '0;
    mul_v = 1'b0;
    sel_a = 2'd0; sel_b = 2'd1;
    sel_in0 = '0; sel_in1 = '0;
    r_lsb = 1'b0; r_guard = 1'b0; r_sticky = 1'b0; r_up = 1'b0; gmask = '0;
    dv_clr = 1'b0; dv_we = 1'b0; dv_aen = 1'b0; dv_ben = 1'b0; dv_start = 1'b0;
    dv_odd = ha.exp[0];

    unique case (st)
      S_IDLE: begin hra0 = srca; hra1 = srcb; end
      S_DST:  hra0 = dst_q;
      S_AW: begin
        sra0 = hx.idx + IB'(k_q);
        sra1 = hx.idx + IB'(k_q) + 1'b1;
        sel_in0 = {srd0, (k_q + 6'd1 <= lastk) ? srd1 : {M{1'b0}}};
        sel_a   = 2'd0;
        la_req  = 1'b1;
        la_val  = sel_oa;
        la_pos  = acc_exp - unb(hx.exp) + int'(k_q) * M;
        la_sub  = hx.sign ^ (opnd_q & eff_sub_b);
      end
      S_PPR: begin
        sra0  = ha.idx + IB'(i_q);
        sra1  = hb.idx + IB'(j_q);
        mul_v = 1'b1;
      end
      S_PPA: begin
        sel_a  = 2'd3;
        la_req = 1'b1;
        la_val = sel_oa;
        la_pos = acc_exp - unb(ha.exp) - unb(hb.exp) + int'(col) * M - 1
                 - ((sqr_mode && i_q != j_q) ? 1 : 0);
        la_sub = ha.sign ^ hb.sign;
      end
      S_DLD: begin
        sra0   = ha.idx + IB'(k_q);
        sra1   = hb.idx + IB'(k_q);
        dv_we  = 1'b1;
        dv_aen = (k_q <= la_len);
        dv_ben = (op_q == U_DIV) && (k_q <= lb_len);
      end
      S_DGO: dv_start = 1'b1;
      S_DDEP: begin
        la_req = 1'b1;
        la_val = dv_qa[QW+W-1 - int'(k_q) * W -: W];
        la_pos = W + int'(k_q) * W;
        la_sub = spec_sign;
      end
      S_DSTK: begin
        // sticky bit for an inexact quotient or root, below the guard bit
        la_req = 1'b1;
        la_val = {1'b1, {(W-1){1'b0}}};
        la_pos = W + int'(dv_nq) + 2;
        la_sub = spec_sign;
      end
      S_RND: begin
        la_ri0 = (SB+1)'(pu / W);
        la_ri1 = (SB+1)'(pg / W);
        r_lsb  = la_m0[W - 1 - (pu % W)];
        if (pg < NSEG * W) begin
          r_guard  = la_m1[W - 1 - (pg % W)];
          gmask    = (W'(1) << (W - 1 - (pg % W))) - W'(1);
          r_sticky = ((la_m1 & gmask) != '0) || (int'(la_low) > int'(pg / W)) || la_lost;
        end else begin
          r_sticky = la_lost;
        end
        unique case (rm_q)
          RM_NEAREST: r_up = r_guard & (r_sticky | r_lsb);
          RM_ZERO:    r_up = 1'b0;
          RM_UP:      r_up = ~la_neg & (r_guard | r_sticky);
          default:    r_up = la_neg & (r_guard | r_sticky);
        endcase
        if (!la_zero && r_up) begin
          la_req = 1'b1;
          la_val = {1'b1, {(W-1){1'b0}}};
          la_pos = int'(pu);
          la_sub = la_neg;
        end
      end
      S_WR: begin
        la_ri0 = (SB+1)'(pw / W);
        la_ri1 = (SB+1)'(pw / W + 1);
        swe = 1'b1;
        swa = hd.idx + IB'(k_q);
        swd = win[2*W-1 -: M];
      end
      S_HW: begin
        hwe = 1'b1;
        hwd.idx  = hd.idx;
        hwd.len  = prec_q;
        hwd.sign = la_neg;
        if (la_zero) begin
          hwd.vtype = T_ZERO; hwd.sign = 1'b0; hwd.exp = '0;
        end else if (e_res > 65535) begin
          hwd.vtype = T_INF;  hwd.exp = '1;
        end else if (e_res < 0) begin
          hwd.vtype = T_ZERO; hwd.exp = '0;
        end else begin
          hwd.vtype = T_NORMAL; hwd.exp = 16'(e_res);
        end
      end
      S_SPEC: begin
        hwe = 1'b1;
        hwd.idx = hd.idx; hwd.len = prec_q; hwd.sign = spec_sign;
        hwd.vtype = spec_type; hwd.exp = '0;
      end
      S_CMPW: begin
        sra0 = ha.idx + IB'(k_q);
        sra1 = hb.idx + IB'(k_q);
        sel_in0 = {{M{1'b0}}, (k_q <= la_len) ? srd0 : {M{1'b0}}};
        sel_in1 = {{M{1'b0}}, (k_q <= lb_len) ? srd1 : {M{1'b0}}};
      end
      S_MOVW: begin
        sra0 = ha.idx + IB'(k_q);
        swe  = 1'b1;
        swa  = hd.idx + IB'(k_q);
        swd  = srd0;
      end
      S_MOVH: begin
        hwe = 1'b1;
        hwd = ha;
        hwd.idx = hd.idx;
      end
      default: ;
    endcase
    if (st == S_DISP && (op_q == U_ACCCLR ||
        ((op_q == U_ADD || op_q == U_SUB || op_q == U_MID ||
          op_q == U_MUL || op_q == U_SQR) && a_norm | b_norm)))
      la_clr = 1'b1;
    if (st == S_DGO) la_clr = 1'b1;
    if (st == S_DISP) dv_clr = 1'b1;
  end

  // header-only comparison terms and the sign B enters an addition with
  logic sa, sb, za, zb, sbe;
  assign sa  = ha.sign & ~abs_q;
  assign sb  = hb.sign & ~abs_q;
  assign za  = (ha.vtype == T_ZERO);
  assign zb  = (hb.vtype == T_ZERO);
  assign sbe = hb.sign ^ (op_q == U_SUB);

  // next partial product (i, j): walk a column from its largest i down, then
  // start the next more significant column col-1 at i = min(col-1, la),
  // j = col-1-i; squares use only i <= j
  logic [5:0] ni, nj;
  logic       pp_last;
  always_comb begin
    pp_last = 1'b0;
    ni = '0;
    nj = '0;
    if (i_q != '0 && j_q != lb_len) begin
      ni = i_q - 6'd1; nj = j_q + 6'd1;
    end else if (col == 7'd0) begin
      pp_last = 1'b1;
    end else begin
      if (col - 7'd1 >= {1'b0, la_len}) begin
        ni = la_len; nj = 6'(col - 7'd1 - {1'b0, la_len});
      end else begin
        ni = 6'(col - 7'd1); nj = '0;
      end
      if (sqr_mode && ni > nj) begin
        ni = 6'((col - 7'd1) >> 1);
        nj = 6'(col - 7'd1 - {1'b0, ni});
      end
    end
  end

  // ---------------- sequencing ----------------
  assign busy = (st != S_IDLE);

  // signed comparison outcome from a magnitude outcome
  function automatic vp_cmp_e apply_sign(input vp_cmp_e mc, input logic negv);
    if (!negv || mc == C_EQ) return mc;
    return (mc == C_LT) ? C_GT : C_LT;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0;
      op_q <= U_NOP; dst_q <= '0; srca_q <= '0; srcb_q <= '0;
      rm_q <= RM_NEAREST; prec_q <= '0; abs_q <= 1'b0;
      ha <= '0; hb <= '0; hd <= '0; dv_rnz_q <= 1'b0;
      acc_exp <= 0; acc_valid <= 1'b0;
      opnd_q <= 1'b0; k_q <= '0; i_q <= '0; j_q <= '0;
      spec_sign <= 1'b0; spec_type <= T_ZERO;
      cmp_res <= C_EQ; cls_a <= '0; cls_b <= '0;
      inexact <= 1'b0; exc_ovf <= 1'b0; exc_unf <= 1'b0; exc_inv <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          op_q <= uop; dst_q <= dst; srca_q <= srca; srcb_q <= srcb;
          rm_q <= rmode; prec_q <= prec; abs_q <= cmp_abs;
          ha <= hrd0;
          hb <= (uop == U_SQR) ? hrd0 : hrd1;
          st <= S_DST;
        end
        S_DST: begin
          hd <= hrd0;
          cls_a <= {ha.sign, ha.vtype};
          cls_b <= {hb.sign, hb.vtype};
          st <= S_DISP;
        end
        S_DISP: begin
          k_q <= '0; opnd_q <= 1'b0;
          unique case (op_q)
            U_ACCCLR: begin acc_valid <= 1'b0; st <= S_FIN; end
            U_CLS:    st <= S_FIN;
            U_ACCADD: begin
              // one number added exactly into the accumulator (interval dot
              // products); infinity is reported as an accumulator overflow
              if (ha.vtype == T_INF) exc_ovf <= 1'b1;
              if (a_norm) begin
                if (!acc_valid) begin
                  acc_exp   <= unb(ha.exp) + HEAD * int'(W);
                  acc_valid <= 1'b1;
                end
                st <= S_AW;
              end else begin
                st <= S_FIN;
              end
            end
            U_INF:    begin spec_sign <= (rm_q == RM_DOWN); spec_type <= T_INF; st <= S_SPEC; end
            U_DIV: begin
              inexact <= 1'b0; exc_ovf <= 1'b0; exc_unf <= 1'b0; exc_inv <= 1'b0;
              spec_sign <= ha.sign ^ hb.sign;
              if (ha.vtype == T_NAN || hb.vtype == T_NAN) begin
                spec_type <= T_NAN; spec_sign <= 1'b0; st <= S_SPEC;
              end else if ((ha.vtype == T_INF && hb.vtype == T_INF) ||
                           (ha.vtype == T_ZERO && hb.vtype == T_ZERO)) begin
                spec_type <= T_NAN; spec_sign <= 1'b0; exc_inv <= 1'b1; st <= S_SPEC;
              end else if (ha.vtype == T_INF || hb.vtype == T_ZERO) begin
                spec_type <= T_INF; st <= S_SPEC;
              end else if (ha.vtype == T_ZERO || hb.vtype == T_INF) begin
                spec_type <= T_ZERO; spec_sign <= 1'b0; st <= S_SPEC;
              end else begin
                // quotient bit of weight 1 lands at accumulator position W
                acc_exp <= unb(ha.exp) - unb(hb.exp) + int'(W);
                st <= S_DLD;
              end
            end
            U_SQRT: begin
              inexact <= 1'b0; exc_ovf <= 1'b0; exc_unf <= 1'b0; exc_inv <= 1'b0;
              spec_sign <= 1'b0;
              if (ha.vtype == T_NAN) begin
                spec_type <= T_NAN; st <= S_SPEC;
              end else if (ha.vtype != T_ZERO && ha.sign) begin
                spec_type <= T_NAN; exc_inv <= 1'b1; st <= S_SPEC;
              end else if (ha.vtype != T_NORMAL) begin
                spec_type <= ha.vtype; st <= S_SPEC;
              end else begin
                // an odd exponent is made even by doubling the radicand
                acc_exp <= (unb(ha.exp) - int'(ha.exp[0])) / 2 + int'(W);
                st <= S_DLD;
              end
            end
            U_ZERO:   begin spec_sign <= 1'b0; spec_type <= T_ZERO; st <= S_SPEC; end
            U_MOV:    st <= (ha.vtype == T_NORMAL) ? S_MOVW : S_MOVH;
            U_ACCRND: begin
              inexact <= 1'b0; exc_ovf <= 1'b0; exc_unf <= 1'b0; exc_inv <= 1'b0;
              st <= S_RND;
            end
            U_CMP: begin
              // decided from the headers where possible
              st <= S_FIN;
              if (ha.vtype == T_NAN || hb.vtype == T_NAN) cmp_res <= C_UN;
              else if (za && zb)                          cmp_res <= C_EQ;
              else if (za)                                cmp_res <= sb ? C_GT : C_LT;
              else if (zb)                                cmp_res <= sa ? C_LT : C_GT;
              else if (sa != sb)                          cmp_res <= sa ? C_LT : C_GT;
              else if (ha.vtype == T_INF && hb.vtype == T_INF) cmp_res <= C_EQ;
              else if (ha.vtype == T_INF)                 cmp_res <= apply_sign(C_GT, sa);
              else if (hb.vtype == T_INF)                 cmp_res <= apply_sign(C_LT, sa);
              else if (!ex_aeqb)                          cmp_res <= apply_sign(ex_agtb ? C_GT : C_LT, sa);
              else begin
                cmp_res <= C_EQ;
                st <= S_CMPW;
              end
            end
            U_ADD, U_SUB, U_MID: begin
              inexact <= 1'b0; exc_ovf <= 1'b0; exc_unf <= 1'b0; exc_inv <= 1'b0;
              if (ha.vtype == T_NAN || hb.vtype == T_NAN) begin
                spec_type <= T_NAN; spec_sign <= 1'b0; st <= S_SPEC;
              end else if (ha.vtype == T_INF && hb.vtype == T_INF && ha.sign != sbe) begin
                spec_type <= T_NAN; spec_sign <= 1'b0; exc_inv <= 1'b1; st <= S_SPEC;
              end else if (ha.vtype == T_INF) begin
                spec_type <= T_INF; spec_sign <= ha.sign; st <= S_SPEC;
              end else if (hb.vtype == T_INF) begin
                spec_type <= T_INF; spec_sign <= sbe; st <= S_SPEC;
              end else if (!a_norm && !b_norm) begin
                spec_type <= T_ZERO; spec_sign <= 1'b0; st <= S_SPEC;
              end else begin
                if (a_norm && (!b_norm || ex_agtb || ex_aeqb)) acc_exp <= unb(ha.exp) + int'(W);
                else                                           acc_exp <= unb(hb.exp) + int'(W);
                opnd_q <= a_norm ? 1'b0 : 1'b1;
                st <= S_AW;
              end
            end
            default: begin  // U_MUL, U_SQR, U_MAC
              if (op_q != U_MAC) begin
                inexact <= 1'b0; exc_ovf <= 1'b0; exc_unf <= 1'b0; exc_inv <= 1'b0;
              end
              if (ha.vtype == T_NAN || hb.vtype == T_NAN ||
                  (ha.vtype == T_INF && hb.vtype == T_ZERO) ||
                  (ha.vtype == T_ZERO && hb.vtype == T_INF)) begin
                spec_type <= T_NAN; spec_sign <= 1'b0;
                exc_inv <= (ha.vtype != T_NAN && hb.vtype != T_NAN);
                st <= (op_q == U_MAC) ? S_FIN : S_SPEC;
              end else if (ha.vtype == T_INF || hb.vtype == T_INF) begin
                spec_type <= T_INF; spec_sign <= ha.sign ^ hb.sign;
                exc_ovf <= (op_q == U_MAC);
                st <= (op_q == U_MAC) ? S_FIN : S_SPEC;
              end else if (!a_norm || !b_norm) begin
                spec_type <= T_ZERO; spec_sign <= 1'b0;
                st <= (op_q == U_MAC) ? S_FIN : S_SPEC;
              end else begin
                if (op_q != U_MAC)
                  acc_exp <= unb(ha.exp) + unb(hb.exp) + int'(W) + 1;
                else if (!acc_valid) begin
                  acc_exp   <= unb(ha.exp) + unb(hb.exp) + HEAD * int'(W) + 1;
                  acc_valid <= 1'b1;
                end
                // least significant column first
                i_q <= la_len;
                j_q <= lb_len;
                st  <= S_PPR;
              end
            end
          endcase
        end
        // ---- addition: one 2M-bit addend (two words) per accumulator add ----
        S_AW: st <= S_AWW;
        S_AWW: if (la_done) begin
          if (k_q + 6'd2 <= lastk) begin
            k_q <= k_q + 6'd2;
            st  <= S_AW;
          end else if (!opnd_q && b_norm && op_q != U_ACCADD) begin
            opnd_q <= 1'b1;
            k_q    <= '0;
            st     <= S_AW;
          end else begin
            st <= (op_q == U_ACCADD) ? S_FIN : S_RND;
          end
        end
        // ---- multiplication: partial products, least significant first ----
        S_PPR: st <= S_PPM;
        S_PPM: st <= S_PPA;
        S_PPA: st <= S_PPW;
        S_PPW: if (la_done) begin
          i_q <= ni;
          j_q <= nj;
          if (pp_last) st <= (op_q == U_MAC) ? S_FIN : S_RND;
          else         st <= S_PPR;
        end
        // ---- normalise and round ----
        S_RND: begin
          inexact <= (r_guard | r_sticky) & ~la_zero;
          k_q <= '0;
          if (la_ovf) exc_ovf <= 1'b1;
          st <= (!la_zero && r_up) ? S_RNDW : (la_zero ? S_HW : S_WR);
        end
        S_RNDW: if (la_done) st <= S_WR;
        S_WR: begin
          if (k_q == {1'b0, prec_q}) st <= S_HW;
          k_q <= k_q + 6'd1;
        end
        S_HW: begin
          if (!la_zero && e_res > 65535) exc_ovf <= 1'b1;
          if (!la_zero && e_res < 0)     exc_unf <= 1'b1;
          st <= S_FIN;
        end
        S_SPEC: st <= S_FIN;
        // ---- comparison of significand words, most significant first ----
        S_CMPW: begin
          if (!sel_eq) begin
            cmp_res <= apply_sign(sel_gt ? C_GT : C_LT, ha.sign & ~abs_q);
            st <= S_FIN;
          end else if (k_q >= la_len && k_q >= lb_len) begin
            cmp_res <= C_EQ;
            st <= S_FIN;
          end
          k_q <= k_q + 6'd1;
        end
        // ---- move ----
        S_MOVW: begin
          if (k_q == la_len) st <= S_MOVH;
          k_q <= k_q + 6'd1;
        end
        S_MOVH: st <= S_FIN;
        // ---- division and square root ----
        S_DLD: begin
          k_q <= k_q + 6'd1;
          if (k_q >= la_len && (op_q == U_SQRT || k_q >= lb_len)) st <= S_DGO;
        end
        S_DGO: begin k_q <= '0; st <= S_DWT; end
        S_DWT: if (dv_done) begin dv_rnz_q <= dv_rnz; st <= S_DDEP; end
        S_DDEP: st <= S_DDW;
        S_DDW: if (la_done) begin
          k_q <= k_q + 6'd1;
          if (32'(k_q) + 32'd1 >= 32'(dv_nch)) st <= dv_rnz_q ? S_DSTK : S_RND;
          else                                  st <= S_DDEP;
        end
        S_DSTK: st <= S_DSTW;
        S_DSTW: if (la_done) st <= S_RND;
        default: begin  // S_FIN
          done <= 1'b1;
          st   <= S_IDLE;
        end
      endcase
    end
  end
endmodule
