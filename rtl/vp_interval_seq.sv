// vp_interval_seq: instruction sequencer of the VPIAC. It decodes one
// coprocessor instruction (vp_op_e) and issues the point micro-operations
// that carry it out to the data path control unit, one after the other.
//
// An interval X occupies two consecutive registers, the lower endpoint a in
// register x and the upper endpoint b in x+1 (likewise Y = [c, d] and the
// destination [lo, hi]). The programs are:
//   X_ADD  lo = down(a+c), hi = up(b+d)
//   X_SUB  lo = down(a-d), hi = up(b-c)
//   X_MUL  the signs of a, b, c, d are read first (CLS); unless both intervals
//          contain zero in their interior, only two products are formed
//          (which endpoints, from the 9-case sign table); if both straddle zero,
//          lo = min(down(ad), down(bc)) and hi = max(up(ac), up(bd)), formed via
//          the scratch register TMP and compared
//   X_SQR  [a^2, b^2] if a >= 0, [b^2, a^2] if b <= 0, else [0, max(|a|,|b|)^2]
//   X_HULL [min(a,c), max(b,d)]      X_ISECT [max(a,c), min(b,d)], and the
//          empty flag is raised when the result's lower end exceeds its upper
//   X_MID  (a+b)/2 rounded to nearest  X_WID  b-a rounded to nearest
//   X_DIV  the signs of a, b, c, d are read first; if 0 is not in Y two
//          quotients are formed, chosen from the sign cases (e.g. Y > 0,
//          X >= 0: [down(a/d), up(b/c)]). If 0 is in Y the extended quotient
//          is one half-line when 0 is an end of Y and not in X (X > 0,
//          Y = [0, d]: [down(a/d), +inf]; X > 0, Y = [c, 0]: [-inf, up(a/c)];
//          X < 0, Y = [0, d]: [-inf, up(b/d)]; X < 0, Y = [c, 0]:
//          [down(b/c), +inf]); in every other case it is returned as the
//          whole line [-inf, +inf], the hull of its two pieces
//   X_SQRT [down(sqrt(a)), up(sqrt(b))] (a negative end gives not-a-number)
//   X_DOTLO / X_DOTHI  add the exact lower (upper) end of X * Y, chosen from
//          the sign cases, into the long accumulator; an interval dot product
//          is ACCCLR, X_DOTLO per term, ACCRND rounding down, then the same
//          with X_DOTHI rounding up
//   X_EQ, X_SUBSET (X in Y), X_SUPSET, X_INSIDE (X in the interior of Y),
//   X_DISJ  two comparisons of ends; the outcome is held in rel
// Point instructions (P_*) pass through as one micro-operation.
//
// Interface: start/op/dst/srca/srcb/rmode/prec are taken when busy is low;
// done pulses once at the end. The destination interval must not overlap a
// source interval, except for X_ADD, X_MID and X_WID. X_MUL of two
// zero-straddling intervals uses register TMP (default 63) as scratch; its
// header must give it a significand area of prec+1 words. X_DOTLO/X_DOTHI of
// two zero-straddling intervals also use TMP-1 (prec+1 words) and TMP-2 (32
// words); the candidate end products are exact when prec+1 is at least the
// sum of the operand lengths, and the saved sum when it fits in 32 words;
// otherwise they are rounded outward, so the result still encloses the true
// dot product. The outcome of a relational instruction is held in rel.
//
// Following the document: the interval definitions, directed rounding of the
// two ends, endpoint selection by sign bits for products and squares, the
// emptiness test after intersection, nearest rounding for midpoint and width.
// This design's own choices: the instruction encoding, the scratch register
// and the order of micro-operations.
module vp_interval_seq
  import vpiac_pkg::*;
#(
  parameter int unsigned NREG = 64,
  parameter int unsigned TMP  = NREG - 1,
  localparam int unsigned RB  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  // instruction
  input  logic          start,
  input  vp_op_e        op,
  input  logic [RB-1:0] dst,
  input  logic [RB-1:0] srca,
  input  logic [RB-1:0] srcb,
  input  vp_rmode_e     rmode,
  input  logic [4:0]    prec,
  output logic          busy,
  output logic          done,
  output logic          empty,       // last intersection was empty
  output logic          rel,         // outcome of the last relational instruction
  // micro-operation interface to vp_dp_ctrl
  output logic          u_start,
  output vp_uop_e       u_op,
  output logic [RB-1:0] u_dst,
  output logic [RB-1:0] u_a,
  output logic [RB-1:0] u_b,
  output vp_rmode_e     u_rm,
  output logic [4:0]    u_prec,
  output logic          u_abs,
  input  logic          u_done,
  input  vp_cmp_e       u_cmp,
  input  logic [2:0]    u_cls_a,
  input  logic [2:0]    u_cls_b
);
  typedef enum logic [1:0] {Q_IDLE, Q_ISSUE, Q_WAIT} qst_e;
  typedef enum logic [1:0] {C_POS, C_NEG, C_MIX} icls_e;   // a>=0, b<=0, a<0<b

  qst_e          st;
  vp_op_e        op_q;
  logic [RB-1:0] x, y, z;
  vp_rmode_e     rm_q;
  logic [4:0]    prec_q;
  logic [3:0]    step;
  icls_e         cx, cy;
  logic          y0;                       // 0 lies in Y
  logic          x0;                       // 0 lies in X
  logic          yc0, yd0;                 // c = 0, d = 0
  vp_cmp_e       last_cmp;

  // endpoint registers
  logic [RB-1:0] ra, rb, rc, rd, rlo, rhi, rt, rt2, rs;
  assign ra = x;  assign rb = x + 1'b1;
  assign rc = y;  assign rd = y + 1'b1;
  assign rlo = z; assign rhi = z + 1'b1;
  assign rt = RB'(TMP);
  assign rt2 = RB'(TMP - 1);
  assign rs  = RB'(TMP - 2);

  function automatic logic has_zero(input logic [2:0] lo_c, input logic [2:0] hi_c);
    return ((lo_c[1:0] == T_ZERO) || lo_c[2]) && ((hi_c[1:0] == T_ZERO) || !hi_c[2]);
  endfunction

  function automatic icls_e classify(input logic [2:0] lo_c, input logic [2:0] hi_c);
    logic lo_nonneg, hi_nonpos;
    lo_nonneg = (lo_c[1:0] == T_ZERO) || !lo_c[2];
    hi_nonpos = (hi_c[1:0] == T_ZERO) ||  hi_c[2];
    if (lo_nonneg)      return C_POS;
    else if (hi_nonpos) return C_NEG;
    else                return C_MIX;
  endfunction

  // endpoints whose product is the lower (lo_end) or upper end of X * Y,
  // from the sign classes (not used when both intervals straddle zero)
  logic          lo_end;
  logic [RB-1:0] pe, qe;
  assign lo_end = (op_q == X_MUL) ? (step == 4'd2) : (op_q == X_DOTLO);
  always_comb begin
    unique case ({cx, cy})
      {C_POS, C_POS}: begin pe = lo_end ? ra : rb; qe = lo_end ? rc : rd; end
      {C_POS, C_NEG}: begin pe = lo_end ? rb : ra; qe = lo_end ? rc : rd; end
      {C_POS, C_MIX}: begin pe = rb;               qe = lo_end ? rc : rd; end
      {C_NEG, C_POS}: begin pe = lo_end ? ra : rb; qe = lo_end ? rd : rc; end
      {C_NEG, C_NEG}: begin pe = lo_end ? rb : ra; qe = lo_end ? rd : rc; end
      {C_NEG, C_MIX}: begin pe = ra;               qe = lo_end ? rd : rc; end
      {C_MIX, C_POS}: begin pe = lo_end ? ra : rb; qe = rd;               end
      {C_MIX, C_NEG}: begin pe = lo_end ? rb : ra; qe = rc;               end
      default:        begin pe = ra;               qe = rc;               end // both straddle
    endcase
  end

  // current micro-operation
  logic skip, last;
  logic [RB-1:0] p, q;   // endpoints of X and Y forming one end of a product
  always_comb begin
    p = ra; q = rc;
    u_op = U_NOP; u_dst = z; u_a = x; u_b = y; u_rm = rm_q; u_abs = 1'b0;
    skip = 1'b0; last = 1'b1;
    unique case (op_q)
      P_ADD:    u_op = U_ADD;
      P_SUB:    u_op = U_SUB;
      P_MUL:    u_op = U_MUL;
      P_SQR:    u_op = U_SQR;
      P_ACCCLR: u_op = U_ACCCLR;
      P_MAC:    u_op = U_MAC;
      P_ACCRND: u_op = U_ACCRND;
      P_MOV:    u_op = U_MOV;
      P_CMP:    u_op = U_CMP;
      P_DIV:    u_op = U_DIV;
      P_SQRT:   u_op = U_SQRT;
      X_SQRT: begin
        last = (step == 4'd1);
        u_op = U_SQRT;
        if (step == 4'd0) begin u_dst = rlo; u_a = ra; u_rm = RM_DOWN; end
        else              begin u_dst = rhi; u_a = rb; u_rm = RM_UP;   end
      end
      X_DIV: begin
        last = (step == 4'd3);
        unique case (step)
          4'd0: begin u_op = U_CLS; u_a = ra; u_b = rb; end
          4'd1: begin u_op = U_CLS; u_a = rc; u_b = rd; end
          default: begin
            u_dst = (step == 4'd2) ? rlo : rhi;
            u_rm  = (step == 4'd2) ? RM_DOWN : RM_UP;
            if (y0) begin
              // half-line: the finite end, or an infinity
              u_op = U_INF;
              if (!x0 && (yc0 != yd0)) begin
                unique case ({cx == C_NEG, yd0, step == 4'd2})
                  3'b001: begin u_op = U_DIV; u_a = ra; u_b = rd; end // X>0, [0,d]: lo
                  3'b010: begin u_op = U_DIV; u_a = ra; u_b = rc; end // X>0, [c,0]: hi
                  3'b100: begin u_op = U_DIV; u_a = rb; u_b = rd; end // X<0, [0,d]: hi
                  3'b111: begin u_op = U_DIV; u_a = rb; u_b = rc; end // X<0, [c,0]: lo
                  default: ;
                endcase
              end
            end else begin
              u_op = U_DIV;
              unique case ({cy == C_NEG, cx})
                {1'b0, C_POS}: begin p = (step == 4'd2) ? ra : rb; q = (step == 4'd2) ? rd : rc; end
                {1'b0, C_NEG}: begin p = (step == 4'd2) ? ra : rb; q = (step == 4'd2) ? rc : rd; end
                {1'b0, C_MIX}: begin p = (step == 4'd2) ? ra : rb; q = rc;                       end
                {1'b1, C_POS}: begin p = (step == 4'd2) ? rb : ra; q = (step == 4'd2) ? rd : rc; end
                {1'b1, C_NEG}: begin p = (step == 4'd2) ? rb : ra; q = (step == 4'd2) ? rc : rd; end
                default:       begin p = (step == 4'd2) ? rb : ra; q = rd;                       end // Y<0, X mixed
              endcase
              u_a = p;
              u_b = q;
            end
          end
        endcase
      end
      X_ADD: begin
        last = (step == 4'd1);
        u_op = U_ADD;
        if (step == 4'd0) begin u_dst = rlo; u_a = ra; u_b = rc; u_rm = RM_DOWN; end
        else              begin u_dst = rhi; u_a = rb; u_b = rd; u_rm = RM_UP;   end
      end
      X_SUB: begin
        last = (step == 4'd1);
        u_op = U_SUB;
        if (step == 4'd0) begin u_dst = rlo; u_a = ra; u_b = rd; u_rm = RM_DOWN; end
        else              begin u_dst = rhi; u_a = rb; u_b = rc; u_rm = RM_UP;   end
      end
      X_MID: begin u_op = U_MID; u_a = ra; u_b = rb; u_rm = RM_NEAREST; end
      X_WID: begin u_op = U_SUB; u_a = rb; u_b = ra; u_rm = RM_NEAREST; end
      X_HULL, X_ISECT: begin
        last = (op_q == X_HULL) ? (step == 4'd3) : (step == 4'd4);
        unique case (step)
          4'd0: begin u_op = U_CMP; u_a = ra; u_b = rc; end
          4'd1: begin
            u_op = U_MOV; u_dst = rlo;
            // hull takes the smaller lower end, intersection the larger
            if ((op_q == X_HULL) == (last_cmp != C_GT)) u_a = ra; else u_a = rc;
          end
          4'd2: begin u_op = U_CMP; u_a = rb; u_b = rd; end
          4'd3: begin
            u_op = U_MOV; u_dst = rhi;
            if ((op_q == X_HULL) == (last_cmp != C_LT)) u_a = rb; else u_a = rd;
          end
          default: begin u_op = U_CMP; u_a = rlo; u_b = rhi; end
        endcase
      end
      X_SQR: begin
        last = (step == 4'd3) || (step == 4'd2 && cx != C_MIX);
        unique case (step)
          4'd0: begin u_op = U_CLS; u_a = ra; u_b = rb; end
          4'd1: begin
            if (cx == C_MIX) begin u_op = U_ZERO; u_dst = rlo; end
            else begin
              u_op = U_SQR; u_dst = rlo; u_rm = RM_DOWN;
              u_a = (cx == C_POS) ? ra : rb;
            end
          end
          4'd2: begin
            if (cx == C_MIX) begin u_op = U_CMP; u_a = ra; u_b = rb; u_abs = 1'b1; end
            else begin
              u_op = U_SQR; u_dst = rhi; u_rm = RM_UP;
              u_a = (cx == C_POS) ? rb : ra;
            end
          end
          default: begin
            u_op = U_SQR; u_dst = rhi; u_rm = RM_UP;
            u_a = (last_cmp == C_GT) ? ra : rb;
          end
        endcase
      end
      X_DOTLO, X_DOTHI: begin
        // exact accumulation of one end of X * Y. If both straddle zero, the
        // running sum is saved (32 words, directed rounding) in SAVE, the two
        // candidates are formed (directed rounding, length prec+1) in TMP and
        // TMP-1 and compared, and the sum is rebuilt from SAVE plus the
        // smaller (larger) candidate
        last = (cx == C_MIX && cy == C_MIX) ? (step == 4'd8) : (step == 4'd2);
        unique case (step)
          4'd0: begin u_op = U_CLS; u_a = ra; u_b = rb; end
          4'd1: begin u_op = U_CLS; u_a = rc; u_b = rd; end
          default: begin
            if (cx == C_MIX && cy == C_MIX) begin
              u_rm = (op_q == X_DOTLO) ? RM_DOWN : RM_UP;
              unique case (step)
                4'd2: begin u_op = U_ACCRND; u_dst = rs; end
                4'd3: begin u_op = U_MUL; u_dst = rt;  u_a = ra; u_b = (op_q == X_DOTLO) ? rd : rc; end
                4'd4: begin u_op = U_MUL; u_dst = rt2; u_a = rb; u_b = (op_q == X_DOTLO) ? rc : rd; end
                4'd5: begin u_op = U_CMP; u_a = rt; u_b = rt2; end
                4'd6: begin u_op = U_ACCCLR; end
                4'd7: begin u_op = U_ACCADD; u_a = rs; end
                default: begin
                  u_op = U_ACCADD;
                  if (op_q == X_DOTLO) u_a = (last_cmp == C_GT) ? rt2 : rt;
                  else                 u_a = (last_cmp == C_LT) ? rt2 : rt;
                end
              endcase
            end else begin
              u_op = U_MAC;
              u_a  = pe;
              u_b  = qe;
            end
          end
        endcase
      end
      X_EQ, X_SUBSET, X_SUPSET, X_INSIDE, X_DISJ: begin
        last = (step == 4'd1);
        u_op = U_CMP;
        if (op_q == X_DISJ) begin u_a = (step == 4'd0) ? rb : ra; u_b = (step == 4'd0) ? rc : rd; end
        else                begin u_a = (step == 4'd0) ? ra : rb; u_b = (step == 4'd0) ? rc : rd; end
      end
      X_MUL: begin
        last = (cx == C_MIX && cy == C_MIX) ? (step == 4'd9) : (step == 4'd3);
        unique case (step)
          4'd0: begin u_op = U_CLS; u_a = ra; u_b = rb; end
          4'd1: begin u_op = U_CLS; u_a = rc; u_b = rd; end
          default: begin
            if (cx == C_MIX && cy == C_MIX) begin
              unique case (step)
                4'd2: begin u_op = U_MUL; u_dst = rlo; u_a = ra; u_b = rd; u_rm = RM_DOWN; end
                4'd3: begin u_op = U_MUL; u_dst = rt;  u_a = rb; u_b = rc; u_rm = RM_DOWN; end
                4'd4: begin u_op = U_CMP; u_a = rt; u_b = rlo; end
                4'd5: begin u_op = U_MOV; u_dst = rlo; u_a = rt; skip = (last_cmp != C_LT); end
                4'd6: begin u_op = U_MUL; u_dst = rhi; u_a = ra; u_b = rc; u_rm = RM_UP; end
                4'd7: begin u_op = U_MUL; u_dst = rt;  u_a = rb; u_b = rd; u_rm = RM_UP; end
                4'd8: begin u_op = U_CMP; u_a = rt; u_b = rhi; end
                default: begin u_op = U_MOV; u_dst = rhi; u_a = rt; skip = (last_cmp != C_GT); end
              endcase
            end else begin
              u_op = U_MUL;
              u_dst = (step == 4'd2) ? rlo : rhi;
              u_rm  = (step == 4'd2) ? RM_DOWN : RM_UP;
              u_a = pe;
              u_b = qe;
            end
          end
        endcase
      end
      default: u_op = U_NOP;
    endcase
    u_prec = prec_q;
    if ((op_q == X_DOTLO || op_q == X_DOTHI) && u_op == U_ACCRND) u_prec = 5'd31;
  end

  assign busy    = (st != Q_IDLE);
  assign u_start = (st == Q_ISSUE) && !skip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= Q_IDLE; done <= 1'b0; empty <= 1'b0; rel <= 1'b0;
      op_q <= I_NOP; x <= '0; y <= '0; z <= '0; rm_q <= RM_NEAREST; prec_q <= '0;
      step <= '0; cx <= C_POS; cy <= C_POS; y0 <= 1'b0; x0 <= 1'b0; yc0 <= 1'b0; yd0 <= 1'b0;
      last_cmp <= C_EQ;
    end else begin
      done <= 1'b0;
      unique case (st)
        Q_IDLE: if (start) begin
          op_q <= op; x <= srca; y <= srcb; z <= dst; rm_q <= rmode; prec_q <= prec;
          step <= '0;
          if (op == X_ISECT) empty <= 1'b0;
          st <= Q_ISSUE;
        end
        Q_ISSUE: begin
          if (skip) begin
            if (last) begin st <= Q_IDLE; done <= 1'b1; end
            else        step <= step + 4'd1;
          end else begin
            st <= Q_WAIT;
          end
        end
        default: if (u_done) begin  // Q_WAIT
          if (u_op == U_CLS) begin
            if (op_q != X_SQR && step == 4'd1) begin
              cy <= classify(u_cls_a, u_cls_b);
              y0 <= has_zero(u_cls_a, u_cls_b);
              yc0 <= (u_cls_a[1:0] == T_ZERO);
              yd0 <= (u_cls_b[1:0] == T_ZERO);
            end else begin
              cx <= classify(u_cls_a, u_cls_b);
              x0 <= has_zero(u_cls_a, u_cls_b);
            end
          end
          if (u_op == U_CMP) last_cmp <= u_cmp;
          if (op_q == X_ISECT && step == 4'd4 && u_cmp == C_GT) empty <= 1'b1;
          if (step == 4'd1) begin
            unique case (op_q)
              X_EQ:     rel <= (last_cmp == C_EQ) && (u_cmp == C_EQ);
              X_SUBSET: rel <= (last_cmp inside {C_GT, C_EQ}) && (u_cmp inside {C_LT, C_EQ});
              X_SUPSET: rel <= (last_cmp inside {C_LT, C_EQ}) && (u_cmp inside {C_GT, C_EQ});
              X_INSIDE: rel <= (last_cmp == C_GT) && (u_cmp == C_LT);
              X_DISJ:   rel <= (last_cmp == C_LT) || (u_cmp == C_GT);
              default: ;
            endcase
          end
          if (last) begin
            st <= Q_IDLE; done <= 1'b1;
          end else begin
            step <= step + 4'd1;
            st   <= Q_ISSUE;
          end
        end
      endcase
    end
  end
endmodule
