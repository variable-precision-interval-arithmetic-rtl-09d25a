// tb_vp_interval_seq: checks the instruction sequencer's micro-operation
// programs. The data path is replaced here by a small integer model: each
// register holds an integer, and the model answers ADD/SUB/MUL/SQR/MID/MOV/
// ZERO/CMP/CLS a few cycles after u_start. Random integer intervals of every
// sign class are run through each interval instruction and the destination
// is compared with the interval definitions (e.g. the product's ends are the
// min and max of all four endpoint products). Every micro-operation that
// writes a lower end must round down and every one that writes an upper end
// must round up. Empty intersections and every product sign case are
// counted and must occur. Division is modelled as a*1000/b (truncated) and
// the square root as the integer square root; a quotient by an interval
// holding zero must be the whole line (the model's infinities are +-10^9).
// Interval dot products (X_DOTLO/X_DOTHI into a modelled accumulator) must
// give the sum of the exact lower (upper) product ends, and the relational
// instructions must agree with their set definitions.
module tb_vp_interval_seq;
  import vpiac_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, empty, rel, u_start, u_abs, u_done;
  vp_op_e op;
  logic [5:0] dst, srca, srcb, u_dst, u_a, u_b;
  vp_rmode_e rmode, u_rm;
  logic [4:0] prec, u_prec;
  vp_uop_e u_op;
  vp_cmp_e u_cmp;
  logic [2:0] u_cls_a, u_cls_b;

  vp_interval_seq dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- integer model of the data path ----------------
  int regv [64];
  int acc;
  int rm_bad = 0, n_uops = 0;
  logic [5:0] lo_reg;

  function automatic logic [2:0] cls_of(int v);
    return {v < 0, (v == 0) ? T_ZERO : T_NORMAL};
  endfunction

  initial begin
    u_done = 0; u_cmp = C_EQ; u_cls_a = '0; u_cls_b = '0;
    forever begin
      @(posedge clk);
      if (u_start) begin
        vp_uop_e o; logic [5:0] d, a, b; vp_rmode_e rm; logic ab;
        o = u_op; d = u_dst; a = u_a; b = u_b; rm = u_rm; ab = u_abs;
        n_uops++;
        // lower ends round down, upper ends round up
        if (o inside {U_ADD, U_SUB, U_MUL, U_SQR, U_DIV, U_SQRT, U_INF} &&
            (op inside {X_ADD, X_SUB, X_MUL, X_SQR, X_DIV, X_SQRT})) begin
          if (d == lo_reg && rm != RM_DOWN) rm_bad++;
          if (d == lo_reg + 1 && rm != RM_UP) rm_bad++;
        end
        repeat (2 + $urandom_range(3)) @(posedge clk);
        unique case (o)
          U_ADD:  regv[d] = regv[a] + regv[b];
          U_SUB:  regv[d] = regv[a] - regv[b];
          U_MUL:  regv[d] = regv[a] * regv[b];
          U_SQR:  regv[d] = regv[a] * regv[a];
          U_MID:  regv[d] = (regv[a] + regv[b]) / 2;
          U_MOV:  regv[d] = regv[a];
          U_ZERO: regv[d] = 0;
          U_DIV:  regv[d] = (regv[b] == 0) ? 12345 : regv[a] * 1000 / regv[b];
          U_SQRT: begin
            int r;
            r = 0;
            while ((r + 1) * (r + 1) <= regv[a]) r++;
            regv[d] = (regv[a] < 0) ? -7777 : r;
          end
          U_ACCCLR: acc = 0;
          U_MAC:    acc += regv[a] * regv[b];
          U_ACCADD: acc += regv[a];
          U_ACCRND: regv[d] = acc;
          U_INF:  regv[d] = (rm == RM_DOWN) ? -1_000_000_000 : 1_000_000_000;
          U_CMP: begin
            int x, y;
            x = ab ? ((regv[a] < 0) ? -regv[a] : regv[a]) : regv[a];
            y = ab ? ((regv[b] < 0) ? -regv[b] : regv[b]) : regv[b];
            u_cmp = (x < y) ? C_LT : (x > y) ? C_GT : C_EQ;
          end
          U_CLS: begin u_cls_a = cls_of(regv[a]); u_cls_b = cls_of(regv[b]); end
          default: ;
        endcase
        @(negedge clk); u_done = 1;
        @(negedge clk); u_done = 0;
      end
    end
  end

  task automatic issue(vp_op_e o, int d, int a, int b);
    @(negedge clk);
    op = o; dst = 6'(d); srca = 6'(a); srcb = 6'(b); rmode = RM_NEAREST; prec = 5'd1;
    lo_reg = 6'(d);
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic expect2(string what, int lo, int hi);
    checks++;
    if (regv[20] != lo || regv[21] != hi) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got [%0d,%0d] exp [%0d,%0d]", what, regv[20], regv[21], lo, hi);
    end
  endtask

  function automatic int rnd_end(int cls, int which);  // which: 0 lower, 1 upper
    int v;
    v = 1 + int'($urandom_range(40));
    unique case (cls)
      0: return which ? v + 41 : v - 1;     // [>=0, >0]
      1: return which ? -v + 1 : -v - 41;   // [<0, <=0]
      default: return which ? v : -v;       // straddles zero
    endcase
  endfunction

  int a, b, c, d, n_case[9], n_empty = 0, p[4], mn, mx, n_dcase[6], n_dinf = 0, n_dhalf = 0, n_dot[9], n_rel[5];
  initial begin
    start = 0; op = I_NOP; dst = 0; srca = 0; srcb = 0; rmode = RM_NEAREST; prec = 0; lo_reg = 0;
    foreach (n_case[i]) n_case[i] = 0;
    foreach (n_dcase[i]) n_dcase[i] = 0;
    foreach (n_dot[i]) n_dot[i] = 0;
    foreach (n_rel[i]) n_rel[i] = 0;
    foreach (regv[i]) regv[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 432; t++) begin
      int cx, cy;
      cx = t % 3; cy = (t / 3) % 3;
      a = rnd_end(cx, 0); b = rnd_end(cx, 1); c = rnd_end(cy, 0); d = rnd_end(cy, 1);
      regv[10] = a; regv[11] = b; regv[12] = c; regv[13] = d;
      regv[20] = 999; regv[21] = 999;
      unique case ((t / 9) % 12)
        0: begin issue(X_ADD, 20, 10, 12); expect2("add", a + c, b + d); end
        1: begin issue(X_SUB, 20, 10, 12); expect2("sub", a - d, b - c); end
        2: begin
          issue(X_MUL, 20, 10, 12);
          n_case[cx * 3 + cy]++;
          p[0] = a * c; p[1] = a * d; p[2] = b * c; p[3] = b * d;
          mn = p[0]; mx = p[0];
          foreach (p[i]) begin if (p[i] < mn) mn = p[i]; if (p[i] > mx) mx = p[i]; end
          expect2("mul", mn, mx);
        end
        3: begin
          issue(X_SQR, 20, 10, 0);
          if (a >= 0)      expect2("sqr", a * a, b * b);
          else if (b <= 0) expect2("sqr", b * b, a * a);
          else             expect2("sqr", 0, (-a > b) ? a * a : b * b);
        end
        4: begin issue(X_HULL, 20, 10, 12); expect2("hull", (a < c) ? a : c, (b > d) ? b : d); end
        5: begin
          int lo, hi;
          issue(X_ISECT, 20, 10, 12);
          lo = (a > c) ? a : c; hi = (b < d) ? b : d;
          expect2("isect", lo, hi);
          checks++;
          if (empty != (lo > hi)) begin failures++; $display("FAIL empty flag"); end
          if (empty) n_empty++;
        end
        6: begin
          issue(X_MID, 20, 10, 0);
          checks++; if (regv[20] != (a + b) / 2) begin failures++; $display("FAIL mid"); end
          issue(X_WID, 20, 10, 0);
          checks++; if (regv[20] != b - a) begin failures++; $display("FAIL wid"); end
        end
        8: begin
          // every other time, make 0 an end of Y
          if ((t / 108) % 2 == 1) begin
            if (cy == 0) begin c = 0; regv[12] = 0; end
            if (cy == 1) begin d = 0; regv[13] = 0; end
          end
          issue(X_DIV, 20, 10, 12);
          if (c <= 0 && d >= 0 && (c == 0) != (d == 0) && (a > 0 || b < 0)) begin
            // extended division: one half-line
            n_dhalf++;
            if (a > 0 && c == 0)      expect2("div half-line", a * 1000 / d, 1_000_000_000);
            else if (a > 0)           expect2("div half-line", -1_000_000_000, a * 1000 / c);
            else if (c == 0)          expect2("div half-line", -1_000_000_000, b * 1000 / d);
            else                      expect2("div half-line", b * 1000 / c, 1_000_000_000);
          end else if (c <= 0 && d >= 0) begin
            n_dinf++;
            expect2("div by interval holding 0", -1_000_000_000, 1_000_000_000);
          end else begin
            n_dcase[cx * 2 + cy]++;
            p[0] = a * 1000 / c; p[1] = a * 1000 / d; p[2] = b * 1000 / c; p[3] = b * 1000 / d;
            mn = p[0]; mx = p[0];
            foreach (p[i]) begin if (p[i] < mn) mn = p[i]; if (p[i] > mx) mx = p[i]; end
            expect2("div", mn, mx);
          end
        end
        10: begin
          // interval dot product of two terms: lower ends, then upper ends
          int lo, hi, e, f, g, h, p2[4];
          e = rnd_end(cy, 0); f = rnd_end(cy, 1); g = rnd_end(cx, 0); h = rnd_end(cx, 1);
          regv[14] = e; regv[15] = f; regv[16] = g; regv[17] = h;
          p[0] = a * c; p[1] = a * d; p[2] = b * c; p[3] = b * d;
          p2[0] = e * g; p2[1] = e * h; p2[2] = f * g; p2[3] = f * h;
          lo = p[0]; hi = p[0];
          foreach (p[i]) begin if (p[i] < lo) lo = p[i]; if (p[i] > hi) hi = p[i]; end
          mn = p2[0]; mx = p2[0];
          foreach (p2[i]) begin if (p2[i] < mn) mn = p2[i]; if (p2[i] > mx) mx = p2[i]; end
          n_dot[cx * 3 + cy]++;
          acc = 12345;
          issue(P_ACCCLR, 0, 0, 0);
          issue(X_DOTLO, 20, 10, 12); issue(X_DOTLO, 20, 14, 16);
          checks++; if (acc != lo + mn) begin failures++; $display("FAIL dot lo %0d exp %0d", acc, lo + mn); end
          issue(P_ACCCLR, 0, 0, 0);
          issue(X_DOTHI, 20, 10, 12); issue(X_DOTHI, 20, 14, 16);
          checks++; if (acc != hi + mx) begin failures++; $display("FAIL dot hi %0d exp %0d", acc, hi + mx); end
        end
        11: begin
          // relational operators on X and Y (Y sometimes equal to X or inside it)
          logic er;
          if (t % 4 == 1) begin c = a; d = b; regv[12] = c; regv[13] = d; end
          if (t % 4 == 2) begin c = a - 1; d = b + 1; regv[12] = c; regv[13] = d; end
          if (t % 4 == 3) begin c = b + 1; d = b + 5; regv[12] = c; regv[13] = d; end
          for (int r = 0; r < 5; r++) begin
            vp_op_e ro;
            ro = (r == 0) ? X_EQ : (r == 1) ? X_SUBSET : (r == 2) ? X_SUPSET : (r == 3) ? X_INSIDE : X_DISJ;
            issue(ro, 0, 10, 12);
            unique case (r)
              0: er = (a == c) && (b == d);
              1: er = (c <= a) && (b <= d);
              2: er = (a <= c) && (d <= b);
              3: er = (c < a) && (b < d);
              default: er = (b < c) || (d < a);
            endcase
            checks++;
            if (rel != er) begin failures++; $display("FAIL relation %0d: [%0d,%0d] [%0d,%0d] got %0d", r, a, b, c, d, rel); end
            if (rel) n_rel[r]++;
          end
        end
        9: begin
          if (cx == 0) begin
            int ra, rb;
            ra = 0; rb = 0;
            while ((ra + 1) * (ra + 1) <= a) ra++;
            while ((rb + 1) * (rb + 1) <= b) rb++;
            issue(X_SQRT, 20, 10, 0);
            expect2("sqrt", ra, rb);
          end else begin
            issue(P_DIV, 20, 10, 12);
            checks++; if (regv[20] != ((c == 0) ? 12345 : a * 1000 / c)) begin failures++; $display("FAIL point div"); end
            issue(P_SQRT, 21, 13, 0);
            checks++; if (regv[21] != ((d < 0) ? -7777 : regv[21])) begin failures++; $display("FAIL point sqrt"); end
          end
        end
        default: begin
          issue(P_SUB, 20, 10, 12);
          checks++; if (regv[20] != a - c) begin failures++; $display("FAIL point sub"); end
          issue(P_MUL, 21, 11, 13);
          checks++; if (regv[21] != b * d) begin failures++; $display("FAIL point mul"); end
        end
      endcase
    end
    checks++; if (rm_bad != 0) begin failures++; $display("FAIL %0d wrong rounding directions", rm_bad); end
    foreach (n_case[i]) begin checks++; if (n_case[i] == 0) begin failures++; $display("FAIL case %0d never", i); end end
    foreach (n_dcase[i]) begin checks++; if (n_dcase[i] == 0) begin failures++; $display("FAIL quotient case %0d never", i); end end
    foreach (n_dot[i]) begin checks++; if (n_dot[i] == 0) begin failures++; $display("FAIL dot case %0d never", i); end end
    foreach (n_rel[i]) begin checks++; if (n_rel[i] == 0) begin failures++; $display("FAIL relation %0d never true", i); end end
    checks++; if (n_dinf == 0) begin failures++; $display("FAIL no division by an interval holding 0"); end
    checks++; if (n_dhalf == 0) begin failures++; $display("FAIL no half-line quotient"); end
    checks++; if (n_empty == 0) begin failures++; $display("FAIL no empty intersection"); end
    $display("micro-ops %0d, product cases %p, empty %0d", n_uops, n_case, n_empty);
    $display("quotient cases %p, unbounded quotients %0d, half-lines %0d", n_dcase, n_dinf, n_dhalf);
    $display("dot product cases %p, relations true %p", n_dot, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
