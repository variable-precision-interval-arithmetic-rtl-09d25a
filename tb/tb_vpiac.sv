// tb_vpiac: end-to-end testbench of the coprocessor at its default size
// (M = 32, 64-segment long accumulator, 64 headers, 256 significand words).
//
// Random variable-precision operands (1 to 4 words, exponents within +-40,
// random signs) are loaded through the host port, instructions are issued,
// and every result (header and significand words) is compared with a
// reference computed here from exact big-integer arithmetic: operands are
// turned into sign/magnitude/scale triples, added, multiplied or divided
// exactly (square roots by a bitwise integer square root) and rounded to the requested length with the requested rounding direction.
// Interval results are checked against the textbook definitions (e.g. the
// product's ends are the rounded min and max of all four exact endpoint
// products), independently of the sign-case tables in the design.
// It counts how often each mechanism happened (carry and borrow resolution
// across all-ones / all-zeros segments, rounding increments, a rounding
// carry that moves the leading one, symmetric squaring, each of the 9 interval
// product cases, the 6 bounded interval quotient cases, half-line quotients
// (0 an end of the divisor), division by an interval holding zero, inexact
// quotients and roots, the 9 sign cases of
// interval dot product terms, each relational operator being true, empty
// intersections,
// special values) and fails if one never did. It also checks the cycle
// counts of point addition, multiplication and division against this
// implementation's formulas and prints them beside the published ones.
module tb_vpiac;
  import vpiac_pkg::*;
  import vp_ref_pkg::*;

  localparam int MAXW = 4;            // words per register area

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          hdr_we, sig_we, start;
  logic [5:0]    hdr_addr, dst, srca, srcb;
  vp_hdr_t       hdr_wdata, hdr_rdata;
  logic [7:0]    sig_addr;
  logic [M-1:0]  sig_wdata, sig_rdata;
  vp_op_e        op;
  vp_rmode_e     rmode;
  logic [4:0]    prec;
  logic          busy, done, empty, rel, inexact, exc_ovf, exc_unf, exc_inv;
  vp_cmp_e       cmp_res;

  vpiac dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host access ----------------
  task automatic load(int reg_i, num_t a);
    vp_hdr_t h;
    h.exp = 16'($signed(a.e) + 32768);
    h.sign = a.sign; h.vtype = vp_type_e'(a.typ); h.len = a.len;
    h.idx = 8'(reg_i * MAXW);
    @(negedge clk);
    hdr_we = 1; hdr_addr = 6'(reg_i); hdr_wdata = h;
    @(negedge clk);
    hdr_we = 0;
    for (int k = 0; k <= int'(a.len); k++) begin
      sig_we = 1; sig_addr = 8'(reg_i * MAXW + k); sig_wdata = a.f[127 - 32 * k -: 32];
      @(negedge clk);
    end
    sig_we = 0;
  endtask

  // set only the significand area of a destination register
  task automatic alloc(int reg_i);
    vp_hdr_t h;
    h = '0; h.vtype = T_ZERO; h.idx = 8'(reg_i * MAXW);
    @(negedge clk);
    hdr_we = 1; hdr_addr = 6'(reg_i); hdr_wdata = h;
    @(negedge clk);
    hdr_we = 0;
  endtask

  task automatic fetch(int reg_i, output num_t a);
    vp_hdr_t h;
    @(negedge clk);
    hdr_addr = 6'(reg_i);
    #1 h = hdr_rdata;
    a = '0;
    a.sign = h.sign; a.typ = h.vtype; a.len = h.len;
    a.e = 32'(int'({16'd0, h.exp}) - 32768);
    if (h.vtype == T_NORMAL)
      for (int k = 0; k <= int'(h.len); k++) begin
        sig_addr = h.idx + 8'(k);
        #1 a.f[127 - 32 * k -: 32] = sig_rdata;
      end
    else a.e = 0;
  endtask

  int last_cycles;
  task automatic issue(vp_op_e o, int d, int a, int b, vp_rmode_e rm, int pr);
    int c0;
    @(negedge clk);
    op = o; dst = 6'(d); srca = 6'(a); srcb = 6'(b); rmode = rm; prec = 5'(pr);
    start = 1;
    c0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    last_cycles = cycle - c0;
  endtask

  task automatic expect_num(string what, num_t got, num_t exp);
    checks++;
    if (got.typ != exp.typ || (exp.typ == T_NORMAL &&
        (got.sign != exp.sign || got.e != exp.e || got.len != exp.len || got.f != exp.f))) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got s%0d t%0d e%0d l%0d %h  exp s%0d t%0d e%0d l%0d %h", what,
                 got.sign, got.typ, $signed(got.e), got.len, got.f,
                 exp.sign, exp.typ, $signed(exp.e), exp.len, exp.f);
    end
  endtask

  task automatic expect_true(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_carry = 0, n_borrow = 0, n_flagtoggle = 0, n_rndinc = 0, n_sqr = 0;
  int n_case[9];
  int n_empty = 0, n_special = 0, n_ovf = 0;
  int n_div = 0, n_sqrt = 0, n_divinf = 0, n_dhalf = 0, n_dinexact = 0;
  int n_dcase[6], n_dotcase[9], n_rel[5];
  always @(posedge clk) begin
    if (dut.u_dp.u_la.st == 2'd3) begin
      if (dut.u_dp.u_la.sub_q) n_borrow++; else n_carry++;
      if (dut.u_dp.u_la.k_idx + 1 < dut.u_dp.u_la.j_q || !dut.u_dp.u_la.k_found) n_flagtoggle++;
    end
    if (dut.u_dp.st == dut.u_dp.S_RNDW && dut.u_dp.u_la.done) n_rndinc++;
  end

  // ---------------- tests ----------------
  num_t A, B, C, D, R, R2, E1, E2;
  ex_t xa, xb, xc, xd, acc;
  vp_rmode_e rm;
  int pr, n;

  initial begin
    hdr_we = 0; sig_we = 0; start = 0; hdr_addr = 0; sig_addr = 0;
    hdr_wdata = '0; sig_wdata = 0; op = I_NOP; dst = 0; srca = 0; srcb = 0;
    rmode = RM_NEAREST; prec = 0;
    foreach (n_case[i]) n_case[i] = 0;
    foreach (n_dcase[i]) n_dcase[i] = 0;
    foreach (n_dotcase[i]) n_dotcase[i] = 0;
    foreach (n_rel[i]) n_rel[i] = 0;
    rnd_carry_ref = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 64; r++) alloc(r);

    // ---- point addition / subtraction ----
    for (int t = 0; t < 150; t++) begin
      A = rand_num(4); B = rand_num(4);
      if (t % 5 == 0) begin B = A; B.sign = ~A.sign; B.f[31:0] = B.f[31:0] ^ 32'h1; end // cancellation
      if (t % 7 == 0) begin B = A; B.sign = ~A.sign; B.e = A.e - 1; end
      rm = vp_rmode_e'($urandom_range(3)); pr = $urandom_range(3);
      load(0, A); load(1, B);
      issue((t % 2) ? P_SUB : P_ADD, 2, 0, 1, rm, pr);
      fetch(2, R);
      xa = to_ex(A); xb = to_ex(B);
      E1 = ex_round(ex_add(xa, (t % 2) ? ex_neg(xb) : xb), pr, rm, 0);
      expect_num((t % 2) ? "sub" : "add", R, E1);
    end

    // cycle count of point addition of two n-word numbers into n words
    for (n = 1; n <= 4; n++) begin
      A = rand_num(1); B = rand_num(1);
      A = rand_num(4); B = rand_num(4);
      A.len = 5'(n - 1); B.len = 5'(n - 1);
      load(0, A); load(1, B);
      issue(P_ADD, 2, 0, 1, RM_ZERO, n - 1);
      // header reads 3, two operands of ceil(n/2) addends of 3 cycles each
      // (4 if a carry is resolved), rounding 1, n writes, header, finish
      checks++;
      if (last_cycles > 4 + 2 * 4 * ((n + 1) / 2) + 1 + 2 + n + 2) begin
        failures++; $display("FAIL add cycles n=%0d: %0d", n, last_cycles);
      end
      $display("add n=%0d: %0d cycles (published 2n+8 = %0d)", n, last_cycles, 2 * n + 8);
    end

    // ---- point multiplication and squaring ----
    for (int t = 0; t < 120; t++) begin
      A = rand_num(4); B = rand_num(4);
      if (t % 4 == 0) begin A.f = '1; A.f[127] = 1; A.f[95:0] = '1; end  // many carries
      rm = vp_rmode_e'($urandom_range(3)); pr = $urandom_range(3);
      load(0, A); load(1, B);
      if (t % 3 == 2) begin
        issue(P_SQR, 2, 0, 0, rm, pr);
        n_sqr++;
        E1 = ex_round(ex_mul(to_ex(A), to_ex(A)), pr, rm, 0);
      end else begin
        issue(P_MUL, 2, 0, 1, rm, pr);
        E1 = ex_round(ex_mul(to_ex(A), to_ex(B)), pr, rm, 0);
      end
      fetch(2, R);
      expect_num((t % 3 == 2) ? "sqr" : "mul", R, E1);
    end

    // cycle count of multiplication: n^2 partial products of 6..7 cycles
    for (n = 1; n <= 4; n++) begin
      A = rand_num(1); B = rand_num(1);
      A.len = 5'(n - 1); B.len = 5'(n - 1);
      load(0, A); load(1, B);
      issue(P_MUL, 2, 0, 1, RM_NEAREST, n - 1);
      checks++;
      if (last_cycles > 4 + 7 * n * n + 2 + n + 3) begin
        failures++; $display("FAIL mul cycles n=%0d: %0d", n, last_cycles);
      end
      $display("mul n=%0d: %0d cycles (published n^2+n+12 = %0d)", n, last_cycles, n * n + n + 12);
    end

    // ---- dot products ----
    for (int t = 0; t < 6; t++) begin
      issue(P_ACCCLR, 0, 0, 0, RM_NEAREST, 0);
      acc = '0;
      for (int k = 0; k < 8; k++) begin
        A = rand_num(3); B = rand_num(3);
        load(2 * k + 4, A); load(2 * k + 5, B);
        issue(P_MAC, 0, 2 * k + 4, 2 * k + 5, RM_NEAREST, 0);
        acc = ex_add(acc, ex_mul(to_ex(A), to_ex(B)));
      end
      rm = vp_rmode_e'(t % 4); pr = 1 + t % 3;
      issue(P_ACCRND, 2, 0, 0, rm, pr);
      fetch(2, R);
      expect_num("dot", R, ex_round(acc, pr, rm, 0));
    end

    // ---- comparisons ----
    for (int t = 0; t < 40; t++) begin
      A = rand_num(3);
      B = (t % 3 == 0) ? A : rand_num(3);
      if (t % 5 == 1) begin B = A; B.f[127 - 32 * int'(A.len)] ^= 1'b1; end
      load(0, A); load(1, B);
      issue(P_CMP, 0, 0, 1, RM_NEAREST, 0);
      begin
        int c;
        vp_cmp_e ec;
        c = ex_cmp(to_ex(A), to_ex(B));
        ec = (c < 0) ? C_LT : (c > 0) ? C_GT : C_EQ;
        expect_true("cmp", cmp_res == ec);
      end
    end

    // ---- special values ----
    begin
      num_t inf, nan;
      inf = '0; inf.typ = T_INF;
      nan = '0; nan.typ = T_NAN;
      A = rand_num(2);
      load(0, inf); load(1, A);
      issue(P_ADD, 2, 0, 1, RM_NEAREST, 0); fetch(2, R);
      expect_true("inf+x", R.typ == T_INF); n_special++;
      load(1, inf); B = inf; B.sign = 1; load(3, B);
      issue(P_ADD, 2, 1, 3, RM_NEAREST, 0); fetch(2, R);
      expect_true("inf-inf", R.typ == T_NAN && exc_inv); n_special++;
      load(1, zero_num());
      issue(P_MUL, 2, 0, 1, RM_NEAREST, 0); fetch(2, R);
      expect_true("inf*0", R.typ == T_NAN); n_special++;
      load(0, nan);
      issue(P_MUL, 2, 0, 3, RM_NEAREST, 0); fetch(2, R);
      expect_true("nan*x", R.typ == T_NAN); n_special++;
      A = rand_num(2); A.sign = 0; load(0, A);
      issue(P_SUB, 2, 0, 0, RM_NEAREST, 1); fetch(2, R);
      expect_true("x-x", R.typ == T_ZERO); n_special++;
      // exponent overflow
      A = rand_num(1); A.e = 32'd32000; B = A; load(0, A); load(1, B);
      issue(P_MUL, 2, 0, 1, RM_NEAREST, 0); fetch(2, R);
      expect_true("overflow", R.typ == T_INF && exc_ovf);
      if (R.typ == T_INF) n_ovf++;
    end

    // ---- interval operations ----
    for (int t = 0; t < 90; t++) begin
      int cx, cy;
      // X = [A, B], Y = [C, D] with chosen sign classes
      cx = t % 3; cy = (t / 3) % 3;
      A = rand_num(2); B = rand_num(2); C = rand_num(2); D = rand_num(2);
      A.sign = (cx != 0); B.sign = (cx == 1);
      C.sign = (cy != 0); D.sign = (cy == 1);
      if (ex_cmp(to_ex(A), to_ex(B)) > 0) begin R = A; A = B; B = R; end
      if (ex_cmp(to_ex(C), to_ex(D)) > 0) begin R = C; C = D; D = R; end
      load(8, A); load(9, B); load(10, C); load(11, D);
      xa = to_ex(A); xb = to_ex(B); xc = to_ex(C); xd = to_ex(D);
      pr = $urandom_range(2);
      unique case (t % 8)
        0: begin
          issue(X_ADD, 12, 8, 10, RM_NEAREST, pr);
          E1 = ex_round(ex_add(xa, xc), pr, RM_DOWN, 0);
          E2 = ex_round(ex_add(xb, xd), pr, RM_UP, 0);
        end
        1: begin
          issue(X_SUB, 12, 8, 10, RM_NEAREST, pr);
          E1 = ex_round(ex_add(xa, ex_neg(xd)), pr, RM_DOWN, 0);
          E2 = ex_round(ex_add(xb, ex_neg(xc)), pr, RM_UP, 0);
        end
        2, 6: begin
          ex_t p[4], mn, mx;
          issue(X_MUL, 12, 8, 10, RM_NEAREST, pr);
          n_case[cx * 3 + cy]++;
          p[0] = ex_mul(xa, xc); p[1] = ex_mul(xa, xd);
          p[2] = ex_mul(xb, xc); p[3] = ex_mul(xb, xd);
          mn = p[0]; mx = p[0];
          for (int q = 1; q < 4; q++) begin
            if (ex_cmp(p[q], mn) < 0) mn = p[q];
            if (ex_cmp(p[q], mx) > 0) mx = p[q];
          end
          E1 = ex_round(mn, pr, RM_DOWN, 0);
          E2 = ex_round(mx, pr, RM_UP, 0);
        end
        3: begin
          ex_t sa, sb;
          issue(X_SQR, 12, 8, 0, RM_NEAREST, pr);
          sa = ex_mul(xa, xa); sb = ex_mul(xb, xb);
          if (cx == 0)      begin E1 = ex_round(sa, pr, RM_DOWN, 0); E2 = ex_round(sb, pr, RM_UP, 0); end
          else if (cx == 1) begin E1 = ex_round(sb, pr, RM_DOWN, 0); E2 = ex_round(sa, pr, RM_UP, 0); end
          else begin
            E1 = zero_num();
            E2 = ex_round((ex_cmp(sa, sb) > 0) ? sa : sb, pr, RM_UP, 0);
          end
        end
        4: begin
          issue(X_HULL, 12, 8, 10, RM_NEAREST, pr);
          E1 = (ex_cmp(xa, xc) <= 0) ? A : C;
          E2 = (ex_cmp(xb, xd) >= 0) ? B : D;
        end
        5: begin
          issue(X_ISECT, 12, 8, 10, RM_NEAREST, pr);
          E1 = (ex_cmp(xa, xc) >= 0) ? A : C;
          E2 = (ex_cmp(xb, xd) <= 0) ? B : D;
          expect_true("isect empty flag", empty == (ex_cmp(to_ex(E1), to_ex(E2)) > 0));
          if (empty) n_empty++;
        end
        default: begin
          issue(X_MID, 12, 8, 0, RM_NEAREST, pr);
          E1 = ex_round(ex_add(xa, xb), pr, RM_NEAREST, 1);
          fetch(12, R);
          expect_num("mid", R, E1);
          issue(X_WID, 13, 8, 0, RM_NEAREST, pr);
          E2 = ex_round(ex_add(xb, ex_neg(xa)), pr, RM_NEAREST, 0);
          fetch(13, R2);
          expect_num("width", R2, E2);
          continue;
        end
      endcase
      fetch(12, R); fetch(13, R2);
      expect_num("interval lo", R, E1);
      expect_num("interval hi", R2, E2);
    end

    // ---- point division and square root ----
    for (int t = 0; t < 60; t++) begin
      A = rand_num(4); B = rand_num(4);
      if (t % 6 == 0) B = A;                                           // exact quotient 1
      if (t % 6 == 1) begin A.f = '0; A.f[127] = 1'b1; A.len = 0; end  // exact square root
      rm = vp_rmode_e'($urandom_range(3)); pr = $urandom_range(3);
      load(0, A); load(1, B);
      if (t % 2) begin
        A.sign = 0; load(0, A);
        issue(P_SQRT, 2, 0, 0, rm, pr);
        n_sqrt++;
        E1 = ex_round(ex_sqrt(to_ex(A)), pr, rm, 0);
      end else begin
        issue(P_DIV, 2, 0, 1, rm, pr);
        n_div++;
        E1 = ex_round(ex_div(to_ex(A), to_ex(B)), pr, rm, 0);
      end
      fetch(2, R);
      expect_num((t % 2) ? "sqrt" : "div", R, E1);
      if (inexact) n_dinexact++;
    end
    begin
      A = rand_num(2); load(0, A); load(1, zero_num());
      issue(P_DIV, 2, 0, 1, RM_NEAREST, 0); fetch(2, R);
      expect_true("x/0", R.typ == T_INF && R.sign == A.sign); n_special++;
      issue(P_DIV, 2, 1, 1, RM_NEAREST, 0); fetch(2, R);
      expect_true("0/0", R.typ == T_NAN && exc_inv); n_special++;
      A.sign = 1; load(0, A);
      issue(P_SQRT, 2, 0, 0, RM_NEAREST, 0); fetch(2, R);
      expect_true("sqrt(-x)", R.typ == T_NAN && exc_inv); n_special++;
    end

    // cycle count of division and square root: one cycle per quotient bit
    // plus loading, moving the bits into the accumulator and rounding
    for (n = 1; n <= 4; n++) begin
      A = rand_num(4); B = rand_num(4);
      A.len = 5'(n - 1); B.len = 5'(n - 1);
      load(0, A); load(1, B);
      issue(P_DIV, 2, 0, 1, RM_NEAREST, n - 1);
      checks++;
      if (last_cycles > 4 + n + 2 + (32 * n + 2) + 4 * ((32 * n + 65) / 64) + 4 + 2 + n + 3) begin
        failures++; $display("FAIL div cycles n=%0d: %0d", n, last_cycles);
      end
      $display("div n=%0d: %0d cycles (published 3n^2+4n+20 = %0d)", n, last_cycles, 3 * n * n + 4 * n + 20);
      A.sign = 0; load(0, A);
      issue(P_SQRT, 2, 0, 0, RM_NEAREST, n - 1);
      $display("sqrt n=%0d: %0d cycles (published 3n^2+6n+26 = %0d)", n, last_cycles, 3 * n * n + 6 * n + 26);
    end

    // ---- interval division and square root ----
    for (int t = 0; t < 36; t++) begin
      int cx, cy;
      cx = t % 3; cy = (t / 3) % 3;
      A = rand_num(2); B = rand_num(2); C = rand_num(2); D = rand_num(2);
      A.sign = (cx != 0); B.sign = (cx == 1);
      C.sign = (cy != 0); D.sign = (cy == 1);
      if (ex_cmp(to_ex(A), to_ex(B)) > 0) begin R = A; A = B; B = R; end
      if (ex_cmp(to_ex(C), to_ex(D)) > 0) begin R = C; C = D; D = R; end
      if (t >= 27) begin                                // 0 is an end of Y
        if (cy == 1) D = zero_num(); else C = zero_num();
      end
      load(8, A); load(9, B); load(10, C); load(11, D);
      xa = to_ex(A); xb = to_ex(B); xc = to_ex(C); xd = to_ex(D);
      pr = $urandom_range(2);
      issue(X_DIV, 12, 8, 10, RM_NEAREST, pr);
      if (t >= 27 && cx != 2) begin
        // 0 is one end of Y and not in X: the quotient is a half-line
        n_dhalf++;
        E1 = '0; E1.typ = T_INF; E1.sign = 1'b1;
        E2 = '0; E2.typ = T_INF;
        if (cy == 1) begin            // Y = [c, 0]
          if (cx == 0) E2 = ex_round(ex_div(xa, xc), pr, RM_UP, 0);
          else         E1 = ex_round(ex_div(xb, xc), pr, RM_DOWN, 0);
        end else begin                // Y = [0, d]
          if (cx == 0) E1 = ex_round(ex_div(xa, xd), pr, RM_DOWN, 0);
          else         E2 = ex_round(ex_div(xb, xd), pr, RM_UP, 0);
        end
      end else if (cy == 2 || t >= 27) begin
        n_divinf++;
        E1 = '0; E1.typ = T_INF; E1.sign = 1'b1;
        E2 = '0; E2.typ = T_INF;
      end else begin
        ex_t p[4], mn, mx;
        n_dcase[cx * 2 + cy]++;
        p[0] = ex_div(xa, xc); p[1] = ex_div(xa, xd);
        p[2] = ex_div(xb, xc); p[3] = ex_div(xb, xd);
        mn = p[0]; mx = p[0];
        for (int q = 1; q < 4; q++) begin
          if (ex_cmp(p[q], mn) < 0) mn = p[q];
          if (ex_cmp(p[q], mx) > 0) mx = p[q];
        end
        E1 = ex_round(mn, pr, RM_DOWN, 0);
        E2 = ex_round(mx, pr, RM_UP, 0);
      end
      fetch(12, R); fetch(13, R2);
      expect_num("interval div lo", R, E1);
      expect_num("interval div hi", R2, E2);
      expect_true("interval div -inf sign", R.typ != T_INF || R.sign);
      if (cx == 0) begin
        issue(X_SQRT, 12, 8, 0, RM_NEAREST, pr);
        fetch(12, R); fetch(13, R2);
        expect_num("interval sqrt lo", R, ex_round(ex_sqrt(xa), pr, RM_DOWN, 0));
        expect_num("interval sqrt hi", R2, ex_round(ex_sqrt(xb), pr, RM_UP, 0));
      end
    end

    // ---- interval dot products: 4 terms of random sign classes ----
    for (int t = 0; t < 12; t++) begin
      ex_t slo, shi;
      slo = '0; shi = '0;
      for (int k = 0; k < 4; k++) begin
        int cx, cy;
        ex_t p[4], mn, mx;
        cx = (t + k) % 3; cy = (t / 3 + 2 * k) % 3;
        A = rand_num(2); B = rand_num(2); C = rand_num(2); D = rand_num(2);
        A.sign = (cx != 0); B.sign = (cx == 1);
        C.sign = (cy != 0); D.sign = (cy == 1);
        if (ex_cmp(to_ex(A), to_ex(B)) > 0) begin R = A; A = B; B = R; end
        if (ex_cmp(to_ex(C), to_ex(D)) > 0) begin R = C; C = D; D = R; end
        load(16 + 4 * k, A); load(17 + 4 * k, B); load(18 + 4 * k, C); load(19 + 4 * k, D);
        xa = to_ex(A); xb = to_ex(B); xc = to_ex(C); xd = to_ex(D);
        p[0] = ex_mul(xa, xc); p[1] = ex_mul(xa, xd); p[2] = ex_mul(xb, xc); p[3] = ex_mul(xb, xd);
        mn = p[0]; mx = p[0];
        for (int q = 1; q < 4; q++) begin
          if (ex_cmp(p[q], mn) < 0) mn = p[q];
          if (ex_cmp(p[q], mx) > 0) mx = p[q];
        end
        slo = ex_add(slo, mn); shi = ex_add(shi, mx);
        n_dotcase[cx * 3 + cy]++;
      end
      // scratch products of two 2-word operands are exact in 4 words; the
      // saved sum (register 61) gets a 32-word area
      begin
        vp_hdr_t h;
        h = '0; h.vtype = T_ZERO; h.idx = 8'd128;
        @(negedge clk); hdr_we = 1; hdr_addr = 6'd61; hdr_wdata = h;
        @(negedge clk); hdr_we = 0;
      end
      issue(P_ACCCLR, 0, 0, 0, RM_NEAREST, 3);
      for (int k = 0; k < 4; k++) issue(X_DOTLO, 0, 16 + 4 * k, 18 + 4 * k, RM_NEAREST, 3);
      issue(P_ACCRND, 12, 0, 0, RM_DOWN, 1);
      issue(P_ACCCLR, 0, 0, 0, RM_NEAREST, 3);
      for (int k = 0; k < 4; k++) issue(X_DOTHI, 0, 16 + 4 * k, 18 + 4 * k, RM_NEAREST, 3);
      issue(P_ACCRND, 13, 0, 0, RM_UP, 1);
      fetch(12, R); fetch(13, R2);
      expect_num("interval dot lo", R, ex_round(slo, 1, RM_DOWN, 0));
      expect_num("interval dot hi", R2, ex_round(shi, 1, RM_UP, 0));
    end

    // ---- interval relational operators ----
    for (int t = 0; t < 24; t++) begin
      int c0, c1, c2, c3;
      logic er;
      A = rand_num(2); B = rand_num(2); C = rand_num(2); D = rand_num(2);
      if (ex_cmp(to_ex(A), to_ex(B)) > 0) begin R = A; A = B; B = R; end
      if (ex_cmp(to_ex(C), to_ex(D)) > 0) begin R = C; C = D; D = R; end
      if (t % 4 == 1) begin C = A; D = B; end
      if (t % 4 == 2) begin C = A; C.e = A.e + 1; C.sign = 1; D = B; D.e = B.e + 1; D.sign = 0; end
      load(8, A); load(9, B); load(10, C); load(11, D);
      c0 = ex_cmp(to_ex(A), to_ex(C)); c1 = ex_cmp(to_ex(B), to_ex(D));
      c2 = ex_cmp(to_ex(B), to_ex(C)); c3 = ex_cmp(to_ex(D), to_ex(A));
      for (int r = 0; r < 5; r++) begin
        vp_op_e ro;
        ro = (r == 0) ? X_EQ : (r == 1) ? X_SUBSET : (r == 2) ? X_SUPSET : (r == 3) ? X_INSIDE : X_DISJ;
        issue(ro, 0, 8, 10, RM_NEAREST, 0);
        unique case (r)
          0: er = (c0 == 0) && (c1 == 0);
          1: er = (c0 >= 0) && (c1 <= 0);
          2: er = (c0 <= 0) && (c1 >= 0);
          3: er = (c0 > 0) && (c1 < 0);
          default: er = (c2 < 0) || (c3 < 0);
        endcase
        expect_true("interval relation", rel == er);
        if (rel) n_rel[r]++;
      end
    end

    // ---- mechanisms that must have happened ----
    $display("carry=%0d borrow=%0d flag toggles=%0d round increments=%0d rounding carries=%0d",
             n_carry, n_borrow, n_flagtoggle, n_rndinc, rnd_carry_ref);
    $display("sqr=%0d empty=%0d special=%0d overflow=%0d", n_sqr, n_empty, n_special, n_ovf);
    $display("interval product cases: %p", n_case);
    expect_true("carry resolution happened", n_carry > 0);
    expect_true("borrow resolution happened", n_borrow > 0);
    expect_true("flag toggling happened", n_flagtoggle > 0);
    expect_true("round increment happened", n_rndinc > 0);
    expect_true("rounding carry happened", rnd_carry_ref > 0);
    expect_true("square happened", n_sqr > 0);
    expect_true("empty intersection happened", n_empty > 0);
    expect_true("special values happened", n_special > 0);
    expect_true("overflow happened", n_ovf > 0);
    foreach (n_case[i]) expect_true("interval product case", n_case[i] > 0);
    $display("div=%0d sqrt=%0d inexact=%0d unbounded quotients=%0d quotient cases: %p",
             n_div, n_sqrt, n_dinexact, n_divinf, n_dcase);
    expect_true("division happened", n_div > 0);
    expect_true("square root happened", n_sqrt > 0);
    expect_true("inexact quotient or root happened", n_dinexact > 0);
    expect_true("division by an interval holding 0 happened", n_divinf > 0);
    expect_true("half-line quotient happened", n_dhalf > 0);
    foreach (n_dcase[i]) expect_true("interval quotient case", n_dcase[i] > 0);
    $display("interval dot product term cases: %p  relations true: %p", n_dotcase, n_rel);
    foreach (n_dotcase[i]) expect_true("interval dot product term case", n_dotcase[i] > 0);
    foreach (n_rel[i]) expect_true("interval relation true", n_rel[i] > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
