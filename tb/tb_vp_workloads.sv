// tb_vp_workloads: the coprocessor at its default size running the three
// kernels its evaluation is built on, at the precisions that fit in the
// register file (64 and 128 bits, i.e. 2 and 4 words of 32 bits):
//  * a 16-element point dot product: ACCCLR, 16 MAC instructions and one
//    ACCRND, exact until the single final rounding;
//  * a degree-20 polynomial by Horner's rule: p = c20, then p = p * x + c_i
//    for i = 19 down to 0, each multiplication and addition rounded;
//  * the interval Newton iteration X' = (m - f(m) / F'(X)) intersected with X,
//    m the midpoint of X, for f(x) = 10x^2 - 5x + 3 sqrt(x) - 17 and
//    F'(X) = 20X - 5 + 1.5 / sqrt(X), from X = [1, 2], with interval
//    instructions only (X_MID, X_SQR, X_MUL by one-word constants, X_ADD,
//    X_SUB, X_SQRT, X_DIV, X_ISECT). Each iteration must give a non-empty
//    interval no wider than the last that holds the root (found in double
//    precision, within 1e-13); after 8 iterations the width must be below
//    1e-15.
// Dot product and polynomial operands are random (random signs, exponents
// within +-40). The reference
// is the same exact big-integer arithmetic and rounding as in tb_vpiac:
// the dot product is summed exactly and rounded once, the polynomial is
// rounded after every step exactly as the instructions are. All four
// rounding directions are used. The cycle count of each kernel is printed
// beside the published formula (dot product k(2n^2+12)+2n+20; one Horner
// step n^2+n+12 plus 2n+8) and checked against a bound for this
// implementation (at most 8n^2+12 cycles per MAC, and per Horner step the
// multiplication plus addition bounds checked in tb_vpiac). The Newton
// iteration's cycle count is printed beside the published 25n^2+93n+386.
module tb_vp_workloads;
  import vpiac_pkg::*;
  import vp_ref_pkg::*;

  localparam int MAXW = 4;            // words per register area
  localparam int K    = 16;           // dot product length
  localparam int DEG  = 20;           // polynomial degree

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
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic alloc(int reg_i);
    vp_hdr_t h;
    h = '0; h.vtype = T_ZERO; h.idx = 8'(reg_i * MAXW);
    @(negedge clk);
    hdr_we = 1; hdr_addr = 6'(reg_i); hdr_wdata = h;
    @(negedge clk);
    hdr_we = 0;
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
      $display("FAIL %s: got s%0d t%0d e%0d l%0d %h  exp s%0d t%0d e%0d l%0d %h", what,
               got.sign, got.typ, $signed(got.e), got.len, got.f,
               exp.sign, exp.typ, $signed(exp.e), exp.len, exp.f);
    end
  endtask

  task automatic expect_true(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic num_t rand_len(int n);
    num_t a;
    a = rand_num(4);
    a.len = 5'(n - 1);
    for (int k = 0; k < 4; k++) if (k >= n) a.f[127 - 32 * k -: 32] = '0;
    return a;
  endfunction

  // positive integer v as a one-word number
  function automatic num_t int_num(int v);
    num_t a;
    int e;
    a = '0; a.typ = T_NORMAL;
    e = 0;
    for (int i = 0; i < 31; i++) if (v[i]) e = i;
    a.e = 32'(e);
    a.f = 128'(v) << (127 - e);
    return a;
  endfunction

  function automatic real to_real(num_t a);
    real r;
    r = 0.0;
    if (a.typ != T_NORMAL) return 0.0;
    for (int k = 0; k < 128; k++)
      if (a.f[127 - k]) r += 2.0 ** ($signed(a.e) - k);
    return a.sign ? -r : r;
  endfunction

  real root, lo, hi, w_old;
  int n_newton = 0;
  num_t X[K], Y[K], C[DEG + 1], XP, R, E;
  ex_t acc;
  vp_rmode_e rm;
  int cyc, pr, n_dot = 0, n_poly = 0;

  initial begin
    hdr_we = 0; sig_we = 0; start = 0; hdr_addr = 0; sig_addr = 0;
    hdr_wdata = '0; sig_wdata = 0; op = I_NOP; dst = 0; srca = 0; srcb = 0;
    rmode = RM_NEAREST; prec = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 64; r++) alloc(r);

    for (int n = 2; n <= 4; n += 2) begin
      pr = n - 1;
      // ---- 16-element point dot product ----
      for (int t = 0; t < 4; t++) begin
        rm = vp_rmode_e'(t);
        for (int i = 0; i < K; i++) begin
          X[i] = rand_len(n); Y[i] = rand_len(n);
          load(i, X[i]); load(K + i, Y[i]);
        end
        issue(P_ACCCLR, 0, 0, 0, rm, pr);
        cyc = last_cycles;
        acc = '0;
        for (int i = 0; i < K; i++) begin
          issue(P_MAC, 0, i, K + i, rm, pr);
          cyc += last_cycles;
          acc = (i == 0) ? ex_mul(to_ex(X[i]), to_ex(Y[i]))
                         : ex_add(acc, ex_mul(to_ex(X[i]), to_ex(Y[i])));
        end
        issue(P_ACCRND, 40, 0, 0, rm, pr);
        cyc += last_cycles;
        fetch(40, R);
        E = ex_round(acc, pr, rm, 0);
        expect_num("dot product", R, E);
        expect_true("dot product cycles", cyc <= K * (8 * n * n + 12) + 8 * n + 40);
        n_dot++;
        if (t == 0)
          $display("dot product k=%0d n=%0d: %0d cycles (published k(2n^2+12)+2n+20 = %0d)",
                   K, n, cyc, K * (2 * n * n + 12) + 2 * n + 20);
      end

      // ---- degree-20 polynomial, Horner's rule ----
      for (int t = 0; t < 4; t++) begin
        rm = vp_rmode_e'(t);
        for (int i = 0; i <= DEG; i++) begin
          C[i] = rand_len(n);
          C[i].e = 32'(int'($urandom_range(16)) - 8);
          load(i, C[i]);
        end
        XP = rand_len(n);
        XP.e = 32'(int'($urandom_range(4)) - 2);
        load(DEG + 1, XP);
        // p lives in register 22, p * x goes to register 23
        issue(P_MOV, 22, DEG, 0, rm, pr);
        E = C[DEG];
        cyc = 0;
        for (int i = DEG - 1; i >= 0; i--) begin
          issue(P_MUL, 23, 22, DEG + 1, rm, pr);
          cyc += last_cycles;
          E = ex_round(ex_mul(to_ex(E), to_ex(XP)), pr, rm, 0);
          issue(P_ADD, 22, 23, i, rm, pr);
          cyc += last_cycles;
          E = ex_round(ex_add(to_ex(E), to_ex(C[i])), pr, rm, 0);
        end
        fetch(22, R);
        expect_num("polynomial", R, E);
        expect_true("polynomial cycles",
                    cyc <= DEG * ((4 * n + 1) * ((n + 1) * (n + 1) + 4) + 2 * 4 * n + 20));
        n_poly++;
        if (t == 0)
          $display("polynomial degree %0d n=%0d: %0d cycles (published 20(n^2+3n+20) = %0d)",
                   DEG, n, cyc, DEG * (n * n + 3 * n + 20));
      end
    end

    // ---- interval Newton iteration ----
    root = 1.5;
    for (int i = 0; i < 60; i++)
      root = root - (10.0 * root * root - 5.0 * root + 3.0 * $sqrt(root) - 17.0)
                  / (20.0 * root - 5.0 + 1.5 / $sqrt(root));
    for (int n = 2; n <= 4; n += 2) begin
      pr = n - 1;
      load(0, int_num(1)); load(1, int_num(2));
      load(2, int_num(10)); load(3, int_num(10));
      load(4, int_num(5));  load(5, int_num(5));
      load(6, int_num(3));  load(7, int_num(3));
      load(8, int_num(17)); load(9, int_num(17));
      load(10, int_num(20)); load(11, int_num(20));
      C[0] = int_num(3); C[0].e = 0;                    // 1.5
      load(12, C[0]); load(13, C[0]);
      w_old = 1.0;
      for (int it = 0; it < 8; it++) begin
        cyc = 0;
        issue(X_MID, 14, 0, 0, RM_NEAREST, pr);  cyc += last_cycles;
        issue(P_MOV, 15, 14, 0, RM_NEAREST, pr); cyc += last_cycles;  // M = [m, m]
        // f(M) = 10 M^2 - 5 M + 3 sqrt(M) - 17
        issue(X_SQR, 16, 14, 0, RM_NEAREST, pr);  cyc += last_cycles;
        issue(X_MUL, 16, 2, 16, RM_NEAREST, pr);  cyc += last_cycles;
        issue(X_MUL, 18, 4, 14, RM_NEAREST, pr);  cyc += last_cycles;
        issue(X_SUB, 16, 16, 18, RM_NEAREST, pr); cyc += last_cycles;
        issue(X_SQRT, 20, 14, 0, RM_NEAREST, pr); cyc += last_cycles;
        issue(X_MUL, 20, 6, 20, RM_NEAREST, pr);  cyc += last_cycles;
        issue(X_ADD, 16, 16, 20, RM_NEAREST, pr); cyc += last_cycles;
        issue(X_SUB, 24, 16, 8, RM_NEAREST, pr);  cyc += last_cycles;
        // F'(X) = 20 X - 5 + 1.5 / sqrt(X)
        issue(X_MUL, 18, 10, 0, RM_NEAREST, pr);  cyc += last_cycles;
        issue(X_SUB, 18, 18, 4, RM_NEAREST, pr);  cyc += last_cycles;
        issue(X_SQRT, 20, 0, 0, RM_NEAREST, pr);  cyc += last_cycles;
        issue(X_DIV, 22, 12, 20, RM_NEAREST, pr); cyc += last_cycles;
        issue(X_ADD, 26, 18, 22, RM_NEAREST, pr); cyc += last_cycles;
        // N = M - f(M) / F'(X); X' = N intersected with X
        issue(X_DIV, 16, 24, 26, RM_NEAREST, pr); cyc += last_cycles;
        issue(X_SUB, 28, 14, 16, RM_NEAREST, pr); cyc += last_cycles;
        issue(X_ISECT, 30, 0, 28, RM_NEAREST, pr); cyc += last_cycles;
        expect_true("newton: intersection not empty", !empty);
        issue(P_MOV, 0, 30, 0, RM_NEAREST, pr);
        issue(P_MOV, 1, 31, 0, RM_NEAREST, pr);
        fetch(0, R); lo = to_real(R);
        fetch(1, R); hi = to_real(R);
        expect_true("newton: interval holds the root", lo <= root + 1e-13 && root - 1e-13 <= hi);
        expect_true("newton: width does not grow", hi - lo <= w_old && lo <= hi);
        w_old = hi - lo;
        if (it == 0)
          $display("interval Newton n=%0d: %0d cycles per iteration (published 25n^2+93n+386 = %0d)",
                   n, cyc, 25 * n * n + 93 * n + 386);
      end
      $display("interval Newton n=%0d: [%.17f, %.17f] after 8 iterations", n, lo, hi);
      expect_true("newton: converged", w_old < 1e-15);
      n_newton++;
    end

    expect_true("newton iterations ran", n_newton == 2);
    expect_true("dot products ran", n_dot == 8);
    expect_true("polynomials ran", n_poly == 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
