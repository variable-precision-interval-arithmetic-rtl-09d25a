// tb_vp_dp_ctrl: runs the data path control unit (with its multiplier,
// selector, exponent unit and long accumulator) against a header memory and
// a significand memory, issuing micro-operations directly: ADD, SUB, MID, MUL,
// SQR, a dot product (ACCCLR, MAC..., ACCRND), CMP (signed and by magnitude),
// MOV, ZERO, CLS, DIV, SQRT, INF and ACCADD, plus exact halfway cases for the
// rounding directions. Operands are written straight into the memories; every
// result is compared with vp_ref_pkg's exact-then-round reference.
module tb_vp_dp_ctrl;
  import vpiac_pkg::*;
  import vp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, cmp_abs, busy, done, inexact, exc_ovf, exc_unf, exc_inv;
  vp_uop_e uop;
  logic [5:0] dst, srca, srcb;
  vp_rmode_e rmode;
  logic [4:0] prec;
  vp_cmp_e cmp_res;
  logic [2:0] cls_a, cls_b;
  logic [5:0] hra0, hra1, hwa, c_hwa;
  vp_hdr_t hrd0, hrd1, hwd, c_hwd;
  logic hwe, c_hwe;
  logic [7:0] sra0, sra1, swa, c_swa;
  logic [31:0] srd0, srd1, swd, c_swd;
  logic swe, c_swe;

  // test bench writes go straight to the memories while the unit is idle
  logic t_hwe, t_swe;
  logic [5:0] t_hwa;
  vp_hdr_t t_hwd;
  logic [7:0] t_swa;
  logic [31:0] t_swd;
  logic [5:0] c_hra0;
  logic [7:0] c_sra0;
  logic [5:0] t_hra;
  logic [7:0] t_sra;

  vp_dp_ctrl dut (
    .clk, .rst_n, .start, .uop, .dst, .srca, .srcb, .rmode, .prec, .cmp_abs,
    .busy, .done, .cmp_res, .cls_a, .cls_b, .inexact, .exc_ovf, .exc_unf, .exc_inv,
    .hra0(c_hra0), .hrd0, .hra1, .hrd1, .hwe(c_hwe), .hwa(c_hwa), .hwd(c_hwd),
    .sra0(c_sra0), .srd0, .sra1, .srd1, .swe(c_swe), .swa(c_swa), .swd(c_swd)
  );

  assign hwe  = c_hwe | t_hwe;  assign hwa = c_hwe ? c_hwa : t_hwa;  assign hwd = c_hwe ? c_hwd : t_hwd;
  assign swe  = c_swe | t_swe;  assign swa = c_swe ? c_swa : t_swa;  assign swd = c_swe ? c_swd : t_swd;
  assign hra0 = (busy || start) ? c_hra0 : t_hra;
  assign sra0 = (busy || start) ? c_sra0 : t_sra;

  vp_header_mem u_h (.clk, .ra0(hra0), .rd0(hrd0), .ra1(hra1), .rd1(hrd1), .we(hwe), .wa(hwa), .wd(hwd));
  vp_signif_mem u_s (.clk, .ra0(sra0), .rd0(srd0), .ra1(sra1), .rd1(srd1), .we(swe), .wa(swa), .wd(swd));

  int checks = 0, failures = 0;
  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load(int r, num_t a);
    vp_hdr_t h;
    h.exp = 16'($signed(a.e) + 32768); h.sign = a.sign; h.vtype = vp_type_e'(a.typ);
    h.len = a.len; h.idx = 8'(r * 4);
    @(negedge clk); t_hwe = 1; t_hwa = 6'(r); t_hwd = h;
    @(negedge clk); t_hwe = 0;
    for (int k = 0; k <= int'(a.len); k++) begin
      t_swe = 1; t_swa = 8'(r * 4 + k); t_swd = a.f[127 - 32 * k -: 32];
      @(negedge clk);
    end
    t_swe = 0;
  endtask

  task automatic fetch(int r, output num_t a);
    vp_hdr_t h;
    @(negedge clk); t_hra = 6'(r);
    #1 h = hrd0;
    a = '0; a.sign = h.sign; a.typ = h.vtype; a.len = h.len;
    a.e = 32'(int'({16'd0, h.exp}) - 32768);
    if (h.vtype == T_NORMAL)
      for (int k = 0; k <= int'(h.len); k++) begin
        t_sra = h.idx + 8'(k);
        #1 a.f[127 - 32 * k -: 32] = srd0;
      end
    else a.e = 0;
  endtask

  task automatic run(vp_uop_e o, int d, int a, int b, vp_rmode_e rm, int pr, logic ab);
    @(negedge clk);
    uop = o; dst = 6'(d); srca = 6'(a); srcb = 6'(b); rmode = rm; prec = 5'(pr); cmp_abs = ab;
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
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

  num_t A, B, R;
  ex_t acc;
  vp_rmode_e rm;
  int pr;

  initial begin
    start = 0; uop = U_NOP; dst = 0; srca = 0; srcb = 0; rmode = RM_NEAREST; prec = 0; cmp_abs = 0;
    t_hwe = 0; t_swe = 0; t_hwa = 0; t_hwd = '0; t_swa = 0; t_swd = 0; t_hra = 0; t_sra = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(2, zero_num());
    for (int t = 0; t < 160; t++) begin
      A = rand_num(4); B = rand_num(4);
      if (t % 6 == 1) begin B = A; B.sign = ~A.sign; B.f[32] = ~B.f[32]; end
      rm = vp_rmode_e'($urandom_range(3)); pr = $urandom_range(3);
      load(0, A); load(1, B);
      unique case (t % 5)
        0: begin run(U_ADD, 2, 0, 1, rm, pr, 0); fetch(2, R);
                 expect_num("add", R, ex_round(ex_add(to_ex(A), to_ex(B)), pr, rm, 0)); end
        1: begin run(U_SUB, 2, 0, 1, rm, pr, 0); fetch(2, R);
                 expect_num("sub", R, ex_round(ex_add(to_ex(A), ex_neg(to_ex(B))), pr, rm, 0)); end
        2: begin run(U_MID, 2, 0, 1, rm, pr, 0); fetch(2, R);
                 expect_num("mid", R, ex_round(ex_add(to_ex(A), to_ex(B)), pr, rm, 1)); end
        3: begin run(U_MUL, 2, 0, 1, rm, pr, 0); fetch(2, R);
                 expect_num("mul", R, ex_round(ex_mul(to_ex(A), to_ex(B)), pr, rm, 0)); end
        default: begin run(U_SQR, 2, 0, 0, rm, pr, 0); fetch(2, R);
                 expect_num("sqr", R, ex_round(ex_mul(to_ex(A), to_ex(A)), pr, rm, 0)); end
      endcase
      // comparison, signed and by magnitude
      run(U_CMP, 0, 0, 1, RM_NEAREST, 0, t % 2);
      begin
        ex_t xa, xb;
        int c;
        xa = to_ex(A); xb = to_ex(B);
        if (t % 2) begin xa.sign = 0; xb.sign = 0; end
        c = ex_cmp(xa, xb);
        checks++;
        if (cmp_res != ((c < 0) ? C_LT : (c > 0) ? C_GT : C_EQ)) begin
          failures++; $display("FAIL cmp %0d got %0d", c, cmp_res);
        end
      end
      // classification
      run(U_CLS, 0, 0, 1, RM_NEAREST, 0, 0);
      checks++;
      if (cls_a != {A.sign, A.typ} || cls_b != {B.sign, B.typ}) begin failures++; $display("FAIL cls"); end
    end
    // exact ties: a 2-word value whose second word is one half of the last
    // kept unit, plus zero, rounded to one word in every direction
    for (int t = 0; t < 16; t++) begin
      A = rand_num(1); A.len = 5'd1; A.f[95:64] = 32'h8000_0000;
      A.f[96] = 1'(t);
      rm = vp_rmode_e'(t % 4);
      load(0, A); load(1, zero_num());
      run(U_ADD, 2, 0, 1, rm, 0, 0); fetch(2, R);
      expect_num("tie", R, ex_round(to_ex(A), 0, rm, 0));
    end
    // move and zero
    A = rand_num(4); load(0, A);
    run(U_MOV, 3, 0, 0, RM_NEAREST, 0, 0); fetch(3, R);
    expect_num("mov", R, A);
    run(U_ZERO, 3, 0, 0, RM_NEAREST, 1, 0); fetch(3, R);
    expect_num("zero", R, zero_num());
    // dot products
    for (int t = 0; t < 5; t++) begin
      run(U_ACCCLR, 0, 0, 0, RM_NEAREST, 0, 0);
      acc = '0;
      for (int k = 0; k < 10; k++) begin
        A = rand_num(3); B = rand_num(3);
        load(0, A); load(1, B);
        run(U_MAC, 0, 0, 1, RM_NEAREST, 0, 0);
        acc = ex_add(acc, ex_mul(to_ex(A), to_ex(B)));
      end
      rm = vp_rmode_e'(t % 4); pr = t % 4;
      run(U_ACCRND, 2, 0, 0, rm, pr, 0); fetch(2, R);
      expect_num("dot", R, ex_round(acc, pr, rm, 0));
    end
    // division, square root and infinity
    for (int t = 0; t < 60; t++) begin
      A = rand_num(4); B = rand_num(4);
      if (t % 5 == 0) B = A;
      rm = vp_rmode_e'($urandom_range(3)); pr = $urandom_range(3);
      load(0, A); load(1, B);
      if (t % 2) begin
        A.sign = 0; A.e = 32'(int'($urandom_range(9)) - 4); load(0, A);
        run(U_SQRT, 2, 0, 0, rm, pr, 0); fetch(2, R);
        expect_num("sqrt", R, ex_round(ex_sqrt(to_ex(A)), pr, rm, 0));
      end else begin
        run(U_DIV, 2, 0, 1, rm, pr, 0); fetch(2, R);
        expect_num("div", R, ex_round(ex_div(to_ex(A), to_ex(B)), pr, rm, 0));
      end
      // x/x is exact; a random quotient is not
      if (t % 2 == 0) begin
        checks++;
        if (inexact != (t % 5 != 0)) begin failures++; $display("FAIL inexact flag"); end
      end
    end
    // single numbers added into the accumulator beside products
    for (int t = 0; t < 8; t++) begin
      run(U_ACCCLR, 0, 0, 0, RM_NEAREST, 0, 0);
      A = rand_num(3); B = rand_num(3); load(0, A); load(1, B);
      run(U_ACCADD, 0, 0, 0, RM_NEAREST, 0, 0);
      run(U_MAC, 0, 0, 1, RM_NEAREST, 0, 0);
      run(U_ACCADD, 0, 1, 0, RM_NEAREST, 0, 0);
      acc = ex_add(ex_add(to_ex(A), ex_mul(to_ex(A), to_ex(B))), to_ex(B));
      rm = vp_rmode_e'(t % 4); pr = 3;
      run(U_ACCRND, 2, 0, 0, rm, pr, 0); fetch(2, R);
      expect_num("accadd", R, ex_round(acc, pr, rm, 0));
    end
    run(U_INF, 3, 0, 0, RM_DOWN, 0, 0); fetch(3, R);
    checks++; if (R.typ != T_INF || !R.sign) begin failures++; $display("FAIL -inf"); end
    run(U_INF, 3, 0, 0, RM_UP, 0, 0); fetch(3, R);
    checks++; if (R.typ != T_INF || R.sign) begin failures++; $display("FAIL +inf"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
