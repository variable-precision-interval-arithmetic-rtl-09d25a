// tb_vpiac_m64: the coprocessor built with a 64-bit data path (M = 64), the
// largest of the three word sizes, checked end to end with integer
// arithmetic that is exact in 64 bits. Operands are random signed integers
// of up to 31 bits, written as 64-bit significands (64/M words). Checked:
// addition, subtraction, multiplication, division of a product by one of
// its factors, square root of a perfect square, a 4-term dot product
// (ACCCLR, MAC, ACCRND), and 1/3 rounded down and up, whose significands
// must differ by exactly one unit in the last place. The expected values
// come from integer arithmetic in the testbench. tb_vpiac_m16 is the same
// test with MW = 16.
module tb_vpiac_m64;
  import vpiac_pkg::*;

  localparam int MW = 64;
  localparam int NW = 64 / MW;        // words per number
  localparam int PR = NW - 1;         // length field of every number

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          hdr_we, sig_we, start;
  logic [5:0]    hdr_addr, dst, srca, srcb;
  vp_hdr_t       hdr_wdata, hdr_rdata;
  logic [7:0]    sig_addr;
  logic [MW-1:0] sig_wdata, sig_rdata;
  vp_op_e        op;
  vp_rmode_e     rmode;
  logic [4:0]    prec;
  logic          busy, done, empty, rel, inexact, exc_ovf, exc_unf, exc_inv;
  vp_cmp_e       cmp_res;

  vpiac #(.M(MW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // integer v -> header + significand (64 bits, NW words) in register r
  task automatic load_int(int r, longint v);
    vp_hdr_t h;
    logic [63:0] mag, f;
    int e;
    mag = (v < 0) ? 64'(-v) : 64'(v);
    h = '0; h.idx = 8'(r * NW); h.len = 5'(PR); h.sign = (v < 0);
    if (mag == 0) h.vtype = T_ZERO;
    else begin
      e = 0;
      for (int i = 0; i < 64; i++) if (mag[i]) e = i;
      f = mag << (63 - e);
      h.vtype = T_NORMAL;
      h.exp = 16'(e + 32768);
      for (int k = 0; k < NW; k++) begin
        @(negedge clk);
        sig_we = 1; sig_addr = 8'(r * NW + k); sig_wdata = f[63 - MW * k -: MW];
      end
    end
    @(negedge clk);
    sig_we = 0;
    hdr_we = 1; hdr_addr = 6'(r); hdr_wdata = h;
    @(negedge clk);
    hdr_we = 0;
  endtask

  // register r -> sign, exponent and 64-bit significand
  task automatic fetch(int r, output vp_hdr_t h, output logic [63:0] f);
    @(negedge clk);
    hdr_addr = 6'(r);
    #1 h = hdr_rdata;
    f = '0;
    for (int k = 0; k <= int'(h.len) && k < NW; k++) begin
      sig_addr = h.idx + 8'(k);
      #1 f[63 - MW * k -: MW] = sig_rdata;
    end
  endtask

  task automatic expect_int(string what, int r, longint v);
    vp_hdr_t h;
    logic [63:0] f;
    longint got;
    int e;
    fetch(r, h, f);
    if (h.vtype == T_ZERO) got = 0;
    else begin
      e = int'({16'd0, h.exp}) - 32768;
      got = (e >= 0 && e < 63) ? longint'(f >> (63 - e)) : 64'h7fff_ffff_ffff_ffff;
      if (h.sign) got = -got;
    end
    checks++;
    if (got != v || (h.vtype != T_ZERO && h.vtype != T_NORMAL)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, v);
    end
  endtask

  task automatic issue(vp_op_e o, int d, int a, int b, vp_rmode_e rm);
    @(negedge clk);
    op = o; dst = 6'(d); srca = 6'(a); srcb = 6'(b); rmode = rm; prec = 5'(PR);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic longint rnd31();
    longint v;
    v = longint'($urandom_range(32'h7fff_ffff)) >> $urandom_range(20);
    return ($urandom_range(1) != 0) ? -v : v;
  endfunction

  longint a, b, s, acc;
  vp_hdr_t h1, h2;
  logic [63:0] f1, f2;

  initial begin
    hdr_we = 0; sig_we = 0; start = 0; hdr_addr = 0; sig_addr = 0;
    hdr_wdata = '0; sig_wdata = 0; op = I_NOP; dst = 0; srca = 0; srcb = 0;
    rmode = RM_NEAREST; prec = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < 40; t++) begin
      a = rnd31(); b = rnd31();
      if (b == 0) b = 7;
      load_int(0, a); load_int(1, b); load_int(2, 0);
      issue(P_ADD, 2, 0, 1, RM_NEAREST); expect_int("add", 2, a + b);
      issue(P_SUB, 2, 0, 1, RM_NEAREST); expect_int("sub", 2, a - b);
      issue(P_MUL, 3, 0, 1, RM_NEAREST); expect_int("mul", 3, a * b);
      issue(P_DIV, 2, 3, 1, vp_rmode_e'(t % 4)); expect_int("div", 2, a);
      s = (a < 0 ? -a : a) & 64'hffff;
      load_int(4, s * s);
      issue(P_SQRT, 2, 4, 0, vp_rmode_e'(t % 4)); expect_int("sqrt", 2, s);
    end

    // 4-term dot product in the long accumulator
    for (int t = 0; t < 10; t++) begin
      issue(P_ACCCLR, 0, 0, 0, RM_NEAREST);
      acc = 0;
      for (int i = 0; i < 4; i++) begin
        a = rnd31(); b = rnd31() >>> 4;
        load_int(10, a); load_int(11, b);
        issue(P_MAC, 0, 10, 11, RM_NEAREST);
        acc += a * b;
      end
      issue(P_ACCRND, 12, 0, 0, RM_NEAREST);
      expect_int("dot product", 12, acc);
    end

    // 1/3 rounded both ways: one unit in the last place apart
    load_int(0, 1); load_int(1, 3);
    issue(P_DIV, 2, 0, 1, RM_DOWN);
    issue(P_DIV, 3, 0, 1, RM_UP);
    fetch(2, h1, f1); fetch(3, h2, f2);
    checks++;
    if (h1.exp != h2.exp || f2 - f1 != 64'd1 || f1 != 64'haaaa_aaaa_aaaa_aaaa) begin
      failures++;
      $display("FAIL 1/3: down %h up %h", f1, f2);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
