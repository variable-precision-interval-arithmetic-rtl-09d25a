// tb_vp_divsqrt: checks the bit-serial divider / square-root unit at M = 32
// with up to 4 words per operand (MAXW = 4). Random significands 1.xxx are
// loaded word by word; the quotient bits are compared with the integer
// quotient (A << (nq-1)) / B and the root bits with the integer square root
// of the (doubled, when odd is set) radicand scaled by 4^(nq-1), both worked
// out here with wide integer arithmetic. rem_nz must say whether the
// remainder is non-zero, and done must come nq cycles after start.
module tb_vp_divsqrt;
  localparam int M = 32, MAXW = 4, RW = M * MAXW, QW = RW + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr, ld_we, ld_a_en, ld_b_en, start, sqrt_mode, odd, busy, done, rem_nz;
  logic [1:0] ld_idx;
  logic [M-1:0] ld_a, ld_b;
  logic [$clog2(QW + 1)-1:0] nq;
  logic [QW-1:0] q;

  vp_divsqrt #(.M(M), .MAXW(MAXW)) dut (.*);

  int checks = 0, failures = 0, n_exact = 0, n_inexact = 0;
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [RW-1:0] a, b;
  logic [1023:0] n, qe, rt, t2, rem;
  int nbits, lat;
  logic sq, od, rnz_e;

  initial begin
    clr = 0; ld_we = 0; ld_a_en = 0; ld_b_en = 0; start = 0; sqrt_mode = 0; odd = 0;
    ld_idx = 0; ld_a = 0; ld_b = 0; nq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int wa, wb;
      wa = 1 + $urandom_range(MAXW - 1); wb = 1 + $urandom_range(MAXW - 1);
      a = '0; b = '0;
      for (int k = 0; k < wa; k++) a[RW - 1 - M * k -: M] = $urandom;
      for (int k = 0; k < wb; k++) b[RW - 1 - M * k -: M] = $urandom;
      if (t % 7 == 0) b = a;
      if (t % 11 == 0) begin a = '0; b = '0; end
      a[RW-1] = 1'b1; b[RW-1] = 1'b1;
      if (t % 13 == 0) begin a = '0; a[RW-1] = 1'b1; a[RW-3] = (t % 2 == 0); end  // 1 or 1.25
      sq = (t % 2 == 1); od = sq && (t % 4 == 1);
      nbits = 2 + $urandom_range(QW - 2);
      // load
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      for (int k = 0; k < MAXW; k++) begin
        ld_we = 1; ld_idx = 2'(k);
        ld_a_en = 1; ld_a = a[RW - 1 - M * k -: M];
        ld_b_en = !sq; ld_b = b[RW - 1 - M * k -: M];
        @(negedge clk);
      end
      ld_we = 0;
      // run
      sqrt_mode = sq; odd = od; nq = $bits(nq)'(nbits); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      // expected
      if (!sq) begin
        n = 1024'(a) << (nbits - 1);
        qe = n / 1024'(b);
        rnz_e = (n % 1024'(b)) != '0;
      end else begin
        // radicand 1.xxx (2 * 1.xxx if odd) as an integer with RW-1 fraction
        // bits; scaled so that the root has nbits bits with the top of weight 1
        n = 1024'(a) << (od ? 1 : 0);
        n = n << (2 * (nbits - 1));
        // n now holds radicand * 2^(RW-1) * 4^(nbits-1); make the fraction
        // bit count even
        if ((RW - 1) % 2) n = n << 1;
        rt = '0;
        for (int bb = 400; bb >= 0; bb--) begin
          t2 = rt | (1024'(1) << bb);
          if (t2 * t2 <= n) rt = t2;
        end
        // root now has (RW-1+1)/2 extra fraction bits; drop them
        rem = n - rt * rt;
        qe = rt >> (RW / 2);
        rnz_e = (rem != '0) || ((rt & ((1024'(1) << (RW / 2)) - 1)) != '0);
      end
      checks++;
      if (QW'(qe) != q || (qe >> nbits) != '0) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d sqrt=%0d odd=%0d nq=%0d: q %h exp %h", t, sq, od, nbits, q, QW'(qe));
      end
      checks++;
      if (rem_nz != rnz_e) begin failures++; if (failures < 10) $display("FAIL rem_nz t=%0d", t); end
      checks++;
      if (lat != nbits + 1) begin failures++; if (failures < 10) $display("FAIL latency %0d nq %0d", lat, nbits); end
      if (rnz_e) n_inexact++; else n_exact++;
    end
    checks++;
    if (n_exact == 0 || n_inexact == 0) begin failures++; $display("FAIL exact %0d inexact %0d", n_exact, n_inexact); end
    $display("exact %0d inexact %0d", n_exact, n_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
