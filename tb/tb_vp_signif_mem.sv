// tb_vp_signif_mem: fills the 256-word significand memory (M = 32) with
// random words, reads them back two at a time through both ports and
// compares with a copy kept here; then overwrites random words while reading
// others and checks again.
module tb_vp_signif_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] ra0, ra1, wa;
  logic [31:0] rd0, rd1, wd;
  logic we;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  vp_signif_mem dut (.*);

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; ra0 = 0; ra1 = 0; wa = 0; wd = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; wa = 8'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 600; t++) begin
      ra0 = 8'($urandom); ra1 = 8'($urandom);
      we = (t % 3 == 0); wa = 8'($urandom); wd = $urandom;
      #1;
      checks += 2;
      if (rd0 !== model[ra0]) begin failures++; $display("FAIL port0 @%0d", ra0); end
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL port1 @%0d", ra1); end
      @(posedge clk);
      if (we) model[wa] = wd;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
