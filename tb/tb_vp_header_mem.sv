// tb_vp_header_mem: writes random headers into all 64 words of the header
// memory, then reads them back through both read ports at once and compares
// with a copy kept here. Also checks that a read in the cycle of a write to
// the same address returns the old word and that the write lands on the edge.
module tb_vp_header_mem;
  import vpiac_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] ra0, ra1, wa;
  vp_hdr_t rd0, rd1, wd;
  logic we;
  vp_hdr_t model [64];
  int checks = 0, failures = 0;

  vp_header_mem dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; ra0 = 0; ra1 = 0; wa = 0; wd = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; wa = 6'(i); wd = vp_hdr_t'($urandom); model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 200; t++) begin
      ra0 = 6'($urandom); ra1 = 6'($urandom);
      #1;
      checks += 2;
      if (rd0 !== model[ra0]) begin failures++; $display("FAIL port0 @%0d", ra0); end
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL port1 @%0d", ra1); end
      @(negedge clk);
    end
    // write and read the same word in one cycle
    ra0 = 6'd7; we = 1; wa = 6'd7; wd = ~model[7];
    #1 checks++; if (rd0 !== model[7]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk); we = 0; model[7] = ~model[7];
    #1 checks++; if (rd0 !== model[7]) begin failures++; $display("FAIL write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
