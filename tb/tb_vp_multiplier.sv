// tb_vp_multiplier: streams random and corner-case 32-bit operand pairs into
// the two-cycle multiplier, one pair per cycle, and checks that each product
// appears exactly two cycles later with out_valid, against a 64-bit product
// computed here.
module tb_vp_multiplier;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [31:0] a, b;
  logic [63:0] p;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;

  vp_multiplier #(.M(32)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected product and valid, delayed by two cycles
  logic [63:0] e1, e2;
  logic v1, v2;
  always @(posedge clk) begin
    e1 <= 64'(a) * 64'(b); v1 <= in_valid && rst_n;
    e2 <= e1;              v2 <= v1;
  end

  initial begin
    in_valid = 0; a = 0; b = 0; v1 = 0; v2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = (t % 7 != 3);
      case (t % 50)
        0: begin a = '1; b = '1; end
        1: begin a = 32'h8000_0000; b = 32'h8000_0000; end
        2: begin a = 0; b = $urandom; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      if (t > 2) begin
        checks++;
        if (out_valid !== v2 || (v2 && p !== e2)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d p=%h exp=%h v=%b/%b", t, p, e2, out_valid, v2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
