// tb_vp_exp_unit: adds and subtracts random biased exponents, including
// values that overflow and underflow the 16-bit range, and checks the result,
// the overflow/underflow flags and the comparison outputs against integer
// arithmetic done here.
module tb_vp_exp_unit;
  logic [15:0] ea, eb;
  logic sub, ovf, unf, a_gt_b, a_eq_b;
  logic signed [18:0] e;
  int ee;
  int checks = 0, failures = 0;

  vp_exp_unit dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      ea = 16'($urandom); eb = 16'($urandom); sub = 1'($urandom);
      if (t % 9 == 0) eb = ea;
      #1;
      ee = sub ? int'(ea) - int'(eb) + 32768 : int'(ea) + int'(eb) - 32768;
      checks++;
      if (int'(e) != ee || ovf !== (ee > 65535) || unf !== (ee < 0) ||
          a_gt_b !== (ea > eb) || a_eq_b !== (ea == eb)) begin
        failures++;
        if (failures < 10) $display("FAIL ea=%0d eb=%0d sub=%b e=%0d exp=%0d", ea, eb, sub, e, ee);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
