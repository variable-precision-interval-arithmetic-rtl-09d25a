// tb_vp_selector: drives four random words (with deliberate equal pairs),
// checks that every select value routes the right word to each output and
// that the comparator outputs agree with unsigned comparison.
module tb_vp_selector;
  logic [63:0] in0, in1, in2, in3, out_a, out_b;
  logic [1:0] sel_a, sel_b;
  logic lt, eq, gt;
  logic [63:0] w [4];
  int checks = 0, failures = 0;

  vp_selector #(.W(64)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 4; i++) w[i] = {$urandom, $urandom};
      if (t % 4 == 0) w[1] = w[0];
      if (t % 4 == 1) w[3] = w[2] + 1;
      in0 = w[0]; in1 = w[1]; in2 = w[2]; in3 = w[3];
      sel_a = 2'($urandom); sel_b = 2'($urandom);
      if (t % 4 == 0) begin sel_a = 0; sel_b = 1; end
      #1;
      checks++;
      if (out_a !== w[sel_a] || out_b !== w[sel_b] ||
          lt !== (w[sel_a] < w[sel_b]) || eq !== (w[sel_a] == w[sel_b]) ||
          gt !== (w[sel_a] > w[sel_b])) begin
        failures++;
        if (failures < 10) $display("FAIL sel %0d %0d", sel_a, sel_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
