// tb_vp_adder: checks the 64-bit adder with random and boundary operands, for
// addition and subtraction with both carry-in values, against 65-bit sums
// computed here.
module tb_vp_adder;
  logic [63:0] a, b, s;
  logic cin, sub, cout;
  logic [64:0] e;
  int checks = 0, failures = 0;

  vp_adder #(.W(64)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (t % 10 == 0) a = '1;
      if (t % 10 == 1) b = '1;
      if (t % 10 == 2) b = a;
      cin = 1'($urandom); sub = 1'($urandom);
      #1;
      e = sub ? ({1'b0, a} + {1'b0, ~b} + 65'(cin)) : ({1'b0, a} + {1'b0, b} + 65'(cin));
      checks++;
      if ({cout, s} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b sub=%b got %b %h", a, b, cin, sub, cout, s);
      end
      // subtraction with cin = 1 is a - b; cout = 1 means no borrow
      if (sub && cin) begin
        checks++;
        if (s !== a - b || cout !== (a >= b)) begin failures++; $display("FAIL a-b"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
