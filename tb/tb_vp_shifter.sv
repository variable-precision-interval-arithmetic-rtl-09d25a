// tb_vp_shifter: shifts random 64-bit words left and right by every amount
// from 0 to 64 and compares with the shift operators.
module tb_vp_shifter;
  logic [63:0] din, dout, e;
  logic [6:0] amt;
  logic dir;
  int checks = 0, failures = 0;

  vp_shifter #(.W(64)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int s = 0; s <= 64; s++) begin
        for (int d = 0; d < 2; d++) begin
          din = {$urandom, $urandom}; amt = 7'(s); dir = 1'(d);
          #1;
          if (s == 64) e = '0;
          else e = dir ? (din >> s) : (din << s);
          checks++;
          if (dout !== e) begin
            failures++;
            if (failures < 10) $display("FAIL din=%h amt=%0d dir=%b got %h", din, s, dir, dout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
