// tb_cla4: all 512 operand/carry combinations of the 4-bit CLA:
// {cout, s} must equal a + b + cin; gg and gp must be the carry out with
// carry in 0 and the all-propagate condition.
module tb_cla4;
  logic [3:0] a, b, s;
  logic       cin, cout, gg, gp;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .gg(gg), .gp(gp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int sum;
      {a, b, cin} = 9'(v);
      #1;
      sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 5'(sum) || gg !== (int'(a) + int'(b) > 15)
          || gp !== ((a ^ b) == 4'hF)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%b -> cout=%b s=%h gg=%b gp=%b", a, b, cin, cout, s, gg, gp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cla4
