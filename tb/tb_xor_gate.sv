// tb_xor_gate: exhaustive check of the two-input XOR cell against its truth
// table (a listed constant, not the operator under test).
module tb_xor_gate;
  logic a, b, y;
  int checks = 0, failures = 0;
  localparam logic [3:0] TT = 4'b0110;  // y for {a,b} = 00, 01, 10, 11

  xor_gate dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== TT[v]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_xor_gate
