// tb_mbe_multiplier: exhaustive check of the 8x8 radix-4 Booth multiplier in
// both modes (all 65536 operand pairs unsigned, all 65536 signed), against
// integer multiplication. Also runs a 4x4 instance exhaustively, including the
// worked example 6 x (-6) = -36 = 8'b1101_1100.
module tb_mbe_multiplier;
  logic        tc;
  logic [7:0]  a, x;
  logic [15:0] p;
  logic [3:0]  a4, x4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  mbe_multiplier           dut  (.tc(tc), .a(a),  .x(x),  .p(p));
  mbe_multiplier #(.N(4))  dut4 (.tc(tc), .a(a4), .x(x4), .p(p4));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sval(int v, int n, logic s);
    return (s && v >= (1 << (n-1))) ? v - (1 << n) : v;
  endfunction

  initial begin
    a4 = '0; x4 = '0;
    for (int m = 0; m < 2; m++) begin
      tc = 1'(m);
      for (int av = 0; av < 256; av++) begin
        for (int xv = 0; xv < 256; xv++) begin
          int e;
          a = 8'(av); x = 8'(xv);
          #1;
          e = sval(av, 8, tc) * sval(xv, 8, tc);
          checks++;
          if (p !== 16'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL tc=%b %0d * %0d -> %h expected %h", tc, a, x, p, 16'(e));
          end
        end
      end
      for (int av = 0; av < 16; av++) begin
        for (int xv = 0; xv < 16; xv++) begin
          int e;
          a4 = 4'(av); x4 = 4'(xv);
          #1;
          e = sval(av, 4, tc) * sval(xv, 4, tc);
          checks++;
          if (p4 !== 8'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL4 tc=%b %h * %h -> %h", tc, a4, x4, p4);
          end
        end
      end
    end
    // worked radix-4 example: a = 0110, x = 1010, product 11011100
    tc = 1'b1; a4 = 4'b0110; x4 = 4'b1010;
    #1;
    checks++;
    if (p4 !== 8'b1101_1100) begin
      failures++;
      $display("FAIL example 0110 * 1010 -> %b", p4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_mbe_multiplier
