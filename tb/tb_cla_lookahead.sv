// tb_cla_lookahead: all 512 combinations of g, p and cin; the four carries and
// the group signals are compared with a bit-by-bit ripple recurrence
// c(i+1) = g(i) | p(i) & c(i).
module tb_cla_lookahead;
  logic [3:0] g, p;
  logic       cin;
  logic [4:1] c;
  logic       gg, gp;
  int checks = 0, failures = 0;

  cla_lookahead dut (.g(g), .p(p), .cin(cin), .c(c), .gg(gg), .gp(gp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] rc;
      logic [4:0] r0;   // ripple with carry in 0 gives the group generate
      {g, p, cin} = 9'(v);
      #1;
      rc[0] = cin;
      r0[0] = 1'b0;
      for (int i = 0; i < 4; i++) begin
        rc[i+1] = g[i] | (p[i] & rc[i]);
        r0[i+1] = g[i] | (p[i] & r0[i]);
      end
      checks++;
      if (c !== rc[4:1] || gg !== r0[4] || gp !== (p == 4'hF)) begin
        failures++;
        if (failures < 10)
          $display("FAIL g=%b p=%b cin=%b -> c=%b gg=%b gp=%b, expected c=%b gg=%b",
                   g, p, cin, c, gg, gp, rc[4:1], r0[4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cla_lookahead
