// tb_multipliers_top: end-to-end test of both 8x8 multipliers at their default
// size. Every operand pair is applied to the Booth multiplier in unsigned and
// in signed mode, and to the array multiplier, and each product is compared
// with integer multiplication. The test recodes the multiplier itself to count
// how often each Booth mechanism was exercised: every digit code (0, +1, +2,
// -2, -1 and the negative-zero code 111) at every digit position, negative
// partial products whose sign extension matters, the extra top digit needed
// for unsigned operands, negative products in signed mode, and the carry out
// of the array's final ripple row. A mechanism that never occurred counts as a
// failure. It ends with the 255 x 255 = 65025 case on both multipliers.
module tb_multipliers_top;
  localparam int N = 8, NPP = N / 2 + 1;
  logic          mbe_tc;
  logic [N-1:0]  mbe_a, mbe_x, arr_a, arr_b;
  logic [2*N-1:0] mbe_p, arr_p;
  int checks = 0, failures = 0;

  // mechanism counters
  int code_seen [NPP][8];   // [digit position][3-bit code]
  int neg_rows, top_digit_used, neg_products, unsigned_runs, signed_runs, arr_carry_out;

  multipliers_top dut (
    .mbe_tc(mbe_tc), .mbe_a(mbe_a), .mbe_x(mbe_x), .mbe_p(mbe_p),
    .arr_a(arr_a), .arr_b(arr_b), .arr_p(arr_p)
  );

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sval(int v, logic s);
    return (s && v >= (1 << (N-1))) ? v - (1 << N) : v;
  endfunction

  task automatic count_mechanisms(int av, int xv, logic tc);
    logic [N+2:0] xe;
    xe = {{2{tc & xv[N-1]}}, N'(xv), 1'b0};
    for (int i = 0; i < NPP; i++) begin
      logic [2:0] g;
      g = xe[2*i +: 3];
      code_seen[i][g]++;
      if (g[2] && g != 3'b111 && av != 0) neg_rows++;
      if (i == NPP - 1 && g != 3'b000 && g != 3'b111) top_digit_used++;
    end
  endtask

  initial begin
    foreach (code_seen[i, c]) code_seen[i][c] = 0;
    neg_rows = 0; top_digit_used = 0; neg_products = 0;
    unsigned_runs = 0; signed_runs = 0; arr_carry_out = 0;

    for (int m = 0; m < 2; m++) begin
      mbe_tc = 1'(m);
      for (int av = 0; av < (1 << N); av++) begin
        for (int xv = 0; xv < (1 << N); xv++) begin
          int e;
          mbe_a = N'(av); mbe_x = N'(xv);
          arr_a = N'(av); arr_b = N'(xv);
          #1;
          e = sval(av, mbe_tc) * sval(xv, mbe_tc);
          checks++;
          if (mbe_p !== (2*N)'(e)) begin
            failures++;
            if (failures < 10)
              $display("FAIL mbe tc=%b %h * %h -> %h expected %h", mbe_tc, mbe_a, mbe_x, mbe_p, (2*N)'(e));
          end
          if (m == 0) begin
            checks++;
            if (arr_p !== (2*N)'(av * xv)) begin
              failures++;
              if (failures < 10) $display("FAIL arr %h * %h -> %h", arr_a, arr_b, arr_p);
            end
            if (arr_p[2*N-1]) arr_carry_out++;
            unsigned_runs++;
          end else begin
            signed_runs++;
            if (e < 0) neg_products++;
          end
          count_mechanisms(av, xv, mbe_tc);
        end
      end
    end

    // 255 x 255 on both multipliers (unsigned): 1111_1110_0000_0001
    mbe_tc = 1'b0; mbe_a = '1; mbe_x = '1; arr_a = '1; arr_b = '1;
    #1;
    checks += 2;
    if (mbe_p !== 16'b1111_1110_0000_0001) begin failures++; $display("FAIL mbe 255*255 = %b", mbe_p); end
    if (arr_p !== 16'b1111_1110_0000_0001) begin failures++; $display("FAIL arr 255*255 = %b", arr_p); end

    // every mechanism must have happened at least once
    for (int i = 0; i < NPP - 1; i++) begin
      for (int c = 0; c < 8; c++) begin
        if (i == 0 && c[0]) continue;  // bit x(-1) is the appended 0
        checks++;
        if (code_seen[i][c] == 0) begin
          failures++;
          $display("FAIL Booth code %b never seen at digit %0d", 3'(c), i);
        end
      end
    end
    checks += 6;
    if (neg_rows == 0)       begin failures++; $display("FAIL no negative partial product"); end
    if (top_digit_used == 0) begin failures++; $display("FAIL unsigned top digit never used"); end
    if (neg_products == 0)   begin failures++; $display("FAIL no negative signed product"); end
    if (unsigned_runs == 0)  begin failures++; $display("FAIL unsigned mode never run"); end
    if (signed_runs == 0)    begin failures++; $display("FAIL signed mode never run"); end
    if (arr_carry_out == 0)  begin failures++; $display("FAIL array final carry never set"); end

    $display("mechanisms: negative rows=%0d top digit used=%0d negative products=%0d",
             neg_rows, top_digit_used, neg_products);
    $display("mechanisms: unsigned=%0d signed=%0d array carry out=%0d",
             unsigned_runs, signed_runs, arr_carry_out);
    for (int i = 0; i < NPP; i++)
      $display("digit %0d codes 000..111: %0d %0d %0d %0d %0d %0d %0d %0d", i,
               code_seen[i][0], code_seen[i][1], code_seen[i][2], code_seen[i][3],
               code_seen[i][4], code_seen[i][5], code_seen[i][6], code_seen[i][7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_multipliers_top
