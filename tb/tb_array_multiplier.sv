// tb_array_multiplier: exhaustive check of the 8x8 unsigned array multiplier
// (all 65536 pairs) and of a 4x4 instance, against integer multiplication,
// including 255 x 255 = 1111_1110_0000_0001.
module tb_array_multiplier;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  array_multiplier          dut  (.a(a),  .b(b),  .p(p));
  array_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0;
    for (int av = 0; av < 256; av++) begin
      for (int bv = 0; bv < 256; bv++) begin
        a = 8'(av); b = 8'(bv);
        #1;
        checks++;
        if (p !== 16'(av * bv)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", a, b, p);
        end
      end
    end
    for (int av = 0; av < 16; av++) begin
      for (int bv = 0; bv < 16; bv++) begin
        a4 = 4'(av); b4 = 4'(bv);
        #1;
        checks++;
        if (p4 !== 8'(av * bv)) begin
          failures++;
          if (failures < 10) $display("FAIL4 %0d * %0d -> %0d", a4, b4, p4);
        end
      end
    end
    a = 8'hFF; b = 8'hFF;
    #1;
    checks++;
    if (p !== 16'b1111_1110_0000_0001) begin
      failures++;
      $display("FAIL 255 * 255 -> %b", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_array_multiplier
