// tb_pp_sign_extend: random and corner rows; each output row must equal the
// signed value of its input row times 4^i, modulo 2^16.
module tb_pp_sign_extend;
  localparam int NPP = 5, PPW = 10, OUTW = 16;
  logic [NPP-1:0][PPW-1:0]  pp;
  logic [NPP-1:0][OUTW-1:0] rows;
  int checks = 0, failures = 0;

  pp_sign_extend dut (.pp(pp), .rows(rows));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NPP; i++) begin
        case (t)
          0:       pp[i] = '0;
          1:       pp[i] = '1;
          2:       pp[i] = {1'b1, {(PPW-1){1'b0}}};
          3:       pp[i] = {1'b0, {(PPW-1){1'b1}}};
          default: pp[i] = PPW'($urandom);
        endcase
      end
      #1;
      for (int i = 0; i < NPP; i++) begin
        longint v;
        v = longint'(pp[i]);
        if (pp[i][PPW-1]) v -= (longint'(1) << PPW);
        v = v * (longint'(1) << (2 * i));
        checks++;
        if (rows[i] !== OUTW'(v)) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d pp=%h rows=%h expected %h", i, pp[i], rows[i], OUTW'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_pp_sign_extend
