// tb_booth_decoder: for every 9-bit multiplicand and every control word the
// encoder can produce (0, +1, +2, -2, -1, -0), the 10-bit row must equal
// digit * a as a two's complement number modulo 2^10.
module tb_booth_decoder;
  import mult_pkg::*;
  localparam int W = 10;
  logic [W-2:0] a;
  booth_sel_t   sel;
  logic [W-1:0] pp;
  int checks = 0, failures = 0;

  booth_decoder dut (.a(a), .sel(sel), .pp(pp));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {neg, one, two} and the digit it stands for
    logic [2:0] codes  [6] = '{3'b000, 3'b010, 3'b001, 3'b101, 3'b110, 3'b100};
    int         digits [6] = '{0, 1, 2, -2, -1, 0};
    for (int av = 0; av < (1 << (W-1)); av++) begin
      for (int c = 0; c < 6; c++) begin
        int sa, expv;
        a = (W-1)'(av);
        {sel.neg, sel.one, sel.two} = codes[c];
        #1;
        sa   = (av >= (1 << (W-2))) ? av - (1 << (W-1)) : av;  // signed a
        expv = digits[c] * sa;
        checks++;
        if (pp !== W'(expv)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d digit=%0d pp=%h expected %h", sa, digits[c], pp, W'(expv));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_booth_decoder
