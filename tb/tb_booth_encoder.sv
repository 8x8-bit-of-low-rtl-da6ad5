// tb_booth_encoder: checks all eight input codes of the radix-4 Booth encoder
// against the encoder truth table, written out row by row as {MI, X, X2}.
module tb_booth_encoder;
  import mult_pkg::*;
  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  // Row v = {x(2i+1), x(2i), x(2i-1)}; entry = {MI, X, X2}.
  localparam logic [2:0] TABLE [8] = '{
    3'b000,  // 000
    3'b010,  // 001
    3'b010,  // 010
    3'b001,  // 011
    3'b101,  // 100
    3'b110,  // 101
    3'b110,  // 110
    3'b100   // 111
  };

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      grp = 3'(v);
      #1;
      checks++;
      if ({sel.neg, sel.one, sel.two} !== TABLE[v]) begin
        failures++;
        $display("FAIL grp=%b -> MI=%b X=%b X2=%b, expected %b",
                 grp, sel.neg, sel.one, sel.two, TABLE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_booth_encoder
