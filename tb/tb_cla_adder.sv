// tb_cla_adder: the default 16-bit two-level CLA, plus a 24-bit instance that
// exercises the chaining of 16-bit sections and a padded second-level unit.
// Random operands and carry-chain corner cases; {cout, s} = a + b + cin.
module tb_cla_adder;
  logic [15:0] a16, b16, s16;
  logic [23:0] a24, b24, s24;
  logic        cin, co16, co24;
  int checks = 0, failures = 0;

  cla_adder                dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(co16));
  cla_adder #(.W(24))      dut24 (.a(a24), .b(b24), .cin(cin), .s(s24), .cout(co24));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint e16, e24;
      case (t % 8)
        0: begin a16 = 16'hFFFF; b16 = 16'(t / 8 % 3); a24 = 24'hFFFFFF; b24 = 24'(t / 8 % 3); end
        1: begin a16 = 16'h8000; b16 = 16'h8000; a24 = 24'h800000; b24 = 24'h800000; end
        2: begin a16 = 16'h0FFF; b16 = 16'h0001; a24 = 24'h00FFFF; b24 = 24'h000001; end
        default: begin
          a16 = 16'($urandom); b16 = 16'($urandom);
          a24 = 24'($urandom); b24 = 24'($urandom);
        end
      endcase
      cin = 1'($urandom);
      #1;
      e16 = longint'(a16) + longint'(b16) + longint'(cin);
      e24 = longint'(a24) + longint'(b24) + longint'(cin);
      checks += 2;
      if ({co16, s16} !== 17'(e16)) begin
        failures++;
        if (failures < 10) $display("FAIL16 %h + %h + %b = %b %h", a16, b16, cin, co16, s16);
      end
      if ({co24, s24} !== 25'(e24)) begin
        failures++;
        if (failures < 10) $display("FAIL24 %h + %h + %b = %b %h", a24, b24, cin, co24, s24);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cla_adder
