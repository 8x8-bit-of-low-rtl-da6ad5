// pp_sign_extend: sign extension and alignment of the Booth partial products.
// Row i of NPP rows is a PPW-bit two's complement number worth 4^i. Each row is
// extended to the full OUTW-bit product width by repeating its own highest bit
// (the partial product's sign, not the multiplicand's), then shifted left by 2i
// places and truncated to OUTW bits, so that the rows can simply be added
// modulo 2^OUTW. The extension is pure wiring. Purely combinational.
module pp_sign_extend #(
  parameter int unsigned NPP  = 5,   // number of partial-product rows
  parameter int unsigned PPW  = 10,  // width of one row
  parameter int unsigned OUTW = 16   // product width
) (
  input  logic [NPP-1:0][PPW-1:0]  pp,
  output logic [NPP-1:0][OUTW-1:0] rows
);
  for (genvar i = 0; i < NPP; i++) begin : g_row
    logic [OUTW+PPW-1:0] ext;
    assign ext     = {{OUTW{pp[i][PPW-1]}}, pp[i]};
    assign rows[i] = OUTW'(ext << (2 * i));
  end
endmodule : pp_sign_extend
