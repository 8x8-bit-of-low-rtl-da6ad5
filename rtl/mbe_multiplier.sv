// mbe_multiplier: N x N radix-4 modified Booth (MBE) multiplier.
// The multiplier x is recoded into radix-4 digits in {-2..+2}: x is widened
// (sign bits when tc = 1, zeros when tc = 0) to an even width of N+2 bits, a 0
// is appended below its LSB, and each overlapping 3-bit group feeds a
// booth_encoder. NPP = N/2 + 1 digits result, so the row count is about half
// that of a shift-and-add multiplier. Every digit drives a booth_decoder
// that turns the multiplicand a (widened by one bit the same way) into a
// two's complement partial product. pp_sign_extend extends each row with its
// own top bit and shifts it by two places per digit, and a chain of NPP-1
// two-level carry look-ahead adders (cla_adder) sums the rows into the 2N-bit
// product p.
//
// Interface: tc selects signed (1) or unsigned (0) operands; p is the exact
// 2N-bit product in the same representation. Purely combinational, no clock;
// the result is valid one propagation delay after a, x or tc change.
//
// The encoder, decoder (MUX, XOR, half-adder chain), the row-wise sign
// extension and the CLA equations follow the original circuit. The tc input,
// the extra (fifth for N = 8) digit and the one extra decoder bit that make
// unsigned operands work, and the linear chain of adders, are this design's
// choices.
module mbe_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned N = 8   // operand width, must be even
) (
  input  logic           tc,  // 1: two's complement operands, 0: unsigned
  input  logic [N-1:0]   a,   // multiplicand
  input  logic [N-1:0]   x,   // multiplier (Booth recoded)
  output logic [2*N-1:0] p    // product
);
  localparam int unsigned NPP = N / 2 + 1;  // partial-product rows
  localparam int unsigned PPW = N + 2;      // Booth decoder width
  localparam int unsigned PW  = 2 * N;      // product width

  logic         a_sx, x_sx;   // extension bits
  logic [N:0]   a_ext;        // multiplicand, N+1 bits
  logic [N+2:0] x_ext;        // {x widened to N+2 bits, appended 0}

  assign a_sx  = tc & a[N-1];
  assign x_sx  = tc & x[N-1];
  assign a_ext = {a_sx, a};
  assign x_ext = {x_sx, x_sx, x, 1'b0};

  booth_sel_t                   sel [NPP];
  logic [NPP-1:0][PPW-1:0]      pp;
  logic [NPP-1:0][PW-1:0]       rows;
  logic [NPP-1:0][PW-1:0]       acc;

  for (genvar i = 0; i < NPP; i++) begin : g_row
    booth_encoder u_enc (.grp(x_ext[2*i +: 3]), .sel(sel[i]));
    booth_decoder #(.W(PPW)) u_dec (.a(a_ext), .sel(sel[i]), .pp(pp[i]));
  end

  pp_sign_extend #(.NPP(NPP), .PPW(PPW), .OUTW(PW)) u_sext (.pp(pp), .rows(rows));

  assign acc[0] = rows[0];
  for (genvar i = 1; i < NPP; i++) begin : g_add
    logic unused_cout;
    cla_adder #(.W(PW)) u_cla (
      .a(acc[i-1]), .b(rows[i]), .cin(1'b0), .s(acc[i]), .cout(unused_cout)
    );
  end

  assign p = acc[NPP-1];

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("mbe_multiplier: N must be even and at least 4");
  end
endmodule : mbe_multiplier
