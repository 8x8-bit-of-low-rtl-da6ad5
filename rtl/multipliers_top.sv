// multipliers_top: the two proposed 8x8 low-power multipliers side by side.
// mbe_* is the radix-4 modified Booth multiplier (Booth encoders, Booth
// decoders with half-adder negation, row-wise sign extension, carry
// look-ahead summation), which takes signed or unsigned operands selected by
// mbe_tc. arr_* is the unsigned carry-save array multiplier built from AND
// gates, half adders and XOR-based full adders. They are independent designs
// offered as alternatives; they share no signal, and each has its own ports.
// Both are purely combinational.
module multipliers_top #(
  parameter int unsigned N = 8
) (
  input  logic           mbe_tc,
  input  logic [N-1:0]   mbe_a,
  input  logic [N-1:0]   mbe_x,
  output logic [2*N-1:0] mbe_p,
  input  logic [N-1:0]   arr_a,
  input  logic [N-1:0]   arr_b,
  output logic [2*N-1:0] arr_p
);
  mbe_multiplier   #(.N(N)) u_mbe (.tc(mbe_tc), .a(mbe_a), .x(mbe_x), .p(mbe_p));
  array_multiplier #(.N(N)) u_arr (.a(arr_a), .b(arr_b), .p(arr_p));
endmodule : multipliers_top
