// array_multiplier: N x N unsigned array (carry-save) multiplier.
// N*N AND gates form every summand pp_k[j] = a[j] & b[k], worth 2^(j+k).
// Row 1 adds pp_0 and pp_1 with N-1 half adders; each further row k = 2..N-1
// adds pp_k to the sums and carries of the row above with N-1 full adders,
// carries moving straight down (carry-save) and sums moving one place right.
// Bit k of the product leaves the right-hand end of row k. A final row of
// one half adder and N-2 full adders ripples the remaining sums and carries
// into the upper N product bits. That is N*N AND gates, N*(N-2) full adders
// and N half adders; the worst path runs through about 2N cells.
//
// Interface: unsigned a, b in, 2N-bit product p out. Purely combinational.
// The cell counts and the HA/FA arrangement follow the original array; the
// exact cell placement in each row is this design's reading of it.
module array_multiplier #(
  parameter int unsigned N = 8   // operand width, at least 3
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0][N-1:0] pp;   // pp[k][j] = a[j] & b[k]
  logic [N-1:0][N-1:0] sm;   // sm[k][j]: sum leaving row k at weight k+j
  logic [N-1:0][N-2:0] cy;   // cy[k][j]: carry leaving row k at weight k+j+1

  for (genvar k = 0; k < N; k++) begin : g_and
    assign pp[k] = a & {N{b[k]}};
  end

  // Row 0 is just pp_0 (no adders); its carries are zero.
  assign sm[0] = pp[0];
  assign cy[0] = '0;   // unused: row 1 has no carry inputs

  for (genvar k = 1; k < N; k++) begin : g_row
    for (genvar j = 0; j < N-1; j++) begin : g_cell
      if (k == 1) begin : g_ha
        half_adder u_ha (.a(sm[0][j+1]), .b(pp[1][j]), .s(sm[1][j]), .co(cy[1][j]));
      end else begin : g_fa
        full_adder u_fa (
          .a(sm[k-1][j+1]), .b(pp[k][j]), .ci(cy[k-1][j]),
          .s(sm[k][j]), .co(cy[k][j])
        );
      end
    end
    assign sm[k][N-1] = pp[k][N-1];
  end

  // Low product bits leave the right edge of each row.
  for (genvar k = 0; k < N; k++) begin : g_plo
    assign p[k] = sm[k][0];
  end

  // Final ripple row: weight N+j, j = 0..N-2.
  logic [N-1:1] rc;   // ripple carries of the final row
  for (genvar j = 0; j < N-1; j++) begin : g_final
    if (j == 0) begin : g_ha
      half_adder u_ha (.a(sm[N-1][1]), .b(cy[N-1][0]), .s(p[N]), .co(rc[1]));
    end else begin : g_fa
      full_adder u_fa (
        .a(sm[N-1][j+1]),
        .b(cy[N-1][j]), .ci(rc[j]), .s(p[N+j]), .co(rc[j+1])
      );
    end
  end
  assign p[2*N-1] = rc[N-1];

  initial begin
    assert (N >= 3) else $error("array_multiplier: N must be at least 3");
  end
endmodule : array_multiplier
