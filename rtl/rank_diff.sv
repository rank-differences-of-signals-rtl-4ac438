// rank_diff: forms the rank differences of the weighing-selection method.
//
// v[0..M-1] are the window signals ordered by rank, largest first
// (Vsor0..Vsor8 for a 3x3 window, M=9). The block produces M+1 differences:
// dr[0] = D - v[0] (distance of the largest signal from the top D of the
// range), dr[r] = v[r-1] - v[r] for r = 1..M-1 (gaps between neighbouring
// ranks), and dr[M] = v[M-1] (the smallest signal, its distance from zero).
// The differences sum to D, and a run of them adds up to the difference of
// any two ranks. For ordered input every result is non-negative and fits
// W bits. Purely combinational.
//
// The definition follows the method exactly; D defaults to the 8-bit range
// top 255.
module rank_diff
  import mip_pkg::*;
#(
  parameter int unsigned       W = PIX_W,
  parameter int unsigned       M = N_SIG - 1,
  parameter logic [PIX_W-1:0]  D = '1
) (
  input  logic [W-1:0] v  [M],
  output logic [W-1:0] dr [M+1]
);

  always_comb begin
    dr[0] = W'(D) - v[0];
    for (int r = 1; r < M; r++) dr[r] = v[r-1] - v[r];
    dr[M] = v[M-1];
  end

endmodule
