// sort_node2: the two linear arrays of base cells of the iterative sorting
// node, N/2 cells each (10 cells for N=10).
//
// The first layer compares lines (0,1), (2,3), ...; the second compares
// (1,2), (3,4), ..., (N-3,N-2) and closes the ring with a cell on lines
// (0,N-1). Each cell (cmp_swap, combinational) puts the larger value on the
// lower-numbered line. One pass through both layers equals two layers of the
// wave structure, so N/2 passes (five for N=10) rank any input, largest on
// a[0]. Purely combinational; N must be even. The pairing follows the wave
// structure, of which this node is two consecutive layers.
module sort_node2
  import mip_pkg::*;
#(
  parameter int unsigned W = PIX_W,
  parameter int unsigned N = N_SIG
) (
  input  logic [W-1:0] x [N],
  output logic [W-1:0] a [N]
);

  logic [W-1:0] mid [N];

  initial begin
    assert (N % 2 == 0 && N >= 4) else $error("sort_node2: N must be even and at least 4");
  end

  // Layer 1: neighbour pairs starting at line 0.
  for (genvar k = 0; k < N / 2; k++) begin : g_l1
    cmp_swap #(.W(W), .REG(1'b0)) u_cell (
      .clk(1'b0), .rst_n(1'b1),
      .a(x[2*k]), .b(x[2*k+1]), .hi(mid[2*k]), .lo(mid[2*k+1])
    );
  end

  // Layer 2: neighbour pairs starting at line 1, plus the ring-closing cell.
  for (genvar k = 0; k < N / 2 - 1; k++) begin : g_l2
    cmp_swap #(.W(W), .REG(1'b0)) u_cell (
      .clk(1'b0), .rst_n(1'b1),
      .a(mid[2*k+1]), .b(mid[2*k+2]), .hi(a[2*k+1]), .lo(a[2*k+2])
    );
  end
  cmp_swap #(.W(W), .REG(1'b0)) u_ring (
    .clk(1'b0), .rst_n(1'b1),
    .a(mid[0]), .b(mid[N-1]), .hi(a[0]), .lo(a[N-1])
  );

endmodule
