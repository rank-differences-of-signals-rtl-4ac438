// mrp: modified relational preprocessor, the iterative sorting node followed
// by the code-controlled rank multiplexer.
//
// The nine window signals and one auxiliary signal (aux, the lower or upper
// boundary of the signal range) are ranked by iter_sorter, largest first.
// When a ranking is ready, rank_select issues the rank chosen by the code y
// (1..9 pick R_1..R_9, 0 picks R_0, the smallest of the ten), and ranks
// exposes all ten ranked signals. A start pulse begins a ranking; out_valid
// comes ITER+2 clocks later (seven for ten signals): five passes, the read
// beat and the multiplexer register.
//
// Nine inputs plus one auxiliary, the iterative node and the multiplexer on
// its outputs follow the document; the handshake is this design's choice.
module mrp
  import mip_pkg::*;
#(
  parameter int unsigned W    = PIX_W,
  parameter int unsigned N    = N_SIG,
  parameter int unsigned ITER = N / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] sig [N-1],
  input  logic [W-1:0] aux,
  input  logic [3:0]   y,
  output logic         busy,
  output logic [W-1:0] ranks [N],
  output logic         ranks_valid,
  output logic         out_valid,
  output logic [W-1:0] out
);

  logic [W-1:0] all_in [N];

  for (genvar k = 0; k < N - 1; k++) begin : g_in
    assign all_in[k] = sig[k];
  end
  assign all_in[N-1] = aux;

  iter_sorter #(.W(W), .N(N), .ITER(ITER)) u_sort (
    .clk, .rst_n,
    .start  (start),
    .inverse(1'b0),
    .in     (all_in),
    .busy   (busy),
    .valid  (ranks_valid),
    .result (ranks)
  );

  rank_select #(.W(W), .N(N), .YW(4)) u_mux (
    .clk, .rst_n,
    .in_valid (ranks_valid),
    .ranks    (ranks),
    .y        (y),
    .out_valid(out_valid),
    .out      (out)
  );

endmodule
