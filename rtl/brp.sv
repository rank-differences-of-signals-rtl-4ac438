// brp: basic relational preprocessor with all inputs in parallel: the wave
// sorting unit followed by the code-controlled rank multiplexer.
//
// N signals (ten: nine window pixels and one auxiliary boundary value, all
// presented at once, a new set on any clock) are ranked by the pipelined
// wave_sorter, largest first. ranks carries all N ranked signals as R_1 ..
// R_(N-1), R_0 and out the one picked by the 4-bit code y (1..N-1 give
// R_1.., 0 gives R_0, other codes hold the output). Timing: the ranks appear
// LAYERS (9) clocks after a set is taken and out one clock after that, with
// ranks_valid and out_valid following in_valid.
//
// The sorter-plus-multiplexer structure with ten parallel inputs and one
// output follows the document's first FPGA processor; widths, the valid
// flags and reset are this design's choices.
module brp
  import mip_pkg::*;
#(
  parameter int unsigned W = PIX_W,
  parameter int unsigned N = N_SIG
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in [N],
  input  logic [3:0]   y,
  output logic         ranks_valid,
  output logic [W-1:0] ranks [N],
  output logic         out_valid,
  output logic [W-1:0] out
);

  wave_sorter #(.W(W), .N(N), .LAYERS(N - 1), .REG(1'b1)) u_su (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in       (in),
    .out_valid(ranks_valid),
    .out      (ranks)
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
