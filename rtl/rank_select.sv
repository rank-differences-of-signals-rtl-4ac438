// rank_select: code-controlled multiplexer that issues the signal of a chosen
// rank (output OF_w9 of the image processor).
//
// ranks[0..N-1] are the sorted signals, largest first; in rank numbering
// they are R_1, R_2, ..., R_(N-1) and, last and smallest, R_0. The 4-bit code
// y selects R_y: codes 1..N-1 give ranks[y-1] and code 0 gives ranks[N-1].
// Codes above N-1 select nothing and the output keeps its last value. The
// output is registered: it shows the rank picked by y one clock after y and
// ranks were presented, and out_valid repeats in_valid with the same delay.
//
// The code-to-rank mapping, the registered output and the unchanged output
// for unused codes follow the FPGA processor; reset to zero is this design's
// choice.
module rank_select
  import mip_pkg::*;
#(
  parameter int unsigned W  = PIX_W,
  parameter int unsigned N  = N_SIG,
  parameter int unsigned YW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  ranks [N],
  input  logic [YW-1:0] y,
  output logic          out_valid,
  output logic [W-1:0]  out
);

  initial begin
    assert (2 ** YW >= N) else $error("rank_select: code too narrow for %0d ranks", N);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (y == '0)
        out <= ranks[N-1];
      else if (32'(y) < N)
        out <= ranks[32'(y) - 1];
    end
  end

endmodule
