// weighted_sum: weighing-selection node, F(Y) = sum over r of Y_r * x[r].
//
// x[0..N-1] are unsigned signals (ranked signals Ds(r) or rank differences
// Dr(r)) and wgt[0..N-1] the control vector Y: signed fixed-point weights
// with WF fraction bits (Q4.3 by default, so -16.0 .. 15.875 in steps of
// 0.125). A weight of 0 drops a signal, 1 selects it, fractions average,
// negative weights subtract; one node therefore gives any rank, a
// difference of ranks, the complement of a signal, or a weighted mean of
// chosen ranks. The sum is exact and registered: out is a signed number with
// WF fraction bits, valid one clock after x and wgt, with out_valid
// following in_valid.
//
// The formula is the method's; the weight format, the exact full-width
// result and the single register stage are this design's choices.
module weighted_sum
  import mip_pkg::*;
#(
  parameter int unsigned W     = PIX_W,
  parameter int unsigned N     = N_SIG,
  parameter int unsigned WW    = WGT_W,
  parameter int unsigned WF    = WGT_F,
  localparam int unsigned ACC_W = W + 1 + WW + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [W-1:0]            x   [N],
  input  logic signed [WW-1:0]    wgt [N],
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out
);

  logic signed [ACC_W-1:0] sum;

  initial begin
    assert (WF < WW) else $error("weighted_sum: weights need an integer part");
  end

  always_comb begin
    sum = '0;
    for (int r = 0; r < N; r++)
      sum += ACC_W'($signed({1'b0, x[r]}) * wgt[r]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out       <= sum;
      out_valid <= in_valid;
    end
  end

endmodule
