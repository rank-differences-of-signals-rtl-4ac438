// shd_bank: multichannel sampling and holding device (SHD) of the iterative
// sorting node, as a bank of N registers.
//
// Each channel holds one signal and shows it on o[k]. On a clock edge with
// sample high the bank takes a new set: the external inputs i_in when
// load_in is high (a new array to sort), otherwise the fed-back outputs of
// the sorting node on b_in (the rewrite beat). With sample low it holds.
// Inputs I1..I10, feedback B1..B10, outputs O1..O10 and the input-select
// control follow the ten-channel SHD; the analog current sample-and-hold is
// replaced here by digital registers, and the synchronous active-low reset
// to zero is this design's choice.
module shd_bank
  import mip_pkg::*;
#(
  parameter int unsigned W = PIX_W,
  parameter int unsigned N = N_SIG
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample,
  input  logic         load_in,
  input  logic [W-1:0] i_in [N],
  input  logic [W-1:0] b_in [N],
  output logic [W-1:0] o    [N]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) o[k] <= '0;
    end else if (sample) begin
      for (int k = 0; k < N; k++) o[k] <= load_in ? i_in[k] : b_in[k];
    end
  end

endmodule
