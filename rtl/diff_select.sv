// diff_select: second switch of the image processor; issues one rank
// difference chosen by a 10-bit control word (output OFD_w10).
//
// dr[0..N-1] are the rank differences from rank_diff. Each bit y2[r] enables
// difference dr[r]; when several bits are set the highest-numbered one
// wins, and when none is set the output keeps its last value. The output is
// registered, one clock after dr and y2, with out_valid following in_valid.
// Setting only bit r+1 of y2, for example, gives the gap between ranks r and
// r+1 (bit 2 gives R_2 - R_3).
//
// The bit-per-difference control, the priority of the highest bit and the
// hold when no bit is set follow the FPGA processor's switch; reset to zero
// is this design's choice.
module diff_select
  import mip_pkg::*;
#(
  parameter int unsigned W = PIX_W,
  parameter int unsigned N = N_SIG
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] dr [N],
  input  logic [N-1:0] y2,
  output logic         out_valid,
  output logic [W-1:0] out
);

  logic         hit;
  logic [W-1:0] pick;

  always_comb begin
    hit  = 1'b0;
    pick = '0;
    for (int r = 0; r < N; r++) begin
      if (y2[r]) begin
        hit  = 1'b1;
        pick = dr[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (hit) out <= pick;
    end
  end

endmodule
