// wave_sorter: sorting unit (SU) built as a modified conveyor homogeneous
// wave structure with regular connections.
//
// N signals pass through LAYERS identical layers of N/2 comparison-switching
// cells (cmp_swap). Layers alternate: an even layer (0, 2, ...) compares the
// neighbouring lines (0,1), (2,3), ...; an odd layer compares (1,2), (3,4),
// ... and closes the ring with one more cell on the first and last lines
// (0,N-1), so that every layer has N/2 cells. Each cell puts the larger value
// on the lower-numbered line, so out[0] is the largest signal (rank 1) and
// out[N-1] the smallest. With N-1 layers the structure sorts any input; for
// N=10 that is 9 layers of 5 cells, 45 cells, as the structure prescribes.
//
// Every cell is registered (REG=1), giving a pipeline that accepts a new
// set of N signals on every clock and delivers it sorted LAYERS clocks later;
// in_valid travels alongside as out_valid. The layer arrangement, the cell
// count and the descending output order follow the wave structure; the
// register after every layer follows the clocked cells of the FPGA version,
// and reset clearing the pipeline is this design's choice.
module wave_sorter
  import mip_pkg::*;
#(
  parameter int unsigned W      = PIX_W,
  parameter int unsigned N      = N_SIG,
  parameter int unsigned LAYERS = N - 1,
  parameter bit          REG    = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in  [N],
  output logic         out_valid,
  output logic [W-1:0] out [N]
);

  logic [W-1:0] stage [LAYERS+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign stage[0][i] = in[i];
  end

  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    // Classify line i in layer l: upper input of a neighbour cell, of the
    // ring-closing cell, lower input of either, or untouched.
    for (genvar i = 0; i < N; i++) begin : g_line
      localparam bit EVEN   = (l % 2 == 0);
      localparam bit TOP_EV = EVEN  && (i % 2 == 0) && (i + 1 < N);
      localparam bit TOP_OD = !EVEN && (i % 2 == 1) && (i + 1 < N - 1);
      localparam bit WRAP   = !EVEN && (i == 0) && (N > 2);
      localparam bit BOT_EV = EVEN  && (i % 2 == 1);
      localparam bit BOT_OD = !EVEN && (i % 2 == 0) && (i >= 2) && (i <= N - 2);
      localparam bit WRAPLO = !EVEN && (i == N - 1) && (N > 2);
      if (TOP_EV || TOP_OD) begin : g_cell
        cmp_swap #(.W(W), .REG(REG)) u_cell (
          .clk, .rst_n,
          .a (stage[l][i]),
          .b (stage[l][i+1]),
          .hi(stage[l+1][i]),
          .lo(stage[l+1][i+1])
        );
      end else if (WRAP) begin : g_wrap
        cmp_swap #(.W(W), .REG(REG)) u_cell (
          .clk, .rst_n,
          .a (stage[l][0]),
          .b (stage[l][N-1]),
          .hi(stage[l+1][0]),
          .lo(stage[l+1][N-1])
        );
      end else if (!(BOT_EV || BOT_OD || WRAPLO)) begin : g_pass
        // A line no cell of this layer touches (only when N is odd).
        if (REG) begin : g_r
          always_ff @(posedge clk) begin
            if (!rst_n) stage[l+1][i] <= '0;
            else        stage[l+1][i] <= stage[l][i];
          end
        end else begin : g_c
          assign stage[l+1][i] = stage[l][i];
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign out[i] = stage[LAYERS][i];
  end

  // Valid flag delayed by the pipeline depth.
  if (REG && LAYERS > 0) begin : g_vpipe
    logic [LAYERS-1:0] vpipe;
    always_ff @(posedge clk) begin
      if (!rst_n) vpipe <= '0;
      else        vpipe <= (vpipe << 1) | LAYERS'(in_valid);
    end
    assign out_valid = vpipe[LAYERS-1];
  end else begin : g_vcomb
    assign out_valid = in_valid;
  end

endmodule
