// cmp_swap: digital comparison-switching cell, the base cell of the sorting
// structures.
//
// It compares two unsigned signals a and b and routes the larger to hi and
// the smaller to lo, which is the max/min pair of a selector-rank
// disjunctive-conjunctive element. With REG=1 both outputs are registered
// on the rising edge of clk (one cycle of latency), as the cells of the
// pipelined FPGA sorting unit carry a clock input; with REG=0 the cell is
// combinational. Ties send a to hi. Reset behaviour is this design's
// choice: the registers clear to zero on an active-low synchronous rst_n.
// The combinational cell keeps the clk and rst_n ports so that both kinds
// plug into the same networks; with REG=0 it leaves them unconnected
// inside, and lint reports them unused.
module cmp_swap #(
  parameter int unsigned W   = 8,
  parameter bit          REG = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] hi,
  output logic [W-1:0] lo
);

  logic         a_ge_b;
  logic [W-1:0] mx, mn;

  always_comb begin
    a_ge_b = (a >= b);
    mx     = a_ge_b ? a : b;
    mn     = a_ge_b ? b : a;
  end

  if (REG) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        hi <= '0;
        lo <= '0;
      end else begin
        hi <= mx;
        lo <= mn;
      end
    end
  end else begin : g_comb
    assign hi = mx;
    assign lo = mn;
  end

endmodule
