// iter_sorter: iterative sorting node built from a sampling-and-holding bank
// (shd_bank) and a two-layer node (sort_node2) in a loop.
//
// A start pulse loads the N input signals into the bank. The node ranks what
// the bank holds and its outputs are written back into the bank on each
// following clock, so the array circulates through the same two layers
// ITER times (five for N=10, enough because N/2 passes of two layers sort any
// input). Once the last pass has been made, the ranked array is copied into
// the output register: result[0] is the largest signal, unless inverse is
// high, which reverses the order (result[0] smallest, inverse sorting).
// Timing: start on edge 0 loads, edges 1..ITER-1 rewrite, edge ITER reads
// out; valid pulses for one clock with the new result, ITER+1 clocks after
// start, and busy is high in between. A start while busy restarts the node.
//
// The loop of SHD and two cell layers, the five passes and the separate,
// longer read beat (six clocks in all) follow the iterative node; the
// counter-based sequencer, the start/valid handshake and reset values are
// this design's choices.
module iter_sorter
  import mip_pkg::*;
#(
  parameter int unsigned W    = PIX_W,
  parameter int unsigned N    = N_SIG,
  parameter int unsigned ITER = N / 2,
  localparam int unsigned CW  = $clog2(ITER + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         inverse,
  input  logic [W-1:0] in     [N],
  output logic         busy,
  output logic         valid,
  output logic [W-1:0] result [N]
);

  logic [W-1:0] held [N];
  logic [W-1:0] a    [N];
  logic [CW-1:0] passes;      // passes through the node the bank feeds
  logic          sample;
  logic          done;

  assign sample = start || (busy && !done);
  assign done   = (32'(passes) == ITER);

  shd_bank #(.W(W), .N(N)) u_shd (
    .clk, .rst_n,
    .sample (sample),
    .load_in(start),
    .i_in   (in),
    .b_in   (a),
    .o      (held)
  );

  sort_node2 #(.W(W), .N(N)) u_node (
    .x(held),
    .a(a)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      passes <= '0;
      valid  <= 1'b0;
      for (int k = 0; k < N; k++) result[k] <= '0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        passes <= CW'(1);
      end else if (busy) begin
        if (done) begin
          busy  <= 1'b0;
          valid <= 1'b1;
          for (int k = 0; k < N; k++) result[k] <= inverse ? a[N-1-k] : a[k];
        end else begin
          passes <= passes + 1'b1;
        end
      end
    end
  end

endmodule
