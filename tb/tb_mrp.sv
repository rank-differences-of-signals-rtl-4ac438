// tb_mrp: runs the relational preprocessor with the iterative node on random
// windows of nine signals, with the auxiliary input at the lower (0) and
// upper (255) boundary, the signals in reverse order as in the node's
// demonstration, and every rank code. It checks all ten ranked signals and
// the multiplexer output against values computed here, and that out_valid
// arrives seven clocks after start (five passes, read beat, multiplexer).
module tb_mrp;
  localparam int unsigned W = 8, N = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, ranks_valid, out_valid;
  logic [W-1:0] sig [N-1];
  logic [W-1:0] aux;
  logic [3:0] y;
  logic [W-1:0] ranks [N];
  logic [W-1:0] out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mrp #(.W(W), .N(N), .ITER(N / 2)) dut (
    .clk, .rst_n, .start, .sig, .aux, .y, .busy, .ranks, .ranks_valid, .out_valid, .out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; aux = '0; y = '0;
    for (int k = 0; k < N - 1; k++) sig[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      int v [N];
      int waited;
      @(negedge clk);
      for (int k = 0; k < N - 1; k++) begin
        v[k] = (t == 0) ? 10 + 20 * k : int'($urandom_range(0, 255));
        sig[k] = W'(v[k]);
      end
      v[N-1] = (t % 2 == 0) ? 0 : 255;
      aux = W'(v[N-1]);
      y = 4'(t % 10);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      waited = 1;
      while (!out_valid && waited < 30) begin
        @(negedge clk);
        waited++;
      end
      v.rsort();
      checks++;
      if (waited != N / 2 + 2) begin
        failures++;
        $display("out_valid after %0d clocks", waited);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(ranks[k]) != v[k]) begin
          failures++;
          $display("rank %0d = %0d expected %0d", k, ranks[k], v[k]);
        end
      end
      checks++;
      if (int'(out) != ((y == 0) ? v[N-1] : v[y-1])) begin
        failures++;
        $display("y=%0d out=%0d", y, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
