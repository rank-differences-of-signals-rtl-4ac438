// tb_iter_sorter: starts the iterative sorting node on random sets of ten
// signals (plus ties, reversed order and one ramping signal among nine
// constants as in the node's demonstrations, and all 1024 sets of zeros and
// 255s) and checks the ranked result against a sort done here, largest
// first, or smallest first with inverse high. valid must
// come exactly six clocks after start (five passes and the read beat), with
// busy high in between; a restart while busy must be honoured.
module tb_iter_sorter;
  localparam int unsigned W = 8, N = 10, ITER = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, inverse, busy, valid;
  logic [W-1:0] in [N];
  logic [W-1:0] result [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  iter_sorter #(.W(W), .N(N), .ITER(ITER)) dut (
    .clk, .rst_n, .start, .inverse, .in, .busy, .valid, .result);

  task automatic sort_one(input int v [N], input bit inv);
    int exp_v [N];
    int waited;
    @(negedge clk);
    for (int k = 0; k < N; k++) in[k] = W'(v[k]);
    start = 1'b1; inverse = inv;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < N; k++) in[k] = W'($urandom);
    waited = 1;
    while (!valid && waited < 20) begin
      checks++;
      if (!busy) begin failures++; $display("busy low while sorting"); end
      @(negedge clk);
      waited++;
    end
    begin
      checks++;
      if (waited != ITER + 1) begin
        failures++;
        $display("valid after %0d clocks, expected %0d", waited, ITER + 1);
      end
      exp_v = v;
      if (inv) exp_v.sort(); else exp_v.rsort();
      checks++;
      for (int k = 0; k < N; k++) begin
        if (int'(result[k]) != exp_v[k]) begin
          failures++;
          $display("result[%0d]=%0d expected %0d (inverse=%0b)", k, result[k], exp_v[k], inv);
          break;
        end
      end
    end
    @(negedge clk);
    checks++;
    if (valid || busy) begin failures++; $display("valid or busy stayed high"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [N];
    start = 1'b0; inverse = 1'b0;
    for (int k = 0; k < N; k++) in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N; k++) v[k] = k * 20;       // reversed order
    sort_one(v, 1'b0);
    // One signal ramping up and then down through the whole range on each
    // input line in turn while the other nine stay at fixed levels: the
    // ramp must pass through every rank position.
    for (int line = 0; line < N; line++) begin
      for (int lvl = 0; lvl <= 2 * 255; lvl += 15) begin
        int n;
        n = 0;
        for (int k = 0; k < N; k++) begin
          if (k == line) v[k] = (lvl <= 255) ? lvl : 2 * 255 - lvl;
          else begin v[k] = 20 + 24 * n; n++; end
        end
        sort_one(v, 1'(line % 2));
      end
    end
    for (int p = 0; p < (1 << N); p++) begin
      for (int k = 0; k < N; k++) v[k] = p[k] ? 255 : 0;
      sort_one(v, 1'b0);
    end
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < N; k++)
        v[k] = (t % 3 == 0) ? int'($urandom_range(0, 4)) : int'($urandom_range(0, 255));
      sort_one(v, 1'(t % 2));
    end
    // Restart while busy: the node must finish the second set, six clocks
    // after the second start.
    @(negedge clk);
    for (int k = 0; k < N; k++) in[k] = W'($urandom);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    for (int k = 0; k < N; k++) begin v[k] = int'($urandom_range(0, 255)); in[k] = W'(v[k]); end
    start = 1'b1; inverse = 1'b0;
    @(negedge clk);
    start = 1'b0;
    repeat (ITER) begin
      checks++;
      if (valid) begin failures++; $display("valid from the abandoned set"); end
      @(negedge clk);
    end
    v.rsort();
    checks++;
    if (!valid) begin failures++; $display("no valid after restart"); end
    for (int k = 0; k < N; k++) begin
      if (int'(result[k]) != v[k]) begin
        failures++;
        $display("restart: result[%0d]=%0d expected %0d", k, result[k], v[k]);
        break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
