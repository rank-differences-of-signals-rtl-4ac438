// tb_wave_sorter: streams a new set of ten signals into the pipelined wave
// sorting unit on most clocks (random gaps) and compares every output set
// with the same set sorted here, largest first. It checks that each result
// is on the outputs after the ninth rising edge counting the one that
// took its set (LAYERS clocks of latency), that nothing
// else is flagged valid, and covers all 1024 sets of zeros and 255s (which
// by the zero-one principle proves the network sorts), ties and random data.
module tb_wave_sorter;
  localparam int unsigned W = 8, N = 10, LAYERS = N - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [W-1:0] in [N];
  logic [W-1:0] out [N];
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { int t; int v [N]; } set_t;
  set_t q [$];

  always #5 clk = ~clk;

  wave_sorter #(.W(W), .N(N), .LAYERS(LAYERS), .REG(1'b1)) dut (
    .clk, .rst_n, .in_valid, .in, .out_valid, .out);

  // Six-input structure of five layers (15 cells), combinational, on the
  // worked example X = 1 2 8 4 5 10, which must come out as 10 8 5 4 2 1.
  logic [W-1:0] in6 [6];
  logic [W-1:0] out6 [6];
  logic v6;
  wave_sorter #(.W(W), .N(6), .LAYERS(5), .REG(1'b0)) dut6 (
    .clk, .rst_n, .in_valid(1'b1), .in(in6), .out_valid(v6), .out(out6));

  // Record each accepted set with its sorted form and the clock it entered.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      set_t s;
      s.t = cycle;
      for (int k = 0; k < N; k++) s.v[k] = int'(in[k]);
      s.v.rsort();
      q.push_back(s);
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        set_t s;
        s = q.pop_front();
        // The set is taken on edge s.t and must be out after edge
        // s.t + LAYERS - 1, the LAYERS-th edge counting the first.
        if (cycle - s.t + 1 != LAYERS) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - s.t + 1, LAYERS);
        end
        for (int k = 0; k < N; k++) begin
          if (int'(out[k]) != s.v[k]) begin
            failures++;
            $display("out[%0d]=%0d expected %0d", k, out[k], s.v[k]);
            break;
          end
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    for (int k = 0; k < N; k++) in[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    begin
      automatic int x6 [6] = '{1, 2, 8, 4, 5, 10};
      automatic int f6 [6] = '{10, 8, 5, 4, 2, 1};
      for (int k = 0; k < 6; k++) in6[k] = W'(x6[k]);
      #1;
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (int'(out6[k]) != f6[k] || !v6) begin
          failures++;
          $display("six-input example: out[%0d]=%0d expected %0d", k, out6[k], f6[k]);
        end
      end
    end
    for (int p = 0; p < (1 << N); p++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) in[k] = p[k] ? 8'd255 : 8'd0;
      in_valid = 1'b1;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++)
        in[k] = (t % 5 == 0) ? W'($urandom_range(10, 13)) : W'($urandom);
      in_valid = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAYERS + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d sets never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
