// tb_brp: streams sets of ten parallel signals (the tenth held at 0 or 255
// like a range boundary) into the basic relational preprocessor with a new
// rank code on every clock, and checks the ten ranks and the selected rank
// against a sort done here. The ranks must come 9 clocks and the selected
// rank 10 clocks after the set was taken; codes 10..15 must hold the output.
module tb_brp;
  localparam int unsigned W = 8, N = 10, LAT = N - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, ranks_valid, out_valid;
  logic [W-1:0] in [N];
  logic [3:0] y;
  logic [W-1:0] ranks [N];
  logic [W-1:0] out;
  int checks = 0, failures = 0;
  int cycle = 0;
  int last_out = 0;

  typedef struct { int t; int s [N]; } set_t;
  set_t q [$];
  set_t hist [$];

  always #5 clk = ~clk;

  brp #(.W(W), .N(N)) dut (.clk, .rst_n, .in_valid, .in, .y, .ranks_valid, .ranks, .out_valid, .out);

  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      set_t s;
      s.t = cycle;
      for (int k = 0; k < N; k++) s.s[k] = int'(in[k]);
      s.s.rsort();
      q.push_back(s);
    end
  end

  // Ranks, LAT-1 edges after the set was taken (the LAT-th edge counting it).
  always @(negedge clk) begin
    if (rst_n && ranks_valid) begin
      set_t s;
      checks++;
      s = q.pop_front();
      if (cycle - s.t + 1 != LAT) begin
        failures++;
        $display("ranks after %0d clocks", cycle - s.t + 1);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(ranks[k]) != s.s[k]) begin
          failures++;
          $display("rank %0d = %0d expected %0d", k, ranks[k], s.s[k]);
        end
      end
      hist.push_back(s);
    end
  end

  // The multiplexer registers what the sorter shows together with y.
  logic [3:0] y_q;
  int exp_next;
  always @(posedge clk) begin
    y_q <= y;
  end
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      set_t s;
      int e;
      s = hist.pop_front();
      if (y_q == 0)     e = s.s[N-1];
      else if (y_q < N) e = s.s[y_q - 1];
      else              e = last_out;
      checks++;
      if (int'(out) != e) begin
        failures++;
        $display("y=%0d out=%0d expected %0d", y_q, out, e);
      end
      last_out = int'(out);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; y = '0;
    for (int k = 0; k < N; k++) in[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N - 1; k++) in[k] = W'($urandom);
      in[N-1] = (t % 2 == 0) ? 8'd0 : 8'd255;
      in_valid = 1'b1;
      y = 4'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (q.size() != 0 || hist.size() != 0) begin failures++; $display("sets left over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
