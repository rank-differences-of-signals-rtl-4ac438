// tb_diff_select: checks the rank-difference switch with single-bit masks
// (each picks its own difference), several bits (the highest wins) and an
// empty mask (the output keeps its value), one clock after the inputs.
module tb_diff_select;
  localparam int unsigned W = 8, N = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [W-1:0] dr [N];
  logic [N-1:0] y2;
  logic [W-1:0] out;
  int checks = 0, failures = 0;
  int expect_out;

  always #5 clk = ~clk;

  diff_select #(.W(W), .N(N)) dut (.clk, .rst_n, .in_valid, .dr, .y2, .out_valid, .out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; y2 = '0;
    for (int k = 0; k < N; k++) dr[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expect_out = 0;
    for (int t = 0; t < 2000; t++) begin
      logic v;
      @(negedge clk);
      for (int k = 0; k < N; k++) dr[k] = W'($urandom);
      if (t < N)            y2 = N'(1) << t;
      else if (t % 7 == 0)  y2 = '0;
      else                  y2 = N'($urandom);
      v = 1'($urandom);
      in_valid = v;
      for (int k = 0; k < N; k++) if (y2[k]) expect_out = int'(dr[k]);
      @(posedge clk); #1;
      checks++;
      if (int'(out) != expect_out || out_valid != v) begin
        failures++;
        $display("y2=%b out=%0d expected %0d", y2, out, expect_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
