// tb_weighted_sum: checks the weighing-selection sum on the worked window
// (ranks 253 246 224 221 217 187 121 112 105 and 0; differences
// 2 7 22 3 4 30 66 9 7 105) with the control vectors of the method's examples
// -- one rank (121), the mean of ranks 4 and 5 (202), the mean of ranks 3..6
// (186.5), the top difference (2), runs of differences (38, 125, 148) and a
// run scaled by 0.125 (27.875) -- and then on random signals with random
// signed weights against a sum computed here. Results carry 3 fraction
// bits, so the expected values are compared times 8.
module tb_weighted_sum;
  localparam int unsigned W = 8, N = 10, WW = 8, WF = 3;
  localparam int unsigned ACC_W = W + 1 + WW + $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [W-1:0] x [N];
  logic signed [WW-1:0] wgt [N];
  logic signed [ACC_W-1:0] out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weighted_sum #(.W(W), .N(N), .WW(WW), .WF(WF)) dut (.clk, .rst_n, .in_valid, .x, .wgt, .out_valid, .out);

  // Apply signals and weights given times 8, check the result times 8.
  task automatic run(input int xs [N], input int w8 [N], input int exp8, input string what);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      x[k]   = W'(xs[k]);
      wgt[k] = WW'(w8[k]);
    end
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    checks++;
    if (int'(out) != exp8 || !out_valid) begin
      failures++;
      $display("%s: got %0d/8 expected %0d/8", what, out, exp8);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ds [N] = '{253, 246, 224, 221, 217, 187, 121, 112, 105, 0};
    automatic int dd [N] = '{2, 7, 22, 3, 4, 30, 66, 9, 7, 105};
    in_valid = 1'b0;
    for (int k = 0; k < N; k++) begin x[k] = '0; wgt[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(ds, '{0, 0, 0, 0, 0, 0, 8, 0, 0, 0}, 121 * 8, "Yk");
    run(ds, '{0, 0, 0, 0, 4, 4, 0, 0, 0, 0}, 202 * 8, "Ys45");
    run(ds, '{0, 0, 0, 2, 2, 2, 2, 0, 0, 0}, 1492, "Ys3456");
    run(dd, '{8, 0, 0, 0, 0, 0, 0, 0, 0, 0}, 2 * 8, "Yd0");
    run(dd, '{8, 8, 8, 8, 8, 0, 0, 0, 0, 0}, 38 * 8, "Y4");
    run(dd, '{0, 0, 8, 8, 8, 8, 8, 0, 0, 0}, 125 * 8, "Yd2s7");
    run(dd, '{0, 8, 8, 8, 8, 8, 8, 8, 8, 0}, 148 * 8, "Y");
    run(dd, '{0, 1, 1, 1, 1, 0, 1, 1, 1, 1}, 223, "Y8 x 0.125");
    run(ds, '{0, 8, 8, 8, 8, -8, -8, -8, -8, 0}, (246 + 224 + 221 + 217 - 187 - 121 - 112 - 105) * 8, "Y9");
    for (int t = 0; t < 1000; t++) begin
      int xs [N];
      int ws [N];
      int e;
      e = 0;
      for (int k = 0; k < N; k++) begin
        xs[k] = int'($urandom_range(0, 255));
        ws[k] = int'($urandom_range(0, 255)) - 128;
        e += xs[k] * ws[k];
      end
      run(xs, ws, e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
