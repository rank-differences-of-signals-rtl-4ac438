// tb_rank_select: drives random ranked sets with every rank code and checks
// the registered output one clock later: codes 1..9 give R_1..R_9 (ranks[0..8]),
// code 0 gives R_0 (ranks[9]) and codes 10..15 leave the output unchanged.
// out_valid must repeat in_valid one clock later.
module tb_rank_select;
  localparam int unsigned W = 8, N = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [W-1:0] ranks [N];
  logic [3:0] y;
  logic [W-1:0] out;
  int checks = 0, failures = 0;
  int expect_out;

  always #5 clk = ~clk;

  rank_select #(.W(W), .N(N), .YW(4)) dut (.clk, .rst_n, .in_valid, .ranks, .y, .out_valid, .out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; y = '0;
    for (int k = 0; k < N; k++) ranks[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expect_out = 0;
    for (int t = 0; t < 2000; t++) begin
      int tmp [N];
      logic v;
      @(negedge clk);
      for (int k = 0; k < N; k++) tmp[k] = int'($urandom_range(0, 255));
      tmp.rsort();
      for (int k = 0; k < N; k++) ranks[k] = W'(tmp[k]);
      y = (t < 16) ? 4'(t) : 4'($urandom);
      v = 1'($urandom);
      in_valid = v;
      if (y == 0)      expect_out = tmp[N-1];
      else if (y < N)  expect_out = tmp[y-1];
      @(posedge clk); #1;
      checks++;
      if (int'(out) != expect_out || out_valid != v) begin
        failures++;
        $display("y=%0d out=%0d expected %0d valid=%0b/%0b", y, out, expect_out, out_valid, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
