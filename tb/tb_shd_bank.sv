// tb_shd_bank: checks the sampling-and-holding bank: with sample high it
// takes i_in when load_in is high and b_in otherwise, with sample low it
// holds, and reset clears it.
module tb_shd_bank;
  localparam int unsigned W = 8, N = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample, load_in;
  logic [W-1:0] i_in [N];
  logic [W-1:0] b_in [N];
  logic [W-1:0] o [N];
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shd_bank #(.W(W), .N(N)) dut (.clk, .rst_n, .sample, .load_in, .i_in, .b_in, .o);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = 1'b0; load_in = 1'b0;
    for (int k = 0; k < N; k++) begin i_in[k] = '0; b_in[k] = '0; model[k] = '0; end
    repeat (2) @(posedge clk);
    #1;
    checks++;
    foreach (o[k]) if (o[k] != 0) begin failures++; $display("not cleared"); break; end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin i_in[k] = W'($urandom); b_in[k] = W'($urandom); end
      sample  = 1'($urandom);
      load_in = 1'($urandom);
      if (sample) model = load_in ? i_in : b_in;
      @(posedge clk); #1;
      checks++;
      for (int k = 0; k < N; k++) begin
        if (o[k] != model[k]) begin
          failures++;
          $display("t=%0d o[%0d]=%0d expected %0d", t, k, o[k], model[k]);
          break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
