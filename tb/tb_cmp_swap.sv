// tb_cmp_swap: checks the comparison-switching cell in its registered and
// combinational forms against max/min computed here, on random pairs, equal
// pairs and the range ends. The registered cell must show its result one
// clock after its inputs.
module tb_cmp_swap;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a, b, hi_r, lo_r, hi_c, lo_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmp_swap #(.W(W), .REG(1'b1)) dut_r (.clk, .rst_n, .a, .b, .hi(hi_r), .lo(lo_r));
  cmp_swap #(.W(W), .REG(1'b0)) dut_c (.clk, .rst_n, .a, .b, .hi(hi_c), .lo(lo_c));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb);
    logic [W-1:0] emax, emin;
    emax = (ta > tb) ? ta : tb;
    emin = (ta > tb) ? tb : ta;
    a = ta; b = tb;
    #1;
    checks++;
    if (hi_c !== emax || lo_c !== emin) begin
      failures++;
      $display("comb a=%0d b=%0d -> hi=%0d lo=%0d", ta, tb, hi_c, lo_c);
    end
    @(posedge clk); #1;
    checks++;
    if (hi_r !== emax || lo_r !== emin) begin
      failures++;
      $display("reg a=%0d b=%0d -> hi=%0d lo=%0d", ta, tb, hi_r, lo_r);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(8'd0, 8'd255);
    check(8'd255, 8'd0);
    check(8'd77, 8'd77);
    check(8'd1, 8'd2);
    for (int i = 0; i < 500; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
