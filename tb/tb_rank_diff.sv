// tb_rank_diff: checks the rank differences on the worked 3x3 example
// (ranked window 253 246 224 221 217 187 121 112 105, differences
// 2 7 22 3 4 30 66 9 7 105) and on random ranked sets, where the differences
// must also add up to the range top 255.
module tb_rank_diff;
  localparam int unsigned W = 8, M = 9;
  logic [W-1:0] v [M];
  logic [W-1:0] dr [M+1];
  int checks = 0, failures = 0;

  rank_diff #(.W(W), .M(M)) dut (.v, .dr);

  task automatic check_set();
    int exp_d, total;
    #1;
    total = 0;
    for (int r = 0; r <= M; r++) begin
      if (r == 0)      exp_d = 255 - int'(v[0]);
      else if (r == M) exp_d = int'(v[M-1]);
      else             exp_d = int'(v[r-1]) - int'(v[r]);
      total += int'(dr[r]);
      checks++;
      if (int'(dr[r]) != exp_d) begin
        failures++;
        $display("dr[%0d]=%0d expected %0d", r, dr[r], exp_d);
      end
    end
    checks++;
    if (total != 255) begin
      failures++;
      $display("differences add up to %0d", total);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ex [M] = '{253, 246, 224, 221, 217, 187, 121, 112, 105};
    automatic int exd [M+1] = '{2, 7, 22, 3, 4, 30, 66, 9, 7, 105};
    for (int k = 0; k < M; k++) v[k] = W'(ex[k]);
    check_set();
    for (int r = 0; r <= M; r++) begin
      checks++;
      if (int'(dr[r]) != exd[r]) begin
        failures++;
        $display("example dr[%0d]=%0d expected %0d", r, dr[r], exd[r]);
      end
    end
    for (int t = 0; t < 300; t++) begin
      int tmp [M];
      for (int k = 0; k < M; k++) tmp[k] = int'($urandom_range(0, 255));
      tmp.rsort();
      for (int k = 0; k < M; k++) v[k] = W'(tmp[k]);
      check_set();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
