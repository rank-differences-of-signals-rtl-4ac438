// tb_sort_node2: checks one pass of the two-layer node against the two
// layers applied here (first (0,1),(2,3),..., then (1,2),...,(7,8) and the
// ring cell (0,9), larger value to the lower line) on random and tied data,
// and that five passes sort all 1024 sets of zeros and 255s.
module tb_sort_node2;
  localparam int unsigned W = 8, N = 10;
  logic [W-1:0] x [N];
  logic [W-1:0] a [N];
  int checks = 0, failures = 0;

  sort_node2 #(.W(W), .N(N)) dut (.x, .a);

  function automatic void cx(ref int v [N], input int i, input int j);
    int t;
    if (v[j] > v[i]) begin
      t = v[i]; v[i] = v[j]; v[j] = t;
    end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int v [N];
      for (int k = 0; k < N; k++) begin
        v[k] = (t % 4 == 0) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, 255));
        x[k] = W'(v[k]);
      end
      for (int k = 0; k < N; k += 2) cx(v, k, k + 1);
      for (int k = 1; k < N - 1; k += 2) cx(v, k, k + 1);
      cx(v, 0, N - 1);
      #1;
      checks++;
      for (int k = 0; k < N; k++) begin
        if (int'(a[k]) != v[k]) begin
          failures++;
          $display("pass: a[%0d]=%0d expected %0d", k, a[k], v[k]);
          break;
        end
      end
    end
    for (int p = 0; p < (1 << N); p++) begin
      int ones;
      logic [W-1:0] cur [N];
      ones = 0;
      for (int k = 0; k < N; k++) begin
        cur[k] = p[k] ? 8'd255 : 8'd0;
        ones += p[k];
      end
      for (int it = 0; it < N / 2; it++) begin
        x = cur;
        #1;
        cur = a;
      end
      checks++;
      for (int k = 0; k < N; k++) begin
        if (cur[k] != ((k < ones) ? 8'd255 : 8'd0)) begin
          failures++;
          $display("five passes leave pattern %b unsorted", p[N-1:0]);
          break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
