// tb_window7: the 7x7-window configuration. A 7x7 window of a 14x12 image
// is formed by window_buffer (K=7) and ranked together with a boundary value
// of 0 by a 50-input wave_sorter (49 registered layers of 25 cells). Every
// interior window of two frames is checked: the 50 ranks against a sort of
// the image's 49 pixels plus the boundary done here, and their latency of 49
// clocks from the clock that takes the window. Idle clocks are mixed into
// the second frame. A second sorter with one layer fewer (48) is run on the
// same windows and the windows it leaves unsorted are reported, to show
// that the n-1 layers of the ring-closed network are all needed.
module tb_window7;
  localparam int unsigned W = 8, IW = 14, IH = 12, K = 7;
  localparam int unsigned N = K * K + 1, LAYERS = N - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_valid, sof, win_valid;
  logic [W-1:0] pix_in;
  logic [W-1:0] win [K*K];
  logic [3:0] tx, ty;
  logic [W-1:0] su_in [N];
  logic su_valid, short_valid;
  logic [W-1:0] ranks [N];
  logic [W-1:0] short_ranks [N];
  int checks = 0, failures = 0, windows = 0, unsorted_short = 0;
  int img [IH][IW];

  typedef struct { longint t; int s [N]; } wset_t;
  wset_t q [$];
  wset_t qs [$];

  always #5 clk = ~clk;

  window_buffer #(.W(W), .IMG_W(IW), .IMG_H(IH), .K(K)) u_win (
    .clk, .rst_n, .pix_valid, .sof, .pix_in, .win_valid, .win, .tx, .ty);

  always_comb begin
    for (int k = 0; k < K * K; k++) su_in[k] = win[k];
    su_in[N-1] = '0;
  end

  wave_sorter #(.W(W), .N(N), .LAYERS(LAYERS), .REG(1'b1)) u_su (
    .clk, .rst_n, .in_valid(win_valid), .in(su_in), .out_valid(su_valid), .out(ranks));

  wave_sorter #(.W(W), .N(N), .LAYERS(LAYERS - 1), .REG(1'b1)) u_short (
    .clk, .rst_n, .in_valid(win_valid), .in(su_in), .out_valid(short_valid), .out(short_ranks));

  // The window taken on this edge, from the image itself.
  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      wset_t e;
      int n;
      e.t = longint'($time);
      n = 0;
      for (int r = -3; r <= 3; r++)
        for (int c = -3; c <= 3; c++) begin
          e.s[n] = img[int'(ty) + r][int'(tx) + c];
          n++;
        end
      e.s[N-1] = 0;
      e.s.rsort();
      q.push_back(e);
      qs.push_back(e);
    end
  end

  always @(negedge clk) begin
    if (rst_n && su_valid) begin
      wset_t e;
      int lat;
      e = q.pop_front();
      lat = int'((longint'($time) - 5 - e.t) / 10) + 1;
      checks++;
      if (lat != LAYERS) begin
        failures++;
        $display("ranks after %0d clocks, expected %0d", lat, LAYERS);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(ranks[k]) != e.s[k]) begin
          failures++;
          $display("window %0d: rank %0d = %0d expected %0d", windows, k, ranks[k], e.s[k]);
        end
      end
      windows++;
    end
    if (rst_n && short_valid) begin
      wset_t e;
      e = qs.pop_front();
      for (int k = 0; k < N; k++) begin
        if (int'(short_ranks[k]) != e.s[k]) begin
          unsorted_short++;
          break;
        end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_valid = 1'b0; sof = 1'b0; pix_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) img[r][c] = int'($urandom_range(0, 255));
      for (int r = 0; r < IH; r++) begin
        for (int c = 0; c < IW; c++) begin
          if (f == 1 && $urandom_range(0, 5) == 0) begin
            pix_valid = 1'b0; sof = 1'b0;
            @(negedge clk);
          end
          pix_valid = 1'b1;
          sof = (r == 0 && c == 0);
          pix_in = W'(img[r][c]);
          @(negedge clk);
        end
      end
      pix_valid = 1'b0; sof = 1'b0;
      // The image must stay put until its last windows are taken.
      repeat (3) @(negedge clk);
    end
    repeat (LAYERS + 3) @(negedge clk);
    checks++;
    if (windows != 2 * (IW - K + 1) * (IH - K + 1) || q.size() != 0) begin
      failures++;
      $display("%0d windows ranked, expected %0d", windows, 2 * (IW - K + 1) * (IH - K + 1));
    end
    $display("windows ranked: %0d; left unsorted with %0d layers: %0d", windows, LAYERS - 1, unsorted_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
