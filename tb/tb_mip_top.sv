// tb_mip_top: end-to-end test of the whole design at its default size
// (64x64 images, 8-bit pixels, ten-signal sorting units).
//
// Image processor: five frames of random pixels are streamed in, each with
// one fixed set of controls, and every output of every interior window --
// the chosen rank, the chosen rank difference, both weighted sums, the ten
// ranks, the centre pixel and its position -- is compared with a model
// computed here from the image itself. Each result must appear ten clocks
// after the clock that took the window's last pixel. The worked 3x3 window
// (121 112 105 / 221 217 187 / 224 246 253) is planted in every frame, and
// its outputs are also checked against the method's example values.
// Iterative preprocessor: runs alongside, sorting random sets and issuing
// the rank chosen by its code.
// Parallel-input preprocessor: runs alongside too, taking a new set of ten
// signals on most clocks with a new rank code for each set, and its ranks
// and selected rank are checked, with their latency, against a sort here.
// Every mechanism is counted and must occur: both boundary settings of the
// auxiliary input, rank code 0 and the held output of unused rank codes,
// single, multiple and empty difference masks, negative and fractional
// weights, border windows skipped, idle clocks in the pixel stream, a frame
// restart by sof, completed iterative sorts, and parallel sets ranked
// back to back.
module tb_mip_top;
  import mip_pkg::*;
  localparam int unsigned W = PIX_W, N = N_SIG, IW = IMG_SIDE, IH = IMG_SIDE;
  localparam int unsigned XW = $clog2(IW), YW = $clog2(IH);
  localparam int unsigned ACC_W = W + 1 + WGT_W + $clog2(N);
  localparam int unsigned LAT = N;          // 9 sorter layers + output register
  localparam int unsigned NFR = 5;
  localparam int EX_R = 10, EX_C = 20;     // top-left corner of the worked window

  logic clk = 1'b0, rst_n = 1'b0;
  logic mip_pix_valid, mip_sof;
  logic [W-1:0] mip_pix_in, mip_ab;
  logic [3:0] mip_y;
  logic [N-1:0] mip_y2;
  logic signed [WGT_W-1:0] mip_wr [N];
  logic signed [WGT_W-1:0] mip_wd [N];
  logic mip_out_valid;
  logic [W-1:0] mip_of_w9, mip_ofd_w10, mip_amo;
  logic signed [ACC_W-1:0] mip_fs_am, mip_f_am;
  logic [W-1:0] mip_ranks [N];
  logic [XW-1:0] mip_tx;
  logic [YW-1:0] mip_ty;
  logic mrp_start, mrp_busy, mrp_ranks_valid, mrp_out_valid;
  logic [W-1:0] mrp_sig [N-1];
  logic [W-1:0] mrp_aux, mrp_out;
  logic [3:0] mrp_y;
  logic [W-1:0] mrp_ranks [N];
  logic brp_in_valid, brp_ranks_valid, brp_out_valid;
  logic [W-1:0] brp_in [N];
  logic [3:0] brp_y;
  logic [W-1:0] brp_ranks [N];
  logic [W-1:0] brp_out;

  int checks = 0, failures = 0;
  int cycle = 0;
  // mechanism counters
  int n_ab_low = 0, n_ab_high = 0, n_y0 = 0, n_y_hold = 0, n_y2_one = 0, n_y2_multi = 0,
      n_y2_hold = 0, n_neg_w = 0, n_frac_w = 0, n_border = 0, n_idle = 0, n_resync = 0,
      n_mrp = 0, n_example = 0, n_brp = 0;

  always #5 clk = ~clk;

  mip_top dut (.*);

  typedef struct {
    int t;
    int s [N];
    int dr [N];
    int amo, tx, ty;
    bit example;
  } exp_t;
  exp_t q [$];

  int img [IH][IW];
  int cur_r, cur_c;
  bit pending;               // a pixel is presented this clock
  int hold_of, hold_ofd;     // values the held outputs must keep
  int frame;

  // Controls of each frame.
  // Frames 0 and 2 rank the nine pixels among themselves (boundary 0) and
  // use the method's example vectors; frames 1 and 3 push them down one rank.
  int f_ab [NFR]  = '{0, 255, 0, 255, 0};
  int f_y  [NFR]  = '{7, 0, 12, 3, 15};
  int f_y2 [NFR]  = '{'h004, 'h034, 0, 'h001, 'h200};

  function automatic int wr_of(int f, int r);
    case (f)
      0: return (r == 6) ? 8 : 0;                    // one rank
      1: return (r >= 3 && r <= 6) ? 2 : 0;          // mean of ranks 3..6
      2: return (r >= 1 && r <= 4) ? 8 : (r >= 5 && r <= 8) ? -8 : 0;
      3: return (r == 4 || r == 5) ? 4 : 0;          // mean of two ranks
      default: return int'($urandom_range(0, 255)) - 128;
    endcase
  endfunction

  function automatic int wd_of(int f, int r);
    case (f)
      0: return (r <= 4) ? 8 : 0;                    // D - rank 5
      1: return (r == 0 || r == 5) ? 0 : 1;          // a run times 0.125
      2: return (r >= 2 && r <= 6) ? 8 : 0;          // rank 2 - rank 7
      3: return (r >= 1 && r <= 8) ? 8 : 0;          // max - min of nine
      default: return int'($urandom_range(0, 255)) - 128;
    endcase
  endfunction

  // Record every window the design should produce, when its last pixel is
  // taken.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && pending && cur_r >= 2 && cur_c >= 2) begin
      exp_t e;
      e.t = cycle;
      for (int k = 0; k < 9; k++) e.s[k] = img[cur_r - 2 + k / 3][cur_c - 2 + k % 3];
      e.s[9] = int'(mip_ab);
      e.amo = img[cur_r - 1][cur_c - 1];
      e.tx = cur_c - 1;
      e.ty = cur_r - 1;
      e.example = (cur_r == EX_R + 2 && cur_c == EX_C + 2);
      e.s.rsort();
      e.dr[0] = 255 - e.s[0];
      for (int r = 1; r < 9; r++) e.dr[r] = e.s[r-1] - e.s[r];
      e.dr[9] = e.s[8];
      q.push_back(e);
    end else if (rst_n && pending) begin
      n_border++;
    end
  end

  // Compare every result with the model.
  always @(negedge clk) begin
    if (rst_n && mip_out_valid) begin
      exp_t e;
      int fs8, fd8, eof, eofd;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("result with no window");
      end else begin
        e = q.pop_front();
        checks++;
        if (cycle - e.t != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t, LAT);
        end
        fs8 = 0; fd8 = 0;
        for (int r = 0; r < N; r++) begin
          fs8 += e.s[r] * int'(mip_wr[r]);
          fd8 += e.dr[r] * int'(mip_wd[r]);
          checks++;
          if (int'(mip_ranks[r]) != e.s[r]) begin
            failures++;
            $display("frame %0d rank %0d = %0d expected %0d", frame, r, mip_ranks[r], e.s[r]);
          end
        end
        if (mip_y == 0)       begin eof = e.s[N-1]; n_y0++; end
        else if (mip_y < N)   eof = e.s[mip_y - 1];
        else                  begin eof = hold_of; n_y_hold++; end
        eofd = hold_ofd;
        for (int r = 0; r < N; r++) if (mip_y2[r]) eofd = e.dr[r];
        if (mip_y2 == 0) n_y2_hold++;
        else if ($countones(mip_y2) == 1) n_y2_one++;
        else n_y2_multi++;
        if (e.s[0] == 255 && int'(mip_ab) == 255) n_ab_high++;
        if (e.s[N-1] == 0 && int'(mip_ab) == 0) n_ab_low++;
        checks++;
        if (int'(mip_of_w9) != eof || int'(mip_ofd_w10) != eofd || int'(mip_fs_am) != fs8 ||
            int'(mip_f_am) != fd8 || int'(mip_amo) != e.amo || int'(mip_tx) != e.tx ||
            int'(mip_ty) != e.ty) begin
          failures++;
          $display("frame %0d (%0d,%0d): of %0d/%0d ofd %0d/%0d fs %0d/%0d fd %0d/%0d amo %0d/%0d pos %0d,%0d",
                   frame, e.tx, e.ty, mip_of_w9, eof, mip_ofd_w10, eofd, mip_fs_am, fs8,
                   mip_f_am, fd8, mip_amo, e.amo, mip_tx, mip_ty);
        end
        hold_of = eof;
        hold_ofd = eofd;
        // The worked window against the method's own numbers.
        if (e.example && (frame == 0 || frame == 2)) begin
          automatic int want_fs [3] = '{121 * 8, 0, (246 + 224 + 221 + 217 - 187 - 121 - 112 - 105) * 8};
          automatic int want_fd [3] = '{38 * 8, 0, 125 * 8};
          n_example++;
          checks++;
          if (int'(mip_fs_am) != want_fs[frame] || int'(mip_f_am) != want_fd[frame] || mip_amo != 217) begin
            failures++;
            $display("worked window, frame %0d: fs %0d f %0d amo %0d", frame, mip_fs_am, mip_f_am, mip_amo);
          end
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Iterative preprocessor, alongside.
  initial begin
    mrp_start = 1'b0; mrp_aux = '0; mrp_y = '0;
    for (int k = 0; k < N - 1; k++) mrp_sig[k] = '0;
    wait (rst_n);
    for (int t = 0; t < 200; t++) begin
      int v [N];
      int waited;
      @(negedge clk);
      for (int k = 0; k < N - 1; k++) begin v[k] = int'($urandom_range(0, 255)); mrp_sig[k] = W'(v[k]); end
      v[N-1] = (t % 2) ? 255 : 0;
      mrp_aux = W'(v[N-1]);
      mrp_y = 4'($urandom_range(0, 9));
      mrp_start = 1'b1;
      @(negedge clk);
      mrp_start = 1'b0;
      waited = 1;
      while (!mrp_out_valid && waited < 30) begin @(negedge clk); waited++; end
      v.rsort();
      checks++;
      if (waited != N / 2 + 2 || int'(mrp_out) != ((mrp_y == 0) ? v[N-1] : v[mrp_y - 1])) begin
        failures++;
        $display("iterative preprocessor: out %0d after %0d clocks", mrp_out, waited);
      end
      for (int k = 0; k < N; k++) begin
        if (int'(mrp_ranks[k]) != v[k]) begin
          failures++;
          $display("iterative preprocessor: rank %0d = %0d expected %0d", k, mrp_ranks[k], v[k]);
          break;
        end
      end
      n_mrp++;
    end
  end

  // Parallel-input preprocessor, alongside. Each set's code is applied when
  // the set leaves the sorter, LAT-1 clocks after it went in.
  typedef struct { longint t; int y; int s [N]; } bset_t;
  bset_t bq [$];
  int bcodes [$];
  always @(posedge clk) begin
    if (rst_n && brp_in_valid) begin
      bset_t b;
      b.t = longint'($time);
      b.y = bcodes[$];
      for (int k = 0; k < N; k++) b.s[k] = int'(brp_in[k]);
      b.s.rsort();
      bq.push_back(b);
    end
  end
  // Seen at the falling edge, the ranks belong to the oldest set still in
  // flight unless that one is being issued on the same clock.
  always @(negedge clk) begin
    if (rst_n && brp_ranks_valid) begin
      bset_t b;
      b = bq[brp_out_valid ? 1 : 0];
      checks++;
      for (int k = 0; k < N; k++) begin
        if (int'(brp_ranks[k]) != b.s[k]) begin
          failures++;
          $display("parallel preprocessor: rank %0d = %0d expected %0d", k, brp_ranks[k], b.s[k]);
          break;
        end
      end
    end
    if (rst_n && brp_out_valid) begin
      bset_t b;
      int e, lat;
      b = bq.pop_front();
      // Clocks from the edge that took the set, that edge included.
      lat = int'((longint'($time) - 5 - b.t) / 10) + 1;
      e = (b.y == 0) ? b.s[N-1] : b.s[b.y - 1];
      checks++;
      if (lat != LAT || int'(brp_out) != e) begin
        failures++;
        $display("parallel preprocessor: out %0d expected %0d, after %0d clocks", brp_out, e, lat);
      end
      n_brp++;
    end
  end
  initial begin
    int sent, yq [$];
    brp_in_valid = 1'b0; brp_y = '0;
    for (int k = 0; k < N; k++) brp_in[k] = '0;
    wait (rst_n);
    sent = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      brp_in_valid = ($urandom_range(0, 4) != 0);
      for (int k = 0; k < N - 1; k++) brp_in[k] = W'($urandom_range(0, 255));
      brp_in[N-1] = (t % 2 == 1) ? 8'd255 : 8'd0;
      bcodes.push_back($urandom_range(0, 9));
      yq.push_back(brp_in_valid ? bcodes[$] : -1);
      // The code for the set that went in LAT-1 clocks ago.
      if (yq.size() >= LAT) begin
        int c;
        c = yq.pop_front();
        if (c >= 0) brp_y = 4'(c);
      end
      if (brp_in_valid) sent++;
    end
    @(negedge clk) brp_in_valid = 1'b0;
    while (yq.size() > 0) begin
      int c;
      c = yq.pop_front();
      if (c >= 0) brp_y = 4'(c);
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_brp != sent || bq.size() != 0) begin
      failures++;
      $display("parallel preprocessor: %0d of %0d sets came out", n_brp, sent);
    end
  end

  initial begin
    automatic int ex [9] = '{121, 112, 105, 221, 217, 187, 224, 246, 253};
    mip_pix_valid = 1'b0; mip_sof = 1'b0; mip_pix_in = '0; mip_ab = '0;
    mip_y = '0; mip_y2 = '0;
    for (int r = 0; r < N; r++) begin mip_wr[r] = '0; mip_wd[r] = '0; end
    pending = 1'b0; cur_r = 0; cur_c = 0; hold_of = 0; hold_ofd = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (frame = 0; frame < NFR; frame++) begin
      for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) img[r][c] = int'($urandom_range(0, 255));
      for (int k = 0; k < 9; k++) img[EX_R + k / 3][EX_C + k % 3] = ex[k];
      // Let the previous frame drain before changing the controls.
      repeat (LAT + 2) @(negedge clk);
      mip_ab = W'(f_ab[frame]);
      mip_y  = 4'(f_y[frame]);
      mip_y2 = N'(f_y2[frame]);
      for (int r = 0; r < N; r++) begin
        mip_wr[r] = WGT_W'(wr_of(frame, r));
        mip_wd[r] = WGT_W'(wd_of(frame, r));
        if (wr_of(frame, r) < 0 || wd_of(frame, r) < 0) n_neg_w++;
        if (wr_of(frame, r) % 8 != 0 || wd_of(frame, r) % 8 != 0) n_frac_w++;
      end
      // The held outputs keep what the drain left there.
      @(negedge clk);
      hold_of = int'(mip_of_w9);
      hold_ofd = int'(mip_ofd_w10);
      if (frame == 3) begin
        // Abandon a partial frame: sof must restart the scan.
        for (int k = 0; k < 3 * IW + 5; k++) begin
          cur_r = k / IW; cur_c = k % IW;
          mip_pix_valid = 1'b1; mip_sof = (k == 0); mip_pix_in = W'(img[cur_r][cur_c]);
          pending = 1'b1;
          @(negedge clk);
        end
        mip_pix_valid = 1'b0; pending = 1'b0;
        repeat (LAT + 2) @(negedge clk);
        hold_of = int'(mip_of_w9);
        hold_ofd = int'(mip_ofd_w10);
        n_resync++;
      end
      for (int r = 0; r < IH; r++) begin
        for (int c = 0; c < IW; c++) begin
          if (frame >= 1 && $urandom_range(0, 9) == 0) begin
            mip_pix_valid = 1'b0; mip_sof = 1'b0; pending = 1'b0;
            n_idle++;
            @(negedge clk);
          end
          cur_r = r; cur_c = c;
          mip_pix_valid = 1'b1;
          mip_sof = (r == 0 && c == 0);
          mip_pix_in = W'(img[r][c]);
          pending = 1'b1;
          @(negedge clk);
        end
      end
      mip_pix_valid = 1'b0; mip_sof = 1'b0; pending = 1'b0;
      repeat (LAT + 2) @(negedge clk);
    end
    wait (n_mrp == 200);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d windows never came out", q.size()); end
    begin
      automatic int counts [15] = '{n_ab_low, n_ab_high, n_y0, n_y_hold, n_y2_one, n_y2_multi, n_y2_hold,
                          n_neg_w, n_frac_w, n_border, n_idle, n_resync, n_mrp, n_example, n_brp};
      automatic string names [15] = '{"boundary 0", "boundary 255", "rank code 0", "held rank code",
                            "single difference", "several difference bits", "held difference",
                            "negative weight", "fractional weight", "border window skipped",
                            "idle clock", "sof restart", "iterative sort", "worked window",
                            "parallel set"};
      for (int k = 0; k < 15; k++) begin
        $display("%-24s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin failures++; $display("%s never happened", names[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
