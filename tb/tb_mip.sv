// tb_mip: the multifunction image processor alone, on small 10x8 images.
//
// Five frames of random pixels, each with one fixed set of controls, are
// streamed in and every output of every interior window -- chosen rank,
// chosen rank difference, both weighted sums, the ten ranks, centre pixel
// and position -- is compared with a model computed here from the image.
// Each result must appear ten clocks after the clock that took the window's
// last pixel. The worked 3x3 window (121 112 105 / 221 217 187 /
// 224 246 253) is planted in each frame and checked against the method's
// example values. Both boundary settings, rank code 0, held rank codes,
// single, multiple and empty difference masks, negative and fractional
// weights, skipped border windows, idle clocks and an sof restart are
// counted and must each occur.
module tb_mip;
  import mip_pkg::*;
  localparam int unsigned W = PIX_W, N = N_SIG, IW = 10, IH = 8;
  localparam int unsigned XW = $clog2(IW), YW = $clog2(IH);
  localparam int unsigned ACC_W = W + 1 + WGT_W + $clog2(N);
  localparam int unsigned LAT = N;          // 9 sorter layers + output register
  localparam int unsigned NFR = 5;
  localparam int EX_R = 3, EX_C = 4;       // top-left corner of the worked window

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

  int checks = 0, failures = 0;
  int cycle = 0;
  // mechanism counters
  int n_ab_low = 0, n_ab_high = 0, n_y0 = 0, n_y_hold = 0, n_y2_one = 0, n_y2_multi = 0,
      n_y2_hold = 0, n_neg_w = 0, n_frac_w = 0, n_border = 0, n_idle = 0, n_resync = 0,
      n_example = 0;

  always #5 clk = ~clk;

  mip #(.IMG_W(IW), .IMG_H(IH)) dut (
    .clk, .rst_n,
    .pix_valid(mip_pix_valid), .sof(mip_sof), .pix_in(mip_pix_in), .ab(mip_ab),
    .y(mip_y), .y2(mip_y2), .wr(mip_wr), .wd(mip_wd),
    .out_valid(mip_out_valid), .of_w9(mip_of_w9), .ofd_w10(mip_ofd_w10),
    .fs_am(mip_fs_am), .f_am(mip_f_am), .ranks(mip_ranks), .amo(mip_amo),
    .tx(mip_tx), .ty(mip_ty));

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
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d windows never came out", q.size()); end
    begin
      automatic int counts [13] = '{n_ab_low, n_ab_high, n_y0, n_y_hold, n_y2_one, n_y2_multi, n_y2_hold,
                          n_neg_w, n_frac_w, n_border, n_idle, n_resync, n_example};
      automatic string names [13] = '{"boundary 0", "boundary 255", "rank code 0", "held rank code",
                            "single difference", "several difference bits", "held difference",
                            "negative weight", "fractional weight", "border window skipped",
                            "idle clock", "sof restart", "worked window"};
      for (int k = 0; k < 13; k++) begin
        $display("%-24s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin failures++; $display("%s never happened", names[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
