// tb_window_buffer: feeds two 7x5 frames of random pixels, with random idle
// clocks between pixels and sof on each frame's first pixel, and checks
// after every accepted pixel that win_valid is high exactly for windows
// wholly inside the image, that the window holds the 3x3 neighbourhood with
// the newest pixel in A9, and that tx, ty name its centre. It also checks
// that idle clocks change nothing and counts 15 windows per frame.
module tb_window_buffer;
  localparam int unsigned W = 8, IW = 7, IH = 5, K = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_valid, sof, win_valid;
  logic [W-1:0] pix_in;
  logic [W-1:0] win [K*K];
  logic [2:0] tx;
  logic [2:0] ty;
  int checks = 0, failures = 0, windows = 0;
  int img [IH][IW];

  always #5 clk = ~clk;

  window_buffer #(.W(W), .IMG_W(IW), .IMG_H(IH), .K(K)) dut (
    .clk, .rst_n, .pix_valid, .sof, .pix_in, .win_valid, .win, .tx, .ty);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_valid = 1'b0; sof = 1'b0; pix_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) img[r][c] = int'($urandom_range(0, 255));
      for (int r = 0; r < IH; r++) begin
        for (int c = 0; c < IW; c++) begin
          bit in_img;
          // idle clocks
          while ($urandom_range(0, 2) == 0) begin
            @(negedge clk);
            pix_valid = 1'b0; sof = 1'b0; pix_in = W'($urandom);
            @(posedge clk); #1;
            checks++;
            if (win_valid) begin failures++; $display("valid on idle clock"); end
          end
          @(negedge clk);
          pix_valid = 1'b1;
          sof = (r == 0 && c == 0);
          pix_in = W'(img[r][c]);
          @(posedge clk); #1;
          in_img = (r >= K - 1) && (c >= K - 1);
          checks++;
          if (win_valid != in_img) begin
            failures++;
            $display("frame %0d (%0d,%0d): win_valid=%0b", f, r, c, win_valid);
          end
          if (in_img) begin
            windows++;
            checks++;
            if (int'(tx) != c - 1 || int'(ty) != r - 1) begin
              failures++;
              $display("centre (%0d,%0d) expected (%0d,%0d)", tx, ty, c - 1, r - 1);
            end
            for (int k = 0; k < K * K; k++) begin
              checks++;
              if (int'(win[k]) != img[r - 2 + k / 3][c - 2 + k % 3]) begin
                failures++;
                $display("window A%0d=%0d expected %0d", k + 1, win[k], img[r - 2 + k / 3][c - 2 + k % 3]);
              end
            end
          end
        end
      end
    end
    @(negedge clk) pix_valid = 1'b0;
    checks++;
    if (windows != 2 * (IW - 2) * (IH - 2)) begin
      failures++;
      $display("%0d windows", windows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
