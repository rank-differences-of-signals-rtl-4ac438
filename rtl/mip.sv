// mip: multifunction image processor with register memory and two outputs,
// extended with the two weighing-selection sums of the method.
//
// Pixels enter serially (pix_in, one per clock while pix_valid is high, sof
// on the first pixel of a frame). The register memory (window_buffer) forms
// the 3x3 window A1..A9 around each interior pixel. The nine window pixels and
// the auxiliary input ab (the range boundary: 0 to rank the nine among
// themselves, 255 to push them one rank down) form the ten inputs of the
// pipelined wave sorting unit, which returns them ranked, largest first, as
// R_1..R_9, R_0. From the ranks the processor produces, on the same clock:
//   of_w9   - the rank chosen by the 4-bit code y (rank_select);
//   ofd_w10 - the rank difference chosen by the 10-bit mask y2 (diff_select),
//             differences taken over R_1..R_9 with top level 255;
//   fs_am   - sum of wr[r] * R(r+1) over the ten ranks (weighted_sum);
//   f_am    - sum of wd[r] * Dr(r) over the ten rank differences.
// The sums are signed with WGT_F fraction bits. amo is the window's centre
// pixel and tx, ty its position, delayed to line up with the results.
//
// Timing: a window formed on one clock leaves the sorter 9 clocks later and
// the results one clock after that, so out_valid follows the accepting clock
// edge of the window's last pixel by 10 clocks; a new window is taken on
// every clock. The control inputs y, y2, wr and wd are sampled on the clock
// that registers the results. The window, sorter, rank multiplexer and the
// difference switch follow the FPGA processor; the two weighted sums follow
// the method's formulas, and their number format is this design's choice.
module mip
  import mip_pkg::*;
#(
  parameter int unsigned W     = PIX_W,
  parameter int unsigned IMG_W = IMG_SIDE,
  parameter int unsigned IMG_H = IMG_SIDE,
  parameter int unsigned WW    = WGT_W,
  parameter int unsigned WF    = WGT_F,
  localparam int unsigned N     = N_SIG,
  localparam int unsigned XW    = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned YW    = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned ACC_W = W + 1 + WW + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  input  logic                    sof,
  input  logic [W-1:0]            pix_in,
  input  logic [W-1:0]            ab,
  input  logic [3:0]              y,
  input  logic [N-1:0]            y2,
  input  logic signed [WW-1:0]    wr   [N],
  input  logic signed [WW-1:0]    wd   [N],
  output logic                    out_valid,
  output logic [W-1:0]            of_w9,
  output logic [W-1:0]            ofd_w10,
  output logic signed [ACC_W-1:0] fs_am,
  output logic signed [ACC_W-1:0] f_am,
  output logic [W-1:0]            ranks [N],
  output logic [W-1:0]            amo,
  output logic [XW-1:0]           tx,
  output logic [YW-1:0]           ty
);

  localparam int unsigned LAYERS = N - 1;
  localparam int unsigned DLY    = LAYERS + 1;

  // ---- register memory -------------------------------------------------
  logic          win_valid;
  logic [W-1:0]  win [WIN*WIN];
  logic [XW-1:0] win_tx;
  logic [YW-1:0] win_ty;

  window_buffer #(.W(W), .IMG_W(IMG_W), .IMG_H(IMG_H), .K(WIN)) u_win (
    .clk, .rst_n,
    .pix_valid, .sof, .pix_in,
    .win_valid, .win,
    .tx(win_tx), .ty(win_ty)
  );

  // ---- sorting unit ----------------------------------------------------
  logic [W-1:0] su_in  [N];
  logic [W-1:0] su_out [N];
  logic         su_valid;

  for (genvar k = 0; k < WIN * WIN; k++) begin : g_su_in
    assign su_in[k] = win[k];
  end
  assign su_in[N-1] = ab;

  wave_sorter #(.W(W), .N(N), .LAYERS(LAYERS), .REG(1'b1)) u_su (
    .clk, .rst_n,
    .in_valid (win_valid),
    .in       (su_in),
    .out_valid(su_valid),
    .out      (su_out)
  );

  // ---- output functions ------------------------------------------------
  logic [W-1:0] dr [N];
  logic [W-1:0] top9 [N-1];
  logic         v_rs, v_ds, v_fs, v_fd;

  for (genvar k = 0; k < N - 1; k++) begin : g_top9
    assign top9[k] = su_out[k];
  end

  rank_select #(.W(W), .N(N), .YW(4)) u_rank_mux (
    .clk, .rst_n,
    .in_valid(su_valid), .ranks(su_out), .y(y),
    .out_valid(v_rs), .out(of_w9)
  );

  rank_diff #(.W(W), .M(N - 1)) u_rdiff (
    .v(top9), .dr(dr)
  );

  diff_select #(.W(W), .N(N)) u_diff_sw (
    .clk, .rst_n,
    .in_valid(su_valid), .dr(dr), .y2(y2),
    .out_valid(v_ds), .out(ofd_w10)
  );

  weighted_sum #(.W(W), .N(N), .WW(WW), .WF(WF)) u_fs (
    .clk, .rst_n,
    .in_valid(su_valid), .x(su_out), .wgt(wr),
    .out_valid(v_fs), .out(fs_am)
  );

  weighted_sum #(.W(W), .N(N), .WW(WW), .WF(WF)) u_fd (
    .clk, .rst_n,
    .in_valid(su_valid), .x(dr), .wgt(wd),
    .out_valid(v_fd), .out(f_am)
  );

  assign out_valid = v_rs;

  // All output stages share one register level, so their valids agree.
  a_valids_agree: assert property (@(posedge clk) disable iff (!rst_n)
    v_rs == v_ds && v_rs == v_fs && v_rs == v_fd)
    else $error("mip: output valids disagree");

  always_ff @(posedge clk) begin
    if (!rst_n) for (int k = 0; k < N; k++) ranks[k] <= '0;
    else        for (int k = 0; k < N; k++) ranks[k] <= su_out[k];
  end

  // ---- centre pixel and position, delayed to match the results ----------
  logic [W-1:0]  amo_d [DLY];
  logic [XW-1:0] tx_d  [DLY];
  logic [YW-1:0] ty_d  [DLY];

  always_ff @(posedge clk) begin
    amo_d[0] <= win[(WIN * WIN) / 2];
    tx_d[0]  <= win_tx;
    ty_d[0]  <= win_ty;
    for (int k = 1; k < DLY; k++) begin
      amo_d[k] <= amo_d[k-1];
      tx_d[k]  <= tx_d[k-1];
      ty_d[k]  <= ty_d[k-1];
    end
  end

  assign amo = amo_d[DLY-1];
  assign tx  = tx_d[DLY-1];
  assign ty  = ty_d[DLY-1];

endmodule
