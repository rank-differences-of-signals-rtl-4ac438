// mip_top: the rank-processing design at its top level, three processors side
// by side on one clock and reset.
//
// u_mip is the pipelined multifunction image processor: a raster pixel
// stream in, and for every interior pixel its 3x3 window ranked by the
// ten-input wave sorting unit, with the selected rank (of_w9), the selected
// rank difference (ofd_w10) and the two weighing-selection sums (fs_am,
// f_am). See mip for timing. u_mrp is the relational preprocessor with the
// iterative sorting node: nine signals and an auxiliary boundary value are
// ranked in five passes through two layers of cells and the rank chosen by
// mrp_y is issued; see mrp. u_brp is the basic relational preprocessor:
// ten signals presented in parallel are ranked by a second wave sorting
// unit and the rank chosen by brp_y is issued; see brp. The three share
// nothing but clk and rst_n
// (synchronous, active low). Ports are the sub-blocks' own, prefixed with
// the processor they belong to.
module mip_top
  import mip_pkg::*;
#(
  parameter int unsigned W     = PIX_W,
  parameter int unsigned IMG_W = IMG_SIDE,
  parameter int unsigned IMG_H = IMG_SIDE,
  localparam int unsigned N     = N_SIG,
  localparam int unsigned XW    = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned YW    = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned ACC_W = W + 1 + WGT_W + $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // image processor
  input  logic                       mip_pix_valid,
  input  logic                       mip_sof,
  input  logic [W-1:0]               mip_pix_in,
  input  logic [W-1:0]               mip_ab,
  input  logic [3:0]                 mip_y,
  input  logic [N-1:0]               mip_y2,
  input  logic signed [WGT_W-1:0]    mip_wr [N],
  input  logic signed [WGT_W-1:0]    mip_wd [N],
  output logic                       mip_out_valid,
  output logic [W-1:0]               mip_of_w9,
  output logic [W-1:0]               mip_ofd_w10,
  output logic signed [ACC_W-1:0]    mip_fs_am,
  output logic signed [ACC_W-1:0]    mip_f_am,
  output logic [W-1:0]               mip_ranks [N],
  output logic [W-1:0]               mip_amo,
  output logic [XW-1:0]              mip_tx,
  output logic [YW-1:0]              mip_ty,
  // iterative relational preprocessor
  input  logic                       mrp_start,
  input  logic [W-1:0]               mrp_sig [N-1],
  input  logic [W-1:0]               mrp_aux,
  input  logic [3:0]                 mrp_y,
  output logic                       mrp_busy,
  output logic [W-1:0]               mrp_ranks [N],
  output logic                       mrp_ranks_valid,
  output logic                       mrp_out_valid,
  output logic [W-1:0]               mrp_out,
  // parallel-input relational preprocessor
  input  logic                       brp_in_valid,
  input  logic [W-1:0]               brp_in [N],
  input  logic [3:0]                 brp_y,
  output logic                       brp_ranks_valid,
  output logic [W-1:0]               brp_ranks [N],
  output logic                       brp_out_valid,
  output logic [W-1:0]               brp_out
);

  mip #(.W(W), .IMG_W(IMG_W), .IMG_H(IMG_H), .WW(WGT_W), .WF(WGT_F)) u_mip (
    .clk, .rst_n,
    .pix_valid(mip_pix_valid),
    .sof      (mip_sof),
    .pix_in   (mip_pix_in),
    .ab       (mip_ab),
    .y        (mip_y),
    .y2       (mip_y2),
    .wr       (mip_wr),
    .wd       (mip_wd),
    .out_valid(mip_out_valid),
    .of_w9    (mip_of_w9),
    .ofd_w10  (mip_ofd_w10),
    .fs_am    (mip_fs_am),
    .f_am     (mip_f_am),
    .ranks    (mip_ranks),
    .amo      (mip_amo),
    .tx       (mip_tx),
    .ty       (mip_ty)
  );

  mrp #(.W(W), .N(N), .ITER(N / 2)) u_mrp (
    .clk, .rst_n,
    .start      (mrp_start),
    .sig        (mrp_sig),
    .aux        (mrp_aux),
    .y          (mrp_y),
    .busy       (mrp_busy),
    .ranks      (mrp_ranks),
    .ranks_valid(mrp_ranks_valid),
    .out_valid  (mrp_out_valid),
    .out        (mrp_out)
  );

  brp #(.W(W), .N(N)) u_brp (
    .clk, .rst_n,
    .in_valid   (brp_in_valid),
    .in         (brp_in),
    .y          (brp_y),
    .ranks_valid(brp_ranks_valid),
    .ranks      (brp_ranks),
    .out_valid  (brp_out_valid),
    .out        (brp_out)
  );

endmodule
