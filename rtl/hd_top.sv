// hd_top: human detection by background subtraction on a video frame stream.
//
// Every colour frame of the video arrives together with the matching pixel
// of a fixed background image. Both go through the same front end:
// pre-processing (grey, resize to IMG_W x IMG_H), a modified 3x3 median
// filter against salt-and-pepper noise and a 2D Haar transform of which only
// the LL band (IMG_W/2 x IMG_H/2) is kept. In parallel the adaptive
// threshold block computes the frame's WMSE from the two pre-processed
// frames. The two LL images are subtracted (|fg - bg|), pixels not above the
// threshold (WMSE + thr_offset) are cleared, the result is inverted
// (255 - x, white background) and a second median filter removes isolated
// specks. The detection image leaves on det_* in raster order with its
// coordinates.
//
// Flow control: frame_in/bg_in are taken together with in_valid/in_ready.
// in_ready drops while the Haar units run their column pass over the stored
// frame, so a frame source must be able to wait. The detection output has no
// back pressure. thr_offset is the LL2 input of the threshold adder; it adds
// a fixed bias to the adaptive WMSE (0 gives the plain WMSE threshold).
//
// Timing at the default size: a frame takes 65536 input cycles, then about
// 33000 cycles for the column pass and the output filter, so a new frame can
// start roughly every 99000 clocks.
// The block order follows the method's architecture; the handshakes, the
// streamed background image and the thr_offset bias are this design's
// choices.
module hd_top #(
  parameter int SRC_W = 256,   // colour frame size delivered by the source
  parameter int SRC_H = 256,
  parameter int IMG_W = 256,   // pre-processed frame size
  parameter int IMG_H = 256,
  localparam int OUT_W  = IMG_W / 2,
  localparam int OUT_H  = IMG_H / 2,
  localparam int WMSE_W = 2 * hd_pkg::PIX_W - 3   // sum(255^2)/8 over N*M pixels/(N*M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // frame stream
  input  logic                 in_valid,
  output logic                 in_ready,
  input  hd_pkg::rgb_t         frame_in,
  input  hd_pkg::rgb_t         bg_in,
  input  hd_pkg::pix_t         thr_offset,
  // detection stream
  output logic                 det_valid,
  output hd_pkg::pix_t         det_pix,
  output logic [$clog2(OUT_W)-1:0] det_x,
  output logic [$clog2(OUT_H)-1:0] det_y,
  output logic                 det_last,
  // status
  output logic [WMSE_W-1:0]    wmse,
  output logic [15:0]          frame_count,
  output logic                 busy
);
  import hd_pkg::*;

  // ---------------- pre-processing ----------------
  logic fg_pp_in_rdy, bg_pp_in_rdy, fg_pp_v, bg_pp_v, fg_pp_drop, bg_pp_drop;
  pix_t fg_pp, bg_pp;
  logic pp_out_rdy, in_fire;

  assign in_ready = fg_pp_in_rdy && bg_pp_in_rdy;
  assign in_fire  = in_valid && in_ready;

  preprocess #(.SRC_W(SRC_W), .SRC_H(SRC_H), .DST_W(IMG_W), .DST_H(IMG_H)) u_pp_fg (
    .clk(clk), .rst_n(rst_n), .in_valid(in_fire), .in_ready(fg_pp_in_rdy),
    .in_rgb(frame_in), .out_valid(fg_pp_v), .out_ready(pp_out_rdy),
    .out_pix(fg_pp), .dropped(fg_pp_drop));
  preprocess #(.SRC_W(SRC_W), .SRC_H(SRC_H), .DST_W(IMG_W), .DST_H(IMG_H)) u_pp_bg (
    .clk(clk), .rst_n(rst_n), .in_valid(in_fire), .in_ready(bg_pp_in_rdy),
    .in_rgb(bg_in), .out_valid(bg_pp_v), .out_ready(pp_out_rdy),
    .out_pix(bg_pp), .dropped(bg_pp_drop));

  // ---------------- median filters (input side) ----------------
  logic fg_mf_in_rdy, bg_mf_in_rdy, pp_fire;
  logic fg_mf_v, bg_mf_v, fg_mf_b, bg_mf_b, mf_out_rdy;
  pix_t fg_mf, bg_mf;

  assign pp_out_rdy = fg_mf_in_rdy && bg_mf_in_rdy;
  assign pp_fire    = fg_pp_v && bg_pp_v && pp_out_rdy;

  median_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_mf_fg (
    .clk(clk), .rst_n(rst_n), .in_valid(pp_fire), .in_ready(fg_mf_in_rdy),
    .in_pix(fg_pp), .out_valid(fg_mf_v), .out_ready(mf_out_rdy),
    .out_pix(fg_mf), .out_border(fg_mf_b));
  median_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_mf_bg (
    .clk(clk), .rst_n(rst_n), .in_valid(pp_fire), .in_ready(bg_mf_in_rdy),
    .in_pix(bg_pp), .out_valid(bg_mf_v), .out_ready(mf_out_rdy),
    .out_pix(bg_mf), .out_border(bg_mf_b));

  // ---------------- adaptive threshold ----------------
  logic [WMSE_W:0] thr;
  logic            wmse_update;

  adaptive_threshold #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_thr (
    .clk(clk), .rst_n(rst_n), .in_valid(pp_fire), .img1(fg_pp), .img2(bg_pp),
    .ll2(thr_offset), .wmse(wmse), .thr(thr), .wmse_update(wmse_update));

  // ---------------- Haar DWT, LL band ----------------
  logic fg_dw_in_rdy, bg_dw_in_rdy, mf_fire;
  logic fg_ll_v, bg_ll_v, fg_dw_done, bg_dw_done, fg_col, bg_col;
  pix_t fg_ll, bg_ll;

  assign mf_out_rdy = fg_dw_in_rdy && bg_dw_in_rdy;
  assign mf_fire    = fg_mf_v && bg_mf_v && mf_out_rdy;

  haar_dwt_2d_ll #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dwt_fg (
    .clk(clk), .rst_n(rst_n), .in_valid(mf_fire), .in_ready(fg_dw_in_rdy),
    .in_pix(fg_mf), .out_valid(fg_ll_v), .out_pix(fg_ll),
    .frame_done(fg_dw_done), .col_pass(fg_col));
  haar_dwt_2d_ll #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dwt_bg (
    .clk(clk), .rst_n(rst_n), .in_valid(mf_fire), .in_ready(bg_dw_in_rdy),
    .in_pix(bg_mf), .out_valid(bg_ll_v), .out_pix(bg_ll),
    .frame_done(bg_dw_done), .col_pass(bg_col));

  // ---------------- subtraction, threshold, negative ----------------
  pix_t diff, kept_pix, neg_pix;
  logic kept;

  bg_subtract u_sub (.fg(fg_ll), .bg(bg_ll), .diff(diff));
  thresholding #(.THR_W(WMSE_W + 1)) u_cmp (
    .pix(diff), .thr(thr), .out(kept_pix), .kept(kept));
  negative_transform u_neg (.pix(kept_pix), .out(neg_pix));

  logic neg_v;
  pix_t neg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_v <= 1'b0;
      neg_q <= '0;
    end else begin
      neg_v <= fg_ll_v && bg_ll_v;
      if (fg_ll_v && bg_ll_v) neg_q <= neg_pix;
    end
  end

  // ---------------- output median filter ----------------
  logic om_in_rdy, om_b;

  median_filter #(.IMG_W(OUT_W), .IMG_H(OUT_H)) u_mf_out (
    .clk(clk), .rst_n(rst_n), .in_valid(neg_v), .in_ready(om_in_rdy),
    .in_pix(neg_q), .out_valid(det_valid), .out_ready(1'b1),
    .out_pix(det_pix), .out_border(om_b));

  // ---------------- controller ----------------
  hd_controller #(.IN_PIX(SRC_W * SRC_H), .OUT_W(OUT_W), .OUT_H(OUT_H)) u_ctl (
    .clk(clk), .rst_n(rst_n), .in_fire(in_fire), .out_fire(det_valid),
    .in_last(), .out_x(det_x), .out_y(det_y), .out_last(det_last),
    .frame_count(frame_count), .busy(busy));

  // The two paths see identical control and must stay in lock step; the
  // output filter must never be flushing when an LL pixel arrives.
  a_pp_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    fg_pp_v == bg_pp_v);
  a_mf_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    fg_mf_v == bg_mf_v);
  a_ll_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    fg_ll_v == bg_ll_v);
  a_out_room: assert property (@(posedge clk) disable iff (!rst_n)
    neg_v |-> om_in_rdy);
endmodule
