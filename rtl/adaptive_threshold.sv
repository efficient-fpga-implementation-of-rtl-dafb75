// adaptive_threshold: per-frame adaptive threshold from the weighted mean
// squared error between the current frame and the background frame,
//   WMSE = sum over all N*M pixels of (Pa - Pb)^2 / (8 * N * M).
//
// Datapath: a look-ahead subtractor (bg_subtract) forms |Pa - Pb|, an 8x8
// Vedic multiplier squares it, and a look-ahead adder accumulates the
// squares. With N*M a power of two the division is a right shift by
// 3 + log2(N*M) bits (19 for 256 x 256). A pixel counter (the block's
// controller) loads the shifted total into the output flip-flop when the
// last pixel of a frame arrives and clears the accumulator for the next
// frame. A final look-ahead adder adds ll2 to the registered WMSE to give
// the threshold.
//
// Interface: one pixel pair is taken on each clock with in_valid high.
// wmse/thr hold the value of the last completed frame; wmse_update pulses
// on the clock after a frame's last pixel, when they change.
// The WMSE formula, the >>19 and the subtract/square/accumulate/register/add
// chain follow the method; what ll2 should carry is not defined there, so
// it is left as an input (the top uses it as a threshold bias).
module adaptive_threshold #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  // Derived widths, fixed by the frame size.
  localparam int NPIX   = IMG_W * IMG_H,
  localparam int SHIFT  = 3 + $clog2(NPIX),            // log2(8*N*M)
  localparam int ACC_W  = 2 * hd_pkg::PIX_W + $clog2(NPIX), // holds NPIX * 255^2
  localparam int WMSE_W = ACC_W - SHIFT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  hd_pkg::pix_t        img1,
  input  hd_pkg::pix_t        img2,
  input  hd_pkg::pix_t        ll2,
  output logic [WMSE_W-1:0]   wmse,
  output logic [WMSE_W:0]     thr,
  output logic                wmse_update
);
  import hd_pkg::*;

  localparam int CW     = $clog2(NPIX);

  pix_t              diff;
  logic [2*PIX_W-1:0] sq;
  logic [ACC_W-1:0]  acc, acc_next;
  logic [CW-1:0]     cnt;
  logic              co_acc, co_thr;
  logic [WMSE_W:0]   thr_sum;

  bg_subtract u_sub (.fg(img1), .bg(img2), .diff(diff));
  vedic_mult8 u_sq  (.a(diff), .b(diff), .m(sq));
  cla_adder #(.W(ACC_W)) u_acc (
    .a(acc), .b(ACC_W'(sq)), .cin(1'b0), .sum(acc_next), .cout(co_acc));
  cla_adder #(.W(WMSE_W + 1)) u_thr (
    .a((WMSE_W + 1)'(wmse)), .b((WMSE_W + 1)'(ll2)), .cin(1'b0),
    .sum(thr_sum), .cout(co_thr));

  assign thr = thr_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      cnt         <= '0;
      wmse        <= '0;
      wmse_update <= 1'b0;
    end else begin
      wmse_update <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(NPIX - 1)) begin
          cnt         <= '0;
          acc         <= '0;
          wmse        <= WMSE_W'(acc_next >> SHIFT);
          wmse_update <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= acc_next;
        end
      end
    end
  end
endmodule
