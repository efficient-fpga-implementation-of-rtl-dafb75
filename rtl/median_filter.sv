// median_filter: modified 3x3 median filter over a streamed IMG_W x IMG_H
// frame.
// The row-median-then-median structure follows the method; border
// pass-through, the flush and the handshakes are this design's choices.
//
// A window_3x3 supplies the nine pixels a0..a8 of the neighbourhood. The
// filter takes the median of each row of three (a0..a2, a3..a5, a6..a8) and
// then the median of those three row medians; this "median of medians" is
// the modification that replaces a full nine-value sort. Pixels on the
// outermost row or column of the frame have no full neighbourhood and are
// passed through unchanged (this border rule is a choice of this design).
//
// Stream timing: the centre of the window lags the newest pixel by
// IMG_W+1 samples, so after the last pixel of a frame the filter shifts
// IMG_W+2 more times on its own (flush) to emit the rest of the frame; it
// does not accept input meanwhile. Output order is raster order, one output
// per input pixel. in_valid/in_ready and out_valid/out_ready are the usual
// valid/ready handshakes (a transfer happens when both are high); the result
// sits in an output register, so a stalled consumer stops the window.
// Reset (rst_n, asynchronous, active low) restarts at the first pixel of a
// frame.
module median_filter #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  hd_pkg::pix_t in_pix,
  output logic         out_valid,
  input  logic         out_ready,
  output hd_pkg::pix_t out_pix,
  output logic         out_border   // the pixel now on out_pix was passed through
);
  import hd_pkg::*;

  localparam int NPIX  = IMG_W * IMG_H;
  localparam int LAT   = IMG_W + 1;          // centre lag in samples
  localparam int NSH   = NPIX + LAT + 1;     // shifts per frame
  localparam int CW    = $clog2(NSH + 1);
  localparam int XW    = $clog2(IMG_W);
  localparam int YW    = $clog2(IMG_H);

  logic [CW-1:0] k;          // number of shifts done in this frame
  logic [XW-1:0] cx;         // column of the next centre to emit
  logic [YW-1:0] cy;         // row of the next centre to emit
  logic          slot_free, taking_input, shift;
  pix_t          win [9];
  pix_t          med, result;
  logic          border;
  logic          emit;

  assign slot_free    = !out_valid || out_ready;
  assign taking_input = (k < CW'(NPIX));
  assign in_ready     = slot_free && taking_input;
  assign shift        = slot_free && (taking_input ? in_valid : 1'b1);

  window_3x3 #(.IMG_W(IMG_W)) u_win (
    .clk  (clk),
    .shift(shift),
    .pix  (taking_input ? in_pix : '0),
    .win  (win)
  );

  always_comb begin
    med    = med3(med3(win[0], win[1], win[2]),
                  med3(win[3], win[4], win[5]),
                  med3(win[6], win[7], win[8]));
    border = (cx == '0) || (cx == XW'(IMG_W-1)) || (cy == '0) || (cy == YW'(IMG_H-1));
    result = border ? win[4] : med;
  end

  // After k shifts the window centre holds sample k-LAT-1. The filter
  // captures the centre's result on the next shift, so the shifts made with
  // k = LAT+1 .. NPIX+LAT emit the NPIX outputs of a frame; the last LAT+1
  // shifts of a frame take no input (flush).
  assign emit = shift && (k >= CW'(LAT + 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k          <= '0;
      cx         <= '0;
      cy         <= '0;
      out_valid  <= 1'b0;
      out_pix    <= '0;
      out_border <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (shift) begin
        k <= (k == CW'(NSH - 1)) ? '0 : k + 1'b1;
      end
      if (emit) begin
        out_valid  <= 1'b1;
        out_pix    <= result;
        out_border <= border;
        if (cx == XW'(IMG_W-1)) begin
          cx <= '0;
          cy <= (cy == YW'(IMG_H-1)) ? '0 : cy + 1'b1;
        end else begin
          cx <= cx + 1'b1;
        end
      end
    end
  end

endmodule
