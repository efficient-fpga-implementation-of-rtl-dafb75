// window_3x3: 3x3 overlapping window generator for a raster-scanned image.
//
// Three taps per image row, two rows of line delay: the newest pixel enters
// the flip-flop that drives a0, then a1 and a2; a shift register of IMG_W-3
// stages links a2 to a3, so a3 is a0 delayed by exactly one image row, and
// likewise a6 is a3 delayed by one row. After a shift that brings in sample k
// (raster index), the taps hold
//   a0=k      a1=k-1      a2=k-2       (newest row)
//   a3=k-W    a4=k-W-1    a5=k-W-2     (middle row, a4 is the window centre)
//   a6=k-2W   a7=k-2W-1   a8=k-2W-2    (oldest row)
// The window therefore wraps around at row ends; the consumer decides what
// to do at image borders.
//
// Interface: `shift` advances every register by one sample; win[i] is tap ai.
// The taps are plain data registers without reset.
// The tap structure follows the method's moving-window architecture; the
// shift enable, which lets the pipeline stall, is this design's addition.
module window_3x3 #(
  parameter int IMG_W = 256
) (
  input  logic          clk,
  input  logic          shift,
  input  hd_pkg::pix_t  pix,
  output hd_pkg::pix_t  win [9]
);
  import hd_pkg::*;

  localparam int SR = IMG_W - 3;   // shift-register stages between rows

  pix_t tap [9];
  pix_t sr1 [SR];
  pix_t sr2 [SR];

  always_ff @(posedge clk) begin
    if (shift) begin
      tap[0] <= pix;
      tap[1] <= tap[0];
      tap[2] <= tap[1];
      sr1[0] <= tap[2];
      for (int i = 1; i < SR; i++) sr1[i] <= sr1[i-1];
      tap[3] <= sr1[SR-1];
      tap[4] <= tap[3];
      tap[5] <= tap[4];
      sr2[0] <= tap[5];
      for (int i = 1; i < SR; i++) sr2[i] <= sr2[i-1];
      tap[6] <= sr2[SR-1];
      tap[7] <= tap[6];
      tap[8] <= tap[7];
    end
  end

  assign win = tap;
endmodule
