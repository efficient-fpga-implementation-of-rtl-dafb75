// preprocess: turns a colour frame into the grey, fixed-size frame the rest
// of the pipeline works on.
//
// Grey conversion uses the ITU-R BT.601 luma weights in 8-bit fixed point,
//   Y = (77 R + 150 G + 29 B) >> 8,
// (the weights sum to 256, so white stays 255). The resize to DST_W x DST_H
// is nearest-neighbour decimation of a SRC_W x SRC_H frame (SRC >= DST in
// each direction): column x is kept when floor((x+1)*DST_W/SRC_W) exceeds
// floor(x*DST_W/SRC_W), found with a running remainder instead of a
// divider, and rows likewise. With SRC equal to DST every pixel is kept.
//
// Interface: valid/ready on both sides; the kept grey pixel sits in an
// output register (one clock latency). Dropped pixels are consumed without
// output. Frames arrive in raster order, back to back.
// The method only asks for grey conversion and a resize to 256 x 256; the
// weights and the resize rule are this design's choices.
module preprocess #(
  parameter int SRC_W = 256,
  parameter int SRC_H = 256,
  parameter int DST_W = 256,
  parameter int DST_H = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  hd_pkg::rgb_t in_rgb,
  output logic         out_valid,
  input  logic         out_ready,
  output hd_pkg::pix_t out_pix,
  output logic         dropped      // pulses for each pixel the resize drops
);
  import hd_pkg::*;

  localparam int XW = $clog2(SRC_W);
  localparam int YW = $clog2(SRC_H);
  localparam int RW = $clog2(SRC_W > SRC_H ? SRC_W : SRC_H) + 2;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [RW-1:0] rx, ry;        // (x*DST_W) mod SRC_W, (y*DST_H) mod SRC_H
  logic          keep_x, keep_y, take;
  logic [17:0]   luma;

  assign keep_x   = (rx + RW'(DST_W)) >= RW'(SRC_W);
  assign keep_y   = (ry + RW'(DST_H)) >= RW'(SRC_H);
  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;
  assign luma     = 18'(77) * in_rgb.r + 18'(150) * in_rgb.g + 18'(29) * in_rgb.b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      rx        <= '0;
      ry        <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      dropped   <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (keep_x && keep_y) begin
          out_valid <= 1'b1;
          out_pix   <= luma[15:8];
        end else begin
          dropped <= 1'b1;
        end
        if (x == XW'(SRC_W - 1)) begin
          x  <= '0;
          rx <= '0;
          if (y == YW'(SRC_H - 1)) begin
            y  <= '0;
            ry <= '0;
          end else begin
            y  <= y + 1'b1;
            ry <= keep_y ? ry + RW'(DST_H) - RW'(SRC_H) : ry + RW'(DST_H);
          end
        end else begin
          x  <= x + 1'b1;
          rx <= keep_x ? rx + RW'(DST_W) - RW'(SRC_W) : rx + RW'(DST_W);
        end
      end
    end
  end
endmodule
