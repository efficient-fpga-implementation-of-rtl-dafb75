// negative_transform: image negative, out = 255 - pixel (for 8-bit pixels,
// the bitwise complement). Turns the dark background left by thresholding
// white, so detected objects show dark on white. Combinational.
module negative_transform (
  input  hd_pkg::pix_t pix,
  output hd_pkg::pix_t out
);
  import hd_pkg::*;
  assign out = pix_t'((1 << PIX_W) - 1) - pix;
endmodule
