// thresholding: removes the residue of background subtraction.
//
// A magnitude comparator keeps a pixel whose value is above the adaptive
// threshold and replaces every other pixel by 0:
//   out = (pix > thr) ? pix : 0.
// The threshold is one bit wider than the WMSE it is built from, so it can
// exceed the pixel range (then every pixel is cleared). Combinational.
// Keeping the pixel or writing 0 follows the method; the strict "greater
// than" test is this design's choice.
module thresholding #(
  parameter int THR_W = 14
) (
  input  hd_pkg::pix_t     pix,
  input  logic [THR_W-1:0] thr,
  output hd_pkg::pix_t     out,
  output logic             kept
);
  assign kept = (THR_W'(pix) > thr);
  assign out  = kept ? pix : '0;
endmodule
