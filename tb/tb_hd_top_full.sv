// tb_hd_top_full: end-to-end test of the detection pipeline at its default
// size: two 256 x 256 colour frames in, two 128 x 128 detection images out,
// input streamed without gaps.
module tb_hd_top_full;
  hd_top_check #(.FULL(1), .SRC_W(256), .SRC_H(256), .IMG_W(256), .IMG_H(256),
                 .NF(2), .GAPS(0)) u_check ();
endmodule
