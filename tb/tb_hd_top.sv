// tb_hd_top: end-to-end test of the detection pipeline at a reduced size:
// two 40 x 36 colour frames resized to 32 x 32 (16 x 16 detection image),
// with random gaps in the input stream.
module tb_hd_top;
  hd_top_check #(.FULL(0), .SRC_W(40), .SRC_H(36), .IMG_W(32), .IMG_H(32),
                 .NF(2), .GAPS(1)) u_check ();
endmodule
