// hd_controller: frame sequencing of the detection pipeline.
//
// Counts the colour pixels accepted at the pipeline input and the detection
// pixels leaving it. From the input count it marks the last input pixel of
// a frame (in_last); from the output count it gives the column and row of
// the current detection pixel, marks the last pixel of a detection frame
// (out_last) and counts completed frames. `busy` is high from the first
// input pixel of a frame until its last detection pixel has left, i.e.
// while a frame is inside the pipeline.
//
// Interface: in_fire and out_fire are transfer strobes; everything else is
// derived from them. in_last, out_x, out_y and out_last are valid in the
// same cycle as the strobe they refer to.
// The method names a controller without describing it; these counters are
// this design's reading of what it has to do.
module hd_controller #(
  parameter int IN_PIX = 256 * 256,   // colour pixels per input frame
  parameter int OUT_W  = 128,         // detection image width
  parameter int OUT_H  = 128,         // detection image height
  localparam int XW = $clog2(OUT_W),
  localparam int YW = $clog2(OUT_H)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_fire,
  input  logic                out_fire,
  output logic                in_last,
  output logic [XW-1:0]       out_x,
  output logic [YW-1:0]       out_y,
  output logic                out_last,
  output logic [15:0]         frame_count,
  output logic                busy
);
  localparam int IW = $clog2(IN_PIX + 1);

  logic [IW-1:0] in_cnt;
  logic [7:0]    in_flight;       // frames entered and not yet finished
  logic          in_done, out_done;

  assign in_last  = in_fire && (in_cnt == IW'(IN_PIX - 1));
  assign out_last = out_fire && (out_x == XW'(OUT_W - 1)) && (out_y == YW'(OUT_H - 1));
  assign in_done  = in_last;
  assign out_done = out_last;
  assign busy     = (in_flight != '0) || (in_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt      <= '0;
      out_x       <= '0;
      out_y       <= '0;
      frame_count <= '0;
      in_flight   <= '0;
    end else begin
      if (in_fire) in_cnt <= in_last ? '0 : in_cnt + 1'b1;
      if (out_fire) begin
        if (out_x == XW'(OUT_W - 1)) begin
          out_x <= '0;
          out_y <= (out_y == YW'(OUT_H - 1)) ? '0 : out_y + 1'b1;
        end else begin
          out_x <= out_x + 1'b1;
        end
      end
      if (out_done) frame_count <= frame_count + 1'b1;
      in_flight <= in_flight + 8'(in_done) - 8'(out_done);
    end
  end
endmodule
