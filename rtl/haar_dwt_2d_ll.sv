// haar_dwt_2d_ll: LL band of the separable 2D Haar transform, computed with a
// single 1D transform unit used twice.
//
// Row pass: the input multiplexer feeds the image into haar_dwt_1d, and the
// demultiplexer writes each L sample into the memory unit, building the
// IMG_W/2 x IMG_H row-transformed image. Column pass: the controller reads
// that image back in the order L(2i,j), L(2i+1,j) for i = 0..IMG_H/2-1,
// j = 0..IMG_W/2-1, the multiplexer now feeds memory data to the same 1D
// unit, and the demultiplexer sends its output to the LL output. The LL
// band thus leaves in raster order, (IMG_W/2) x (IMG_H/2) samples, each
// LL = ((a+b)/2 + (c+d)/2)/2 of a 2x2 block with every halving rounded down.
//
// Handshake: in_ready is high during the row pass only, so the source is
// held off while the column pass runs (IMG_W*IMG_H/2 cycles). out_valid
// marks each LL sample; the consumer must take it (there is no back
// pressure). frame_done (the counter's reset output) pulses with the last LL
// sample of a frame, and the unit returns to the row pass. col_pass shows
// which pass is running.
// The shared 1D unit, multiplexer, demultiplexer, memory unit and counter
// follow the method. Running everything from one clock with valid strobes
// (instead of a divided clock) and the column read order are this design's
// choices.
module haar_dwt_2d_ll #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  hd_pkg::pix_t in_pix,
  output logic         out_valid,
  output hd_pkg::pix_t out_pix,
  output logic         frame_done,
  output logic         col_pass
);
  import hd_pkg::*;

  localparam int HW    = IMG_W / 2;
  localparam int NPIX  = IMG_W * IMG_H;
  localparam int NL    = HW * IMG_H;          // L samples = memory depth
  localparam int NLL   = HW * (IMG_H / 2);    // LL samples
  localparam int AW    = $clog2(NL);
  localparam int PW    = $clog2(NPIX + 1);
  localparam int XW    = $clog2(HW);
  localparam int YW    = $clog2(IMG_H / 2);
  localparam int LW    = $clog2(NLL + 1);

  typedef enum logic [0:0] {ROW_PASS, COL_PASS} pass_e;
  pass_e pass;

  // Controller unit state
  logic [PW-1:0] in_cnt;      // pixels accepted in the row pass
  logic [AW-1:0] wr_addr;
  logic [XW-1:0] rd_j;        // column of the L image being read
  logic [YW-1:0] rd_i;        // LL row being read (L rows 2i and 2i+1)
  logic          rd_odd;      // 0: reading row 2i, 1: reading row 2i+1
  logic          rd_active;   // reads still to issue in this column pass
  logic [AW-1:0] rd_addr;
  logic          rd_en, rd_valid;
  logic [LW-1:0] ll_cnt;      // counter: LL samples emitted

  // 1D unit with its multiplexer and demultiplexer
  logic          d_in_valid, d_out_valid, d_src_mem, d_src_mem_q;
  pix_t          d_in_pix, d_out_pix, mem_q;

  assign in_ready  = (pass == ROW_PASS);
  assign col_pass  = (pass == COL_PASS);

  assign d_src_mem  = (pass == COL_PASS);
  assign d_in_valid = d_src_mem ? rd_valid : (in_valid && in_ready);
  assign d_in_pix   = d_src_mem ? mem_q : in_pix;

  haar_dwt_1d u_dwt (
    .clk(clk), .rst_n(rst_n), .clear(1'b0),
    .in_valid(d_in_valid), .in_pix(d_in_pix),
    .out_valid(d_out_valid), .out_pix(d_out_pix));

  // Which side of the demultiplexer the 1D unit's current output goes to:
  // the source of the samples that produced it, one clock earlier.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_src_mem_q <= 1'b0;
    else        d_src_mem_q <= d_src_mem;
  end

  dwt_memory #(.DEPTH(NL), .AW(AW)) u_mem (
    .clk(clk),
    .wr_en(d_out_valid && !d_src_mem_q), .wr_addr(wr_addr), .wr_data(d_out_pix),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(mem_q));

  // Read address of L(2i + rd_odd, j) in the row-major L image.
  assign rd_addr = AW'({rd_i, rd_odd} * HW + rd_j);
  assign rd_en   = (pass == COL_PASS) && rd_active;

  assign out_valid  = d_out_valid && d_src_mem_q;
  assign out_pix    = d_out_pix;
  assign frame_done = out_valid && (ll_cnt == LW'(NLL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass      <= ROW_PASS;
      in_cnt    <= '0;
      wr_addr   <= '0;
      rd_i      <= '0;
      rd_j      <= '0;
      rd_odd    <= 1'b0;
      rd_active <= 1'b0;
      rd_valid  <= 1'b0;
      ll_cnt    <= '0;
    end else begin
      rd_valid <= rd_en;
      if (d_out_valid && !d_src_mem_q)
        wr_addr <= (wr_addr == AW'(NL - 1)) ? '0 : wr_addr + 1'b1;

      unique case (pass)
        ROW_PASS: begin
          if (in_valid && in_ready) begin
            if (in_cnt == PW'(NPIX - 1)) begin
              in_cnt    <= '0;
              pass      <= COL_PASS;
              rd_active <= 1'b1;
            end else begin
              in_cnt <= in_cnt + 1'b1;
            end
          end
        end
        COL_PASS: begin
          if (rd_en) begin
            rd_odd <= !rd_odd;
            if (rd_odd) begin
              if (rd_j == XW'(HW - 1)) begin
                rd_j <= '0;
                if (rd_i == YW'(IMG_H / 2 - 1)) begin
                  rd_i      <= '0;
                  rd_active <= 1'b0;
                end else begin
                  rd_i <= rd_i + 1'b1;
                end
              end else begin
                rd_j <= rd_j + 1'b1;
              end
            end
          end
          if (out_valid) begin
            if (ll_cnt == LW'(NLL - 1)) begin
              ll_cnt <= '0;
              pass   <= ROW_PASS;
            end else begin
              ll_cnt <= ll_cnt + 1'b1;
            end
          end
        end
        default: pass <= ROW_PASS;
      endcase
    end
  end
endmodule
