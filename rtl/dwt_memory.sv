// dwt_memory: the memory unit of the 2D Haar transform, a simple dual-port
// RAM that holds the row-transformed (L band) image between the row pass
// and the column pass.
//
// One write port and one read port, both synchronous to clk; the read data
// appears one clock after rd_en (registered read), which maps onto FPGA
// block RAM. No reset: every location is written before it is read.
module dwt_memory #(
  parameter int DEPTH = 32768,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  hd_pkg::pix_t  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output hd_pkg::pix_t  rd_data
);
  import hd_pkg::*;

  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
