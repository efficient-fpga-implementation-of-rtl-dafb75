// haar_dwt_1d: one-dimensional Haar transform, low band only.
//
// A flip-flop holds the first sample of each pair; when the second sample
// arrives a carry look-ahead adder forms a + b and a one-bit right shift
// gives L = (a + b) / 2 (rounded down). One L sample leaves for every two
// samples in. The L output is registered: out_valid pulses one clock after
// the second sample of a pair. `clear` drops a half-collected pair so that
// the next sample starts a new pair.
module haar_dwt_1d (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  hd_pkg::pix_t in_pix,
  output logic         out_valid,
  output hd_pkg::pix_t out_pix
);
  import hd_pkg::*;

  pix_t first;           // held first sample of the pair
  logic have_first;
  pix_t sum;
  logic cout;

  cla_adder #(.W(PIX_W)) u_add (
    .a(first), .b(in_pix), .cin(1'b0), .sum(sum), .cout(cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first      <= '0;
      have_first <= 1'b0;
      out_valid  <= 1'b0;
      out_pix    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        have_first <= 1'b0;
      end else if (in_valid) begin
        if (!have_first) begin
          first      <= in_pix;
          have_first <= 1'b1;
        end else begin
          have_first <= 1'b0;
          out_valid  <= 1'b1;
          out_pix    <= {cout, sum[PIX_W-1:1]};   // shift right by one
        end
      end
    end
  end
endmodule
