// mc_pingpong_buf: two block buffers of motion-compensated prediction, used in
// ping-pong, and the reconstruction adder at the output of the coding loop.
//
// The MC prediction of a block is written while the block's prediction error
// enters the block engine; it is read back when the engine's IDCT delivers the
// reconstructed error for that block, and the two are added and clipped to
// 0..255.  With the interleaved schedule the reconstruction of a block ends
// before the block after next begins, so two buffers are enough.  Intra
// blocks carry no prediction (stored as 0), so their output is the clipped
// IDCT output.  Both sides walk the buffers in raster order; the write bank
// flips after each 64th write and the read bank after each 64th read.
// Timing: reconstructed pixels leave one cycle after the IDCT output.
module mc_pingpong_buf
  import be_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_valid,
  input  logic [5:0]           wr_idx,
  input  logic                 wr_intra,
  input  logic [7:0]           wr_pred,
  input  logic                 res_valid,
  input  logic [5:0]           res_idx,
  input  logic signed [CW-1:0] res_data,
  output logic                 rec_valid,
  output logic [5:0]           rec_idx,
  output logic [7:0]           rec_data
);

  logic [7:0] buf_q [2][64];
  logic       wbank, rbank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      rbank <= 1'b0;
    end else begin
      if (wr_valid && wr_idx == 6'd63)   wbank <= ~wbank;
      if (res_valid && res_idx == 6'd63) rbank <= ~rbank;
    end
  end

  always_ff @(posedge clk)
    if (wr_valid) buf_q[wbank][wr_idx] <= wr_intra ? 8'd0 : wr_pred;

  logic signed [CW:0] sum;
  assign sum = (CW+1)'(res_data) + (CW+1)'(signed'({1'b0, buf_q[rbank][res_idx]}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_valid <= 1'b0; rec_idx <= '0; rec_data <= '0;
    end else begin
      rec_valid <= res_valid;
      rec_idx   <= res_idx;
      if (sum < 0)                     rec_data <= 8'd0;
      else if (sum > (CW+1)'(255))     rec_data <= 8'd255;
      else                             rec_data <= sum[7:0];
    end
  end

endmodule
