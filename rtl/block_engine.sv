// block_engine: MPEG-4 texture-coding block engine (DCT, Q, DC/AC prediction,
// IQ, IDCT and reconstruction) scheduled with interleaved DCT and IDCT.
//
// One shared 1-D DCT/IDCT engine and one transpose memory run the forward
// transform of a block and the inverse transform of the same block's
// quantized coefficients at the same time, so the coding loop has no block
// buffers between its stages: coefficients leave the second DCT pass, are
// quantized, inverse quantized and enter the first IDCT pass eight cycles
// later (QIQ_LAT).  The quantizer and inverse quantizer double as the divider
// and multiplier of DC/AC prediction: during each block's first 1-D DCT the
// quantizer, idle in that slot, computes the prediction values.
//
// Per block (times from the block start, cycle 0):
//   0..63     input samples (pixels of intra blocks, prediction errors of
//             inter blocks) and their MC prediction; DC/AC phase 1 at 1..~14
//   76..139   DCT coefficients -> quantizer (77..) -> DC/AC prediction and
//             inverse quantizer (78..) -> coefficient output `vlc_*` (79..)
//   84..147   first IDCT pass input;  160..223 reconstructed error -> adder
//   161..224  reconstructed pixels `rec_*`
// Blocks start every BLK_PERIOD = 152 cycles; a macroblock of six blocks also
// spends 33 + 32 cycles moving predictor data to and from external memory.
// Interfaces: `mb_start`/`mb_in` while `mb_ready`; `in_req` asks for input
// sample `in_idx` of block `in_blk` in the same cycle (`in_data`, `in_mc`);
// `vlc_*` gives predicted quantized levels column by column (u fastest);
// `ext_*` is the external prediction memory (32 words per macroblock column,
// read latency 1).
module block_engine
  import be_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // macroblock control
  input  logic                 mb_start,
  input  mb_param_t            mb_in,
  output logic                 mb_ready,
  output logic                 mb_done,
  // block input (point A of the coder)
  output logic                 in_req,
  output logic [5:0]           in_idx,
  output blk_e                 in_blk,
  input  logic signed [CW-1:0] in_data,
  input  logic [7:0]           in_mc,
  // quantized, predicted coefficients to scan / VLC
  output logic                 vlc_valid,
  output logic signed [CW-1:0] vlc_level,
  output logic [2:0]           vlc_u,
  output logic [2:0]           vlc_v,
  output blk_e                 vlc_blk,
  output logic                 vlc_vert,
  // reconstructed pixels (point B of the coder) to frame memory
  output logic                 rec_valid,
  output logic [5:0]           rec_idx,
  output blk_e                 rec_blk,
  output logic [7:0]           rec_data,
  // external prediction memory
  output logic                 ext_rd_en,
  output logic [10:0]          ext_addr,
  input  logic signed [PW-1:0] ext_rd_data,
  output logic                 ext_wr_en,
  output logic signed [PW-1:0] ext_wr_data
);

  mb_param_t  mb;
  logic [2:0] ph;
  logic       dma_load, dma_store, dma_done, blk_start;
  blk_e       start_blk, cur_blk;

  be_controller u_ctrl (
    .clk, .rst_n, .mb_start, .mb_in, .mb_ready, .mb_done, .mb, .ph,
    .dma_load, .dma_store, .dma_done, .blk_start, .start_blk, .cur_blk, .in_req, .in_idx
  );
  assign in_blk = blk_start ? start_blk : cur_blk;

  // ---------------- DCT / IDCT ----------------
  logic                 coef_valid, res_valid, idct_start, idct_in_valid;
  logic signed [CW-1:0] coef_data, res_data, idct_in_data;
  logic [2:0]           coef_u, coef_v;
  logic [5:0]           res_idx;

  dct_idct_unit u_dct (
    .clk, .rst_n, .ph,
    .dct_start(blk_start), .dct_in_valid(in_req), .dct_in_data(in_data),
    .coef_valid, .coef_data, .coef_u, .coef_v,
    .idct_start, .idct_in_valid, .idct_in_data,
    .res_valid, .res_data, .res_idx
  );

  // ---------------- quantizer, shared with DC/AC prediction ----------------
  logic                 dq_valid, q_out_valid;
  logic signed [CW-1:0] dq_a, q_out_level;
  logic [5:0]           dq_div;
  logic [7:0]           dq_tag, q_out_tag;
  logic                 q_in_valid;
  q_op_e                q_in_op;
  logic signed [CW-1:0] q_in_a;
  logic [5:0]           q_in_div;
  logic [7:0]           q_in_tag;
  logic                 chroma;

  assign chroma = (cur_blk == BLK_CB) || (cur_blk == BLK_CR);

  always_comb begin
    if (dq_valid) begin
      q_in_valid = 1'b1;
      q_in_op    = Q_DIVR;
      q_in_a     = dq_a;
      q_in_div   = dq_div;
      q_in_tag   = dq_tag;
    end else begin
      q_in_valid = coef_valid;
      q_in_a     = coef_data;
      q_in_div   = chroma ? mb.dc_scaler_c : mb.dc_scaler_y;
      q_in_tag   = {2'b00, coef_v, coef_u};
      if (!mb.intra)                      q_in_op = Q_INTER;
      else if (coef_u == 0 && coef_v == 0) q_in_op = Q_DIVR;
      else                                q_in_op = Q_INTRA_AC;
    end
  end

  quantizer #(.TAGW(8)) u_q (
    .clk, .rst_n, .in_valid(q_in_valid), .in_op(q_in_op), .in_a(q_in_a), .in_div(q_in_div),
    .in_qp(mb.qp), .in_tag(q_in_tag), .out_valid(q_out_valid), .out_level(q_out_level),
    .out_tag(q_out_tag)
  );

  logic qc_valid;
  assign qc_valid = q_out_valid && !q_out_tag[7];

  // ---------------- inverse quantizer ----------------
  logic                 iq_valid;
  logic signed [CW-1:0] iq_rec;
  logic signed [PW-1:0] iq_pqp;
  logic [7:0]           iq_tag;

  inv_quantizer #(.TAGW(8)) u_iq (
    .clk, .rst_n, .in_valid(qc_valid), .in_level(q_out_level),
    .in_intra_dc(mb.intra && q_out_tag[5:0] == 6'd0), .in_qp(mb.qp),
    .in_dc_scaler(chroma ? mb.dc_scaler_c : mb.dc_scaler_y), .in_tag(q_out_tag),
    .out_valid(iq_valid), .out_rec(iq_rec), .out_pqp(iq_pqp), .out_tag(iq_tag)
  );

  // ---------------- DC/AC prediction ----------------
  dcac_pred u_dcac (
    .clk, .rst_n, .mb,
    .dma_load, .dma_store, .dma_done, .ext_rd_en, .ext_addr, .ext_rd_data, .ext_wr_en, .ext_wr_data,
    .prep_start(blk_start), .prep_blk(start_blk), .prep_busy(),
    .q_req_valid(dq_valid), .q_req_a(dq_a), .q_req_div(dq_div), .q_req_tag(dq_tag),
    .q_res_valid(q_out_valid), .q_res_level(q_out_level), .q_res_tag(q_out_tag),
    .qc_valid, .qc_level(q_out_level), .qc_u(q_out_tag[2:0]), .qc_v(q_out_tag[5:3]),
    .vlc_valid, .vlc_level, .vlc_u, .vlc_v, .pred_vert(vlc_vert),
    .iq_valid, .iq_rec, .iq_pqp, .iq_u(iq_tag[2:0]), .iq_v(iq_tag[5:3])
  );
  assign vlc_blk = cur_blk;

  // ---------------- pad the loop to QIQ_LAT and feed the IDCT ----------------
  localparam int PAD = QIQ_LAT - 2;
  logic                 pad_v [PAD];
  logic signed [CW-1:0] pad_d [PAD];
  logic                 pad_f [PAD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < PAD; k++) begin pad_v[k] <= 1'b0; pad_f[k] <= 1'b0; pad_d[k] <= '0; end
    end else begin
      pad_v[0] <= iq_valid;
      pad_d[0] <= iq_rec;
      pad_f[0] <= iq_valid && iq_tag[5:0] == 6'd0;
      for (int k = 1; k < PAD; k++) begin
        pad_v[k] <= pad_v[k-1]; pad_d[k] <= pad_d[k-1]; pad_f[k] <= pad_f[k-1];
      end
    end
  end
  assign idct_in_valid = pad_v[PAD-1];
  assign idct_in_data  = pad_d[PAD-1];
  assign idct_start    = pad_f[PAD-1];

  // ---------------- reconstruction ----------------
  mc_pingpong_buf u_mc (
    .clk, .rst_n, .wr_valid(in_req), .wr_idx(in_idx), .wr_intra(mb.intra), .wr_pred(in_mc),
    .res_valid, .res_idx, .res_data, .rec_valid, .rec_idx, .rec_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rec_blk <= BLK_Y1;
    else if (rec_valid && rec_idx == 6'd63) rec_blk <= (rec_blk == BLK_CR) ? BLK_Y1 : blk_e'(rec_blk + 3'd1);
  end

  a_q_shared: assert property (@(posedge clk) disable iff (!rst_n) !(dq_valid && coef_valid));

endmodule
