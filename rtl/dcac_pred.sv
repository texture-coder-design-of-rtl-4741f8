// dcac_pred: adaptive DC/AC prediction of intra blocks, built around the
// quantizer and inverse quantizer it shares with the coding loop, plus the
// DMA sequencer that swaps prediction data with external memory.
//
// Neighbours of block X: A to the left, B above-left, C above.
//   QDC_n = DC_n // dc_scaler                  (done by the quantizer)
//   if |QDC_A - QDC_B| < |QDC_B - QDC_C| predict from C (vertical)
//   else                                 predict from A (horizontal)
//   AC predictors: (QAC x QP_pred) // QP_X     (numerator stored by IQ,
//                                               division by the quantizer)
// Phase 1 (`prep_start`, while the block's first 1-D DCT runs and the
// quantizer is idle): the DCs of A, B and C are sent to the quantizer with
// divisor dc_scaler (3 cycles), the direction is chosen, then the 7 AC
// candidates of the chosen neighbour are sent with divisor QP (7 cycles); the
// returned values form pred[0..7].  Quantizer requests carry tag bit 7 set.
// Phase 2 (coefficients streaming, column by column): each quantized level
// leaves on the `vlc_*` port minus its predictor (DC always; first row for
// vertical or first column for horizontal prediction when AC prediction is
// on), one cycle later.  The inverse quantizer's outputs for the first row and
// first column (rec DC, level x QP) are written into the local buffer as this
// block's own predictor data, replacing what later blocks no longer need.
// Blocks of inter macroblocks store DC 1024 and AC 0, the values used for a
// neighbour that may not be used, as do neighbours outside the picture
// (`left_avail`, `top_avail`, `topleft_avail`).
// DMA: `dma_load` copies 32 words (the above bank) from external address
// mb_x*32, `dma_store` writes them back; `dma_done` pulses at the end.  The
// external memory read has one cycle of latency.  B of Y1, Cb and Cr (the
// above-left macroblock) is kept in registers from the previous load, B of Y2
// and Y3 is saved at load time, and B of Y4 is Y1's DC.
// Some output bits are fixed by design.  Bits 6:4 of `q_req_tag` are always
// 0 and bit 7 is always 1; the tag keeps the 8-bit width of the coefficient
// tags it shares the quantizer with.  The upper 6 bits of `ext_addr` are
// `mb.mb_x`, passed through.
module dcac_pred
  import be_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  mb_param_t            mb,
  // DMA to the external prediction memory
  input  logic                 dma_load,
  input  logic                 dma_store,
  output logic                 dma_done,
  output logic                 ext_rd_en,
  output logic [10:0]          ext_addr,
  input  logic signed [PW-1:0] ext_rd_data,
  output logic                 ext_wr_en,
  output logic signed [PW-1:0] ext_wr_data,
  // phase 1
  input  logic                 prep_start,
  input  blk_e                 prep_blk,
  output logic                 prep_busy,
  output logic                 q_req_valid,
  output logic signed [CW-1:0] q_req_a,
  output logic [5:0]           q_req_div,
  output logic [7:0]           q_req_tag,
  input  logic                 q_res_valid,
  input  logic signed [CW-1:0] q_res_level,
  input  logic [7:0]           q_res_tag,
  // phase 2: quantized levels in, predicted levels out
  input  logic                 qc_valid,
  input  logic signed [CW-1:0] qc_level,
  input  logic [2:0]           qc_u,
  input  logic [2:0]           qc_v,
  output logic                 vlc_valid,
  output logic signed [CW-1:0] vlc_level,
  output logic [2:0]           vlc_u,
  output logic [2:0]           vlc_v,
  output logic                 pred_vert,
  // phase 2: inverse quantizer results in
  input  logic                 iq_valid,
  input  logic signed [CW-1:0] iq_rec,
  input  logic signed [PW-1:0] iq_pqp,
  input  logic [2:0]           iq_u,
  input  logic [2:0]           iq_v
);

  localparam logic signed [PW-1:0] DC_NA = PW'(1024);

  // ---------------- local buffer ----------------
  logic [4:0]           ab_raddr, ab_waddr, lb_raddr, lb_waddr;
  logic signed [PW-1:0] ab_rdata, ab_wdata, lb_rdata, lb_wdata;
  logic                 ab_we, lb_we;

  pred_local_buf u_buf (.clk, .ab_raddr, .ab_rdata, .ab_we, .ab_waddr, .ab_wdata,
                        .lb_raddr, .lb_rdata, .lb_we, .lb_waddr, .lb_wdata);

  // ---------------- block geometry ----------------
  blk_e       blk;
  logic [1:0] aslot, lslot;
  logic       a_ok, b_ok, c_ok, chroma;
  logic signed [PW-1:0] b_dc;
  logic signed [PW-1:0] corner [3];
  logic signed [PW-1:0] cnext  [3];
  logic signed [PW-1:0] bsave_y2, bsave_y3, bsave_y4, l0dc;

  always_comb begin
    chroma = (blk == BLK_CB) || (blk == BLK_CR);
    unique case (blk)
      BLK_Y1: begin aslot = 2'd0; lslot = 2'd0; a_ok = mb.left_avail; c_ok = mb.top_avail;
                    b_ok = mb.topleft_avail; b_dc = corner[0]; end
      BLK_Y2: begin aslot = 2'd1; lslot = 2'd0; a_ok = 1'b1;          c_ok = mb.top_avail;
                    b_ok = mb.top_avail;     b_dc = bsave_y2;  end
      BLK_Y3: begin aslot = 2'd0; lslot = 2'd1; a_ok = mb.left_avail; c_ok = 1'b1;
                    b_ok = mb.left_avail;    b_dc = bsave_y3;  end
      BLK_Y4: begin aslot = 2'd1; lslot = 2'd1; a_ok = 1'b1;          c_ok = 1'b1;
                    b_ok = 1'b1;             b_dc = bsave_y4;  end
      BLK_CB: begin aslot = 2'd2; lslot = 2'd2; a_ok = mb.left_avail; c_ok = mb.top_avail;
                    b_ok = mb.topleft_avail; b_dc = corner[1]; end
      default: begin aslot = 2'd3; lslot = 2'd3; a_ok = mb.left_avail; c_ok = mb.top_avail;
                    b_ok = mb.topleft_avail; b_dc = corner[2]; end
    endcase
  end

  // ---------------- DMA sequencer ----------------
  typedef enum logic [1:0] {D_IDLE, D_LOAD, D_STORE} dma_st_e;
  dma_st_e    dst;
  logic [5:0] dcnt;           // load: 0..32 (one extra cycle for the read latency)
  logic       ld_wv;          // a loaded word arrives this cycle
  logic [4:0] ld_wa;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst <= D_IDLE; dcnt <= '0; ld_wv <= 1'b0; ld_wa <= '0; dma_done <= 1'b0;
    end else begin
      dma_done <= 1'b0;
      ld_wv    <= (dst == D_LOAD) && (dcnt < 6'd32);
      ld_wa    <= dcnt[4:0];
      unique case (dst)
        D_IDLE: begin
          dcnt <= '0;
          if (dma_load)       dst <= D_LOAD;
          else if (dma_store) dst <= D_STORE;
        end
        D_LOAD: begin
          dcnt <= dcnt + 6'd1;
          if (dcnt == 6'd32) begin dst <= D_IDLE; dma_done <= 1'b1; end
        end
        default: begin
          dcnt <= dcnt + 6'd1;
          if (dcnt == 6'd31) begin dst <= D_IDLE; dma_done <= 1'b1; end
        end
      endcase
    end
  end

  assign ext_rd_en   = (dst == D_LOAD) && (dcnt < 6'd32);
  assign ext_wr_en   = (dst == D_STORE);
  assign ext_addr    = {mb.mb_x, dcnt[4:0]};
  assign ext_wr_data = ab_rdata;

  // ---------------- phase 1 sequencer ----------------
  typedef enum logic [1:0] {P_IDLE, P_DC, P_WAIT, P_AC} prep_st_e;
  prep_st_e   pst;
  logic [3:0] pcnt;
  logic signed [CW-1:0] qdc [3];
  logic signed [CW-1:0] pred [8];
  logic       vert;
  logic [1:0] ndc;

  logic signed [CW-1:0] dA, dB, dC;
  logic [CW:0] gAB, gBC;
  assign dA = qdc[0]; assign dB = qdc[1]; assign dC = qdc[2];
  always_comb begin
    gAB = (CW+1)'(dA) - (CW+1)'(dB);  if (gAB[CW]) gAB = -gAB;
    gBC = (CW+1)'(dB) - (CW+1)'(dC);  if (gBC[CW]) gBC = -gBC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst <= P_IDLE; pcnt <= '0; vert <= 1'b0; ndc <= '0; blk <= BLK_Y1;
    end else begin
      if (q_res_valid && q_res_tag[7]) begin
        if (q_res_tag[3] == 1'b0) qdc[q_res_tag[1:0]] <= q_res_level;
        else                      pred[q_res_tag[2:0]] <= q_res_level;
        if (q_res_tag[3] == 1'b0) ndc <= ndc + 2'd1;
      end
      unique case (pst)
        P_IDLE: if (prep_start) begin
          blk  <= prep_blk;
          pcnt <= '0;
          ndc  <= '0;
          if (mb.intra) pst <= P_DC;
          else          vert <= 1'b0;
        end
        P_DC: begin
          pcnt <= pcnt + 4'd1;
          if (pcnt == 4'd2) pst <= P_WAIT;
        end
        P_WAIT: if (ndc == 2'd3) begin
          vert    <= (gAB < gBC);
          pred[0] <= (gAB < gBC) ? dC : dA;
          pcnt    <= 4'd1;
          pst     <= P_AC;
        end
        default: begin
          pcnt <= pcnt + 4'd1;
          if (pcnt == 4'd7) pst <= P_IDLE;
        end
      endcase
    end
  end

  assign prep_busy = (pst != P_IDLE);

  // quantizer requests and buffer read addresses
  always_comb begin
    q_req_valid = 1'b0;
    q_req_a     = '0;
    q_req_div   = chroma ? mb.dc_scaler_c : mb.dc_scaler_y;
    q_req_tag   = 8'h80;
    lb_raddr    = {lslot, 3'd0};
    ab_raddr    = (dst == D_STORE) ? dcnt[4:0] : {aslot, 3'd0};
    if (pst == P_DC) begin
      q_req_valid = 1'b1;
      q_req_tag   = {6'b100000, pcnt[1:0]};
      unique case (pcnt[1:0])
        2'd0:    q_req_a = a_ok ? CW'(lb_rdata) : CW'(DC_NA);
        2'd1:    q_req_a = b_ok ? CW'(b_dc)     : CW'(DC_NA);
        default: q_req_a = c_ok ? CW'(ab_rdata) : CW'(DC_NA);
      endcase
    end else if (pst == P_AC) begin
      q_req_valid = 1'b1;
      q_req_tag   = {5'b10001, pcnt[2:0]};
      q_req_div   = {1'b0, mb.qp};
      lb_raddr    = {lslot, pcnt[2:0]};
      ab_raddr    = {aslot, pcnt[2:0]};
      if (vert) q_req_a = c_ok ? CW'(ab_rdata) : '0;
      else      q_req_a = a_ok ? CW'(lb_rdata) : '0;
    end
  end

  // ---------------- phase 2: prediction of the coded levels ----------------
  logic use_pred;
  logic [2:0] pidx;
  always_comb begin
    use_pred = 1'b0;
    pidx     = 3'd0;
    if (mb.intra) begin
      if (qc_u == 0 && qc_v == 0) use_pred = 1'b1;
      else if (mb.ac_pred && vert && qc_u == 0)  begin use_pred = 1'b1; pidx = qc_v; end
      else if (mb.ac_pred && !vert && qc_v == 0) begin use_pred = 1'b1; pidx = qc_u; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vlc_valid <= 1'b0; vlc_level <= '0; vlc_u <= '0; vlc_v <= '0;
    end else begin
      vlc_valid <= qc_valid;
      vlc_u     <= qc_u;
      vlc_v     <= qc_v;
      vlc_level <= use_pred ? CW'(sat(int'(qc_level) - int'(pred[pidx]), CW)) : qc_level;
    end
  end
  assign pred_vert = vert;

  // ---------------- phase 2: store this block's predictor data ----------------
  logic signed [PW-1:0] own;
  assign own = (iq_u == 0 && iq_v == 0) ? (mb.intra ? PW'(iq_rec) : DC_NA)
                                        : (mb.intra ? iq_pqp : '0);

  always_comb begin
    ab_we    = 1'b0; ab_waddr = {aslot, iq_v}; ab_wdata = own;
    lb_we    = 1'b0; lb_waddr = {lslot, iq_u}; lb_wdata = own;
    if (ld_wv) begin
      ab_we = 1'b1; ab_waddr = ld_wa; ab_wdata = ext_rd_data;
    end else if (iq_valid && iq_u == 0) begin
      ab_we = 1'b1;
    end
    if (iq_valid && iq_v == 0) lb_we = 1'b1;
  end

  // saved DCs for the B neighbour
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin corner[i] <= DC_NA; cnext[i] <= DC_NA; end
      bsave_y2 <= DC_NA; bsave_y3 <= DC_NA; bsave_y4 <= DC_NA; l0dc <= DC_NA;
    end else begin
      if (dma_load && dst == D_IDLE) begin
        corner   <= cnext;
        bsave_y3 <= l0dc;
      end
      if (ld_wv && ld_wa == 5'd0)  bsave_y2 <= ext_rd_data;
      if (ld_wv && ld_wa == 5'd8)  cnext[0] <= ext_rd_data;
      if (ld_wv && ld_wa == 5'd16) cnext[1] <= ext_rd_data;
      if (ld_wv && ld_wa == 5'd24) cnext[2] <= ext_rd_data;
      if (lb_we && lb_waddr == 5'd0) l0dc <= lb_wdata;
      if (iq_valid && iq_u == 0 && iq_v == 0 && blk == BLK_Y1) bsave_y4 <= own;
    end
  end

  a_no_dma_clash: assert property (@(posedge clk) disable iff (!rst_n) !(ld_wv && iq_valid));

endmodule
