// be_controller: macroblock and block sequencer of the block engine.
//
// For each macroblock (`mb_start` while `mb_ready`) it latches the coding
// parameters, has the prediction DMA load the above-row predictor data, then
// starts the six blocks Y1, Y2, Y3, Y4, Cb, Cr.  A block start (`blk_start`, block `start_blk`)
// begins the block's first 1-D DCT and, at the same time, phase 1 of DC/AC
// prediction; `in_req` then asks for the block's 64 input samples, one per
// cycle, with `in_idx` their raster index.  Block starts are BLK_PERIOD = 152
// cycles apart and fall on phase 0 of the engine's 8-cycle frame `ph`, which
// this controller owns.  After the last block's quantized levels have passed
// the inverse quantizer the predictor data are stored back and `mb_done`
// pulses; the IDCT of that block then still runs, overlapping the next
// macroblock's start.  `cur_blk` names the block whose coefficients are in
// the quantizer loop (the one started last).
module be_controller
  import be_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mb_start,
  input  mb_param_t  mb_in,
  output logic       mb_ready,
  output logic       mb_done,
  output mb_param_t  mb,
  output logic [2:0] ph,
  output logic       dma_load,
  output logic       dma_store,
  input  logic       dma_done,
  output logic       blk_start,
  output blk_e       start_blk,
  output blk_e       cur_blk,
  output logic       in_req,
  output logic [5:0] in_idx
);

  localparam int TAIL = 64 + L1D + 64 + 4;   // last block start to its last IQ output, plus margin

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_BLK, S_TAIL, S_STORE} st_e;
  st_e        st;
  logic [7:0] since;          // cycles since the last block start (saturating)
  logic [6:0] icnt;
  logic [2:0] nblk;           // index of the next block to start

  assign blk_start = (st == S_BLK) && (ph == 3'd0) && (since >= 8'(BLK_PERIOD));
  assign mb_ready  = (st == S_IDLE);
  assign start_blk = blk_e'(nblk);
  assign in_req    = (icnt != 0) || blk_start;
  assign in_idx    = blk_start ? 6'd0 : icnt[5:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; since <= 8'hff; nblk <= '0; icnt <= '0; ph <= '0; cur_blk <= BLK_Y1;
      mb <= '0; mb_done <= 1'b0; dma_load <= 1'b0; dma_store <= 1'b0;
    end else begin
      ph        <= ph + 3'd1;
      mb_done   <= 1'b0;
      dma_load  <= 1'b0;
      dma_store <= 1'b0;
      if (since != 8'hff) since <= since + 8'd1;
      if (blk_start)            icnt <= 7'd1;
      else if (icnt == 7'd63)   icnt <= '0;
      else if (icnt != 0)       icnt <= icnt + 7'd1;

      unique case (st)
        S_IDLE: if (mb_start) begin
          mb       <= mb_in;
          dma_load <= 1'b1;
          st       <= S_LOAD;
        end
        S_LOAD: if (dma_done) begin
          st   <= S_BLK;
          nblk <= 3'd0;
        end
        S_BLK: if (blk_start) begin
          since   <= 8'd1;
          cur_blk <= start_blk;
          nblk    <= nblk + 3'd1;
          if (nblk == 3'd5) st <= S_TAIL;
        end
        S_TAIL: if (since == 8'(TAIL)) begin
          dma_store <= 1'b1;
          st        <= S_STORE;
        end
        default: if (dma_done) begin   // S_STORE
          mb_done <= 1'b1;
          st      <= S_IDLE;
        end
      endcase
    end
  end

endmodule
