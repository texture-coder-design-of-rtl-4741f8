// tb_be_controller: runs three macroblocks through the sequencer with a
// DMA model that answers after a random delay.  Checks: the load is asked
// for before any block starts, six blocks start per macroblock in the order
// Y1..Cr, on frame phase 0, BLK_PERIOD apart (also across macroblocks),
// each followed by exactly 64 input requests with indices 0..63; the store
// comes after the last block's quantizer loop, then mb_done; parameters are
// latched at mb_start.
module tb_be_controller;
  import be_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mb_start, mb_ready, mb_done, dma_load, dma_store, dma_done, blk_start, in_req;
  mb_param_t mb_in, mb;
  logic [2:0] ph;
  blk_e start_blk, cur_blk;
  logic [5:0] in_idx;

  be_controller dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // DMA model
  int dma_wait = -1;
  bit loading = 0;
  always @(posedge clk) begin
    dma_done <= 0;
    if (dma_load || dma_store) begin dma_wait <= $urandom_range(10, 40); loading <= dma_load; end
    else if (dma_wait > 0) dma_wait <= dma_wait - 1;
    else if (dma_wait == 0) begin dma_done <= 1; dma_wait <= -1; end
  end

  int nblk = 0, last_start = -1000, nreq = 0, nload = 0, nstore = 0, ndone = 0;
  bit loaded = 0;
  task automatic fail(string s);
    failures++; $display("%s at cycle %0d", s, cyc);
  endtask
  always @(posedge clk) if (rst_n) begin
    if (dma_load) begin nload++; loaded = 1; end
    if (blk_start) begin
      checks++;
      if (!loaded) fail("block before load");
      checks++;
      if (ph != 0) fail("block start off phase 0");
      checks++;
      if (int'(start_blk) != nblk % 6) fail("block order");
      checks++;
      if (nblk > 0 && cyc - last_start < BLK_PERIOD) fail("blocks too close");
      if (nblk % 6 != 0) begin
        checks++;
        if (cyc - last_start != BLK_PERIOD) fail("block period");
      end
      checks++;
      if (nreq != 64 * nblk) fail("input request count");
      last_start = cyc; nblk++;
    end
    if (in_req) begin
      checks++;
      if (int'(in_idx) != nreq % 64) fail("input index");
      nreq++;
    end
    if (dma_store) begin
      nstore++;
      checks++;
      if (nblk != 6 * nstore || cyc - last_start < 64 + L1D + 64 + 2) fail("store too early");
      loaded = 0;
    end
    if (mb_done) begin
      ndone++;
      checks++;
      if (ndone != nstore) fail("done without store");
    end
  end

  initial begin
    mb_start = 0; mb_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      @(negedge clk);
      while (!mb_ready) @(negedge clk);
      mb_in = '0; mb_in.qp = 5'(m + 3); mb_in.mb_x = 6'(m); mb_in.intra = m[0];
      mb_start = 1;
      @(negedge clk); mb_start = 0; mb_in = '0;
      #1;
      checks++;
      if (mb.qp != 5'(m + 3) || mb.mb_x != 6'(m)) fail("parameters not latched");
    end
    @(negedge clk);
    while (!mb_ready) @(negedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (nblk != 18 || nreq != 18 * 64 || nload != 3 || nstore != 3 || ndone != 3) fail("counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
