// tb_mc_pingpong_buf: writes the MC prediction of consecutive blocks on the
// 152-cycle block schedule and reads each back 160 cycles after its start,
// so a block's reconstruction overlaps the writing of the next block.
// Intra and inter blocks alternate; the reconstruction is compared with
// clip(prediction + error, 0, 255) computed in the testbench.
module tb_mc_pingpong_buf;
  import be_pkg::*;
  localparam int NB = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid, wr_intra, res_valid, rec_valid;
  logic [5:0] wr_idx, res_idx, rec_idx;
  logic [7:0] wr_pred, rec_data;
  logic signed [CW-1:0] res_data;

  mc_pingpong_buf dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int pred [NB][64], err [NB][64];
  bit intra [NB];
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  int wb, wo, rb, ro;
  always_comb begin
    wr_valid = 0; wr_idx = 0; wr_pred = 0; wr_intra = 0;
    res_valid = 0; res_idx = 0; res_data = 0;
    for (int b = 0; b < NB; b++) begin
      wo = cyc - 152 * b;
      if (wo >= 0 && wo < 64) begin
        wr_valid = 1; wr_idx = 6'(wo); wr_pred = 8'(pred[b][wo]); wr_intra = intra[b];
      end
      ro = cyc - 152 * b - 160;
      if (ro >= 0 && ro < 64) begin
        res_valid = 1; res_idx = 6'(ro); res_data = CW'(err[b][ro]);
      end
    end
  end

  int nrec = 0;
  always @(posedge clk) if (rst_n && rec_valid) begin
    int b, k, e;
    b = nrec / 64; k = nrec % 64;
    e = (intra[b] ? 0 : pred[b][k]) + err[b][k];
    e = e < 0 ? 0 : (e > 255 ? 255 : e);
    checks++;
    if (int'(rec_data) != e || int'(rec_idx) != k) begin
      failures++;
      if (failures < 10) $display("blk %0d idx %0d: got %0d exp %0d", b, k, rec_data, e);
    end
    nrec++;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      intra[b] = (b % 3 == 1);
      for (int k = 0; k < 64; k++) begin
        pred[b][k] = $urandom_range(0, 255);
        err[b][k]  = intra[b] ? int'($urandom_range(0, 300)) - 20 : int'($urandom_range(0, 200)) - 100;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (nrec == NB * 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 152 + 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
