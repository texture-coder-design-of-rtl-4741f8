// tb_dcac_pred: DC/AC prediction of a 2 x 2 macroblock picture, with the
// quantizer serving the prediction unit's divisions and a model of the
// external prediction memory.  For each block the testbench waits for phase 1
// to finish, then streams the block's quantized levels (column by column) and,
// one cycle later, their inverse-quantized values and level x QP products.
// The predicted levels and the chosen direction are compared with a model
// that keeps every block's DC and first row / column in a picture-wide grid
// and applies the MPEG-4 rules directly (neighbours outside the picture or in
// inter macroblocks count as DC 1024, AC 0).
module tb_dcac_pred;
  import be_pkg::*;
  localparam int MBW = 2, MBH = 2, NMB = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mb_param_t mb;
  logic dma_load, dma_store, dma_done, ext_rd_en, ext_wr_en;
  logic [10:0] ext_addr;
  logic signed [PW-1:0] ext_rd_data, ext_wr_data;
  logic prep_start, prep_busy, q_req_valid, q_res_valid;
  blk_e prep_blk;
  logic signed [CW-1:0] q_req_a, q_res_level;
  logic [5:0] q_req_div;
  logic [7:0] q_req_tag, q_res_tag;
  logic qc_valid, vlc_valid, pred_vert, iq_valid;
  logic signed [CW-1:0] qc_level, vlc_level, iq_rec;
  logic [2:0] qc_u, qc_v, vlc_u, vlc_v, iq_u, iq_v;
  logic signed [PW-1:0] iq_pqp;

  dcac_pred dut (.*);

  quantizer #(.TAGW(8)) u_q (
    .clk, .rst_n, .in_valid(q_req_valid), .in_op(Q_DIVR), .in_a(q_req_a), .in_div(q_req_div),
    .in_qp(mb.qp), .in_tag(q_req_tag), .out_valid(q_res_valid), .out_level(q_res_level),
    .out_tag(q_res_tag)
  );

  logic signed [PW-1:0] ext_mem [2048];
  always @(posedge clk) begin
    if (ext_rd_en) ext_rd_data <= ext_mem[ext_addr];
    if (ext_wr_en) ext_mem[ext_addr] <= ext_wr_data;
  end

  int checks = 0, failures = 0;
  int lvl [NMB][6][64];
  bit intra [NMB], acp [NMB];
  int qp [NMB];
  int gdc  [3][2*MBH][2*MBW];
  int grow [3][2*MBH][2*MBW][8];
  int gcol [3][2*MBH][2*MBW][8];
  int exp_out [NMB][6][64];
  bit exp_vert [NMB][6];
  int n_vert = 0, n_horz = 0;

  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction
  function automatic int divr(int a, int d);
    int m;
    m = (iabs(a) + d / 2) / d;
    return a < 0 ? -m : m;
  endfunction
  function automatic int sat12(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction
  function automatic int dcs(int q, bit chroma);
    if (!chroma) return q <= 4 ? 8 : q <= 8 ? 2 * q : q <= 24 ? q + 8 : 2 * q - 16;
    return q <= 4 ? 8 : q <= 24 ? (q + 13) / 2 : q - 6;
  endfunction
  function automatic int rec_of(int m, int b, int k);
    int l, r;
    l = lvl[m][b][k];
    if (intra[m] && k == 0) return sat12(l * dcs(qp[m], b >= 4));
    if (l == 0) return 0;
    r = (2 * iabs(l) + 1) * qp[m] - (qp[m] % 2 == 0 ? 1 : 0);
    return sat12(l < 0 ? -r : r);
  endfunction
  function automatic int pqp_of(int m, int b, int k);
    if (intra[m] && k == 0) return sat12(lvl[m][b][k] * dcs(qp[m], b >= 4));
    return sat12(lvl[m][b][k] * qp[m]);
  endfunction

  function automatic void model(int m);
    int mx, my;
    mx = m % MBW; my = m / MBW;
    for (int b = 0; b < 6; b++) begin
      int comp, gy, gx, d, da, db, dc, qa, qb, qc;
      bit aok, bok, cok, vert;
      comp = b < 4 ? 0 : b - 3;
      gy = b < 4 ? 2 * my + b / 2 : my;
      gx = b < 4 ? 2 * mx + b % 2 : mx;
      d = dcs(qp[m], b >= 4);
      for (int k = 0; k < 64; k++) exp_out[m][b][k] = lvl[m][b][k];
      if (intra[m]) begin
        aok = gx > 0; cok = gy > 0; bok = gx > 0 && gy > 0;
        da = aok ? gdc[comp][gy][gx-1] : 1024;
        db = bok ? gdc[comp][gy-1][gx-1] : 1024;
        dc = cok ? gdc[comp][gy-1][gx] : 1024;
        qa = divr(da, d); qb = divr(db, d); qc = divr(dc, d);
        vert = iabs(qa - qb) < iabs(qb - qc);
        exp_vert[m][b] = vert;
        if (vert) n_vert++; else n_horz++;
        exp_out[m][b][0] = sat12(lvl[m][b][0] - (vert ? qc : qa));
        if (acp[m])
          for (int i = 1; i < 8; i++) begin
            if (vert) exp_out[m][b][i]   = sat12(lvl[m][b][i]   - divr(cok ? grow[comp][gy-1][gx][i] : 0, qp[m]));
            else      exp_out[m][b][8*i] = sat12(lvl[m][b][8*i] - divr(aok ? gcol[comp][gy][gx-1][i] : 0, qp[m]));
          end
      end
      gdc[comp][gy][gx] = intra[m] ? rec_of(m, b, 0) : 1024;
      for (int i = 1; i < 8; i++) begin
        grow[comp][gy][gx][i] = intra[m] ? pqp_of(m, b, i) : 0;
        gcol[comp][gy][gx][i] = intra[m] ? pqp_of(m, b, 8*i) : 0;
      end
    end
  endfunction

  // output checker
  int cm = 0, cb = 0, cn = 0;
  always @(posedge clk) if (rst_n && vlc_valid) begin
    int k;
    k = 8 * vlc_u + vlc_v;
    checks++;
    if (int'(vlc_level) != exp_out[cm][cb][k]) begin
      failures++;
      if (failures < 10) $display("mb %0d blk %0d (%0d,%0d): got %0d exp %0d", cm, cb, vlc_u, vlc_v, vlc_level, exp_out[cm][cb][k]);
    end
    if (cn == 0 && intra[cm]) begin
      checks++;
      if (pred_vert != exp_vert[cm][cb]) begin failures++; $display("direction mb %0d blk %0d", cm, cb); end
    end
    cn++;
    if (cn == 64) begin cn = 0; cb++; if (cb == 6) begin cb = 0; cm++; end end
  end

  // phase-2 streams: levels at cycle t, inverse quantizer results at t+1
  int sm, sb, sn = -1;
  always_comb begin
    qc_valid = 0; qc_level = '0; qc_u = 0; qc_v = 0;
    if (sn >= 0 && sn < 64) begin
      qc_valid = 1; qc_u = 3'(sn % 8); qc_v = 3'(sn / 8);
      qc_level = CW'(lvl[sm][sb][8 * (sn % 8) + sn / 8]);
    end
  end
  always @(posedge clk) begin
    iq_valid <= qc_valid;
    iq_u <= qc_u; iq_v <= qc_v;
    iq_rec <= CW'(rec_of(sm, sb, 8 * qc_u + qc_v));
    iq_pqp <= PW'(pqp_of(sm, sb, 8 * qc_u + qc_v));
  end

  initial begin
    for (int i = 0; i < 2048; i++) ext_mem[i] = PW'(i * 7);
    for (int m = 0; m < NMB; m++) begin
      intra[m] = (m != 2);
      acp[m] = (m != 1);
      qp[m] = $urandom_range(1, 31);
      for (int b = 0; b < 6; b++)
        for (int k = 0; k < 64; k++) begin
          if (k == 0) lvl[m][b][k] = intra[m] ? int'($urandom_range(1, 2040 / dcs(qp[m], b >= 4))) : int'($urandom_range(0, 40)) - 20;
          else if (k < 8 || k % 8 == 0) lvl[m][b][k] = int'($urandom_range(0, 60)) - 30;
          else lvl[m][b][k] = int'($urandom_range(0, 6)) - 3;
        end
    end
    for (int m = 0; m < NMB; m++) model(m);

    mb = '0; dma_load = 0; dma_store = 0; prep_start = 0; prep_blk = BLK_Y1;
    iq_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < NMB; m++) begin
      @(negedge clk);
      mb.intra = intra[m]; mb.ac_pred = acp[m]; mb.qp = 5'(qp[m]);
      mb.dc_scaler_y = 6'(dcs(qp[m], 0)); mb.dc_scaler_c = 6'(dcs(qp[m], 1));
      mb.mb_x = 6'(m % MBW);
      mb.left_avail = (m % MBW) != 0; mb.top_avail = (m / MBW) != 0;
      mb.topleft_avail = mb.left_avail && mb.top_avail;
      dma_load = 1;
      @(negedge clk); dma_load = 0;
      while (!dma_done) @(negedge clk);
      for (int b = 0; b < 6; b++) begin
        @(negedge clk);
        prep_start = 1; prep_blk = blk_e'(b);
        @(negedge clk); prep_start = 0;
        while (prep_busy) @(negedge clk);
        repeat (3) @(negedge clk);
        sm = m; sb = b;
        for (int n = 0; n < 64; n++) begin sn = n; @(negedge clk); end
        sn = -1;
        repeat (3) @(negedge clk);
      end
      dma_store = 1;
      @(negedge clk); dma_store = 0;
      while (!dma_done) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (cm != NMB || n_vert == 0 || n_horz == 0) begin
      failures++; $display("coverage: mbs %0d vertical %0d horizontal %0d", cm, n_vert, n_horz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
