// tb_frame_720x480: codes one whole 720x480 picture (45 x 30 macroblocks,
// 4:2:0) through the block engine at its default parameters and checks that
// it takes no more than 1,800,000 cycles, the budget of one frame at 30
// frames/s with a 54 MHz clock.  Every coefficient and reconstructed pixel is
// checked against the testbench's own model of the coding loop (the same
// model as tb_block_engine: bit-exact fixed-point transform written as
// matrix products, MPEG-4 quantization, DC/AC prediction on a picture-wide
// grid), and the same mechanisms are counted.
module tb_frame_720x480;
  import be_pkg::*;

  localparam int MBW = 45, MBH = 30, NMB = MBW * MBH;
  localparam int FRAME_BUDGET = 54_000_000 / 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mb_start, mb_ready, mb_done;
  mb_param_t mb_in;
  logic in_req; logic [5:0] in_idx; blk_e in_blk;
  logic signed [CW-1:0] in_data; logic [7:0] in_mc;
  logic vlc_valid, vlc_vert; logic signed [CW-1:0] vlc_level; logic [2:0] vlc_u, vlc_v; blk_e vlc_blk;
  logic rec_valid; logic [5:0] rec_idx; blk_e rec_blk; logic [7:0] rec_data;
  logic ext_rd_en, ext_wr_en; logic [10:0] ext_addr; logic signed [PW-1:0] ext_rd_data, ext_wr_data;

  block_engine dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- external prediction memory ----------------
  logic signed [PW-1:0] ext_mem [2048];
  always @(posedge clk) begin
    if (ext_rd_en) ext_rd_data <= ext_mem[ext_addr];
    if (ext_wr_en) ext_mem[ext_addr] <= ext_wr_data;
  end

  // ---------------- stimulus ----------------
  int  in_x  [NMB][6][64];     // engine input (pixel or prediction error)
  int  mc_p  [NMB][6][64];     // MC prediction
  bit  intra [NMB];
  bit  acp   [NMB];
  int  qp    [NMB];

  function automatic int dcs(int q, bit chroma);
    if (!chroma) return q <= 4 ? 8 : q <= 8 ? 2 * q : q <= 24 ? q + 8 : 2 * q - 16;
    return q <= 4 ? 8 : q <= 24 ? (q + 13) / 2 : q - 6;
  endfunction

  // ---------------- fixed-point transform model ----------------
  int cm [8][8];
  function automatic int rnd13(longint a, int w);
    longint r, hi;
    r = (a + 4096) >>> 13;
    hi = (longint'(1) << (w - 1)) - 1;
    if (r > hi) r = hi;
    if (r < -hi - 1) r = -hi - 1;
    return int'(r);
  endfunction
  function automatic int sat12(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction
  function automatic int out_int(int v);   // drop the 3 fractional bits
    return sat12((v + 4) >>> 3);
  endfunction

  function automatic void fdct2(input int x [64], output int f [64]);
    int t [64];
    for (int r = 0; r < 8; r++)
      for (int v = 0; v < 8; v++) begin
        longint s; s = 0;
        for (int c = 0; c < 8; c++) s += longint'(cm[v][c]) * (x[8*r+c] * 8);
        t[8*r+v] = rnd13(s, DW);
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        longint s; s = 0;
        for (int r = 0; r < 8; r++) s += longint'(cm[u][r]) * t[8*r+v];
        f[8*u+v] = out_int(rnd13(s, DW));
      end
  endfunction

  function automatic void idct2(input int f [64], output int x [64]);
    int g [64];
    for (int v = 0; v < 8; v++)
      for (int r = 0; r < 8; r++) begin
        longint s; s = 0;
        for (int u = 0; u < 8; u++) s += longint'(cm[u][r]) * (f[8*u+v] * 8);
        g[8*r+v] = rnd13(s, DW);
      end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        longint s; s = 0;
        for (int v = 0; v < 8; v++) s += longint'(cm[v][c]) * g[8*r+v];
        x[8*r+c] = out_int(rnd13(s, DW));
      end
  endfunction

  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction
  function automatic int divr(int a, int d);   // rounding away from zero
    int m;
    m = (iabs(a) + d / 2) / d;
    return a < 0 ? -m : m;
  endfunction

  // ---------------- picture-wide predictor grid ----------------
  // luma grid (2MBW x 2MBH), chroma grids (MBW x MBH) x 2
  int gdc  [3][2*MBH][2*MBW];
  int grow [3][2*MBH][2*MBW][8];
  int gcol [3][2*MBH][2*MBW][8];

  // expected outputs
  int exp_vlc [NMB][6][64];     // index 8u+v
  int exp_rec [NMB][6][64];
  bit exp_vert [NMB][6];
  int n_vert = 0, n_horz = 0, n_edge = 0;

  function automatic void model_mb(int m);
    int mx, my;
    mx = m % MBW; my = m / MBW;
    for (int b = 0; b < 6; b++) begin
      int comp, gy, gx, d;
      int f [64], lv [64], rc [64], rs [64];
      comp = b < 4 ? 0 : b - 3;
      gy = b < 4 ? 2 * my + b / 2 : my;
      gx = b < 4 ? 2 * mx + b % 2 : mx;
      d = dcs(qp[m], b >= 4);
      fdct2(in_x[m][b], f);
      for (int k = 0; k < 64; k++) begin
        int mg, q; mg = iabs(f[k]);
        if (intra[m] && k == 0) q = divr(f[k], d);
        else if (intra[m])      q = mg / (2 * qp[m]);
        else                    q = (mg - qp[m] / 2 > 0) ? (mg - qp[m] / 2) / (2 * qp[m]) : 0;
        if (q > 2047) q = 2047;
        lv[k] = (f[k] < 0 && !(intra[m] && k == 0)) ? -q : q;
        if (intra[m] && k == 0) lv[k] = q > 2047 ? 2047 : (q < -2047 ? -2047 : q);
      end
      for (int k = 0; k < 64; k++) exp_vlc[m][b][k] = lv[k];
      if (intra[m]) begin
        bit aok, cok, bok, vert;
        int da, db, dc, qa, qb, qc;
        aok = gx > 0; cok = gy > 0; bok = gx > 0 && gy > 0;
        da = aok ? gdc[comp][gy][gx-1] : 1024;
        db = bok ? gdc[comp][gy-1][gx-1] : 1024;
        dc = cok ? gdc[comp][gy-1][gx] : 1024;
        qa = divr(da, d); qb = divr(db, d); qc = divr(dc, d);
        vert = iabs(qa - qb) < iabs(qb - qc);
        if (!aok || !cok || !bok) n_edge++;
        exp_vert[m][b] = vert;
        if (vert) n_vert++; else n_horz++;
        exp_vlc[m][b][0] = sat12(lv[0] - (vert ? qc : qa));
        if (acp[m])
          for (int i = 1; i < 8; i++) begin
            if (vert) exp_vlc[m][b][i]   = sat12(lv[i]   - divr(cok ? grow[comp][gy-1][gx][i] : 0, qp[m]));
            else      exp_vlc[m][b][8*i] = sat12(lv[8*i] - divr(aok ? gcol[comp][gy][gx-1][i] : 0, qp[m]));
          end
      end
      // inverse quantization
      for (int k = 0; k < 64; k++) begin
        int l;
        l = lv[k];
        if (intra[m] && k == 0) rc[k] = sat12(l * d);
        else if (l == 0)        rc[k] = 0;
        else begin
          int r;
          r = (2 * iabs(l) + 1) * qp[m] - (qp[m] % 2 == 0 ? 1 : 0);
          rc[k] = sat12(l < 0 ? -r : r);
        end
      end
      // predictor data of this block
      gdc[comp][gy][gx] = intra[m] ? rc[0] : 1024;
      for (int i = 1; i < 8; i++) begin
        grow[comp][gy][gx][i] = intra[m] ? sat12(lv[i] * qp[m]) : 0;
        gcol[comp][gy][gx][i] = intra[m] ? sat12(lv[8*i] * qp[m]) : 0;
      end
      idct2(rc, rs);
      for (int k = 0; k < 64; k++) begin
        int p, s;
        p = intra[m] ? 0 : mc_p[m][b][k];
        s = p + rs[k];
        exp_rec[m][b][k] = s < 0 ? 0 : (s > 255 ? 255 : s);
      end
    end
  endfunction

  // ---------------- drive the engine ----------------
  int cur_mb = -1;
  always_comb begin
    in_data = '0; in_mc = '0;
    if (cur_mb >= 0 && in_req) begin
      in_data = CW'(in_x[cur_mb][in_blk][in_idx]);
      in_mc   = 8'(mc_p[cur_mb][in_blk][in_idx]);
    end
  end

  // ---------------- check outputs ----------------
  int vmb = 0, vb = 0, vn = 0, rmb = 0, rb = 0, rn = 0;
  int blk_t0 [NMB*6];
  int nstart = 0;
  int n_overlap = 0, n_compact = 0, n_load = 0, n_store = 0, n_intra_blk = 0, n_inter_blk = 0;
  int n_acp_blk = 0, n_deadzone = 0;
  int mb_t0 [NMB], mb_t1 [NMB];

  always @(posedge clk) if (rst_n) begin
    if (dut.blk_start) begin blk_t0[nstart] = cyc; nstart++; end
    if (dut.u_dct.dct_rd && dut.u_dct.idct_in_valid) n_overlap++;
    if (dut.u_dct.dct_rd && dut.u_dct.w0) n_compact++;
    if (dut.dma_load)  n_load++;
    if (dut.dma_store) n_store++;
    if (vlc_valid) begin
      automatic int k = 8 * vlc_u + vlc_v;
      checks++;
      if (int'(vlc_blk) != vb || vlc_level != CW'(exp_vlc[vmb][vb][k])) begin
        failures++;
        if (failures < 20) $display("vlc mb %0d blk %0d (%0d,%0d): got %0d exp %0d", vmb, vb, vlc_u, vlc_v, vlc_level, exp_vlc[vmb][vb][k]);
      end
      if (vn == 0) begin
        checks++;
        if (cyc - blk_t0[vmb*6+vb] != 64 + L1D + 2) begin
          failures++; $display("vlc latency %0d", cyc - blk_t0[vmb*6+vb]);
        end
        if (intra[vmb]) n_intra_blk++; else n_inter_blk++;
        if (intra[vmb] && acp[vmb]) n_acp_blk++;
        if (intra[vmb]) begin
          checks++;
          if (vlc_vert != exp_vert[vmb][vb]) begin failures++; $display("direction mb %0d blk %0d", vmb, vb); end
        end
      end
      if (!intra[vmb] && vlc_level == 0) n_deadzone++;
      vn++;
      if (vn == 64) begin vn = 0; vb++; if (vb == 6) begin vb = 0; vmb++; end end
    end
    if (rec_valid) begin
      checks++;
      if (int'(rec_blk) != rb || rec_idx != 6'(rn) || int'(rec_data) != exp_rec[rmb][rb][rn]) begin
        failures++;
        if (failures < 20) $display("rec mb %0d blk %0d idx %0d: got %0d exp %0d", rmb, rb, rec_idx, rec_data, exp_rec[rmb][rb][rn]);
      end
      if (rn == 0) begin
        checks++;
        if (cyc - blk_t0[rmb*6+rb] != 64 + L1D + QIQ_LAT + 64 + L1D + 1) begin
          failures++; $display("rec latency %0d", cyc - blk_t0[rmb*6+rb]);
        end
      end
      rn++;
      if (rn == 64) begin
        rn = 0; rb++;
        if (rb == 6) begin mb_t1[rmb] = cyc; rb = 0; rmb++; end
      end
    end
  end

  // block starts must keep the period
  always @(posedge clk) if (rst_n && dut.blk_start && nstart > 0 && nstart % 6 != 0) begin
    checks++;
    if (cyc - blk_t0[nstart-1] != BLK_PERIOD) begin failures++; $display("block period %0d", cyc - blk_t0[nstart-1]); end
  end

  task automatic report_counts();
    int c [string];
    c["intra blocks"] = n_intra_blk;  c["inter blocks"] = n_inter_blk;
    c["vertical prediction"] = n_vert; c["horizontal prediction"] = n_horz;
    c["AC prediction blocks"] = n_acp_blk; c["unavailable neighbour"] = n_edge;
    c["inter dead-zone zeros"] = n_deadzone;
    c["DMA loads"] = n_load; c["DMA stores"] = n_store;
    c["DCT/IDCT overlap cycles"] = n_overlap; c["early transposed reads"] = n_compact;
    foreach (c[s]) begin
      $display("  %-26s %0d", s, c[s]);
      checks++;
      if (c[s] == 0) begin failures++; $display("mechanism never exercised: %s", s); end
    end
  endtask

  initial begin
    for (int u = 0; u < 8; u++)
      for (int k = 0; k < 8; k++) begin
        real v;
        v = (u == 0 ? 1.0 / $sqrt(2.0) : 1.0) / 2.0 * $cos((2 * k + 1) * u * 3.14159265358979 / 16.0) * 8192.0;
        cm[u][k] = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
      end
    for (int i = 0; i < 2048; i++) ext_mem[i] = '0;
    for (int m = 0; m < NMB; m++) begin
      intra[m] = (m < 2) || (m == 3) || (m == 5) || ($urandom_range(0, 2) != 0);
      if (m == 4) intra[m] = 0;
      acp[m]   = (m % 2 == 0);
      qp[m]    = (m == 0) ? 2 : int'($urandom_range(1, 31));
      for (int b = 0; b < 6; b++) begin
        int base, gx, gy;
        base = $urandom_range(20, 230); gx = $urandom_range(0, 12); gy = $urandom_range(0, 12);
        for (int k = 0; k < 64; k++) begin
          mc_p[m][b][k] = $urandom_range(0, 255);
          if (intra[m]) in_x[m][b][k] = base + gx * (k % 8 - 4) / 2 + gy * (k / 8 - 4) / 2 + int'($urandom_range(0, 8)) - 4;
          else          in_x[m][b][k] = int'($urandom_range(0, 60)) - 30;
          if (intra[m] && in_x[m][b][k] < 0) in_x[m][b][k] = 0;
          if (intra[m] && in_x[m][b][k] > 255) in_x[m][b][k] = 255;
        end
      end
    end
    for (int m = 0; m < NMB; m++) model_mb(m);

    mb_start = 0; mb_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < NMB; m++) begin
      @(negedge clk);
      while (!mb_ready) @(negedge clk);
      mb_in.intra = intra[m]; mb_in.ac_pred = acp[m]; mb_in.qp = 5'(qp[m]);
      mb_in.dc_scaler_y = 6'(dcs(qp[m], 0)); mb_in.dc_scaler_c = 6'(dcs(qp[m], 1));
      mb_in.mb_x = 6'(m % MBW);
      mb_in.left_avail = (m % MBW) != 0; mb_in.top_avail = (m / MBW) != 0;
      mb_in.topleft_avail = mb_in.left_avail && mb_in.top_avail;
      mb_start = 1; cur_mb = m; mb_t0[m] = cyc + 1;
      @(negedge clk); mb_start = 0;
    end
    wait (rmb == NMB);
    repeat (4) @(posedge clk);
    $display("first macroblock: %0d cycles from start to last reconstructed pixel", mb_t1[0] - mb_t0[0] + 1);
    $display("%0d macroblocks in %0d cycles (%0d per macroblock)", NMB, mb_t1[NMB-1] - mb_t0[0] + 1, (mb_t1[NMB-1] - mb_t0[0] + 1) / NMB);
    report_counts();
    checks++;
    if (mb_t1[NMB-1] - mb_t0[0] + 1 > FRAME_BUDGET) begin
      failures++; $display("frame takes %0d cycles, budget %0d", mb_t1[NMB-1] - mb_t0[0] + 1, FRAME_BUDGET);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NMB * 1200 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired: vlc mb %0d, rec mb %0d", vmb, rmb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
