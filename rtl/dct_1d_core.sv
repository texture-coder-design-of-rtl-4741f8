// dct_1d_core: 8-point 1-D DCT / IDCT engine shared by two sample streams.
//
// The structure follows the even/odd decomposition of a multiplexed 1-D DCT
// processor: each channel collects 8 serial samples (the input LIFO), then a
// 4-cycle window drives four "ACF" multipliers (even half) and four "BDEG"
// multipliers (odd half) into eight accumulators, and an add/sub stage forms
// the 8 results, which leave serially (the output LIFO).
//   forward (DCT):  cycle j: ACF input  x(j)+x(7-j), coefficient C[2i][j]
//                            BDEG input x(j)-x(7-j), coefficient C[2i+1][j]
//                   y(2i) = even acc i, y(2i+1) = odd acc i
//   inverse (IDCT): cycle j: ACF input  y(2j),  coefficient C[2j][i]
//                            BDEG input y(2j+1), coefficient C[2j+1][i]
//                   x(i) = E(i)+O(i), x(7-i) = E(i)-O(i)
// The transform direction is chosen per vector (the DCT/IDCT select), so one
// channel can run DCT while the other runs IDCT: this is what lets the second
// 1-D DCT of a block and the first 1-D IDCT share the engine.
//
// Timing (this design's choice): a free-running 3-bit phase `ph` frames the
// engine.  Channel 0 owns the multipliers in ph 0..3 and channel 1 in
// ph 4..7, so the last sample of a channel-0 vector must arrive in ph 7 and
// that of a channel-1 vector in ph 3 (asserted).  Each channel accepts one
// sample per cycle and delivers one per cycle; the first output of a vector
// appears L1D = 12 cycles after its first input.  Results are rounded to the
// input's fixed-point format (the coefficients carry 13 fractional bits) and
// saturated to DW bits.  A 1-bit tag travels with each vector.
module dct_1d_core
  import be_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           ph,
  // channel 0
  input  logic                 in0_valid,
  input  logic signed [DW-1:0] in0_data,
  input  logic                 in0_inv,     // 1: IDCT, 0: DCT (sampled with the 8th sample)
  input  logic                 in0_tag,
  output logic                 out0_valid,
  output logic signed [DW-1:0] out0_data,
  output logic                 out0_tag,
  // channel 1
  input  logic                 in1_valid,
  input  logic signed [DW-1:0] in1_data,
  input  logic                 in1_inv,
  input  logic                 in1_tag,
  output logic                 out1_valid,
  output logic signed [DW-1:0] out1_data,
  output logic                 out1_tag
);

  localparam int AW = DW + COEF_W + 3;   // accumulator width

  typedef logic signed [DW-1:0] vec_t [8];

  // ---------------- input collectors (LIFO) ----------------
  logic [2:0] icnt [2];
  vec_t       coll [2];
  vec_t       hold [2];
  logic       hold_inv [2];
  logic       hold_tag [2];
  logic       hold_v   [2];

  logic                 iv [2];
  logic signed [DW-1:0] id [2];
  logic                 iinv [2];
  logic                 itag [2];
  assign iv[0] = in0_valid;  assign id[0] = in0_data;  assign iinv[0] = in0_inv;  assign itag[0] = in0_tag;
  assign iv[1] = in1_valid;  assign id[1] = in1_data;  assign iinv[1] = in1_inv;  assign itag[1] = in1_tag;

  for (genvar c = 0; c < 2; c++) begin : g_coll
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        icnt[c]   <= '0;
        hold_v[c] <= 1'b0;
      end else begin
        if (iv[c]) begin
          icnt[c]         <= icnt[c] + 3'd1;
          coll[c][icnt[c]] <= id[c];
          if (icnt[c] == 3'd7) begin
            for (int k = 0; k < 7; k++) hold[c][k] <= coll[c][k];
            hold[c][7]  <= id[c];
            hold_inv[c] <= iinv[c];
            hold_tag[c] <= itag[c];
            hold_v[c]   <= 1'b1;
          end
        end
        // the window of channel c ends in ph 3 (c=0) or ph 7 (c=1)
        if (ph == {c[0], 2'b11} && !(iv[c] && icnt[c] == 3'd7)) hold_v[c] <= 1'b0;
      end
    end
  end

  // ---------------- shared multiply-accumulate window ----------------
  logic signed [COEF_W-1:0] cmat [8][8];
  always_comb
    for (int u = 0; u < 8; u++)
      for (int k = 0; k < 8; k++)
        cmat[u][k] = coef(u, k);

  logic                 wch;            // channel owning this cycle
  logic [1:0]           j;
  logic [2:0]           j3;
  vec_t                 x;
  logic                 inv;
  logic signed [DW:0]   acf_in, bdeg_in;
  logic signed [COEF_W-1:0] acf_c [4], bdeg_c [4];
  logic signed [AW-1:0] acc_e [4], acc_o [4];
  logic signed [AW-1:0] sum_e [4], sum_o [4];
  logic signed [AW-1:0] res   [8];

  assign wch = ph[2];
  assign j   = ph[1:0];
  assign j3  = {1'b0, ph[1:0]};
  assign x   = hold[wch];
  assign inv = hold_inv[wch];

  always_comb begin
    if (inv) begin                       // even/odd mux
      acf_in  = (DW+1)'(x[2*j]);
      bdeg_in = (DW+1)'(x[2*j+1]);
    end else begin                       // butterfly add / sub
      acf_in  = (DW+1)'(x[j3]) + (DW+1)'(x[7-j3]);
      bdeg_in = (DW+1)'(x[j3]) - (DW+1)'(x[7-j3]);
    end
    for (int i = 0; i < 4; i++) begin
      acf_c[i]  = inv ? cmat[2*j][i]   : cmat[2*i][j3];
      bdeg_c[i] = inv ? cmat[2*j+1][i] : cmat[2*i+1][j3];
      sum_e[i]  = (j == 2'd0 ? '0 : acc_e[i]) + AW'(acf_in * acf_c[i]);
      sum_o[i]  = (j == 2'd0 ? '0 : acc_o[i]) + AW'(bdeg_in * bdeg_c[i]);
    end
    // add/sub output stage
    for (int i = 0; i < 4; i++) begin
      if (inv) begin
        res[i]   = sum_e[i] + sum_o[i];
        res[7-i] = sum_e[i] - sum_o[i];
      end else begin
        res[2*i]   = sum_e[i];
        res[2*i+1] = sum_o[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    acc_e <= sum_e;
    acc_o <= sum_o;
  end

  // round to the input format and saturate
  function automatic logic signed [DW-1:0] rnd(input logic signed [AW-1:0] v);
    logic signed [AW-1:0] r;
    r = (v + (AW'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > AW'((1 <<< (DW - 1)) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (r < -AW'(1 <<< (DW - 1)))      return {1'b1, {(DW-1){1'b0}}};
    return r[DW-1:0];
  endfunction

  // ---------------- output registers (serial out) ----------------
  vec_t       osr  [2];
  logic [3:0] ocnt [2];
  logic       otag [2];

  for (genvar c = 0; c < 2; c++) begin : g_out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ocnt[c] <= '0;
      end else if (wch == c[0] && j == 2'd3 && hold_v[c]) begin
        for (int k = 0; k < 8; k++) osr[c][k] <= rnd(res[k]);
        otag[c] <= hold_tag[c];
        ocnt[c] <= 4'd8;
      end else if (ocnt[c] != 0) begin
        for (int k = 0; k < 7; k++) osr[c][k] <= osr[c][k+1];
        ocnt[c] <= ocnt[c] - 4'd1;
      end
    end
  end

  assign out0_valid = (ocnt[0] != 0);
  assign out0_data  = osr[0][0];
  assign out0_tag   = otag[0];
  assign out1_valid = (ocnt[1] != 0);
  assign out1_data  = osr[1][0];
  assign out1_tag   = otag[1];

  // the 8th sample of a vector must end on its channel's frame boundary
  a_ch0_frame: assert property (@(posedge clk) disable iff (!rst_n)
    (in0_valid && icnt[0] == 3'd7) |-> ph == 3'd7);
  a_ch1_frame: assert property (@(posedge clk) disable iff (!rst_n)
    (in1_valid && icnt[1] == 3'd7) |-> ph == 3'd3);

endmodule
