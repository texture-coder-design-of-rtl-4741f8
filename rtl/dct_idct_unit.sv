// dct_idct_unit: one 1-D DCT/IDCT engine and one transpose memory running a
// forward 2-D DCT and an inverse 2-D IDCT at the same time (interleaved DCT /
// IDCT schedule).
//
// Channel 0 of the engine carries the forward transform: 64 input samples of
// a block (row by row) are transformed row-wise and written row-by-row into
// the transpose memory; from the 65th cycle after `dct_start` the memory is
// read column-by-column back into channel 0 for the column pass, whose
// results leave as DCT coefficients, column by column (all u of v = 0, then
// v = 1, ...).  Channel 1 carries the inverse transform of the dequantized
// coefficients, which arrive in that same order: the first pass is written
// into the transpose memory column-by-column, and 64 cycles after
// `idct_start` the memory is read row-by-row into channel 1 for the second
// pass, whose results leave as the reconstructed prediction error, row by row.
// So while one block is in its second DCT pass the previous (or same) block is
// in an IDCT pass, and one memory serves both: its read and write address
// generators are separate, so a write pass may trail the read pass of the
// same order, and a transposing read may start before the writing pass ends.
//
// Fixed point: samples enter with DATA_FRAC = 3 fractional bits appended and
// results are rounded back to integers and saturated to CW bits.
// Timing rules (checked by assertions in dct_1d_core): `dct_start` falls in
// ph 0 and `idct_start` in ph 4; input valid must stay high for 64 cycles
// after a start.  The first coefficient appears 64 + 12 cycles after
// `dct_start`, the first reconstructed sample 64 + 12 cycles after
// `idct_start`.  The transpose memory is conflict-free when `idct_start`
// comes 84 cycles after its block's `dct_start` and block starts are at
// least 148 cycles apart (be_controller keeps 152): then every word is read
// before it is overwritten and written before it is read.
module dct_idct_unit
  import be_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           ph,
  // forward transform input
  input  logic                 dct_start,
  input  logic                 dct_in_valid,
  input  logic signed [CW-1:0] dct_in_data,
  // DCT coefficients out, column by column
  output logic                 coef_valid,
  output logic signed [CW-1:0] coef_data,
  output logic [2:0]           coef_u,
  output logic [2:0]           coef_v,
  // inverse transform input (same order as the coefficients)
  input  logic                 idct_start,
  input  logic                 idct_in_valid,
  input  logic signed [CW-1:0] idct_in_data,
  // reconstructed prediction error out, row by row
  output logic                 res_valid,
  output logic signed [CW-1:0] res_data,
  output logic [5:0]           res_idx
);

  // ---------------- pass sequencing ----------------
  logic [6:0] dct_cnt, idct_cnt;       // cycles since start, 0 = idle
  logic       dct_rd, idct_rd;         // column / row pass being read from memory
  logic [6:0] dct_rcnt, idct_rcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dct_cnt <= '0;  idct_cnt <= '0;
      dct_rcnt <= '0; idct_rcnt <= '0;
    end else begin
      if (dct_start)            dct_cnt <= 7'd1;
      else if (dct_cnt == 7'd64) dct_cnt <= '0;
      else if (dct_cnt != 0)    dct_cnt <= dct_cnt + 7'd1;
      if (idct_start)            idct_cnt <= 7'd1;
      else if (idct_cnt == 7'd64) idct_cnt <= '0;
      else if (idct_cnt != 0)    idct_cnt <= idct_cnt + 7'd1;

      if (dct_cnt == 7'd64)     dct_rcnt <= 7'd1;
      else if (dct_rcnt == 7'd63) dct_rcnt <= '0;
      else if (dct_rcnt != 0)   dct_rcnt <= dct_rcnt + 7'd1;
      if (idct_cnt == 7'd64)     idct_rcnt <= 7'd1;
      else if (idct_rcnt == 7'd63) idct_rcnt <= '0;
      else if (idct_rcnt != 0)   idct_rcnt <= idct_rcnt + 7'd1;
    end
  end

  logic dct_rd_start, idct_rd_start;
  assign dct_rd_start  = (dct_cnt == 7'd64);
  assign idct_rd_start = (idct_cnt == 7'd64);
  assign dct_rd  = dct_rd_start  || (dct_rcnt != 0);
  assign idct_rd = idct_rd_start || (idct_rcnt != 0);

  // ---------------- transpose memory ----------------
  logic                 tm_wr_start, tm_wr_col, tm_wr_en;
  logic signed [DW-1:0] tm_wr_data, tm_rd_data;
  logic                 tm_rd_valid;
  logic [5:0]           tm_rd_addr, tm_wr_addr;

  // ---------------- engine ----------------
  logic                 o0v, o0t, o1v, o1t;
  logic signed [DW-1:0] o0d, o1d;
  logic signed [DW-1:0] in0, in1;

  assign in0 = dct_rd  ? tm_rd_data : (DW'(dct_in_data)  <<< DATA_FRAC);
  assign in1 = idct_rd ? tm_rd_data : (DW'(idct_in_data) <<< DATA_FRAC);

  dct_1d_core u_core (
    .clk, .rst_n, .ph,
    .in0_valid (dct_in_valid || dct_rd),  .in0_data (in0), .in0_inv (1'b0), .in0_tag (dct_rd),
    .out0_valid(o0v), .out0_data(o0d), .out0_tag(o0t),
    .in1_valid (idct_in_valid || idct_rd), .in1_data (in1), .in1_inv (1'b1), .in1_tag (idct_rd),
    .out1_valid(o1v), .out1_data(o1d), .out1_tag(o1t)
  );

  // first-pass results go to the transpose memory
  logic [5:0] w0cnt, w1cnt;
  logic       w0, w1;
  assign w0 = o0v && !o0t;
  assign w1 = o1v && !o1t;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0cnt <= '0; w1cnt <= '0;
    end else begin
      if (w0) w0cnt <= w0cnt + 6'd1;
      if (w1) w1cnt <= w1cnt + 6'd1;
    end
  end
  assign tm_wr_en    = w0 || w1;
  assign tm_wr_data  = w0 ? o0d : o1d;
  assign tm_wr_start = (w0 && w0cnt == 0) || (w1 && w1cnt == 0);
  assign tm_wr_col   = w1;             // DCT rows written row-by-row, IDCT columns column-by-column

  transpose_mem u_tm (
    .clk, .rst_n,
    .wr_start(tm_wr_start), .wr_col(tm_wr_col), .wr_en(tm_wr_en), .wr_data(tm_wr_data),
    .rd_start(dct_rd_start || idct_rd_start), .rd_col(dct_rd_start),
    .rd_valid(tm_rd_valid), .rd_data(tm_rd_data), .rd_addr(tm_rd_addr), .wr_addr(tm_wr_addr)
  );

  // ---------------- second-pass results out ----------------
  function automatic logic signed [CW-1:0] to_int(input logic signed [DW-1:0] v);
    logic signed [DW-1:0] r;
    r = (v + DW'(1 << (DATA_FRAC - 1))) >>> DATA_FRAC;
    return CW'(sat(int'(r), CW));
  endfunction

  logic [5:0] c_cnt, r_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_cnt <= '0; r_cnt <= '0;
    end else begin
      if (coef_valid) c_cnt <= c_cnt + 6'd1;
      if (res_valid)  r_cnt <= r_cnt + 6'd1;
    end
  end

  assign coef_valid = o0v && o0t;
  assign coef_data  = to_int(o0d);
  assign coef_u     = c_cnt[2:0];
  assign coef_v     = c_cnt[5:3];
  assign res_valid  = o1v && o1t;
  assign res_data   = to_int(o1d);
  assign res_idx    = r_cnt;

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(w0 && w1));
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) !(dct_rd && idct_rd));
  a_dct_phase:  assert property (@(posedge clk) disable iff (!rst_n) dct_start  |-> ph == 3'd0);
  a_idct_phase: assert property (@(posedge clk) disable iff (!rst_n) idct_start |-> ph == 3'd4);

endmodule
