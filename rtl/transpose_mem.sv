// transpose_mem: 64-word transpose memory of the DCT/IDCT unit, with separate
// address generators for reading and for writing.
//
// The memory is an 8x8 array with one write port and one asynchronous read
// port.  Each address generator walks 64 addresses in one of two orders:
// row-by-row (0,1,2,...,63) or column-by-column (0,8,16,...,56,1,9,...).
// Because reading and writing have their own generators, a write pass may
// trail a read pass of the same order by any delay (each word is read before
// it is overwritten), and a read pass in the other order may start while the
// previous write pass is still running: with column-by-column reading of a
// block written row-by-row, reading may begin once address 49 has been
// written, since every later read then finds its word already updated.
//
// Interface: `wr_start` (with `wr_col`) arms the write generator; each
// `wr_en` then writes `wr_data` at the next address.  `rd_start` (with
// `rd_col`) starts a read pass: `rd_valid` is high for the 64 following
// cycles, beginning with the cycle of `rd_start`, and `rd_data` shows the
// addressed word in the same cycle.  A start in the last word of a pass
// continues seamlessly.
module transpose_mem
  import be_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_start,
  input  logic                 wr_col,
  input  logic                 wr_en,
  input  logic signed [DW-1:0] wr_data,
  input  logic                 rd_start,
  input  logic                 rd_col,
  output logic                 rd_valid,
  output logic signed [DW-1:0] rd_data,
  output logic [5:0]           rd_addr,
  output logic [5:0]           wr_addr
);

  logic signed [DW-1:0] mem [64];

  // write address generator
  logic [5:0] wcnt;
  logic       wcol;
  logic       wcol_eff;
  logic [5:0] wcnt_eff;
  assign wcol_eff = wr_start ? wr_col : wcol;
  assign wcnt_eff = wr_start ? 6'd0   : wcnt;
  assign wr_addr  = wcol_eff ? {wcnt_eff[2:0], wcnt_eff[5:3]} : wcnt_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0;
      wcol <= 1'b0;
    end else begin
      if (wr_start) wcol <= wr_col;
      if (wr_en)    wcnt <= wcnt_eff + 6'd1;
      else if (wr_start) wcnt <= '0;
    end
  end

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  // read address generator
  logic [5:0] rcnt;
  logic       rcol;
  logic       ract;
  logic       rcol_eff;
  logic [5:0] rcnt_eff;
  assign rcol_eff = rd_start ? rd_col : rcol;
  assign rcnt_eff = rd_start ? 6'd0   : rcnt;
  assign rd_valid = rd_start || ract;
  assign rd_addr  = rcol_eff ? {rcnt_eff[2:0], rcnt_eff[5:3]} : rcnt_eff;
  assign rd_data  = mem[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt <= '0;
      rcol <= 1'b0;
      ract <= 1'b0;
    end else if (rd_valid) begin
      rcol <= rcol_eff;
      rcnt <= rcnt_eff + 6'd1;
      ract <= (rcnt_eff != 6'd63);
    end
  end

endmodule
