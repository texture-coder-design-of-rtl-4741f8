// tb_transpose_mem: exercises the transpose memory the way the interleaved
// schedule does.  Block A is written row-by-row; its column-by-column read
// starts as soon as address 49 has been written, while block B is written
// column-by-column 16 cycles behind that read, into the same words; B is then
// read row-by-row while block C is written row-by-row behind it.  Every read
// must return the transposed data of the right block, and the address
// generators' sequences are checked.
module tb_transpose_mem;
  import be_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_start, wr_col, wr_en, rd_start, rd_col, rd_valid;
  logic signed [DW-1:0] wr_data, rd_data;
  logic [5:0] rd_addr, wr_addr;

  transpose_mem dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int blkv [3][64];   // blkv[b][8r+c]: element r,c of the 8x8 data of block b

  // schedule (cycle numbers): A written 0..63, read 50..113; B written 66..129,
  // read 120..183; C written 130..193
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  int wa, wb, wc;
  always_comb begin
    wa = cyc; wb = cyc - 66; wc = cyc - 130;
    wr_start = 0; wr_col = 0; wr_en = 0; wr_data = '0;
    if (wa >= 0 && wa < 64) begin
      wr_en = 1; wr_start = (wa == 0); wr_data = DW'(blkv[0][wa]);
    end else if (wb >= 0 && wb < 64) begin
      // column-by-column: sequence index j -> element (j%8, j/8)
      wr_en = 1; wr_start = (wb == 0); wr_col = 1; wr_data = DW'(blkv[1][8*(wb%8) + wb/8]);
    end else if (wc >= 0 && wc < 64) begin
      wr_en = 1; wr_start = (wc == 0); wr_data = DW'(blkv[2][wc]);
    end
    rd_start = (cyc == 50) || (cyc == 120);
    rd_col   = (cyc == 50);
  end

  int rn = 0;
  always @(posedge clk) if (rst_n && rd_valid) begin
    int e, ea, j;
    j = rn % 64;
    if (rn < 64) begin e = blkv[0][8*(j%8) + j/8]; ea = 8*(j%8) + j/8; end
    else         begin e = blkv[1][j];             ea = j; end
    checks++;
    if (int'(rd_data) != e || int'(rd_addr) != ea) begin
      failures++;
      if (failures < 10) $display("read %0d: got %0d @%0d exp %0d @%0d", rn, rd_data, rd_addr, e, ea);
    end
    rn++;
  end

  initial begin
    for (int b = 0; b < 3; b++)
      for (int k = 0; k < 64; k++) blkv[b][k] = int'($urandom_range(0, 60000)) - 30000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (cyc == 200);
    checks++;
    if (rn != 128) begin failures++; $display("reads: %0d", rn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
