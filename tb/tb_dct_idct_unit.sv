// tb_dct_idct_unit: runs blocks back to back through the interleaved DCT/IDCT
// unit on the 152-cycle block schedule.  Each block's DCT coefficients are fed
// back (8 cycles later) as the IDCT input of the same block, as the quantizer
// loop would do.  Coefficients are checked against a floating-point 2-D DCT
// and the reconstruction against a floating-point 2-D IDCT of the coefficients
// (both within +-1), and the latencies of both outputs are checked.
module tb_dct_idct_unit;
  import be_pkg::*;

  localparam int NBLK = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] ph;
  logic dct_start, dct_in_valid, idct_start, idct_in_valid;
  logic signed [CW-1:0] dct_in_data, idct_in_data, coef_data, res_data;
  logic coef_valid, res_valid;
  logic [2:0] coef_u, coef_v;
  logic [5:0] res_idx;

  dct_idct_unit dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int pix [NBLK][64];
  int cf  [NBLK][64];     // coefficients received, index 8u+v
  real pi = 3.14159265358979;

  function automatic real cc(int u);
    return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  function automatic int fdct(int b, int u, int v);
    real s = 0;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        s += pix[b][8*x+y] * $cos((2*x+1)*u*pi/16) * $cos((2*y+1)*v*pi/16);
    s = s * cc(u) * cc(v) / 4.0;
    return $rtoi(s >= 0 ? s + 0.5 : s - 0.5);
  endfunction

  function automatic int idct(int b, int x, int y);
    real s = 0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++)
        s += cc(u) * cc(v) * cf[b][8*u+v] * $cos((2*x+1)*u*pi/16) * $cos((2*y+1)*v*pi/16);
    s = s / 4.0;
    return $rtoi(s >= 0 ? s + 0.5 : s - 0.5);
  endfunction

  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction

  // stimulus schedule
  int t0 = 16;
  always_ff @(posedge clk) if (rst_n) cyc <= cyc + 1;
  assign ph = 3'(cyc);

  int bi, off;
  always_comb begin
    dct_start = 0; dct_in_valid = 0; dct_in_data = '0;
    for (int b = 0; b < NBLK; b++) begin
      off = cyc - (t0 + b * BLK_PERIOD);
      if (off >= 0 && off < 64) begin
        dct_in_valid = 1; dct_start = (off == 0); dct_in_data = CW'(pix[b][off]);
      end
    end
  end

  // feedback of coefficients into the IDCT, delayed 8 cycles
  logic signed [CW-1:0] dly_d [8];
  logic                 dly_v [8];
  int in_first;
  always_ff @(posedge clk) begin
    dly_d[0] <= coef_data; dly_v[0] <= coef_valid && rst_n;
    for (int k = 1; k < 8; k++) begin dly_d[k] <= dly_d[k-1]; dly_v[k] <= dly_v[k-1]; end
  end
  assign idct_in_valid = dly_v[7];
  assign idct_in_data  = dly_d[7];
  logic prev_v;
  always_ff @(posedge clk) prev_v <= dly_v[7];
  initial begin
    for (int k = 0; k < 8; k++) begin dly_v[k] = 1'b0; dly_d[k] = '0; end
    prev_v = 1'b0;
  end
  assign idct_start = dly_v[7] && !prev_v;

  // checkers
  int cb = 0, rb = 0, ncoef = 0, nres = 0;
  int first_coef [NBLK], first_res [NBLK];
  always_ff @(posedge clk) if (rst_n) begin
    if (coef_valid) begin
      automatic int e = fdct(cb, coef_u, coef_v);
      if (ncoef % 64 == 0) first_coef[cb] = cyc;
      cf[cb][8*coef_u+coef_v] = coef_data;
      checks++;
      if (iabs(e - coef_data) > 1) begin
        failures++; $display("coef blk %0d (%0d,%0d) got %0d exp %0d", cb, coef_u, coef_v, coef_data, e);
      end
      ncoef++; if (ncoef % 64 == 0) cb++;
    end
    if (res_valid) begin
      automatic int e = idct(rb, res_idx / 8, res_idx % 8);
      if (nres % 64 == 0) first_res[rb] = cyc;
      checks++;
      if (iabs(e - res_data) > 1) begin
        failures++; $display("res blk %0d idx %0d got %0d exp %0d", rb, res_idx, res_data, e);
      end
      if (iabs(pix[rb][res_idx] - res_data) > 2) begin
        failures++; $display("roundtrip blk %0d idx %0d got %0d orig %0d", rb, res_idx, res_data, pix[rb][res_idx]);
      end
      nres++; if (nres % 64 == 0) rb++;
    end
  end

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < 64; k++)
        pix[b][k] = (b == 0) ? 255 : (b == 1) ? -255 + ((k % 2) * 510) : int'($urandom_range(0, 510)) - 255;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nres == NBLK * 64);
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (first_coef[b] - (t0 + b * BLK_PERIOD) != 64 + L1D) begin
        failures++; $display("coef latency blk %0d = %0d", b, first_coef[b] - (t0 + b * BLK_PERIOD));
      end
      checks++;
      if (first_res[b] - (t0 + b * BLK_PERIOD) != 64 + L1D + QIQ_LAT + 64 + L1D) begin
        failures++; $display("res latency blk %0d = %0d", b, first_res[b] - (t0 + b * BLK_PERIOD));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * BLK_PERIOD + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
