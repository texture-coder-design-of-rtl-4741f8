// tb_dct_1d_core: feeds random 8-sample vectors into both channels of the
// shared 1-D engine at full rate, with the transform direction chosen at
// random per vector, and compares every output with a floating-point 1-D DCT
// or IDCT (within the rounding error of 13-bit coefficients).  Also checks the 12-cycle latency and the tags.
module tb_dct_1d_core;
  import be_pkg::*;
  localparam int NV = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] ph;
  logic in0_valid, in0_inv, in0_tag, out0_valid, out0_tag;
  logic in1_valid, in1_inv, in1_tag, out1_valid, out1_tag;
  logic signed [DW-1:0] in0_data, out0_data, in1_data, out1_data;

  dct_1d_core dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int vin [2][NV][8];
  bit vinv [2][NV];
  int nout [2] = '{0, 0};

  function automatic int ref1d(int c, int n, int i);
    real s = 0;
    for (int k = 0; k < 8; k++) begin
      if (vinv[c][n]) s += (k == 0 ? 1.0 / $sqrt(2.0) : 1.0) / 2.0 * $cos((2*i+1)*k*3.14159265358979/16) * vin[c][n][k];
      else            s += (i == 0 ? 1.0 / $sqrt(2.0) : 1.0) / 2.0 * $cos((2*k+1)*i*3.14159265358979/16) * vin[c][n][k];
    end
    return $rtoi(s >= 0 ? s + 0.5 : s - 0.5);
  endfunction

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  assign ph = 3'(cyc);

  // channel 0 starts at cycle 8 (ph 0), channel 1 at cycle 12 (ph 4)
  int o0, o1;
  always_comb begin
    o0 = cyc - 8; o1 = cyc - 12;
    in0_valid = (o0 >= 0 && o0 < NV * 8);
    in1_valid = (o1 >= 0 && o1 < NV * 8);
    in0_data = in0_valid ? DW'(vin[0][o0/8][o0%8]) : '0;
    in1_data = in1_valid ? DW'(vin[1][o1/8][o1%8]) : '0;
    in0_inv  = in0_valid ? vinv[0][o0/8] : 1'b0;
    in1_inv  = in1_valid ? vinv[1][o1/8] : 1'b0;
    in0_tag  = in0_valid ? 1'((o0/8) % 2) : 1'b0;
    in1_tag  = in1_valid ? 1'((o1/8) % 2) : 1'b0;
  end

  task automatic chk(int c, logic signed [DW-1:0] d, logic t);
    int n = nout[c] / 8, i = nout[c] % 8, e;
    int tol = 1;
    e = ref1d(c, n, i);
    // coefficients carry 13 fractional bits: allow their rounding error
    for (int k = 0; k < 8; k++) tol += (vin[c][n][k] < 0 ? -vin[c][n][k] : vin[c][n][k]);
    tol = 1 + tol / 16384 + 1;
    checks++;
    if (d > e + tol || d < e - tol || t != 1'(n % 2)) begin
      failures++;
      if (failures < 10) $display("ch%0d vec %0d out %0d: got %0d exp %0d", c, n, i, d, e);
    end
    if (nout[c] == 0) begin
      checks++;
      if (cyc - (c == 0 ? 8 : 12) != L1D) begin failures++; $display("ch%0d latency %0d", c, cyc - (c == 0 ? 8 : 12)); end
    end
    nout[c]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out0_valid) chk(0, out0_data, out0_tag);
    if (out1_valid) chk(1, out1_data, out1_tag);
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int n = 0; n < NV; n++) begin
        vinv[c][n] = $urandom_range(0, 1);
        for (int k = 0; k < 8; k++) vin[c][n][k] = int'($urandom_range(0, 32000)) - 16000;
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (nout[0] == NV * 8 && nout[1] == NV * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 8 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
