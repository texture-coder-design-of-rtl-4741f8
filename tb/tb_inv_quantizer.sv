// tb_inv_quantizer: random levels, QPs and DC scalers through the inverse
// quantizer; the reconstruction and the level x QP product are compared with
// values computed in the testbench, including saturation.
module tb_inv_quantizer;
  import be_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, in_intra_dc;
  logic signed [CW-1:0] in_level, out_rec;
  logic signed [PW-1:0] out_pqp;
  logic [4:0] in_qp;
  logic [5:0] in_dc_scaler;
  logic [7:0] in_tag, out_tag;

  inv_quantizer dut (.*);

  int checks = 0, failures = 0;
  int exp_r [$], exp_p [$];

  function automatic int clip(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  initial begin
    in_valid = 0; in_level = '0; in_intra_dc = 0; in_qp = 1; in_dc_scaler = 8; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int l, q, d, r;
      @(negedge clk);
      in_valid = 1;
      l = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 4095)) - 2048 : int'($urandom_range(0, 40)) - 20;
      q = $urandom_range(1, 31);
      d = $urandom_range(8, 46);
      in_level = CW'(l); in_qp = 5'(q); in_dc_scaler = 6'(d);
      in_intra_dc = ($urandom_range(0, 4) == 0);
      in_tag = 8'(n);
      if (in_intra_dc) r = l * d;
      else if (l == 0) r = 0;
      else begin
        r = (2 * (l < 0 ? -l : l) + 1) * q;
        if (q % 2 == 0) r = r - 1;
        if (l < 0) r = -r;
      end
      exp_r.push_back(clip(r, -2048, 2047));
      exp_p.push_back(in_intra_dc ? clip(l * d, -2048, 2047) : clip(l * q, -2048, 2047));
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int er = exp_r.pop_front();
    automatic int ep = exp_p.pop_front();
    checks++;
    if (int'(out_rec) != er || int'(out_pqp) != ep) begin
      failures++;
      $display("got rec %0d pqp %0d exp %0d %0d", out_rec, out_pqp, er, ep);
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
