// tb_quantizer: drives random operands through all three quantizer
// operations, one per cycle, and compares each registered result (and its tag)
// with a reference computed in the testbench from real-valued division.
module tb_quantizer;
  import be_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  q_op_e in_op;
  logic signed [CW-1:0] in_a, out_level;
  logic [5:0] in_div;
  logic [4:0] in_qp;
  logic [7:0] in_tag, out_tag;

  quantizer dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$];
  int exp_t [$];

  function automatic int ref_q(q_op_e op, int a, int d, int qp);
    real r; int m, s;
    s = a < 0 ? -1 : 1;
    m = a < 0 ? -a : a;
    case (op)
      Q_DIVR:     r = $floor(m * 1.0 / d + 0.5);
      Q_INTRA_AC: r = $floor(m * 1.0 / (2 * qp));
      default:    r = (m - qp / 2 <= 0) ? 0.0 : $floor((m - qp / 2) * 1.0 / (2 * qp));
    endcase
    if (r > 2047.0) r = 2047.0;
    return s * $rtoi(r);
  endfunction

  initial begin
    in_valid = 0; in_op = Q_DIVR; in_a = '0; in_div = 8; in_qp = 1; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_op  = q_op_e'($urandom_range(0, 2));
      in_a   = CW'(int'($urandom_range(0, 4095)) - 2048);
      if (n < 8) in_a = CW'(n * 5 - 20);
      in_div = 6'($urandom_range(1, 63));
      in_qp  = 5'($urandom_range(1, 31));
      in_tag = 8'(n);
      exp_q.push_back(ref_q(in_op, int'(in_a), int'(in_div), int'(in_qp)));
      exp_t.push_back(n % 256);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing results: %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int e = exp_q.pop_front();
    automatic int t = exp_t.pop_front();
    checks++;
    if (int'(out_level) != e || int'(out_tag) != t) begin
      failures++;
      $display("tag %0d: got %0d exp %0d", out_tag, out_level, e);
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
