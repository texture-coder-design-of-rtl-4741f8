// tb_pred_local_buf: random writes to both banks (sometimes in the same
// cycle, sometimes to the same address in both banks) and random reads,
// compared with a shadow copy kept by the testbench.
module tb_pred_local_buf;
  import be_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0] ab_raddr, ab_waddr, lb_raddr, lb_waddr;
  logic signed [PW-1:0] ab_rdata, ab_wdata, lb_rdata, lb_wdata;
  logic ab_we, lb_we;

  pred_local_buf dut (.*);

  int checks = 0, failures = 0;
  int sa [32], sl [32];

  initial begin
    ab_we = 0; lb_we = 0; ab_waddr = 0; lb_waddr = 0; ab_wdata = 0; lb_wdata = 0;
    ab_raddr = 0; lb_raddr = 0;
    // fill both banks
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      ab_we = 1; lb_we = 1; ab_waddr = 5'(i); lb_waddr = 5'(i);
      ab_wdata = PW'($urandom); lb_wdata = PW'($urandom);
      sa[i] = ab_wdata; sl[i] = lb_wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ab_we = $urandom_range(0, 1); lb_we = $urandom_range(0, 1);
      ab_waddr = 5'($urandom); lb_waddr = 5'($urandom);
      ab_wdata = PW'($urandom); lb_wdata = PW'($urandom);
      ab_raddr = 5'($urandom); lb_raddr = 5'($urandom);
      #1;
      checks++;
      if (int'(ab_rdata) != sa[ab_raddr] || int'(lb_rdata) != sl[lb_raddr]) begin
        failures++;
        if (failures < 10) $display("read %0d/%0d: got %0d %0d exp %0d %0d", ab_raddr, lb_raddr, ab_rdata, lb_rdata, sa[ab_raddr], sl[lb_raddr]);
      end
      if (ab_we) sa[ab_waddr] = ab_wdata;
      if (lb_we) sl[lb_waddr] = lb_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
