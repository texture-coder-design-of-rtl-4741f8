// pred_local_buf: local DC/AC prediction buffer of one macroblock.
//
// Two banks of PW-bit words, each 4 slots x 8 words:
//   above bank - slot 0: predictors of the left luma column (block above Y1,
//                later Y1 itself for Y3), slot 1: right luma column, slot 2: Cb,
//                slot 3: Cr.  Word 0 is the reconstructed DC, words 1..7 the
//                first-row AC levels already multiplied by their block's QP.
//                This bank is exchanged with the external prediction memory,
//                one macroblock at a time.
//   left bank  - slot 0: upper luma row, 1: lower luma row, 2: Cb, 3: Cr, word
//                0 the reconstructed DC, words 1..7 first-column AC levels x QP.
//                It stays local, since the next macroblock is to the right.
// Each bank has one asynchronous read port and one write port, so a block's
// left (A) and above (C) predictors can be read in the same cycle, and its DC
// can be written into both banks at once.  Address = {slot, word}.
module pred_local_buf
  import be_pkg::*;
(
  input  logic                 clk,
  input  logic [4:0]           ab_raddr,
  output logic signed [PW-1:0] ab_rdata,
  input  logic                 ab_we,
  input  logic [4:0]           ab_waddr,
  input  logic signed [PW-1:0] ab_wdata,
  input  logic [4:0]           lb_raddr,
  output logic signed [PW-1:0] lb_rdata,
  input  logic                 lb_we,
  input  logic [4:0]           lb_waddr,
  input  logic signed [PW-1:0] lb_wdata
);

  logic signed [PW-1:0] above [32];
  logic signed [PW-1:0] left  [32];

  always_ff @(posedge clk) begin
    if (ab_we) above[ab_waddr] <= ab_wdata;
    if (lb_we) left[lb_waddr]  <= lb_wdata;
  end

  assign ab_rdata = above[ab_raddr];
  assign lb_rdata = left[lb_raddr];

endmodule
