// inv_quantizer: the IQ module.  Its multiplier forms |level| x m, where m is
// QP for AC coefficients and dc_scaler for the intra DC coefficient:
//   intra DC   rec = level * dc_scaler
//   otherwise  |rec| = 2|level|QP + QP, minus 1 when QP is even; 0 if level = 0
// and the same product, level x QP with its sign, is brought out as `pqp`.
// That product is the first half of the AC predictor scaling
// (QAC x QP_pred) // QP_cur, so the prediction buffer can store predictors
// already multiplied by their own QP and the QP of earlier blocks need not be
// kept (sub-structure sharing).  `rec` saturates to -2048..2047 and `pqp` to
// the PW-bit prediction word.  The AC rule is the H.263-style inverse
// quantizer of MPEG-4, which the document does not spell out.
// Timing: one coefficient per cycle, results registered one cycle later.
module inv_quantizer
  import be_pkg::*;
#(
  parameter int TAGW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [CW-1:0] in_level,
  input  logic                 in_intra_dc,
  input  logic [4:0]           in_qp,
  input  logic [5:0]           in_dc_scaler,
  input  logic [TAGW-1:0]      in_tag,
  output logic                 out_valid,
  output logic signed [CW-1:0] out_rec,
  output logic signed [PW-1:0] out_pqp,
  output logic [TAGW-1:0]      out_tag
);

  logic          neg;
  logic [CW-1:0] mag;
  logic [5:0]    m;
  logic [18:0]   p;        // |level| x m
  logic [19:0]   rmag;
  int            rec_i, pqp_i;

  always_comb begin
    neg  = in_level[CW-1];
    mag  = neg ? CW'(-in_level) : CW'(in_level);
    m    = in_intra_dc ? in_dc_scaler : {1'b0, in_qp};
    p    = 19'(mag) * 19'(m);
    if (in_intra_dc)   rmag = 20'(p);
    else if (mag == 0) rmag = '0;
    else               rmag = {p, 1'b0} + 20'(in_qp) - 20'(in_qp[0] ? 0 : 1);
    rec_i = sat(neg ? -int'(rmag) : int'(rmag), CW);
    pqp_i = sat(neg ? -int'(p) : int'(p), PW);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rec   <= '0;
      out_pqp   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      out_rec   <= CW'(rec_i);
      out_pqp   <= PW'(pqp_i);
    end
  end

endmodule
