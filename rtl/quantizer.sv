// quantizer: the Q module.  One divider serves both the quantization of DCT
// coefficients and the divisions of adaptive DC/AC prediction (sub-structure
// sharing): while the first 1-D DCT of a block runs, the prediction unit
// borrows it to turn neighbouring DC values into quantized DCs (a // dc_scaler)
// and to scale AC predictors (a // QP), and afterwards it quantizes the block.
//
// Operations (q_op_e), with a the signed input and |a| its magnitude:
//   Q_DIVR      sign(a) * ((|a| + div/2) / div)    division rounded half away
//                                                  from zero; also the intra DC
//                                                  quantizer with div = dc_scaler
//   Q_INTRA_AC  sign(a) * (|a| / (2 QP))
//   Q_INTER     sign(a) * max(0, (|a| - QP/2) / (2 QP))
// (the AC rules are the H.263-style quantizer of MPEG-4; the document does not
// spell them out).  Results saturate to -2048..2047.
// Timing: one operation per cycle, result registered one cycle later with its
// tag.  The divider is written as one combinational division.
module quantizer
  import be_pkg::*;
#(
  parameter int TAGW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  q_op_e                in_op,
  input  logic signed [CW-1:0] in_a,
  input  logic [5:0]           in_div,     // divisor of Q_DIVR (dc_scaler or QP)
  input  logic [4:0]           in_qp,
  input  logic [TAGW-1:0]      in_tag,
  output logic                 out_valid,
  output logic signed [CW-1:0] out_level,
  output logic [TAGW-1:0]      out_tag
);

  logic [CW-1:0] mag;
  logic [CW:0]   num;
  logic [6:0]    den;
  logic [CW:0]   quo;
  logic          neg;

  always_comb begin
    neg = in_a[CW-1];
    mag = neg ? CW'(-in_a) : CW'(in_a);
    unique case (in_op)
      Q_DIVR: begin
        num = {1'b0, mag} + (CW+1)'(in_div >> 1);
        den = {1'b0, in_div};
      end
      Q_INTRA_AC: begin
        num = {1'b0, mag};
        den = {1'b0, in_qp, 1'b0};
      end
      default: begin  // Q_INTER
        num = ({1'b0, mag} > (CW+1)'(in_qp >> 1)) ? {1'b0, mag} - (CW+1)'(in_qp >> 1) : '0;
        den = {1'b0, in_qp, 1'b0};
      end
    endcase
    quo = (den == 0) ? '0 : num / (CW+1)'(den);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_level <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      if (quo > (CW+1)'(2047)) out_level <= neg ? -CW'(2047) : CW'(2047);
      else                     out_level <= neg ? -CW'(quo)  : CW'(quo);
    end
  end

endmodule
