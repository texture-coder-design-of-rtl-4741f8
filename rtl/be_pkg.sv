// be_pkg: types, constants and the 1-D DCT coefficient function shared by the
// MPEG-4 texture-coding block engine.
//
// The 8-point DCT basis used everywhere is
//   C[u][k] = c(u)/2 * cos((2k+1) u pi / 16),  c(0) = 1/sqrt(2), c(u>0) = 1,
// held as signed integers scaled by 2^COEF_FRAC (13 fractional bits).  The
// forward 1-D transform is y(u) = sum_k C[u][k] x(k) and the inverse is
// x(k) = sum_u C[u][k] y(u); a 2-D transform is a row pass then a column pass.
// Only the nine values of cos(n pi/16)/2, n = 0..8, are stored; coef() folds
// any (u,k) onto them.  The schedule constants describe this design's own
// interleaved DCT/IDCT timing (see dct_idct_unit and be_controller).
package be_pkg;

  localparam int COEF_FRAC = 13;       // fractional bits of the DCT coefficients
  localparam int COEF_W    = 15;       // signed coefficient width
  localparam int DATA_FRAC = 3;        // fractional bits carried between the two 1-D passes
  localparam int DW        = 18;       // signed width of 1-D engine samples
  localparam int CW        = 12;       // signed width of DCT coefficients / quantizer levels
  localparam int PW        = 12;       // prediction buffer word width (12 bits per word)

  // Schedule of one block, in cycles from the first input sample.
  localparam int L1D        = 12;      // latency of the 1-D core, first input to first output
  localparam int QIQ_LAT    = 8;       // coefficient leaving the DCT to entering the IDCT
  localparam int BLK_PERIOD = 152;     // cycles between block starts (multiple of 8)

  // Quantizer operations (the Q module is shared by DC/AC prediction).
  typedef enum logic [1:0] {
    Q_DIVR     = 2'd0,   // a // b : divide, rounding half away from zero
    Q_INTRA_AC = 2'd1,   // |a| / (2QP), truncated, sign restored
    Q_INTER    = 2'd2    // (|a| - QP/2) / (2QP), truncated at 0, sign restored
  } q_op_e;

  // Block position inside the 4:2:0 macroblock, in coding order.
  typedef enum logic [2:0] {
    BLK_Y1 = 3'd0, BLK_Y2 = 3'd1, BLK_Y3 = 3'd2, BLK_Y4 = 3'd3,
    BLK_CB = 3'd4, BLK_CR = 3'd5
  } blk_e;

  // Per-macroblock coding parameters.
  typedef struct packed {
    logic       intra;          // intra macroblock (DC/AC prediction applies)
    logic       ac_pred;        // AC prediction enabled for this macroblock
    logic [4:0] qp;             // quantizer parameter 1..31
    logic [5:0] dc_scaler_y;    // luminance DC scaler
    logic [5:0] dc_scaler_c;    // chrominance DC scaler
    logic       left_avail;     // macroblock to the left may be used for prediction
    logic       top_avail;      // macroblock above may be used for prediction
    logic       topleft_avail;  // macroblock above-left may be used for prediction
    logic [5:0] mb_x;           // macroblock column, addresses the external prediction memory
  } mb_param_t;

  // cos(n*pi/16)/2 * 2^13 for n = 0..8.
  function automatic logic signed [COEF_W-1:0] half_cos(input int n);
    case (n)
      0: return 15'sd4096;
      1: return 15'sd4017;
      2: return 15'sd3784;
      3: return 15'sd3406;
      4: return 15'sd2896;
      5: return 15'sd2276;
      6: return 15'sd1567;
      7: return 15'sd799;
      default: return 15'sd0;
    endcase
  endfunction

  // C[u][k] scaled by 2^13.
  function automatic logic signed [COEF_W-1:0] coef(input int u, input int k);
    int n;
    if (u == 0) return 15'sd2896;      // 1/(2*sqrt(2))
    n = ((2 * k + 1) * u) % 32;
    if (n > 16) n = 32 - n;
    if (n > 8) return -half_cos(16 - n);
    return half_cos(n);
  endfunction

  // Saturate a 32-bit value into a signed field of width w (w <= 31).
  function automatic int sat(input int v, input int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
