// amt_pkg: types, sizes and constants shared by the reconfigurable 4x4
// Adaptive Multiple Transform (AMT) datapath.
//
// The datapath computes D = DTT * S * DTT^T on 4x4 blocks, where DTT is one of
// the five AMT matrices (DCT-II, DCT-V, DCT-VIII, DST-I, DST-VII) chosen per
// block by a transform identifier. All constant multiplications are built from
// shifts and adders/subtractors in canonical signed digit (CSD) form; the
// helper functions below derive those shift/add recipes at elaboration time.
//
// Sizes: residual samples are DATA_W = 10 bit signed, coefficients fit in
// COEF_W = 10 bit signed, every product is PROD_W = 19 bit signed (four such
// products make the 76-bit register bank of the overclocked MCM_MIX2 block),
// and a sum of four products is SUM_W = 21 bit signed. Between the two 1-D
// passes the intermediate values are rounded back to DATA_W by MID_SHIFT = 10,
// so both passes can be the same circuit. The 19-bit product width follows
// from the 76-bit / 4-register figure; the rest is this design's choice.
//
// Coefficient values are the 4-point integer AMT matrices of the VVC
// exploration model (each entry round(512 * orthonormal basis value)); the
// entries 194 (DCT-V), 117 (DST-VII) and 336/296/219/117 (DCT-VIII column 0)
// agree with the worked multiplierless examples of the design.
package amt_pkg;

  localparam int unsigned N         = 4;   // block size (4x4)
  localparam int unsigned NUM_TR    = 5;   // transforms in the AMT set
  localparam int unsigned DATA_W    = 10;  // input / intermediate sample width
  localparam int unsigned COEF_W    = 10;  // coefficient width (|c| <= 349)
  localparam int unsigned PROD_W    = 19;  // one product, 4 x 19 = 76 bits
  localparam int unsigned SUM_W     = 21;  // sum of N products
  localparam int unsigned MID_SHIFT = 10;  // rounding shift between passes
  localparam int unsigned CSD_BITS  = 12;  // CSD digits examined per constant

  // Transform identifier (transform_ID). Codes 5..7 are unused and select
  // DCT-II.
  typedef enum logic [2:0] {
    TR_DCT2 = 3'd0,
    TR_DCT5 = 3'd1,
    TR_DCT8 = 3'd2,
    TR_DST1 = 3'd3,
    TR_DST7 = 3'd4
  } tr_id_t;

  // The five reconfigurable multiplier organisations, and the single-transform
// (standalone) circuit they are derived from.
  typedef enum logic [2:0] {
    ARCH_MCM_PAR  = 3'd0,  // 5 MCM-parallel blocks per input, outputs muxed
    ARCH_MCM_MUX  = 3'd1,  // 16 single-output MCM-multiplexed blocks
    ARCH_MCM_MIX0 = 3'd2,  // 16 five-output MCM-parallel blocks + inner mux
    ARCH_MCM_MIX1 = 3'd3,  // 4 four-output blocks selecting 4 of 20 products
    ARCH_MCM_MIX2 = 3'd4,  // 4 one-of-20 blocks run at 4x clock + registers
    ARCH_STANDALONE = 3'd5 // one fixed transform: 4 MCM-parallel blocks
  } arch_t;

  localparam int unsigned NUM_ARCH = 5;  // reconfigurable organisations

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  // COEF_TAB[tr][k][j] = DTT[k][j]: row k is basis function k.
  localparam int COEF_TAB [NUM_TR][N][N] = '{
    // DCT-II
    '{'{ 256,  256,  256,  256},
      '{ 334,  139, -139, -334},
      '{ 256, -256, -256,  256},
      '{ 139, -334,  334, -139}},
    // DCT-V
    '{'{ 194,  274,  274,  274},
      '{ 274,  241,  -86, -349},
      '{ 274,  -86, -349,  241},
      '{ 274, -349,  241,  -86}},
    // DCT-VIII
    '{'{ 336,  296,  219,  117},
      '{ 296,    0, -296, -296},
      '{ 219, -296, -117,  336},
      '{ 117, -296,  336, -219}},
    // DST-I
    '{'{ 190,  308,  308,  190},
      '{ 308,  190, -190, -308},
      '{ 308, -190, -190,  308},
      '{ 190, -308,  308, -190}},
    // DST-VII
    '{'{ 117,  219,  296,  336},
      '{ 296,  296,    0, -296},
      '{ 336, -117, -296,  219},
      '{ 219, -336,  296, -117}}
  };

  // Coefficient DTT[k][j] of transform tr (tr >= NUM_TR reads DCT-II).
  function automatic int coef(int tr, int k, int j);
    int t;
    t = (tr >= 0 && tr < int'(NUM_TR)) ? tr : 0;
    return COEF_TAB[t][k][j];
  endfunction

  // Coefficient groups handed to the multiplier blocks as parameters.
  typedef coef_t [N-1:0]        coef4_t;   // one column of one matrix
  typedef coef_t [NUM_TR-1:0]   coef5_t;   // one position in all matrices
  typedef coef_t [N*NUM_TR-1:0] coef20_t;  // one column in all matrices

  // Column j of transform tr: element k is DTT[k][j], the constant sample j
  // is multiplied by on its way to output k.
  function automatic coef4_t col_coefs(int tr, int j);
    coef4_t r;
    for (int k = 0; k < int'(N); k++) r[k] = coef_t'(coef(tr, k, j));
    return r;
  endfunction

  // Position (k, j) of all five matrices: element tr is DTT_tr[k][j].
  function automatic coef5_t pos_coefs(int k, int j);
    coef5_t r;
    for (int tr = 0; tr < int'(NUM_TR); tr++) r[tr] = coef_t'(coef(tr, k, j));
    return r;
  endfunction

  // Column j of all five matrices: element tr*N + k is DTT_tr[k][j].
  function automatic coef20_t all_coefs(int j);
    coef20_t r;
    for (int tr = 0; tr < int'(NUM_TR); tr++)
      for (int k = 0; k < int'(N); k++) r[tr*N+k] = coef_t'(coef(tr, k, j));
    return r;
  endfunction

  // CSD digit (-1, 0 or +1) at bit position b of constant c.
  function automatic int csd_digit(int c, int b);
    int m, d, res, sgn;
    sgn = (c < 0) ? -1 : 1;
    m   = (c < 0) ? -c : c;
    res = 0;
    for (int i = 0; i < CSD_BITS; i++) begin
      if ((m & 1) != 0) begin
        d = 2 - (m & 3);
        m = m - d;
      end else begin
        d = 0;
      end
      m = m >> 1;
      if (i == b) res = d * sgn;
    end
    return res;
  endfunction

  // Number of non-zero CSD digits of c (adder/subtractor operands).
  function automatic int csd_weight(int c);
    int w;
    w = 0;
    for (int b = 0; b < CSD_BITS; b++) if (csd_digit(c, b) != 0) w++;
    return w;
  endfunction

  // Bit position of the n-th non-zero CSD digit of c, counted from the LSB;
  // 0 when c has fewer than n+1 digits.
  function automatic int csd_shift(int c, int n);
    int cnt, pos;
    cnt = 0;
    pos = 0;
    for (int b = 0; b < CSD_BITS; b++) begin
      if (csd_digit(c, b) != 0) begin
        if (cnt == n) pos = b;
        cnt++;
      end
    end
    return pos;
  endfunction

  // Sign (1 = subtract) of the n-th non-zero CSD digit of c.
  function automatic bit csd_neg(int c, int n);
    int cnt;
    bit neg;
    cnt = 0;
    neg = 1'b0;
    for (int b = 0; b < CSD_BITS; b++) begin
      if (csd_digit(c, b) != 0) begin
        if (cnt == n) neg = (csd_digit(c, b) < 0);
        cnt++;
      end
    end
    return neg;
  endfunction

  // Odd part of |c| and the power of two taken out of it (c != 0).
  function automatic int odd_part(int c);
    int m;
    m = (c < 0) ? -c : c;
    if (m == 0) return 0;
    while ((m & 1) == 0) m = m >> 1;
    return m;
  endfunction

  function automatic int pow2_part(int c);
    int m, s;
    m = (c < 0) ? -c : c;
    s = 0;
    if (m == 0) return 0;
    while ((m & 1) == 0) begin
      m = m >> 1;
      s++;
    end
    return s;
  endfunction

  // Rounding of a first-pass sum back to the sample width:
  // (t + 2^(MID_SHIFT-1)) >>> MID_SHIFT. With |DTT row| sums <= 1024 and
  // samples in [-512, 511] the result always lies in [-512, 511].
  function automatic data_t mid_round(sum_t t);
    sum_t r;
    r = (t + sum_t'(1 <<< (MID_SHIFT - 1))) >>> MID_SHIFT;
    return data_t'(r);
  endfunction

endpackage
