// dct13_pkg: sizes, fixed-point formats and constant tables shared by the
// 13-point DCT pipeline.
//
// The transform length N = 13, the primitive root 2, the coefficient order,
// the pair order and the two sign matrices follow the algorithm: the DCT is
// rewritten through the backward running sum xa(i) = x(i) + xa(i+1), and the
// twelve values T(k) = sum_i xa(i) sin(i*k*pi/13) are split into two
// 6-point pseudo-correlations, one over differences xa(p)-xa(q) (even k) and
// one over sums xa(p)+xa(q) (odd k). The word widths and the Q formats are
// this design's own choice.
//
// Fixed-point formats (all two's complement):
//   input x        : XW bits, integer
//   xa             : XAW = XW+4 bits (a sum of 13 inputs cannot overflow)
//   sum/difference : DW  = XAW+1 bits
//   s(m)           : CW bits, CF fractional bits, s(m) = round(sin(m*pi/13)*2^CF)
//   T(k)           : YW bits, CF fractional bits (6 products accumulated)
//   COS_K, SIN2_K  : PCW bits, CF fractional bits,
//                    COS_K[k]  = round(cos(k*pi/26)*2^CF),
//                    SIN2_K[k] = round(2*sin(k*pi/26)*2^CF)
//   output Y       : OW bits, OF fractional bits (rounded)
package dct13_pkg;

  localparam int N  = 13;        // transform length
  localparam int M  = (N - 1) / 2; // PEs per array = length of each pseudo-correlation

  localparam int XW  = 12;
  localparam int XAW = XW + 4;
  localparam int DW  = XAW + 1;
  localparam int CW  = 16;
  localparam int CF  = 14;
  localparam int YW  = DW + CW + 3;
  localparam int PCW = 18;
  localparam int OW  = 20;
  localparam int OF  = 4;

  typedef logic signed [XW-1:0]  x_t;
  typedef logic signed [XAW-1:0] xa_t;
  typedef logic signed [DW-1:0]  d_t;
  typedef logic signed [CW-1:0]  coef_t;
  typedef logic signed [YW-1:0]  acc_t;
  typedef logic signed [PCW-1:0] pcoef_t;
  typedef logic signed [OW-1:0]  y_t;

  // One item entering the array: a sum (for the odd-k lane), a difference
  // (for the even-k lane), the coefficient travelling with it, the load tag
  // and a valid flag for the partial sum that starts with it.
  typedef struct packed {
    d_t    xs;     // xa(p) + xa(q)
    d_t    xd;     // xa(p) - xa(q)
    coef_t s;      // s(m)
  } item_t;

  // Sign tag of one PE: bit 1 negates the difference lane (epsilon),
  // bit 0 negates the sum lane (gamma).
  typedef logic [1:0] sign_t;

  // s(m) = sin(m*pi/13), m = 1..6, index 0 unused.
  localparam coef_t S_COEF [7] = '{16'sd0, 16'sd3921, 16'sd7614, 16'sd10865,
                                   16'sd13484, 16'sd15319, 16'sd16265};

  // cos(k*pi/26) and 2*sin(k*pi/26), k = 0..12.
  localparam pcoef_t COS_K [13] = '{18'sd16384, 18'sd16265, 18'sd15908, 18'sd15319,
                                    18'sd14507, 18'sd13484, 18'sd12264, 18'sd10865,
                                    18'sd9307,  18'sd7614,  18'sd5810,  18'sd3921,
                                    18'sd1975};
  localparam pcoef_t SIN2_K [13] = '{18'sd0,     18'sd3950,  18'sd7842,  18'sd11620,
                                     18'sd15228, 18'sd18614, 18'sd21729, 18'sd24527,
                                     18'sd26968, 18'sd29015, 18'sd30639, 18'sd31816,
                                     18'sd32529};

  // Row 1 of the coefficient matrix: row r (0-based) uses COEF_SEQ[(r+c) mod 6]
  // in column c (0-based).
  localparam int COEF_SEQ [M] = '{4, 5, 3, 6, 1, 2};

  // Index pairs (p, q) of column c: difference xa(p)-xa(q), sum xa(p)+xa(q).
  localparam int PAIR_P [M] = '{2, 4, 8, 3, 6, 12};
  localparam int PAIR_Q [M] = '{11, 9, 5, 10, 7, 1};

  // Output index of row r: NU for the difference lane, MU for the sum lane.
  localparam int NU [M] = '{2, 4, 8, 10, 6, 12};
  localparam int MU [M] = '{11, 9, 5, 3, 7, 1};

  // Sign matrices, row r, column c: 1 means the term is subtracted.
  localparam logic [M-1:0] EPS [M] = '{6'b001001, 6'b010011, 6'b100111,
                                       6'b110001, 6'b011101, 6'b111011};
  localparam logic [M-1:0] GAM [M] = '{6'b110010, 6'b101000, 6'b011100,
                                       6'b001010, 6'b100110, 6'b000000};
  // Bit (M-1-c) of a row holds column c, so the literals read left to right
  // like the printed matrices.

  // Array schedule. Item n (n = 0..5) of a block enters PE 1 at phase n and
  // carries column c = 5-n, so PE j (1-based) keeps column 6-j. The partial
  // sum started at phase t leaves with row (6-t) mod 6.
  function automatic int item_col(input int n);
    return M - 1 - n;
  endfunction

  function automatic int phase_row(input int t);
    return (M - t) % M;
  endfunction

  // Coefficient index s(m) on the coefficient input at phase p.
  function automatic int phase_coef(input int p);
    return COEF_SEQ[(M - 1 - p + M) % M];
  endfunction

endpackage
