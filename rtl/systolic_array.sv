// systolic_array: linear array of M = 6 PEs computing both pseudo-correlations.
//
// The array evaluates, for one block, the six difference-lane outputs
// T(NU[r]) = sum_c (-1)^EPS[r][c] s(COEF_SEQ[(r+c) mod 6]) * (xa(PAIR_P[c]) - xa(PAIR_Q[c]))
// and the six sum-lane outputs
// T(MU[r]) = sum_c (-1)^GAM[r][c] s(COEF_SEQ[(r+c) mod 6]) * (xa(PAIR_P[c]) + xa(PAIR_Q[c])).
// Items enter PE 1 one per cycle and move towards PE 6; the partial sums and
// the load tag move the same way at half speed. A block is six items, entered
// at phases 0..5 with the load tag on the first: the tag overtakes nothing
// and meets item j-1 in PE j, so each PE keeps one column (PE j: column 6-j).
// The partial sums start at zero at PE 1 during phases 0..5, each sees
// coefficient s(COEF_SEQ[(r+c) mod 6]) in every PE, and the six pairs
// (T(NU[r]), T(MU[r])) leave PE 6 in the row order 0,5,4,3,2,1, two values
// per cycle. Between blocks the coefficient input must keep running through
// its period of six (phase_coef), since a partial sum started at phase 5
// meets items up to phase 10 on its way through the array.
//
// Latency: the first pair leaves 2*M = 12 cycles after the block's first item
// entered. A new block may start every 6 cycles; operands of the next block
// are loaded behind the last partial sum of the current one.
// The array structure and the PE follow the described architecture; the
// two-speed schedule and the output order are this design's choice.
module systolic_array
  import dct13_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  item_t item_i,          // item entering PE 1
  input  logic  tc_i,            // load tag (first item of a block)
  input  logic  v_i,             // start a valid partial sum
  input  sign_t sign_i [M],      // sign tags, index j-1 for PE j
  output logic  tc_o,            // first output pair of a block
  output logic  v_o,             // output pair valid
  output acc_t  t_sum_o,         // sum lane: T(MU[row])
  output acc_t  t_dif_o          // difference lane: T(NU[row])
);

  item_t item [M+1];
  logic  tc   [M+1];
  logic  v    [M+1];
  acc_t  y1   [M+1];
  acc_t  y2   [M+1];

  assign item[0] = item_i;
  assign tc[0]   = tc_i;
  assign v[0]    = v_i;
  assign y1[0]   = '0;
  assign y2[0]   = '0;

  for (genvar j = 0; j < M; j++) begin : g_pe
    pe u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .item_i (item[j]),
      .tc_i   (tc[j]),
      .v_i    (v[j]),
      .y1_i   (y1[j]),
      .y2_i   (y2[j]),
      .sign_i (sign_i[j]),
      .item_o (item[j+1]),
      .tc_o   (tc[j+1]),
      .v_o    (v[j+1]),
      .y1_o   (y1[j+1]),
      .y2_o   (y2[j+1])
    );
  end

  // The load tag always starts a valid partial sum.
  a_tag_valid: assert property (@(posedge clk) disable iff (!rst_n) tc_i |-> v_i);

  assign tc_o    = tc[M];
  assign v_o     = v[M];
  assign t_sum_o = y1[M];
  assign t_dif_o = y2[M];

endmodule
