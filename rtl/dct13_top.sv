// dct13_top: 13-point 1-D DCT built around a pseudo-correlation systolic array.
//
// Y(k) = sum_i x(i) cos((2i+1) k pi/26), k = 0..12, without the sqrt(2/13)
// scale of the orthonormal definition. The chain is
//   pre_accum     : input buffer, backward running sum xa(i) = x(i) + xa(i+1)
//   pair_seq      : xa buffer, sums/differences in the array's order,
//                   coefficient stream, load tags, phase counter
//   sign_tag_gen  : per-PE sign tags from the phase
//   systolic_array: 6 PEs evaluating both 6-point pseudo-correlations,
//                   giving T(k) for even k (differences) and odd k (sums)
//   post_proc     : T(k) back into natural order, Y(k) = xa(0)cos(k pi/26)
//                   - 2 sin(k pi/26) T(k), Y(0) = xa(0)
// Interface: one input sample per cycle with in_valid_i (x(0) first, blocks
// of 13 back to back, gaps allowed); one output per cycle with y_valid_o,
// y_idx_o = k, in natural order, OF = 4 fractional bits.
// Throughput: one block per 13 cycles, set by the one-sample-per-cycle input;
// the array itself could take a block every 6 cycles. From the clock edge
// that takes the last input sample of a block, its Y(0) is on the outputs
// 37 to 42 edges later, depending on where the 6-cycle phase stands when the
// block becomes ready; with continuous input a block may wait up to 13 more
// cycles for the output reader.
// The observation outputs count nothing themselves; they show when a block
// waits for the array phase or for the output reader.
module dct13_top
  import dct13_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid_i,
  input  x_t         in_x_i,
  output logic       y_valid_o,
  output logic [3:0] y_idx_o,
  output y_t         y_o,
  output logic       phase_wait_o,   // a ready block waits for phase 0
  output logic       out_queued_o    // a finished block waits for the reader
);

  logic       xa_we, xa_bank, blk_done;
  logic [3:0] xa_addr;
  xa_t        xa, xa0_pre, xa0_seq;

  logic [2:0] phase;
  item_t      item;
  logic       tc_in, v_in, blk_start;
  sign_t      sign [M];

  logic       tc_out, v_out;
  acc_t       t_sum, t_dif;

  pre_accum u_pre (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid_i (in_valid_i),
    .in_x_i     (in_x_i),
    .xa_we_o    (xa_we),
    .xa_bank_o  (xa_bank),
    .xa_addr_o  (xa_addr),
    .xa_o       (xa),
    .blk_done_o (blk_done),
    .xa0_o      (xa0_pre)
  );

  pair_seq u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .xa_we_i     (xa_we),
    .xa_bank_i   (xa_bank),
    .xa_addr_i   (xa_addr),
    .xa_i        (xa),
    .blk_done_i  (blk_done),
    .xa0_i       (xa0_pre),
    .phase_o     (phase),
    .item_o      (item),
    .tc_o        (tc_in),
    .v_o         (v_in),
    .blk_start_o (blk_start),
    .xa0_o       (xa0_seq),
    .wait_o      (phase_wait_o)
  );

  sign_tag_gen u_sign (
    .phase_i (phase),
    .sign_o  (sign)
  );

  systolic_array u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .item_i  (item),
    .tc_i    (tc_in),
    .v_i     (v_in),
    .sign_i  (sign),
    .tc_o    (tc_out),
    .v_o     (v_out),
    .t_sum_o (t_sum),
    .t_dif_o (t_dif)
  );

  post_proc u_post (
    .clk         (clk),
    .rst_n       (rst_n),
    .blk_start_i (blk_start),
    .xa0_i       (xa0_seq),
    .tc_i        (tc_out),
    .v_i         (v_out),
    .t_sum_i     (t_sum),
    .t_dif_i     (t_dif),
    .y_valid_o   (y_valid_o),
    .y_idx_o     (y_idx_o),
    .y_o         (y_o),
    .queued_o    (out_queued_o)
  );

endmodule
