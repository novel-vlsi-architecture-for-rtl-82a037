// pair_seq: permutation buffer and input sequencer of the systolic array.
//
// It holds the auxiliary sequence xa of a block in a two-bank RAM (written by
// pre_accum in reverse order) and reads it back two words per cycle in the
// order the array needs, forming xa(p)+xa(q) for the sum lane and
// xa(p)-xa(q) for the difference lane. With each pair it sends the
// coefficient s(m) of the current phase, a load tag on the first pair of the
// block and a valid flag. The pairs, their add/subtract and the RAM-based
// reordering follow the described pre-processing; the sequencer is this
// design's own.
//
// A free-running phase counter (0..5) paces the array: the coefficient input
// cycles through s(COEF_SEQ[(5-p) mod 6]) in every cycle, busy or not, and a
// block always enters at phases 0..5, item n carrying column 5-n of the
// pair tables. A block that becomes ready (blk_done_i) waits for the next
// phase 0: its first item is at the array input 3 to 8 clock edges after
// the edge that took blk_done_i. The phase is also sent to sign_tag_gen.
// blk_start_o pulses with the first item and xa0_o then holds that block's
// xa(0). Blocks must be at least 7 cycles apart at blk_done_i; pre_accum
// delivers them at least 13 apart.
module pair_seq
  import dct13_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       xa_we_i,
  input  logic       xa_bank_i,
  input  logic [3:0] xa_addr_i,
  input  xa_t        xa_i,
  input  logic       blk_done_i,
  input  xa_t        xa0_i,
  output logic [2:0] phase_o,      // phase of the item now at the array input
  output item_t      item_o,
  output logic       tc_o,
  output logic       v_o,
  output logic       blk_start_o,
  output xa_t        xa0_o,
  output logic       wait_o        // a ready block is waiting for phase 0
);

  logic [2:0] phase;
  logic       pend, pend_bank;
  xa_t        pend_xa0;
  logic       act, act_bank;
  logic [2:0] n;
  logic       iss_v, iss_first;
  logic [XAW-1:0] rda, rdb;
  logic [3:0] addr_p, addr_q;

  always_comb begin
    addr_p = 4'(PAIR_P[item_col(int'(n))]);
    addr_q = 4'(PAIR_Q[item_col(int'(n))]);
  end

  bank_ram #(.W(XAW), .DEPTH(N), .AW(4)) u_xaram (
    .clk       (clk),
    .we_i      (xa_we_i),
    .wbank_i   (xa_bank_i),
    .waddr_i   (xa_addr_i),
    .wdata_i   (xa_i),
    .rea_i     (act),
    .rbank_a_i (act_bank),
    .raddr_a_i (addr_p),
    .rda_o     (rda),
    .reb_i     (act),
    .rbank_b_i (act_bank),
    .raddr_b_i (addr_q),
    .rdb_o     (rdb)
  );

  // The read of item n is issued at phase n-1, so its data meet phase n.
  // A block is therefore started (act set) at the edge that ends phase 4.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      pend      <= 1'b0;
      pend_bank <= 1'b0;
      pend_xa0  <= '0;
      act       <= 1'b0;
      act_bank  <= 1'b0;
      n         <= '0;
      iss_v     <= 1'b0;
      iss_first <= 1'b0;
      xa0_o     <= '0;
    end else begin
      phase <= (phase == 3'(M - 1)) ? 3'd0 : phase + 3'd1;
      if (blk_done_i) begin
        pend      <= 1'b1;
        pend_bank <= xa_bank_i;
        pend_xa0  <= xa0_i;
      end
      if (act) begin
        if (n == 3'(M - 1)) act <= 1'b0;
        n <= n + 3'd1;
      end
      if (pend && phase == 3'(M - 2)) begin
        pend     <= blk_done_i;
        act      <= 1'b1;
        act_bank <= pend_bank;
        n        <= 3'd0;
        xa0_o    <= pend_xa0;
      end
      iss_v     <= act;
      iss_first <= act && (n == 3'd0);
    end
  end

  always_comb begin
    phase_o     = phase;
    item_o.xs   = d_t'(xa_t'(rda)) + d_t'(xa_t'(rdb));
    item_o.xd   = d_t'(xa_t'(rda)) - d_t'(xa_t'(rdb));
    item_o.s    = S_COEF[phase_coef(int'(phase))];
    tc_o        = iss_first;
    v_o         = iss_v;
    blk_start_o = iss_first;
    wait_o      = pend;
  end

  // A second block must not arrive while one is still waiting.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) blk_done_i |-> !pend || (phase == 3'(M - 2));
  endproperty
  a_no_overrun: assert property (p_no_overrun);

endmodule
