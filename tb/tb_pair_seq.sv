// tb_pair_seq: self-checking testbench of the array input sequencer.
//
// Blocks of random xa values are written the way pre_accum writes them
// (addresses 12 down to 0, alternating banks, blk_done_i with xa(0)), with
// random spacing of at least 13 cycles. At the array input the testbench
// expects, for every block, six consecutive items starting at phase 0 with
// the load tag on the first, the pairs in the order
// (12,1) (6,7) (3,10) (8,5) (4,9) (2,11) as sums and differences, and xa0_o
// equal to the block's xa(0). The coefficient must follow
// s(2) s(1) s(6) s(3) s(5) s(4) by phase in every cycle, busy or idle. Both
// orders are the published input streams of the array in arrival order,
// written here independently of the package tables. The wait for phase 0
// must be 3 to 8 cycles from blk_done_i, and must vary.
module tb_pair_seq;
  import dct13_pkg::*;
  import dct13_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic xa_we_i, xa_bank_i, blk_done_i;
  logic [3:0] xa_addr_i;
  xa_t xa_i, xa0_i;
  logic [2:0] phase_o;
  item_t item_o;
  logic tc_o, v_o, blk_start_o, wait_o;
  xa_t xa0_o;
  int checks = 0, failures = 0, cyc = 0;
  int min_wait = 99, max_wait = 0, blocks_seen = 0;

  pair_seq dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ord_p [6] = '{12, 6, 3, 8, 4, 2};
  int ord_q [6] = '{1, 7, 10, 5, 9, 11};
  int coef_by_phase [6] = '{2, 1, 6, 3, 5, 4};

  longint exp_s [$], exp_d [$], exp_x0 [$];
  int     done_cyc [$];
  int     nblk = 60;

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    logic bank = 0;
    xa_we_i = 0; xa_bank_i = 0; blk_done_i = 0; xa_addr_i = 0; xa_i = '0; xa0_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < nblk; b++) begin
      arr13_t xa;
      for (int i = 0; i < N; i++) xa[i] = rnd(XAW);
      for (int n = 0; n < 6; n++) begin
        exp_s.push_back(xa[ord_p[n]] + xa[ord_q[n]]);
        exp_d.push_back(xa[ord_p[n]] - xa[ord_q[n]]);
      end
      exp_x0.push_back(xa[0]);
      for (int i = N - 1; i >= 0; i--) begin
        @(negedge clk);
        xa_we_i = 1; xa_bank_i = bank; xa_addr_i = 4'(i); xa_i = xa_t'(xa[i]);
        blk_done_i = (i == 0);
        if (i == 0) begin xa0_i = xa_t'(xa[0]); done_cyc.push_back(cyc); end
      end
      @(negedge clk);
      xa_we_i = 0; blk_done_i = 0;
      bank = ~bank;
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    repeat (30) @(posedge clk);
    checks++;
    if (blocks_seen != nblk || exp_s.size() != 0 || min_wait == max_wait) begin
      failures++;
      $display("FAIL blocks %0d of %0d, wait %0d..%0d", blocks_seen, nblk, min_wait, max_wait);
    end
    $display("blocks=%0d wait=%0d..%0d cycles", blocks_seen, min_wait, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_in = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (int'(item_o.s) != int'(S_COEF[coef_by_phase[phase_o]]) && coef_by_phase[phase_o] > 0) begin
        failures++;
        $display("FAIL coefficient at phase %0d", phase_o);
      end
      if (v_o) begin
        longint es, ed;
        if (n_in == 0) begin
          int w;
          checks++;
          w = cyc - done_cyc.pop_front();
          if (w < min_wait) min_wait = w;
          if (w > max_wait) max_wait = w;
          if (!tc_o || !blk_start_o || phase_o != 0 || w < 3 || w > 8 ||
              longint'(xa0_o) != exp_x0.pop_front()) begin
            failures++;
            $display("FAIL block start: tc %b phase %0d wait %0d", tc_o, phase_o, w);
          end
        end else if (tc_o || int'(phase_o) != n_in) begin
          failures++;
          $display("FAIL item %0d: tc %b phase %0d", n_in, tc_o, phase_o);
        end
        es = exp_s.pop_front();
        ed = exp_d.pop_front();
        checks++;
        if (longint'(item_o.xs) != es || longint'(item_o.xd) != ed) begin
          failures++;
          $display("FAIL item %0d: sum %0d exp %0d, diff %0d exp %0d", n_in, item_o.xs, es, item_o.xd, ed);
        end
        n_in = (n_in == 5) ? 0 : n_in + 1;
        if (n_in == 0) blocks_seen++;
      end else if (tc_o) begin
        failures++;
        $display("FAIL tag without valid");
      end
    end
  end
endmodule
