// tb_post_proc: self-checking testbench of the output stage.
//
// For each block a random input x(0..12) is drawn, and xa and T(k) are
// computed by the reference package. The testbench then plays the array:
// blk_start_i with xa(0), and some cycles later six (T(NU[r]), T(MU[r]))
// pairs in row order 0,5,4,3,2,1, the first with tc_i. It checks that
// Y(0..12) come out in natural order on consecutive cycles and equal the
// rounded reference values, and that each lies within a small tolerance of
// the floating-point DCT. Blocks are spaced 12 to 20 cycles apart, so the
// second bank must sometimes wait for the reader (queued_o); without a wait
// the first output follows the last pair after 3 clock edges (2 when
// the reader goes straight on from the previous block).
module tb_post_proc;
  import dct13_pkg::*;
  import dct13_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic blk_start_i, tc_i, v_i;
  xa_t  xa0_i;
  acc_t t_sum_i, t_dif_i;
  logic y_valid_o, queued_o;
  logic [3:0] y_idx_o;
  y_t   y_o;
  int checks = 0, failures = 0, cyc = 0;
  int queued_cycles = 0, blocks_out = 0, direct = 0;

  post_proc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_y [$];
  real    exp_r [$];
  real    tol_q [$];
  int     last_pair [$];
  int     nblk = 80;

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    blk_start_i = 0; tc_i = 0; v_i = 0; xa0_i = '0; t_sum_i = '0; t_dif_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < nblk; b++) begin
      arr13_t x, xa, tt, yy;
      real sabs;
      for (int i = 0; i < N; i++) x[i] = rnd(XW);
      xa = ref_xa(x);
      tt = ref_t(xa);
      yy = ref_y(xa[0], tt);
      sabs = 0.0;
      for (int i = 0; i < N; i++) sabs += (xa[i] < 0) ? -real'(xa[i]) : real'(xa[i]);
      for (int k = 0; k < N; k++) begin
        exp_y.push_back(yy[k]);
        exp_r.push_back(real_dct(x, k));
        tol_q.push_back(1.0 + sabs * 3.0 / 16384.0);
      end
      @(negedge clk);
      blk_start_i = 1; xa0_i = xa_t'(xa[0]);
      @(negedge clk);
      blk_start_i = 0;
      repeat (4) @(negedge clk);
      for (int t = 0; t < M; t++) begin
        int r;
        r = phase_row(t);
        tc_i = (t == 0); v_i = 1;
        t_dif_i = acc_t'(tt[NU[r]]);
        t_sum_i = acc_t'(tt[MU[r]]);
        if (t == M - 1) last_pair.push_back(cyc);
        @(negedge clk);
      end
      tc_i = 0; v_i = 0;
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    repeat (60) @(posedge clk);
    checks++;
    if (blocks_out != nblk || queued_cycles == 0 || direct == 0) begin
      failures++;
      $display("FAIL blocks %0d of %0d, queued cycles %0d, direct %0d", blocks_out, nblk, queued_cycles, direct);
    end
    $display("blocks=%0d queued_cycles=%0d direct_starts=%0d", blocks_out, queued_cycles, direct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  k_exp = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (queued_o) queued_cycles++;
      if (y_valid_o) begin
        longint e;
        real    er, tol, yr;
        if (k_exp == 0) begin
          int d;
          d = cyc - last_pair.pop_front();
          checks++;
          if (d == 3) direct++;
          else if (d < 2 || d > 16) begin
            failures++;
            $display("FAIL output start %0d cycles after last pair", d);
          end
        end
        e = exp_y.pop_front(); er = exp_r.pop_front(); tol = tol_q.pop_front();
        yr = real'(y_o) / real'(1 << OF);
        checks++;
        if (int'(y_idx_o) != k_exp || longint'(y_o) != e || yr - er > tol || er - yr > tol) begin
          failures++;
          $display("FAIL Y(%0d) idx %0d = %0d exp %0d (real %f vs %f)", k_exp, y_idx_o, y_o, e, yr, er);
        end
        k_exp = (k_exp == N - 1) ? 0 : k_exp + 1;
        if (k_exp == 0) blocks_out++;
      end
    end
  end
endmodule
