// tb_dct13_top: end-to-end testbench of the 13-point DCT at its default size.
//
// Random input blocks x(0..12), 12-bit signed, are streamed in natural order:
// runs of blocks back to back (one sample every cycle, the full input rate)
// and blocks with idle cycles inside and between them, plus blocks of
// extreme values. Every output Y(k) is compared with the exact value of the
// reference chain (backward running sum, T(k) from its definition, rounded
// post-processing formula) and with the floating-point DCT within a small
// tolerance set by the 14-bit coefficients.
//
// It also checks that each mechanism of the design occurred: a block waiting
// for array phase 0 with different wait lengths, a finished block queued
// behind the output reader, operand loads by tag in every PE, and all four
// sign codes applied to valid partial sums. Latency from the last input
// sample of a block to its Y(0) must lie between 38 and 56 clock edges, and
// with continuous input the outputs must keep pace (no growing backlog).
module tb_dct13_top;
  import dct13_pkg::*;
  import dct13_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid_i;
  x_t   in_x_i;
  logic y_valid_o, phase_wait_o, out_queued_o;
  logic [3:0] y_idx_o;
  y_t   y_o;
  int checks = 0, failures = 0, cyc = 0;

  dct13_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NBLK = 300;

  initial begin : watchdog
    repeat (NBLK * 40 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_y [$];
  real    exp_r [$];
  real    tol_q [$];
  int     last_in [$];
  int     blocks_out = 0;
  real    max_err = 0.0;

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    in_valid_i = 0; in_x_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      arr13_t x, xa, tt, yy;
      real sabs;
      bit gappy;
      int kind;
      kind = $urandom_range(0, 9);
      for (int i = 0; i < N; i++) begin
        if (kind == 0) x[i] = -(longint'(1) <<< (XW - 1));                 // all most negative
        else if (kind == 1) x[i] = (longint'(1) <<< (XW - 1)) - 1;         // all most positive
        else if (kind == 2) x[i] = (i % 2 == 0) ? -(longint'(1) <<< (XW - 1)) : (longint'(1) <<< (XW - 1)) - 1;
        else x[i] = rnd(XW);
      end
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
      gappy = (b % 40) >= 25;          // 25 blocks back to back, then 15 with gaps
      if (gappy) repeat ($urandom_range(0, 9)) begin @(negedge clk); in_valid_i = 0; end
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid_i = 1; in_x_i = x_t'(x[i]);
        if (i == N - 1) last_in.push_back(cyc);
        if (gappy && i < N - 1 && $urandom_range(0, 4) == 0) begin
          @(negedge clk); in_valid_i = 0;
        end
      end
    end
    @(negedge clk) in_valid_i = 0;
    repeat (120) @(posedge clk);
    finish_checks();
  end

  // Mechanism counters
  int wait_cycles = 0, wait_len = 0, wait_min = 99, wait_max = 0;
  int queued_cycles = 0;
  int loads [M];
  int codes [4];
  int lat_min = 9999, lat_max = 0;

  initial begin
    for (int j = 0; j < M; j++) loads[j] = 0;
    for (int c = 0; c < 4; c++) codes[c] = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (phase_wait_o) begin wait_cycles++; wait_len++; end
      else if (wait_len > 0) begin
        if (wait_len < wait_min) wait_min = wait_len;
        if (wait_len > wait_max) wait_max = wait_len;
        wait_len = 0;
      end
      if (out_queued_o) queued_cycles++;
      if (dut.u_array.g_pe[0].u_pe.tc_i) loads[0]++;
      if (dut.u_array.g_pe[1].u_pe.tc_i) loads[1]++;
      if (dut.u_array.g_pe[2].u_pe.tc_i) loads[2]++;
      if (dut.u_array.g_pe[3].u_pe.tc_i) loads[3]++;
      if (dut.u_array.g_pe[4].u_pe.tc_i) loads[4]++;
      if (dut.u_array.g_pe[5].u_pe.tc_i) loads[5]++;
      if (dut.u_array.g_pe[0].u_pe.v_i) codes[dut.u_array.g_pe[0].u_pe.sign_i]++;
      if (dut.u_array.g_pe[1].u_pe.v_i) codes[dut.u_array.g_pe[1].u_pe.sign_i]++;
      if (dut.u_array.g_pe[2].u_pe.v_i) codes[dut.u_array.g_pe[2].u_pe.sign_i]++;
      if (dut.u_array.g_pe[3].u_pe.v_i) codes[dut.u_array.g_pe[3].u_pe.sign_i]++;
      if (dut.u_array.g_pe[4].u_pe.v_i) codes[dut.u_array.g_pe[4].u_pe.sign_i]++;
      if (dut.u_array.g_pe[5].u_pe.v_i) codes[dut.u_array.g_pe[5].u_pe.sign_i]++;
    end
  end

  // Output checker
  int k_exp = 0;
  always @(posedge clk) begin
    if (rst_n && y_valid_o) begin
      longint e;
      real er, tol, yr, err;
      if (k_exp == 0) begin
        int d;
        d = cyc - last_in.pop_front();
        if (d < lat_min) lat_min = d;
        if (d > lat_max) lat_max = d;
        checks++;
        if (d < 38 || d > 56) begin
          failures++;
          $display("FAIL latency %0d", d);
        end
      end
      e = exp_y.pop_front(); er = exp_r.pop_front(); tol = tol_q.pop_front();
      yr = real'(y_o) / real'(1 << OF);
      err = (yr > er) ? yr - er : er - yr;
      if (err > max_err) max_err = err;
      checks++;
      if (int'(y_idx_o) != k_exp || longint'(y_o) != e || err > tol) begin
        failures++;
        if (failures < 20)
          $display("FAIL block %0d Y(%0d) idx %0d = %0d exp %0d (%f vs %f)", blocks_out, k_exp, y_idx_o, y_o, e, yr, er);
      end
      k_exp = (k_exp == N - 1) ? 0 : k_exp + 1;
      if (k_exp == 0) blocks_out++;
    end
  end

  task automatic finish_checks();
    bit ok;
    ok = 1;
    checks++;
    if (blocks_out != NBLK || exp_y.size() != 0) begin
      ok = 0; $display("FAIL %0d of %0d blocks came out", blocks_out, NBLK);
    end
    checks++;
    if (wait_cycles == 0 || wait_min == wait_max) begin
      ok = 0; $display("FAIL phase wait not exercised (%0d..%0d)", wait_min, wait_max);
    end
    checks++;
    if (queued_cycles == 0) begin ok = 0; $display("FAIL output queue never used"); end
    for (int j = 0; j < M; j++) begin
      checks++;
      if (loads[j] != NBLK) begin ok = 0; $display("FAIL PE%0d loaded %0d times", j + 1, loads[j]); end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (codes[c] == 0) begin ok = 0; $display("FAIL sign code %0d never used", c); end
    end
    if (!ok) failures++;
    $display("blocks=%0d phase_wait_cycles=%0d (runs %0d..%0d) queued_cycles=%0d", blocks_out,
             wait_cycles, wait_min, wait_max, queued_cycles);
    $display("loads per PE=%0d sign codes 00:%0d 01:%0d 10:%0d 11:%0d", loads[0], codes[0], codes[1],
             codes[2], codes[3]);
    $display("latency last sample -> Y(0): %0d..%0d cycles, max |Y - DCT| = %f", lat_min, lat_max, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
