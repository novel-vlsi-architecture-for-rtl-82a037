// tb_systolic_array: self-checking testbench of the 6-PE array.
//
// The testbench plays the array's environment: a phase counter, the
// coefficient stream and sign_tag_gen. Each block is a random auxiliary
// sequence xa(0..12); its six sums and differences enter at phases 0..5 with
// the load tag on the first. The twelve outputs are compared with T(k)
// computed directly from the definition T(k) = sum_i xa(i) sin(i k pi/13)
// (reference package), in the output order of the array. The first output
// pair must leave exactly 12 cycles after the first item entered. Blocks are
// sent back to back (a new block every 6 cycles) and with idle gaps.
module tb_systolic_array;
  import dct13_pkg::*;
  import dct13_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  item_t item_i;
  logic  tc_i, v_i, tc_o, v_o;
  sign_t sign_i [M];
  acc_t  t_sum_o, t_dif_o;
  logic [2:0] phase;
  int checks = 0, failures = 0;
  int back_to_back = 0, gaps = 0, blocks_out = 0;

  systolic_array dut (.*);
  sign_tag_gen u_sign (.phase_i(phase), .sign_o(sign_i));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs, queued per block.
  longint exp_dif [$], exp_sum [$];
  int     start_cyc [$];
  int     cyc = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  // Stimulus
  initial begin
    int nblk = 60;
    item_i = '0; tc_i = 0; v_i = 0; phase = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < nblk; b++) begin
      arr13_t xa;
      int idle;
      for (int i = 0; i < N; i++) xa[i] = rnd(XAW);
      idle = ($urandom_range(0, 2) == 0) ? 6 * $urandom_range(1, 2) : 0;
      if (b > 0) begin
        if (idle == 0) back_to_back++; else gaps++;
      end
      repeat (idle) begin
        @(negedge clk);
        tc_i = 0; v_i = 0;
        item_i.xs = d_t'(rnd(DW)); item_i.xd = d_t'(rnd(DW));  // junk between blocks
        item_i.s = S_COEF[phase_coef(int'(phase))];
        @(posedge clk); #1 phase = (phase == 5) ? 0 : phase + 1;
      end
      begin
        arr13_t tt;
        tt = ref_t(xa);
        for (int t = 0; t < M; t++) begin
          exp_dif.push_back(tt[NU[phase_row(t)]]);
          exp_sum.push_back(tt[MU[phase_row(t)]]);
        end
      end
      for (int n = 0; n < M; n++) begin
        int c;
        @(negedge clk);
        c = item_col(n);
        item_i.xs = d_t'(xa[PAIR_P[c]] + xa[PAIR_Q[c]]);
        item_i.xd = d_t'(xa[PAIR_P[c]] - xa[PAIR_Q[c]]);
        item_i.s  = S_COEF[phase_coef(int'(phase))];
        tc_i = (n == 0);
        v_i  = 1;
        if (n == 0) start_cyc.push_back(cyc);
        @(posedge clk); #1 phase = (phase == 5) ? 0 : phase + 1;
      end
    end
    for (int i = 0; i < 2 * M + 6; i++) begin
      @(negedge clk);
      tc_i = 0; v_i = 0;
      item_i.s = S_COEF[phase_coef(int'(phase))];
      @(posedge clk); #1 phase = (phase == 5) ? 0 : phase + 1;
    end
    checks++;
    if (blocks_out != nblk || back_to_back == 0 || gaps == 0) begin
      failures++;
      $display("FAIL blocks out %0d of %0d, back-to-back %0d, gaps %0d", blocks_out, nblk, back_to_back, gaps);
    end
    $display("blocks=%0d back_to_back=%0d with_gap=%0d", blocks_out, back_to_back, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker
  int     t_out = 0;
  always @(posedge clk) begin
    if (rst_n && v_o) begin
      int r;
      if (tc_o) begin
        begin
          checks++;
          if (cyc - start_cyc.pop_front() != 2 * M) begin
            failures++;
            $display("FAIL latency");
          end
        end
        t_out = 0;
        blocks_out++;
      end
      r = phase_row(t_out);
      checks++;
      if (exp_dif.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        longint ed, es;
        ed = exp_dif.pop_front();
        es = exp_sum.pop_front();
        if (longint'(t_dif_o) != ed || longint'(t_sum_o) != es) begin
          failures++;
          $display("FAIL row %0d: T(%0d)=%0d exp %0d, T(%0d)=%0d exp %0d", r, NU[r], t_dif_o, ed,
                   MU[r], t_sum_o, es);
        end
      end
      t_out++;
    end
  end
endmodule
