// tb_sign_tag_gen: self-checking testbench of the sign tag generator.
//
// Two independent checks for every PE and phase:
//  1. The row is found by search: the coefficient a PE holding column c sees
//     at phase p is the one that entered the array j cycles earlier, and the
//     only row whose coefficient in column c is that one is the row passing
//     through. The expected tag is {EPS, GAM} of that row and column.
//  2. The six-cycle tag sequence of PEs 1, 3, 4, 5 and 6 must be a rotation
//     of the published tag columns of the architecture (read in arrival
//     order), which were written down independently of this design's timing.
module tb_sign_tag_gen;
  import dct13_pkg::*;

  logic [2:0] phase_i;
  sign_t      sign_o [M];
  int checks = 0, failures = 0;
  logic clk = 0;

  sign_tag_gen dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Published tag columns, first entry to arrive first; 2 = "10", 1 = "01".
  // Index j-1 for PE j; PE 2 is not used (its column is not given in full).
  int pub [M][6] = '{
    '{2, 2, 2, 2, 2, 2},     // PE 1
    '{0, 0, 0, 0, 0, 0},     // PE 2 (unused)
    '{0, 0, 3, 0, 3, 0},     // PE 3
    '{1, 1, 1, 2, 2, 2},     // PE 4
    '{1, 2, 1, 2, 2, 2},     // PE 5
    '{1, 1, 2, 1, 2, 2}      // PE 6
  };

  initial begin
    sign_t seq [M][M];
    #1;
    for (int p = 0; p < M; p++) begin
      phase_i = 3'(p);
      #1;
      for (int j = 0; j < M; j++) begin
        int c, want_m, r;
        c = M - 1 - j;
        want_m = phase_coef((p - j + M) % M);
        r = -1;
        for (int rr = 0; rr < M; rr++)
          if (COEF_SEQ[(rr + c) % M] == want_m) r = rr;
        checks++;
        if (r < 0 || sign_o[j] !== {EPS[r][M-1-c], GAM[r][M-1-c]}) begin
          failures++;
          $display("FAIL PE%0d phase %0d: tag %b", j + 1, p, sign_o[j]);
        end
        seq[j][p] = sign_o[j];
      end
    end
    for (int j = 0; j < M; j++) begin
      bit found;
      if (j == 1) continue;
      found = 0;
      for (int rot = 0; rot < M; rot++) begin
        bit ok;
        ok = 1;
        for (int p = 0; p < M; p++) if (int'(seq[j][(p + rot) % M]) != pub[j][p]) ok = 0;
        if (ok) found = 1;
      end
      checks++;
      if (!found) begin
        failures++;
        $display("FAIL PE%0d tag sequence is not a rotation of the published column", j + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
