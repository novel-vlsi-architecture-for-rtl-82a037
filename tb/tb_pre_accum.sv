// tb_pre_accum: self-checking testbench of the input buffer and accumulator.
//
// Random blocks of 13 samples are sent with random idle cycles inside and
// between blocks, and also back to back. Every xa write is compared with the
// backward running sum computed by the reference package: address order
// 12 down to 0, alternating bank, blk_done_o with xa(0), xa0_o = xa(0). The
// testbench also checks the timing: xa(12) is on the write port after the
// second clock edge following the one that took the block's last sample,
// xa(0) after the fourteenth.
module tb_pre_accum;
  import dct13_pkg::*;
  import dct13_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid_i;
  x_t   in_x_i;
  logic xa_we_o, xa_bank_o, blk_done_o;
  logic [3:0] xa_addr_o;
  xa_t  xa_o, xa0_o;
  int checks = 0, failures = 0;
  int b2b = 0, gapped = 0, blocks_done = 0;
  int cyc = 0;

  pre_accum dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_xa [$];
  int     last_cyc [$];
  int     nblk = 80;

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    in_valid_i = 0; in_x_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < nblk; b++) begin
      arr13_t x, xa;
      bit tight;
      tight = $urandom_range(0, 1) == 1;
      for (int i = 0; i < N; i++) x[i] = rnd(XW);
      xa = ref_xa(x);
      for (int i = N - 1; i >= 0; i--) exp_xa.push_back(xa[i]);
      if (!tight) begin
        gapped++;
        repeat ($urandom_range(1, 4)) begin @(negedge clk); in_valid_i = 0; end
      end else if (b > 0) b2b++;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid_i = 1; in_x_i = x_t'(x[i]);
        if (i == N - 1) last_cyc.push_back(cyc);
        if (!tight && $urandom_range(0, 5) == 0 && i < N - 1) begin
          @(negedge clk); in_valid_i = 0;
        end
      end
    end
    @(negedge clk) in_valid_i = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (blocks_done != nblk || b2b == 0 || gapped == 0 || exp_xa.size() != 0) begin
      failures++;
      $display("FAIL blocks %0d, back-to-back %0d, gapped %0d", blocks_done, b2b, gapped);
    end
    $display("blocks=%0d back_to_back=%0d gapped=%0d", blocks_done, b2b, gapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  widx = 0;
  logic ebank = 0;
  int  lc;
  always @(posedge clk) begin
    if (rst_n && xa_we_o) begin
      longint e;
      checks++;
      e = (exp_xa.size() > 0) ? exp_xa.pop_front() : 0;
      if (widx == 0) lc = last_cyc.pop_front();
      if (longint'(xa_o) != e || int'(xa_addr_o) != N - 1 - widx || xa_bank_o != ebank) begin
        failures++;
        $display("FAIL xa write %0d: addr %0d value %0d exp %0d bank %0d", widx, xa_addr_o, xa_o, e, xa_bank_o);
      end
      if (widx == 0 || widx == N - 1) begin
        checks++;
        if (cyc - lc != 3 + widx) begin
          failures++;
          $display("FAIL timing: write %0d at +%0d", widx, cyc - lc);
        end
      end
      checks++;
      if (blk_done_o != (widx == N - 1)) begin failures++; $display("FAIL blk_done"); end
      if (widx == N - 1) begin
        blocks_done++;
        checks++;
        if (longint'(xa0_o) != e) begin failures++; $display("FAIL xa0"); end
        widx = 0;
        ebank = ~ebank;
      end else widx++;
    end
  end
endmodule
