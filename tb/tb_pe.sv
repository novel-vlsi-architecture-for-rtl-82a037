// tb_pe: self-checking testbench of one processing element.
//
// Random items, tags, signs and partial sums are driven every cycle. A
// behavioural model in the testbench keeps the stationary operands and
// predicts, from the sign table, the partial sums two cycles later and the
// item one cycle later; every cycle both are compared with the PE outputs.
module tb_pe;
  import dct13_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  item_t item_i, item_o;
  logic  tc_i, v_i, tc_o, v_o;
  acc_t  y1_i, y2_i, y1_o, y2_o;
  sign_t sign_i;
  int    checks = 0, failures = 0;
  int    cyc = 0;
  int    loads = 0;
  int    codes [4] = '{0, 0, 0, 0};

  pe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state
  longint m_x1 = 0, m_x2 = 0;
  longint ey1 [3], ey2 [3];
  logic   etc [3], ev [3];
  item_t  eitem;

  function automatic longint rnd(input int bits);
    return longint'($signed($urandom)) >>> (32 - bits);
  endfunction

  initial begin
    item_i = '0; tc_i = 0; v_i = 0; y1_i = '0; y2_i = '0; sign_i = '0;
    for (int i = 0; i < 3; i++) begin ey1[i] = 0; ey2[i] = 0; etc[i] = 0; ev[i] = 0; end
    eitem = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      // drive new inputs
      @(negedge clk);
      item_i.xs = d_t'(rnd(DW));
      item_i.xd = d_t'(rnd(DW));
      item_i.s  = coef_t'(rnd(CW));
      tc_i      = ($urandom_range(0, 5) == 0);
      v_i       = $urandom_range(0, 1);
      y1_i      = acc_t'(rnd(30));
      y2_i      = acc_t'(rnd(30));
      sign_i    = sign_t'($urandom_range(0, 3));
      // model
      begin
        longint u1, u2, n1, n2;
        if (tc_i) begin m_x1 = item_i.xs; m_x2 = item_i.xd; loads++; end
        u1 = m_x1; u2 = m_x2;
        n1 = sign_i[0] ? longint'(y1_i) - longint'(item_i.s) * u1 : longint'(y1_i) + longint'(item_i.s) * u1;
        n2 = sign_i[1] ? longint'(y2_i) - longint'(item_i.s) * u2 : longint'(y2_i) + longint'(item_i.s) * u2;
        codes[sign_i]++;
        @(posedge clk);
        #1;
        // item: one cycle
        checks++;
        if (item_o !== item_i) begin
          failures++;
          $display("FAIL item pass-through at cycle %0d", cyc);
        end
        // partial sums: two cycles
        ey1[1] = ey1[0]; ey2[1] = ey2[0]; etc[1] = etc[0]; ev[1] = ev[0];
        ey1[0] = n1; ey2[0] = n2; etc[0] = tc_i; ev[0] = v_i;
        if (cyc >= 1) begin
          checks++;
          if (longint'(y1_o) != ey1[1] || longint'(y2_o) != ey2[1] || tc_o != etc[1] || v_o != ev[1]) begin
            failures++;
            $display("FAIL cycle %0d: y1 %0d exp %0d, y2 %0d exp %0d", cyc, y1_o, ey1[1], y2_o, ey2[1]);
          end
        end
      end
    end
    checks++;
    if (loads == 0 || codes[0] == 0 || codes[1] == 0 || codes[2] == 0 || codes[3] == 0) begin
      failures++;
      $display("FAIL not every mechanism exercised");
    end
    $display("loads=%0d sign codes 00:%0d 01:%0d 10:%0d 11:%0d", loads, codes[0], codes[1], codes[2], codes[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
