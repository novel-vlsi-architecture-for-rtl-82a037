// tb_bank_ram: self-checking testbench of the two-bank buffer RAM.
//
// Random writes and reads on both read ports against an array model, with
// one cycle of read latency; same-cycle write and read of one word must
// return the old word, and a read port without its enable must hold its data.
module tb_bank_ram;
  localparam int W = 16, DEPTH = 13, AW = 4;
  logic clk = 0;
  logic we_i, wbank_i, rea_i, rbank_a_i, reb_i, rbank_b_i;
  logic [AW-1:0] waddr_i, raddr_a_i, raddr_b_i;
  logic [W-1:0] wdata_i, rda_o, rdb_o;
  int checks = 0, failures = 0, collisions = 0, holds = 0;
  logic [W-1:0] model [2][DEPTH];
  logic [W-1:0] ea, eb;

  bank_ram #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_i = 0; rea_i = 0; reb_i = 0; wbank_i = 0; rbank_a_i = 0; rbank_b_i = 0;
    waddr_i = 0; raddr_a_i = 0; raddr_b_i = 0; wdata_i = 0;
    // fill both banks
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we_i = 1; wbank_i = b[0]; waddr_i = AW'(a); wdata_i = W'($urandom);
        model[b][a] = wdata_i;
      end
    @(negedge clk) we_i = 0;
    ea = 0; eb = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we_i = $urandom_range(0, 1) == 1;
      wbank_i = $urandom_range(0, 1) == 1; waddr_i = AW'($urandom_range(0, DEPTH - 1));
      wdata_i = W'($urandom);
      rea_i = $urandom_range(0, 3) != 0; rbank_a_i = $urandom_range(0, 1) == 1;
      raddr_a_i = AW'($urandom_range(0, DEPTH - 1));
      reb_i = $urandom_range(0, 3) != 0; rbank_b_i = $urandom_range(0, 1) == 1;
      raddr_b_i = AW'($urandom_range(0, DEPTH - 1));
      if (rea_i) ea = model[rbank_a_i][raddr_a_i]; else holds++;
      if (reb_i) eb = model[rbank_b_i][raddr_b_i];
      if (we_i && rea_i && wbank_i == rbank_a_i && waddr_i == raddr_a_i) collisions++;
      if (we_i) model[wbank_i][waddr_i] = wdata_i;
      @(posedge clk); #1;
      checks++;
      if (rda_o !== ea || rdb_o !== eb) begin
        failures++;
        $display("FAIL cycle %0d: a %h exp %h, b %h exp %h", i, rda_o, ea, rdb_o, eb);
      end
    end
    checks++;
    if (collisions == 0 || holds == 0) begin failures++; $display("FAIL coverage"); end
    $display("collisions=%0d holds=%0d", collisions, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
