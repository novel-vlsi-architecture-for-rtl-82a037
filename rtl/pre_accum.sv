// pre_accum: input buffer and backward accumulator of the pre-processing stage.
//
// It computes the auxiliary sequence xa(N-1) = x(N-1), xa(i) = x(i) + xa(i+1)
// for i = N-2..0, i.e. each xa(i) is the sum of x(i)..x(N-1). The recurrence
// follows the algorithm. Samples arrive in natural order x(0)..x(N-1), one per
// cycle in which in_valid_i is high (gaps are allowed), and are written into
// one bank of a two-bank RAM. When the 13th sample of a block is written the
// bank flips, and the full bank is read back from address N-1 down to 0, one
// word per cycle, through a single accumulator. Each xa(i) is sent out on the
// xa write port (to the next RAM) one cycle after its read. blk_done_o pulses
// with the write of xa(0), and xa0_o then holds xa(0), which is also Y(0).
// Natural input order, the ping-pong buffer and all timing are this design's
// choice; blocks may follow each other without a gap.
//
// Timing, counted in clock edges from the edge that takes the last sample of
// a block: xa(N-1) is on the write port after edge 2, xa(0) and blk_done_o
// after edge N+1 = 14.
module pre_accum
  import dct13_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid_i,
  input  x_t         in_x_i,
  output logic       xa_we_o,     // write strobe of xa(xa_addr_o)
  output logic       xa_bank_o,   // block parity
  output logic [3:0] xa_addr_o,
  output xa_t        xa_o,
  output logic       blk_done_o,  // pulses with the write of xa(0)
  output xa_t        xa0_o
);

  logic       wbank;
  logic [3:0] wcnt;
  logic       start;

  logic       rd_act;
  logic       rbank;
  logic [3:0] raddr;

  logic       iss_v, iss_bank, iss_first;
  logic [3:0] iss_addr;

  logic [XW-1:0] rdata;
  xa_t           xa_next;

  assign start = in_valid_i && (wcnt == 4'(N - 1));

  bank_ram #(.W(XW), .DEPTH(N), .AW(4)) u_xram (
    .clk       (clk),
    .we_i      (in_valid_i),
    .wbank_i   (wbank),
    .waddr_i   (wcnt),
    .wdata_i   (in_x_i),
    .rea_i     (rd_act),
    .rbank_a_i (rbank),
    .raddr_a_i (raddr),
    .rda_o     (rdata),
    .reb_i     (1'b0),
    .rbank_b_i (1'b0),
    .raddr_b_i ('0),
    .rdb_o     ()
  );

  // Input side: natural-order writes into the current bank.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      wcnt  <= '0;
    end else if (in_valid_i) begin
      if (start) begin
        wcnt  <= '0;
        wbank <= ~wbank;
      end else begin
        wcnt <= wcnt + 4'd1;
      end
    end
  end

  // Read side: addresses N-1 down to 0 of the bank just filled.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act <= 1'b0;
      rbank  <= 1'b0;
      raddr  <= '0;
    end else if (start) begin
      rd_act <= 1'b1;
      rbank  <= wbank;
      raddr  <= 4'(N - 1);
    end else if (rd_act) begin
      if (raddr == 4'd0) rd_act <= 1'b0;
      else raddr <= raddr - 4'd1;
    end
  end

  // Accumulator: xa(i) = x(i) + xa(i+1); the previous xa is the output register.
  always_comb begin
    if (iss_first) xa_next = xa_t'(x_t'(rdata));
    else           xa_next = xa_o + xa_t'(x_t'(rdata));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_v      <= 1'b0;
      iss_bank   <= 1'b0;
      iss_first  <= 1'b0;
      iss_addr   <= '0;
      xa_we_o    <= 1'b0;
      xa_bank_o  <= 1'b0;
      xa_addr_o  <= '0;
      xa_o       <= '0;
      blk_done_o <= 1'b0;
      xa0_o      <= '0;
    end else begin
      iss_v     <= rd_act;
      iss_bank  <= rbank;
      iss_first <= rd_act && (raddr == 4'(N - 1));
      iss_addr  <= raddr;
      xa_we_o   <= iss_v;
      blk_done_o <= iss_v && (iss_addr == 4'd0);
      if (iss_v) begin
        xa_bank_o <= iss_bank;
        xa_addr_o <= iss_addr;
        xa_o      <= xa_next;
        if (iss_addr == 4'd0) xa0_o <= xa_next;
      end
    end
  end

endmodule
