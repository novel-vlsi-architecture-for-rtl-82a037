// post_proc: output permutation and final combination of the DCT.
//
// The array delivers the twelve values T(k) of a block as six pairs
// (T(NU[r]), T(MU[r])) in row order 0,5,4,3,2,1. They are written, at their
// index k, into one bank of a two-bank register buffer, which undoes the
// permutation. Once a bank is complete it is read in natural order and the
// outputs
//   Y(0) = xa(0),   Y(k) = xa(0) cos(k*pi/26) - 2 sin(k*pi/26) T(k), k = 1..12
// are produced one per cycle, with two multipliers (xa(0)*cos, T*2sin) and
// two adders (the subtraction and the rounding). The equations follow the
// algorithm; the common scale factor sqrt(2/N) of the DCT definition is left
// out, as the algorithm's output equations do. The buffer organisation,
// rounding and timing are this design's choice.
//
// xa(0) of each block arrives earlier, with the block's first item at the
// array input (blk_start_i), and waits in a two-entry queue until that
// block's first pair leaves the array (tc_i).
//
// Output format: OW bits, OF fractional bits, rounded half up. Y(0..12) of a
// block leave on consecutive cycles, y_valid_o high and y_idx_o = k. Y(0) is
// on the outputs after the second clock edge following the one that took
// the block's last pair (the first, if the reader goes straight on from the
// previous block), or later if the previous block is still being read
// (queued_o is then high).
module post_proc
  import dct13_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_start_i,
  input  xa_t        xa0_i,
  input  logic       tc_i,
  input  logic       v_i,
  input  acc_t       t_sum_i,    // T(MU[row])
  input  acc_t       t_dif_i,    // T(NU[row])
  output logic       y_valid_o,
  output logic [3:0] y_idx_o,
  output y_t         y_o,
  output logic       queued_o    // a complete bank waits for the reader
);

  localparam int SH = 2 * CF - OF;
  typedef logic signed [63:0] wide_t;

  acc_t       tbuf [2][N];     // index 0 unused
  xa_t        xa0b [2];
  xa_t        xa0q [2];
  logic       qw, qr;          // queue pointers
  logic       wbank;
  logic [2:0] wt;              // pairs of the current block written so far
  logic [1:0] full;            // complete banks not yet read
  logic       rd_act, rbank;
  logic [3:0] k;
  logic       wr_done, rd_done;
  logic [2:0] row;

  assign row     = 3'(phase_row(tc_i ? 0 : int'(wt)));
  assign wr_done = v_i && (tc_i ? 1'b0 : (wt == 3'(M - 1)));
  assign rd_done = rd_act && (k == 4'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qw    <= 1'b0;
      qr    <= 1'b0;
      wbank <= 1'b0;
      wt    <= '0;
      for (int b = 0; b < 2; b++) begin
        xa0q[b] <= '0;
        xa0b[b] <= '0;
        for (int i = 0; i < N; i++) tbuf[b][i] <= '0;
      end
    end else begin
      if (blk_start_i) begin
        xa0q[qw] <= xa0_i;
        qw       <= ~qw;
      end
      if (v_i) begin
        tbuf[wbank][NU[row]] <= t_dif_i;
        tbuf[wbank][MU[row]] <= t_sum_i;
        if (tc_i) begin
          xa0b[wbank] <= xa0q[qr];
          qr          <= ~qr;
          wt          <= 3'd1;
        end else begin
          wt <= wt + 3'd1;
        end
        if (wr_done) wbank <= ~wbank;
      end
    end
  end

  // Reader: one output per cycle from the oldest complete bank.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= '0;
      rd_act <= 1'b0;
      rbank  <= 1'b0;
      k      <= '0;
    end else begin
      full <= full + 2'(wr_done) - 2'(rd_done);
      if (rd_act) begin
        if (rd_done) begin
          rbank  <= ~rbank;
          rd_act <= (full + 2'(wr_done) - 2'd1) != 2'd0;
        end
        k <= rd_done ? 4'd0 : k + 4'd1;
      end else if (full != 2'd0) begin
        rd_act <= 1'b1;
        k      <= 4'd0;
      end
    end
  end

  // Two multipliers, a subtractor and a rounding adder.
  wide_t pc, ps, yw;
  always_comb begin
    pc = wide_t'(xa0b[rbank]) * wide_t'(COS_K[k]);
    ps = wide_t'(tbuf[rbank][k]) * wide_t'(SIN2_K[k]);
    if (k == 4'd0) yw = wide_t'(xa0b[rbank]) <<< (2 * CF);
    else           yw = (pc <<< CF) - ps;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid_o <= 1'b0;
      y_idx_o   <= '0;
      y_o       <= '0;
    end else begin
      y_valid_o <= rd_act;
      y_idx_o   <= k;
      y_o       <= y_t'((yw + (wide_t'(1) <<< (SH - 1))) >>> SH);
    end
  end

  assign queued_o = (full == 2'd2);

  // The writer must never catch up with the bank being read.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(v_i && full == 2'd2));

endmodule
