// pe: one processing element of the pseudo-correlation systolic array.
//
// Each PE serves both lanes at once. The sum lane (y1) accumulates the odd-k
// outputs over the sums xa(p)+xa(q), the difference lane (y2) the even-k
// outputs over the differences xa(p)-xa(q). An item (sum, difference,
// coefficient s) enters from the neighbour on the right and leaves to the
// left after one register. When the load tag tc_i is 1, the item's sum and
// difference are captured into the stationary registers xi1/xi2. The two
// multipliers form s*xi1 and s*xi2 and the two adders add or subtract them
// from the incoming partial sums according to the 2-bit sign tag:
//   sign 00: y1 + s*xi1, y2 + s*xi2      sign 01: y1 - s*xi1, y2 + s*xi2
//   sign 10: y1 + s*xi1, y2 - s*xi2      sign 11: y1 - s*xi1, y2 - s*xi2
// This behaviour (pass-through of x_e, s and t_c, tag-controlled capture,
// two multipliers, two adders and the sign table) follows the described PE.
//
// Timing, this design's choice: items take one cycle per PE, while the partial
// sums, the load tag and the valid flag take two cycles per PE. The speed
// difference is what lets a partial sum meet a new coefficient in every PE
// while the operands stay put, which is what the pseudo-correlation needs.
// In the cycle the tag arrives, the product already uses the new operands.
module pe
  import dct13_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  item_t item_i,   // from the right neighbour (or the array input)
  input  logic  tc_i,     // load tag
  input  logic  v_i,      // partial sums on y1_i/y2_i are valid
  input  acc_t  y1_i,     // sum-lane partial sum
  input  acc_t  y2_i,     // difference-lane partial sum
  input  sign_t sign_i,   // bit 1: negate difference lane, bit 0: negate sum lane
  output item_t item_o,
  output logic  tc_o,
  output logic  v_o,
  output acc_t  y1_o,
  output acc_t  y2_o
);

  d_t   xi1, xi2;            // stationary operands (sum, difference)
  d_t   x1u, x2u;            // operands used this cycle
  acc_t p1, p2;              // products
  acc_t y1a, y2a;            // first partial-sum stage
  logic tca, va;

  always_comb begin
    x1u = tc_i ? item_i.xs : xi1;
    x2u = tc_i ? item_i.xd : xi2;
    p1  = acc_t'(item_i.s) * acc_t'(x1u);
    p2  = acc_t'(item_i.s) * acc_t'(x2u);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      item_o <= '0;
      xi1    <= '0;
      xi2    <= '0;
      y1a    <= '0;
      y2a    <= '0;
      tca    <= 1'b0;
      va     <= 1'b0;
      y1_o   <= '0;
      y2_o   <= '0;
      tc_o   <= 1'b0;
      v_o    <= 1'b0;
    end else begin
      item_o <= item_i;
      if (tc_i) begin
        xi1 <= item_i.xs;
        xi2 <= item_i.xd;
      end
      y1a  <= sign_i[0] ? y1_i - p1 : y1_i + p1;
      y2a  <= sign_i[1] ? y2_i - p2 : y2_i + p2;
      tca  <= tc_i;
      va   <= v_i;
      y1_o <= y1a;
      y2_o <= y2a;
      tc_o <= tca;
      v_o  <= va;
    end
  end

endmodule
