// sign_tag_gen: sign control tags for all PEs of the array.
//
// Every PE needs, each cycle, the signs of its two products: epsilon(r, c)
// for the difference lane and gamma(r, c) for the sum lane, where c is the
// column the PE holds and r the output row whose partial sum is passing
// through it. The matrices and the per-PE two-bit tags follow the algorithm;
// generating the tags from a shared phase counter instead of feeding
// precomputed tag streams is this design's choice.
//
// With the array schedule of dct13_pkg, PE j (1-based) holds column 6-j and
// at phase p sees the partial sum started at phase (p - 2(j-1)) mod 6, which
// belongs to row phase_row() of that start phase. Output bit 1 of each tag
// is epsilon (negate difference lane), bit 0 gamma (negate sum lane).
// Purely combinational: the tag is valid in the same cycle as phase_i.
module sign_tag_gen
  import dct13_pkg::*;
(
  input  logic [2:0] phase_i,       // 0..5, phase of the item entering PE 1
  output sign_t      sign_o [M]     // sign_o[j-1] drives PE j
);

  always_comb begin
    for (int j = 0; j < M; j++) begin
      int t, c;
      logic [2:0] r;
      t = (int'(phase_i) - 2 * j + 2 * M) % M;
      r = 3'(phase_row(t));
      c = M - 1 - j;
      sign_o[j] = {EPS[r][M-1-c], GAM[r][M-1-c]};
    end
  end

endmodule
