// vec_unpack: widening conversion of one half of a vector.
//
// With wide16 = 0, the eight bytes of the selected half become eight
// halfwords (8 => 16); with wide16 = 1, the four halfwords of the selected half
// become four words (16 => 32). lo = 0 selects the high half (elements
// 0..n/2-1, the leftmost), lo = 1 the low half. sext chooses sign extension
// (as AltiVec vupkhsb/vupkhsh) or zero extension (what unsigned pixels need,
// the same as merging with a zero vector). These are steps 1 and 3 of the
// RISC form of vec_msum. Purely combinational.
module vec_unpack
  import altivec_pkg::*;
(
  input  vec_t a,
  input  logic wide16,
  input  logic lo,
  input  logic sext,
  output vec_t d
);

  vec_t src;    // the selected half, moved to the left of the vector
  vec_t w16, w32;

  assign src = lo ? {a[VLEN/2-1:0], a[VLEN-1:VLEN/2]} : a;

  always_comb begin
    for (int h = 0; h < NHALVES; h++)
      w16[VLEN-1-16*h -: 16] = {{8{sext & src[VLEN-1-8*h]}}, get_b(src, h)};
    for (int w = 0; w < NWORDS; w++)
      w32[VLEN-1-32*w -: 32] = {{16{sext & src[VLEN-1-16*w]}}, get_h(src, w)};
  end

  assign d = wide16 ? w32 : w16;

endmodule
