// vec_mul16: specialized 16-bit multiply, low half kept.
//
// d[i] = (a[i]*b[i]) mod 2^16 for the eight halfwords. AltiVec has no such
// instruction; it is the multiply half of vec_mladd split in two, so that
// vec_mladd(A,B,C) = vec_add(vec_mul16(A,B), C) with 16-bit elements.
// Purely combinational.
module vec_mul16
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  output vec_t d
);

  always_comb begin
    for (int h = 0; h < NHALVES; h++)
      d[VLEN-1-16*h -: 16] = 16'(get_h(a, h) * get_h(b, h));
  end

endmodule
