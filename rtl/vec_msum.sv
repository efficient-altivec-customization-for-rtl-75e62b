// vec_msum: AltiVec multiply-sum of unsigned bytes, modulo (vmsumubm).
//
// Each of the 16 byte pairs of a and b is multiplied (8x8 -> 16 bits); the four
// products that fall in one 32-bit word are reduced to a single sum, and that
// sum is added to the matching word of c:
//   d[i] = c[i] + a[4i]*b[4i] + a[4i+1]*b[4i+1] + a[4i+2]*b[4i+2] + a[4i+3]*b[4i+3]
// for words i = 0..3, wrapping modulo 2^32. That is 16 multiplies, the 4-way
// reduction and the 32-bit accumulation of the CISC instruction.
// Purely combinational; the unit that instantiates it decides the latency.
// Unsigned operands and the wrap-around sum are this design's reading of the
// instruction (pixels are unsigned; the accumulation has no saturation).
module vec_msum
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  input  vec_t c,
  output vec_t d
);

  always_comb begin
    for (int w = 0; w < NWORDS; w++) begin
      logic [31:0] acc;
      acc = get_w(c, w);
      for (int j = 0; j < 4; j++)
        acc = acc + 32'(get_b(a, 4*w+j) * get_b(b, 4*w+j));
      d[VLEN-1-32*w -: 32] = acc;
    end
  end

endmodule
