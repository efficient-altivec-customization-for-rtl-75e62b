// vec_mladd: AltiVec 16-bit multiply-low and add, modulo (vmladduhm).
//
// For each of the eight halfwords: d[i] = (a[i]*b[i] + c[i]) mod 2^16.
// This is the RISC #1 building block: with bytes zero-extended to halfwords the
// product of two pixels never overflows, so a dot product or FIR tap can be
// accumulated in 16-bit lanes. Purely combinational.
module vec_mladd
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  input  vec_t c,
  output vec_t d
);

  always_comb begin
    for (int h = 0; h < NHALVES; h++)
      d[VLEN-1-16*h -: 16] = 16'(get_h(a, h) * get_h(b, h)) + get_h(c, h);
  end

endmodule
