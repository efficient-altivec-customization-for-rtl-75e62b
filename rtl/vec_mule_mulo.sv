// vec_mule_mulo: AltiVec even/odd unsigned byte multiply (vmuleub / vmuloub).
//
// Eight 8x8 -> 16-bit products are formed from either the even-numbered bytes
// (odd = 0, vec_mule) or the odd-numbered bytes (odd = 1, vec_mulo):
//   d[i] = a[2i+odd] * b[2i+odd],  i = 0..7, as full 16-bit products.
// This is the RISC #2 building block. Both instructions share one unit here,
// selected by the odd input. Purely combinational.
module vec_mule_mulo
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  input  logic odd,
  output vec_t d
);

  always_comb begin
    for (int h = 0; h < NHALVES; h++)
      d[VLEN-1-16*h -: 16] = 16'(get_b(a, 2*h + int'(odd))) * 16'(get_b(b, 2*h + int'(odd)));
  end

endmodule
