// vec_sum4s: AltiVec quarter sum of unsigned bytes with saturation (vsum4ubs).
//
// For each 32-bit word i, the four unsigned bytes of a in that word are added
// to word i of b; a sum above 2^32-1 is clamped to 2^32-1 and sets sat.
//   d[i] = min(2^32-1, a[4i] + a[4i+1] + a[4i+2] + a[4i+3] + b[i])
// Purely combinational. The unsigned-byte form is this design's choice.
module vec_sum4s
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  output vec_t d,
  output logic sat
);

  always_comb begin
    sat = 1'b0;
    for (int w = 0; w < NWORDS; w++) begin
      logic [32:0] s;
      s = 33'(get_w(b, w));
      for (int j = 0; j < 4; j++)
        s = s + 33'(get_b(a, 4*w+j));
      if (s[32]) begin
        d[VLEN-1-32*w -: 32] = 32'hFFFF_FFFF;
        sat = 1'b1;
      end else begin
        d[VLEN-1-32*w -: 32] = s[31:0];
      end
    end
  end

endmodule
