// vec_perm_v1: permute specialized for unaligned vectors, offsets 0..3.
//
// The only permutations a dot product or 4-tap FIR needs are unaligned windows
// of a byte stream held in two consecutive registers. This version builds the
// window that starts s bytes into a:
//   d[i] = (a || b)[s + i],  s = c[0] mod 4
// i.e. a 4-input byte multiplexer instead of a 32-input crossbar. The offset is
// taken from control byte 0, so a consecutive control vector (s, s+1, ..., s+15)
// gives the same result as the full vec_perm. Restricting the offset to 0..3
// (what FIR taps 0..3 need) is this design's reading of the narrower of the two
// specialized permutes. Purely combinational.
// Only the first three bytes of b can reach d (the rest of b is unused by
// design).
module vec_perm_v1
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  input  vec_t c,
  output vec_t d
);

  logic [1:0]        s;
  logic [VLEN+23:0]  window;   // a followed by the first three bytes of b

  assign s      = get_b(c, 0)[1:0];
  assign window = {a, b[VLEN-1 -: 24]};
  assign d      = window[VLEN+23-8*int'(s) -: VLEN];

endmodule
