// vec_perm_v2: permute specialized for unaligned vectors, offsets 0..15.
//
// Builds the 16-byte window that starts s bytes into the 32-byte pair a || b:
//   d[i] = (a || b)[s + i],  s = c[0] mod 16
// It is a byte-granular funnel shifter: a 16-input multiplexer per output byte
// instead of the 32-input crossbar of the full vec_perm. The offset is taken
// from control byte 0, so the consecutive control vectors used for unaligned
// loads give the same result as vec_perm. Which subset the wider of the two
// specialized permutes supports is this design's choice. Purely combinational.
// The last byte of b can never reach d and is unused by design.
module vec_perm_v2
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  input  vec_t c,
  output vec_t d
);

  logic [3:0]        s;
  logic [2*VLEN-9:0] window;   // a followed by the first fifteen bytes of b

  assign s      = get_b(c, 0)[3:0];
  assign window = {a, b[VLEN-1 -: VLEN-8]};
  assign d      = window[2*VLEN-9-8*int'(s) -: VLEN];

endmodule
