// vec_perm: AltiVec full byte permute (vperm), a 32-to-1 crossbar per byte.
//
// a and b are concatenated into a 32-byte table (a = bytes 0x00-0x0F,
// b = bytes 0x10-0x1F). Each byte of the control vector c selects, with its low
// five bits, which table byte goes into the same position of d:
//   d[i] = (a || b)[c[i] mod 32]
// Any pattern, regular or not, can be built. Purely combinational.
module vec_perm
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  input  vec_t c,
  output vec_t d
);

  logic [2*VLEN-1:0] tbl;
  assign tbl = {a, b};

  always_comb begin
    for (int i = 0; i < NBYTES; i++) begin
      logic [4:0] sel;
      sel = get_b(c, i)[4:0];
      d[VLEN-1-8*i -: 8] = tbl[2*VLEN-1-8*int'(sel) -: 8];
    end
  end

endmodule
