// vec_add: AltiVec element-wise modulo add (vaddubm / vadduhm / vadduwm).
//
// esz selects 8-, 16- or 32-bit elements; every element of d is the sum of the
// matching elements of a and b, wrapping within its own width. It is built as
// sixteen byte adders whose carries are passed on only inside an element.
// Purely combinational.
module vec_add
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  input  esz_e esz,
  output vec_t d
);

  always_comb begin
    logic carry;
    carry = 1'b0;
    // Walk bytes from least significant (byte 15) to most significant (byte 0).
    for (int i = NBYTES-1; i >= 0; i--) begin
      logic [8:0] s;
      logic       first;   // byte is the least significant of its element
      unique case (esz)
        ESZ_B:   first = 1'b1;
        ESZ_H:   first = (i % 2) == 1;
        default: first = (i % 4) == 3;
      endcase
      s = 9'(get_b(a, i)) + 9'(get_b(b, i)) + 9'(first ? 1'b0 : carry);
      d[VLEN-1-8*i -: 8] = s[7:0];
      carry = s[8];
    end
  end

endmodule
