// vec_sums: AltiVec sum-across with signed saturation (vsumsws).
//
// The four signed 32-bit words of a and word 3 of b are added at full
// precision; the total is clamped to the signed 32-bit range and placed in
// word 3 of d. Words 0..2 of d are zero. sat is 1 when clamping occurred.
// Used after vec_msum to reduce a dot product's four partial sums to one.
// Purely combinational.
module vec_sums
  import altivec_pkg::*;
(
  input  vec_t a,
  input  vec_t b,
  output vec_t d,
  output logic sat
);

  localparam logic signed [34:0] SMAX = 35'sd2147483647;
  localparam logic signed [34:0] SMIN = -35'sd2147483648;

  logic signed [34:0] total;

  always_comb begin
    total = 35'(signed'(get_w(b, 3)));
    for (int w = 0; w < NWORDS; w++)
      total = total + 35'(signed'(get_w(a, w)));
    d   = '0;
    sat = 1'b0;
    if (total > SMAX) begin
      d[31:0] = 32'h7FFF_FFFF;
      sat     = 1'b1;
    end else if (total < SMIN) begin
      d[31:0] = 32'h8000_0000;
      sat     = 1'b1;
    end else begin
      d[31:0] = total[31:0];
    end
  end

endmodule
