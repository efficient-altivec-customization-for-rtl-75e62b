// vec_execute: decode and functional units of the customizable SIMD unit.
//
// Given an opcode and its three 128-bit operands, it produces the result, the
// number of cycles until that result is written back, whether the opcode
// writes vD, whether it saturated, and whether it is illegal. Customization is
// done by the EN_* parameters: a unit whose parameter is 0 is not built, and
// its opcodes are reported illegal (they retire without writing anything).
// Unknown opcodes are illegal too.
//
// Latency classes: simple integer (vec_add, VLD) LAT_SIMPLE; permute class
// (all permutes and unpacks) LAT_PERM; complex integer (multiplies and sums)
// LAT_COMPLEX. The defaults 1/2/4 are the PowerPC G4 (MPC7450) AltiVec
// latencies, which the unit is meant to match; the grouping is this design's.
// Purely combinational: operands are read and the result computed at issue,
// and the write-back delay line in vec_issue supplies the latency.
module vec_execute
  import altivec_pkg::*;
#(
  parameter bit          EN_MSUM     = 1'b1,
  parameter bit          EN_SUMS     = 1'b1,
  parameter bit          EN_SUM4S    = 1'b1,
  parameter bit          EN_MLADD    = 1'b1,
  parameter bit          EN_MULEO    = 1'b1,
  parameter bit          EN_MUL16    = 1'b1,
  parameter bit          EN_PERM     = 1'b1,
  parameter bit          EN_PERM_V1  = 1'b1,
  parameter bit          EN_PERM_V2  = 1'b1,
  parameter bit          EN_UNPACK   = 1'b1,
  parameter int unsigned LAT_SIMPLE  = 1,
  parameter int unsigned LAT_PERM    = 2,
  parameter int unsigned LAT_COMPLEX = 4
) (
  input  op_e        op,
  input  vec_t       a,
  input  vec_t       b,
  input  vec_t       c,
  input  vec_t       ld_data,
  output vec_t       d,
  output logic [2:0] lat,
  output logic       writes,
  output logic       illegal,
  output logic       sat
);

  vec_t r_add, r_msum, r_sums, r_sum4s, r_mladd, r_muleo, r_mul16;
  vec_t r_perm, r_perm1, r_perm2, r_upk;
  logic sat_sums, sat_sum4s;
  esz_e add_esz;

  always_comb begin
    unique case (op)
      OP_VADDUBM: add_esz = ESZ_B;
      OP_VADDUHM: add_esz = ESZ_H;
      default:    add_esz = ESZ_W;
    endcase
  end

  vec_add u_add (.a(a), .b(b), .esz(add_esz), .d(r_add));

  if (EN_MSUM) begin : g_msum
    vec_msum u_msum (.a(a), .b(b), .c(c), .d(r_msum));
  end else begin : g_no_msum
    assign r_msum = '0;
  end

  if (EN_SUMS) begin : g_sums
    vec_sums u_sums (.a(a), .b(b), .d(r_sums), .sat(sat_sums));
  end else begin : g_no_sums
    assign r_sums = '0;
    assign sat_sums = 1'b0;
  end

  if (EN_SUM4S) begin : g_sum4s
    vec_sum4s u_sum4s (.a(a), .b(b), .d(r_sum4s), .sat(sat_sum4s));
  end else begin : g_no_sum4s
    assign r_sum4s = '0;
    assign sat_sum4s = 1'b0;
  end

  if (EN_MLADD) begin : g_mladd
    vec_mladd u_mladd (.a(a), .b(b), .c(c), .d(r_mladd));
  end else begin : g_no_mladd
    assign r_mladd = '0;
  end

  if (EN_MULEO) begin : g_muleo
    vec_mule_mulo u_muleo (.a(a), .b(b), .odd(op == OP_VMULOUB), .d(r_muleo));
  end else begin : g_no_muleo
    assign r_muleo = '0;
  end

  if (EN_MUL16) begin : g_mul16
    vec_mul16 u_mul16 (.a(a), .b(b), .d(r_mul16));
  end else begin : g_no_mul16
    assign r_mul16 = '0;
  end

  if (EN_PERM) begin : g_perm
    vec_perm u_perm (.a(a), .b(b), .c(c), .d(r_perm));
  end else begin : g_no_perm
    assign r_perm = '0;
  end

  if (EN_PERM_V1) begin : g_perm1
    vec_perm_v1 u_perm1 (.a(a), .b(b), .c(c), .d(r_perm1));
  end else begin : g_no_perm1
    assign r_perm1 = '0;
  end

  if (EN_PERM_V2) begin : g_perm2
    vec_perm_v2 u_perm2 (.a(a), .b(b), .c(c), .d(r_perm2));
  end else begin : g_no_perm2
    assign r_perm2 = '0;
  end

  if (EN_UNPACK) begin : g_upk
    // Unpacks read vB, as the AltiVec unpack instructions do.
    vec_unpack u_upk (
      .a     (b),
      .wide16(op inside {OP_VUPKHUH, OP_VUPKLUH, OP_VUPKHSH, OP_VUPKLSH}),
      .lo    (op inside {OP_VUPKLUB, OP_VUPKLUH, OP_VUPKLSB, OP_VUPKLSH}),
      .sext  (op inside {OP_VUPKHSB, OP_VUPKLSB, OP_VUPKHSH, OP_VUPKLSH}),
      .d     (r_upk)
    );
  end else begin : g_no_upk
    assign r_upk = '0;
  end

  always_comb begin
    d       = '0;
    lat     = 3'(LAT_SIMPLE);
    writes  = 1'b1;
    illegal = 1'b0;
    sat     = 1'b0;
    unique case (op)
      OP_NOP:      writes = 1'b0;
      OP_VLD:      d = ld_data;
      OP_VADDUBM, OP_VADDUHM, OP_VADDUWM: d = r_add;
      OP_VMSUMUBM: begin d = r_msum;  lat = 3'(LAT_COMPLEX); illegal = !EN_MSUM;  end
      OP_VSUMSWS:  begin d = r_sums;  lat = 3'(LAT_COMPLEX); illegal = !EN_SUMS;  sat = sat_sums;  end
      OP_VSUM4UBS: begin d = r_sum4s; lat = 3'(LAT_COMPLEX); illegal = !EN_SUM4S; sat = sat_sum4s; end
      OP_VMLADDUHM:begin d = r_mladd; lat = 3'(LAT_COMPLEX); illegal = !EN_MLADD; end
      OP_VMULEUB, OP_VMULOUB:
                   begin d = r_muleo; lat = 3'(LAT_COMPLEX); illegal = !EN_MULEO; end
      OP_VMULUHM:  begin d = r_mul16; lat = 3'(LAT_COMPLEX); illegal = !EN_MUL16; end
      OP_VPERM:    begin d = r_perm;  lat = 3'(LAT_PERM);    illegal = !EN_PERM;  end
      OP_VPERM_V1: begin d = r_perm1; lat = 3'(LAT_PERM);    illegal = !EN_PERM_V1; end
      OP_VPERM_V2: begin d = r_perm2; lat = 3'(LAT_PERM);    illegal = !EN_PERM_V2; end
      OP_VUPKHUB, OP_VUPKLUB, OP_VUPKHUH, OP_VUPKLUH,
      OP_VUPKHSB, OP_VUPKLSB, OP_VUPKHSH, OP_VUPKLSH:
                   begin d = r_upk;   lat = 3'(LAT_PERM);    illegal = !EN_UNPACK; end
      default:     illegal = 1'b1;
    endcase
    if (illegal) begin
      writes = 1'b0;
      sat    = 1'b0;
    end
  end

endmodule
