// altivec_pkg: types, opcodes and element helpers shared by the customizable
// AltiVec-compatible SIMD unit.
//
// Vectors are 128 bits wide. Element numbering follows the big-endian
// convention of the AltiVec instruction set: element 0 is the leftmost, most
// significant element, so byte i sits in bits [127-8i -: 8],
// halfword i in [127-16i -: 16] and word i in [127-32i -: 32].
//
// The opcode list covers the instructions this unit can be built with: the
// CISC reductions (vec_msum, vec_sums, vec_sum4s), the RISC replacements
// (vec_mladd, vec_mule/vec_mulo, vec_add), the specialized 16-bit multiply,
// the full and specialized permutes, the widening conversions, and a VLD
// pseudo-instruction that writes 128 bits of load data into a register.
package altivec_pkg;

  localparam int VLEN     = 128;
  localparam int NBYTES   = VLEN / 8;
  localparam int NHALVES  = VLEN / 16;
  localparam int NWORDS   = VLEN / 32;
  localparam int NVREG    = 32;

  typedef logic [VLEN-1:0] vec_t;
  typedef logic [4:0]      vreg_t;

  // Element size for vec_add.
  typedef enum logic [1:0] {
    ESZ_B = 2'd0,
    ESZ_H = 2'd1,
    ESZ_W = 2'd2
  } esz_e;

  typedef enum logic [4:0] {
    OP_NOP      = 5'd0,
    OP_VLD      = 5'd1,   // vD <- load data
    OP_VADDUBM  = 5'd2,   // vec_add, bytes
    OP_VADDUHM  = 5'd3,   // vec_add, halfwords
    OP_VADDUWM  = 5'd4,   // vec_add, words
    OP_VMSUMUBM = 5'd5,   // vec_msum  vD <- msum(vA, vB, vC)
    OP_VSUMSWS  = 5'd6,   // vec_sums  vD <- sums(vA, vB)
    OP_VSUM4UBS = 5'd7,   // vec_sum4s vD <- sum4s(vA, vB)
    OP_VMLADDUHM= 5'd8,   // vec_mladd vD <- vA*vB + vC
    OP_VMULEUB  = 5'd9,   // vec_mule
    OP_VMULOUB  = 5'd10,  // vec_mulo
    OP_VMULUHM  = 5'd11,  // specialized 16-bit vec_mul
    OP_VPERM    = 5'd12,  // full vec_perm
    OP_VPERM_V1 = 5'd13,  // unaligned-vector permute, offsets 0..3
    OP_VPERM_V2 = 5'd14,  // unaligned-vector permute, offsets 0..15
    OP_VUPKHUB  = 5'd15,  // zero-extend high bytes of vB to halfwords
    OP_VUPKLUB  = 5'd16,
    OP_VUPKHUH  = 5'd17,  // zero-extend high halfwords of vB to words
    OP_VUPKLUH  = 5'd18,
    OP_VUPKHSB  = 5'd19,  // sign-extending forms
    OP_VUPKLSB  = 5'd20,
    OP_VUPKHSH  = 5'd21,
    OP_VUPKLSH  = 5'd22
  } op_e;

  typedef struct packed {
    op_e   op;
    vreg_t vd;
    vreg_t va;
    vreg_t vb;
    vreg_t vc;
    vec_t  data;   // load data, used by OP_VLD only
  } instr_t;

  // Which source registers an opcode reads: {reads vA, reads vB, reads vC}.
  function automatic logic [2:0] op_reads(op_e op);
    unique case (op)
      OP_NOP, OP_VLD:                              return 3'b000;
      OP_VADDUBM, OP_VADDUHM, OP_VADDUWM,
      OP_VSUMSWS, OP_VSUM4UBS,
      OP_VMULEUB, OP_VMULOUB, OP_VMULUHM:          return 3'b110;
      OP_VMSUMUBM, OP_VMLADDUHM,
      OP_VPERM, OP_VPERM_V1, OP_VPERM_V2:          return 3'b111;
      OP_VUPKHUB, OP_VUPKLUB, OP_VUPKHUH, OP_VUPKLUH,
      OP_VUPKHSB, OP_VUPKLSB, OP_VUPKHSH, OP_VUPKLSH: return 3'b010;
      default:                                     return 3'b000;
    endcase
  endfunction

  function automatic logic [7:0] get_b(vec_t v, int i);
    return v[VLEN-1-8*i -: 8];
  endfunction

  function automatic logic [15:0] get_h(vec_t v, int i);
    return v[VLEN-1-16*i -: 16];
  endfunction

  function automatic logic [31:0] get_w(vec_t v, int i);
    return v[VLEN-1-32*i -: 32];
  endfunction

endpackage
