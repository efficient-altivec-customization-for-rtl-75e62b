// altivec_unit: customizable AltiVec-compatible SIMD integer unit.
//
// The unit executes the AltiVec instructions that dot products and FIR
// filters are built from, so that code written for a PowerPC with AltiVec can
// drive it unchanged, while only the instructions an application needs are
// built (EN_* parameters). It holds:
//   - vreg_file: 32 x 128-bit vector registers,
//   - vec_execute: the functional units (CISC vec_msum / vec_sums / vec_sum4s,
//     RISC vec_mladd / vec_mule / vec_mulo / vec_add, the specialized 16-bit
//     vec_mul, the full vec_perm and two permutes specialized to unaligned
//     windows, and the 8=>16 / 16=>32 widening conversions),
//   - vec_issue: in-order issue with per-class latency and interlocks,
//   - the sticky saturation flag vscr_sat (set by vec_sums / vec_sum4s,
//     cleared by sat_clr).
//
// Interface: an instruction (instr_t: opcode, vD, vA, vB, vC, 128-bit load
// data for VLD) is offered with in_valid and taken at a rising clock edge when
// in_ready is high; it must then be held stable until taken. Its result is
// written to vD LAT cycles later (1 simple, 2 permute, 4 complex by default).
// A register can be read at any time on rd_addr/rd_data. illegal pulses in the
// cycle an opcode that is not built (or unknown) is taken; it writes nothing.
// busy is high while results are in flight. rst_n is synchronous, active low.
// Loads and stores to a memory hierarchy are outside the unit; VLD and the
// read port stand in for them.
module altivec_unit
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
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  output logic   illegal,
  output logic   vscr_sat,
  input  logic   sat_clr,
  output logic   busy,
  output logic   stall_raw,
  output logic   stall_wb,
  input  vreg_t  rd_addr,
  output vec_t   rd_data
);

  localparam int unsigned MAX_LAT =
    (LAT_COMPLEX > LAT_PERM) ? ((LAT_COMPLEX > LAT_SIMPLE) ? LAT_COMPLEX : LAT_SIMPLE)
                             : ((LAT_PERM > LAT_SIMPLE) ? LAT_PERM : LAT_SIMPLE);

  vec_t       va_data, vb_data, vc_data, result, wb_data;
  logic [2:0] lat;
  logic       writes, ex_illegal, ex_sat, fire, wb_en, wb_sat;
  vreg_t      wb_addr;

  vreg_file #(.NREG(NVREG)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .ra_addr(in_instr.va),
    .rb_addr(in_instr.vb),
    .rc_addr(in_instr.vc),
    .rd_addr(rd_addr),
    .ra_data(va_data),
    .rb_data(vb_data),
    .rc_data(vc_data),
    .rd_data(rd_data),
    .we     (wb_en),
    .wa     (wb_addr),
    .wd     (wb_data)
  );

  vec_execute #(
    .EN_MSUM(EN_MSUM), .EN_SUMS(EN_SUMS), .EN_SUM4S(EN_SUM4S), .EN_MLADD(EN_MLADD),
    .EN_MULEO(EN_MULEO), .EN_MUL16(EN_MUL16), .EN_PERM(EN_PERM),
    .EN_PERM_V1(EN_PERM_V1), .EN_PERM_V2(EN_PERM_V2), .EN_UNPACK(EN_UNPACK),
    .LAT_SIMPLE(LAT_SIMPLE), .LAT_PERM(LAT_PERM), .LAT_COMPLEX(LAT_COMPLEX)
  ) u_ex (
    .op     (in_instr.op),
    .a      (va_data),
    .b      (vb_data),
    .c      (vc_data),
    .ld_data(in_instr.data),
    .d      (result),
    .lat    (lat),
    .writes (writes),
    .illegal(ex_illegal),
    .sat    (ex_sat)
  );

  vec_issue #(.MAX_LAT(MAX_LAT)) u_iss (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .vd       (in_instr.vd),
    .va       (in_instr.va),
    .vb       (in_instr.vb),
    .vc       (in_instr.vc),
    .reads    (op_reads(in_instr.op)),
    .writes   (writes),
    .lat      (lat),
    .result   (result),
    .sat      (ex_sat),
    .fire     (fire),
    .wb_en    (wb_en),
    .wb_addr  (wb_addr),
    .wb_data  (wb_data),
    .wb_sat   (wb_sat),
    .stall_raw(stall_raw),
    .stall_wb (stall_wb),
    .busy     (busy)
  );

  assign illegal = fire && ex_illegal;

  always_ff @(posedge clk) begin
    if (!rst_n)       vscr_sat <= 1'b0;
    else if (sat_clr) vscr_sat <= 1'b0;
    else if (wb_sat)  vscr_sat <= 1'b1;
  end

  // Handshake rule: an offered instruction stays offered, unchanged, until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_ready |=> in_valid && $stable(in_instr));

endmodule
