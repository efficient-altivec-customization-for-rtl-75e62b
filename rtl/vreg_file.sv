// vreg_file: the unit's vector register file, NREG x 128 bits.
//
// Three operand read ports (vA, vB, vC) and one observation read port, all
// asynchronous, and one synchronous write port. A read of the register being
// written in the same cycle returns the new value (write-through), so a result
// written back at a clock edge is usable by the instruction issued at that
// edge. All registers clear on reset (rst_n low at a rising edge).
// The 32-entry size follows the AltiVec register model; reset and forwarding
// are this design's choices.
module vreg_file
  import altivec_pkg::*;
#(
  parameter int unsigned NREG = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] ra_addr,
  input  logic [$clog2(NREG)-1:0] rb_addr,
  input  logic [$clog2(NREG)-1:0] rc_addr,
  input  logic [$clog2(NREG)-1:0] rd_addr,
  output vec_t                    ra_data,
  output vec_t                    rb_data,
  output vec_t                    rc_data,
  output vec_t                    rd_data,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  vec_t                    wd
);

  vec_t regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign ra_data = (we && wa == ra_addr) ? wd : regs[ra_addr];
  assign rb_data = (we && wa == rb_addr) ? wd : regs[rb_addr];
  assign rc_data = (we && wa == rc_addr) ? wd : regs[rc_addr];
  assign rd_data = (we && wa == rd_addr) ? wd : regs[rd_addr];

endmodule
