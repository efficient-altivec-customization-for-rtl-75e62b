// vec_issue: in-order issue and write-back scheduling of the SIMD unit.
//
// One instruction is offered per cycle on a valid/ready handshake. Its result
// is computed at issue and travels down a delay line of MAX_LAT slots; slot k
// holds the result that is written to the register file k+1 clock edges from
// now, so an instruction of latency L enters slot L-1. The instruction is held
// (in_ready low) when
//   - it reads or writes a register whose result is still in slots 1..MAX_LAT-1
//     (stall_raw; slot 0 is written at this edge and the register file
//     forwards it), or
//   - it writes a register and slot L is occupied, so that after shifting two
//     results would land in the same write-back cycle (stall_wb).
// Write-back is therefore always in order of issue for a given register and
// at most one result per cycle. The sat flag of a result travels with it.
// The scheduling scheme is this design's; the latencies come from vec_execute.
module vec_issue
  import altivec_pkg::*;
#(
  parameter int unsigned MAX_LAT = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  vreg_t      vd,
  input  vreg_t      va,
  input  vreg_t      vb,
  input  vreg_t      vc,
  input  logic [2:0] reads,     // {vA, vB, vC} are read
  input  logic       writes,    // vD is written
  input  logic [2:0] lat,       // 1..MAX_LAT
  input  vec_t       result,
  input  logic       sat,
  output logic       fire,      // the offered instruction issues this cycle
  output logic       wb_en,
  output vreg_t      wb_addr,
  output vec_t       wb_data,
  output logic       wb_sat,
  output logic       stall_raw,
  output logic       stall_wb,
  output logic       busy
);

  typedef struct packed {
    logic  valid;
    vreg_t vd;
    vec_t  data;
    logic  sat;
  } slot_t;

  slot_t pipe [MAX_LAT];

  logic dep, conflict;

  always_comb begin
    dep = 1'b0;
    for (int k = 1; k < int'(MAX_LAT); k++) begin
      if (pipe[k].valid &&
          ((reads[2] && pipe[k].vd == va) ||
           (reads[1] && pipe[k].vd == vb) ||
           (reads[0] && pipe[k].vd == vc) ||
           (writes   && pipe[k].vd == vd)))
        dep = 1'b1;
    end
    conflict = 1'b0;
    for (int k = 1; k < int'(MAX_LAT); k++)
      if (writes && int'(lat) == k && pipe[k].valid) conflict = 1'b1;
  end

  assign in_ready  = !(dep || conflict);
  assign fire      = in_valid && in_ready;
  assign stall_raw = in_valid && dep;
  assign stall_wb  = in_valid && !dep && conflict;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(MAX_LAT); k++) pipe[k] <= '0;
    end else begin
      for (int k = 0; k < int'(MAX_LAT) - 1; k++) pipe[k] <= pipe[k+1];
      pipe[MAX_LAT-1] <= '0;
      if (fire && writes)
        pipe[int'(lat) - 1] <= '{valid: 1'b1, vd: vd, data: result, sat: sat};
    end
  end

  assign wb_en   = pipe[0].valid;
  assign wb_addr = pipe[0].vd;
  assign wb_data = pipe[0].data;
  assign wb_sat  = pipe[0].valid && pipe[0].sat;

  always_comb begin
    busy = 1'b0;
    for (int k = 0; k < int'(MAX_LAT); k++) busy |= pipe[k].valid;
  end

  // An issued write must have a latency the delay line can hold.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fire && writes |-> lat >= 3'd1 && int'(lat) <= int'(MAX_LAT));

endmodule
