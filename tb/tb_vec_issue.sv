// Self-checking testbench of vec_issue. A random stream of instructions with
// latencies 1, 2 and 4 and random register numbers is offered; a reference
// scoreboard, kept as a list of issued instructions and their write-back
// cycles, predicts in_ready every cycle. Every write-back is checked for cycle,
// register and data. Both kinds of stall must occur.
module tb_vec_issue;
  import altivec_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rst_n, in_valid, in_ready, writes, sat, fire;
  logic       wb_en, wb_sat, stall_raw, stall_wb, busy;
  vreg_t      vd, va, vb, vc, wb_addr;
  logic [2:0] reads, lat;
  vec_t       result, wb_data;

  vec_issue #(.MAX_LAT(4)) dut (.*);

  typedef struct {
    int    wb_cycle;
    vreg_t vd;
    vec_t  data;
    logic  sat;
  } issued_t;
  issued_t q[$];

  logic took;
  int cycle = 0;       // number of rising edges since reset
  int n_raw = 0, n_wb = 0, n_issued = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  function automatic logic ref_ready();
    logic dep = 1'b0, conf = 1'b0;
    foreach (q[i]) begin
      int k = q[i].wb_cycle - (cycle + 1);   // slot the result sits in this cycle
      if (k >= 1 && ((reads[2] && q[i].vd == va) || (reads[1] && q[i].vd == vb) ||
                     (reads[0] && q[i].vd == vc) || (writes && q[i].vd == vd)))
        dep = 1'b1;
      if (writes && k == int'(lat) && k <= 3) conf = 1'b1;
    end
    return !(dep || conf);
  endfunction

  task automatic new_instr();
    int l = $urandom % 3;
    lat    = (l == 0) ? 3'd1 : (l == 1) ? 3'd2 : 3'd4;
    vd     = vreg_t'($urandom % 4);
    va     = vreg_t'($urandom % 4);
    vb     = vreg_t'($urandom % 4);
    vc     = vreg_t'($urandom % 4);
    reads  = 3'($urandom);
    writes = ($urandom % 8) != 0;
    result = {$urandom, $urandom, $urandom, $urandom};
    sat    = 1'($urandom);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    new_instr();
    @(posedge clk); #1 rst_n = 1'b1;
    while (n_issued < 2000) begin
      in_valid = ($urandom % 5) != 0;
      #1;
      if (in_valid) check("in_ready", in_ready == ref_ready());
      if (stall_raw) n_raw++;
      if (stall_wb) n_wb++;
      // Write-back at the coming edge.
      if (q.size() > 0 && q[0].wb_cycle == cycle + 1) begin
        check("wb_en", wb_en);
        check("wb_addr", wb_addr == q[0].vd);
        check("wb_data", wb_data == q[0].data);
        check("wb_sat", wb_sat == q[0].sat);
        void'(q.pop_front());
      end else begin
        check("no wb", !wb_en);
      end
      if (in_valid && in_ready && writes) begin
        issued_t e;
        int pos;
        pos = q.size();
        e = '{wb_cycle: cycle + 1 + int'(lat), vd: vd, data: result, sat: sat};
        // Keep the list ordered by write-back cycle.
        foreach (q[i]) if (q[i].wb_cycle > e.wb_cycle) begin pos = i; break; end
        q.insert(pos, e);
      end
      took = in_valid && fire;
      @(posedge clk);
      #1;
      cycle++;
      if (took) begin n_issued++; new_instr(); end
    end
    check("read-after-write stalls seen", n_raw > 0);
    check("write-back slot stalls seen", n_wb > 0);
    $display("issued %0d, raw stalls %0d, wb stalls %0d", n_issued, n_raw, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
