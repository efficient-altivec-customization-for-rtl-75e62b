// End-to-end testbench of altivec_unit at its default configuration.
//
// The testbench plays the host processor: it issues instruction sequences on
// the valid/ready interface (holding each instruction until taken) and reads
// results through the observation port. Programs run:
//   - a 64-element dot product in the CISC form (vec_msum + vec_sums), the
//     RISC #1 form (unpack, vec_mladd, 16=>32 unpack, 32-bit vec_add,
//     vec_sums) and the RISC #2 form (vec_mule/vec_mulo, unpack, vec_add),
//   - the specialized split vec_add(vec_mul16(A,B),C) against vec_mladd,
//   - a 4-tap FIR row with vec_perm_v1 windows and vec_msum, and with
//     vec_perm_v2 windows and 16-bit vec_mladd,
//   - the crossbar vec_perm example and vec_sum4s,
//   - saturation of vec_sums (sticky flag and its clear), an illegal opcode,
//   - the result latency of each class, measured in cycles.
// Each mechanism (read-after-write stall, write-back slot stall, same-cycle
// forwarding, saturation, illegal opcode) is counted and must occur.
module tb_altivec_unit;
  import altivec_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   rst_n, in_valid, in_ready, illegal, vscr_sat, sat_clr, busy, stall_raw, stall_wb;
  instr_t in_instr;
  vreg_t  rd_addr;
  vec_t   rd_data;

  altivec_unit dut (.*);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_raw = 0, n_wbc = 0, n_fwd = 0, n_illegal = 0, n_sat = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall_raw) n_raw++;
    if (stall_wb)  n_wbc++;
    if (illegal)   n_illegal++;
    if (dut.u_iss.wb_en && dut.u_iss.wb_sat) n_sat++;
    if (in_valid && in_ready && dut.u_iss.wb_en &&
        ((op_reads(in_instr.op)[2] && in_instr.va == dut.u_iss.wb_addr) ||
         (op_reads(in_instr.op)[1] && in_instr.vb == dut.u_iss.wb_addr) ||
         (op_reads(in_instr.op)[0] && in_instr.vc == dut.u_iss.wb_addr)))
      n_fwd++;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int last_issue = 0;

  // Issue one instruction; returns when it has been taken.
  task automatic issue(op_e op, int vd, int va = 0, int vb = 0, int vc = 0, vec_t data = '0);
    in_instr = '{op: op, vd: vreg_t'(vd), va: vreg_t'(va), vb: vreg_t'(vb), vc: vreg_t'(vc), data: data};
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    last_issue = cycle;
    #1 in_valid = 1'b0;
  endtask

  task automatic drain();
    #1;
    while (busy) begin @(posedge clk); #1; end
  endtask

  function automatic vec_t read_reg(int r);
    rd_addr = vreg_t'(r);
    return rd_data;
  endfunction

  task automatic rdchk(string what, int r, vec_t exp);
    vec_t got;
    drain();
    rd_addr = vreg_t'(r);
    #1 got = rd_data;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: v%0d = %032h expected %032h", what, r, got, exp);
    end
  endtask

  function automatic vec_t rnd_vec();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic int unsigned rb(vec_t v, int i);
    return int'((v >> (8*(15-i))) & 128'hFF);
  endfunction
  function automatic vec_t bytes_at(byte unsigned s[], int start);
    vec_t r = '0;
    for (int i = 0; i < 16; i++) r = (r << 8) | vec_t'(s[start + i]);
    return r;
  endfunction
  function automatic vec_t lvsl(int s);
    vec_t r = '0;
    for (int i = 0; i < 16; i++) r = (r << 8) | vec_t'(8'(s + i));
    return r;
  endfunction

  localparam int NV = 4;            // vectors per dot-product operand
  vec_t x [NV];
  vec_t y [NV];
  longint unsigned dot;

  // Register map: v0 zero, v1/v2 operands, v3..v20 temporaries and accumulators.
  initial begin
    int t0, lat_meas;
    vec_t m, exp, eh, el;
    int unsigned yv, yh, yl;
    byte unsigned row [];
    int unsigned f [4];
    rst_n = 1'b0; in_valid = 1'b0; sat_clr = 1'b0; rd_addr = '0;
    in_instr = '{op: OP_NOP, default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    dot = 0;
    for (int i = 0; i < NV; i++) begin
      x[i] = rnd_vec(); y[i] = rnd_vec();
      for (int j = 0; j < 16; j++) dot += rb(x[i], j) * rb(y[i], j);
    end

    // ---- CISC dot product: vec_msum then vec_sums --------------------------------
    issue(OP_VLD, 0, .data('0));
    issue(OP_VLD, 3, .data('0));
    for (int i = 0; i < NV; i++) begin
      issue(OP_VLD, 1, .data(x[i]));
      issue(OP_VLD, 2, .data(y[i]));
      issue(OP_VMSUMUBM, 3, 1, 2, 3);
    end
    issue(OP_VSUMSWS, 4, 3, 0);
    rdchk("dot cisc", 4, vec_t'(dot));

    // ---- RISC #1: 8=>16, vec_mladd, 16=>32, vec_add, vec_sums --------------
    issue(OP_VLD, 9, .data('0));
    issue(OP_VLD, 10, .data('0));
    for (int i = 0; i < NV; i++) begin
      issue(OP_VLD, 1, .data(x[i]));
      issue(OP_VLD, 2, .data(y[i]));
      issue(OP_VUPKHUB, 5, 0, 1);        // A0
      issue(OP_VUPKLUB, 6, 0, 1);        // A1
      issue(OP_VUPKHUB, 7, 0, 2);        // B0
      issue(OP_VUPKLUB, 8, 0, 2);        // B1
      issue(OP_VMLADDUHM, 11, 5, 7, 0);  // P0
      issue(OP_VMLADDUHM, 12, 6, 8, 0);  // P1
      issue(OP_VUPKHUH, 13, 0, 11);      // P00
      issue(OP_VUPKLUH, 14, 0, 11);      // P01
      issue(OP_VUPKHUH, 15, 0, 12);      // P10
      issue(OP_VUPKLUH, 16, 0, 12);      // P11
      issue(OP_VADDUWM, 9, 9, 13);
      issue(OP_VADDUWM, 10, 10, 14);
      issue(OP_VADDUWM, 9, 9, 15);
      issue(OP_VADDUWM, 10, 10, 16);
    end
    issue(OP_VADDUWM, 17, 9, 10);
    issue(OP_VSUMSWS, 18, 17, 0);
    rdchk("dot risc1", 18, vec_t'(dot));

    // ---- RISC #2: vec_mule / vec_mulo, 16=>32, vec_add, vec_sums -------------------
    issue(OP_VLD, 9, .data('0));
    issue(OP_VLD, 10, .data('0));
    for (int i = 0; i < NV; i++) begin
      issue(OP_VLD, 1, .data(x[i]));
      issue(OP_VLD, 2, .data(y[i]));
      issue(OP_VMULEUB, 11, 1, 2);
      issue(OP_VMULOUB, 12, 1, 2);
      issue(OP_VUPKHUH, 13, 0, 11);
      issue(OP_VUPKLUH, 14, 0, 11);
      issue(OP_VUPKHUH, 15, 0, 12);
      issue(OP_VUPKLUH, 16, 0, 12);
      issue(OP_VADDUWM, 9, 9, 13);
      issue(OP_VADDUWM, 10, 10, 14);
      issue(OP_VADDUWM, 9, 9, 15);
      issue(OP_VADDUWM, 10, 10, 16);
    end
    issue(OP_VADDUWM, 17, 9, 10);
    issue(OP_VSUMSWS, 18, 17, 0);
    rdchk("dot risc2", 18, vec_t'(dot));

    // ---- Specialized split: vec_add(vec_mul16(A,B),C) == vec_mladd(A,B,C) ---------
    issue(OP_VLD, 1, .data(x[0]));
    issue(OP_VLD, 2, .data(y[0]));
    issue(OP_VLD, 3, .data(x[1]));
    issue(OP_VMLADDUHM, 4, 1, 2, 3);
    issue(OP_VMULUHM, 5, 1, 2);
    issue(OP_VADDUHM, 5, 5, 3);
    drain();
    rd_addr = 5'd4; #1 m = rd_data;
    rdchk("mul16+add == mladd", 5, m);

    // ---- 4-tap FIR on one row, Y(j) = sum f(k) X(j+k) ------------------------------
    row = new[48];
    foreach (row[i]) row[i] = 8'($urandom);
    for (int k = 0; k < 4; k++) f[k] = $urandom % 16;
    issue(OP_VLD, 1, .data(bytes_at(row, 0)));
    issue(OP_VLD, 2, .data(bytes_at(row, 16)));
    issue(OP_VLD, 7, .data({4{8'(f[0]), 8'(f[1]), 8'(f[2]), 8'(f[3])}}));
    // (a) vec_perm_v1 windows at offsets 0..3, vec_msum: word w of D_k is Y(4w+k).
    for (int k = 0; k < 4; k++) begin
      exp = '0;
      issue(OP_VLD, 6, .data(lvsl(k)));
      issue(OP_VPERM_V1, 8, 1, 2, 6);
      issue(OP_VMSUMUBM, 9, 8, 7, 0);
      for (int w = 0; w < 4; w++) begin
        yv = 0;
        for (int j = 0; j < 4; j++) yv += f[j] * row[4*w + k + j];
        exp = (exp << 32) | vec_t'(yv);
      end
      rdchk($sformatf("fir msum k=%0d", k), 9, exp);
    end
    // (b) vec_perm_v2 windows, 16-bit vec_mladd with a splatted coefficient per tap.
    issue(OP_VLD, 10, .data('0));
    issue(OP_VLD, 11, .data('0));
    for (int k = 0; k < 4; k++) begin
      issue(OP_VLD, 6, .data(lvsl(k)));
      issue(OP_VLD, 12, .data({8{16'(f[k])}}));
      issue(OP_VPERM_V2, 8, 1, 2, 6);
      issue(OP_VUPKHUB, 13, 0, 8);
      issue(OP_VUPKLUB, 14, 0, 8);
      issue(OP_VMLADDUHM, 10, 13, 12, 10);
      issue(OP_VMLADDUHM, 11, 14, 12, 11);
    end
    begin
      eh = '0; el = '0;
      for (int j = 0; j < 8; j++) begin
        yh = 0; yl = 0;
        for (int k = 0; k < 4; k++) begin
          yh += f[k] * row[j + k];
          yl += f[k] * row[j + 8 + k];
        end
        eh = (eh << 16) | vec_t'(yh);
        el = (el << 16) | vec_t'(yl);
      end
      rdchk("fir mladd hi", 10, eh);
      rdchk("fir mladd lo", 11, el);
    end
    // A window past offset 3 through vec_perm_v2, against the full crossbar.
    issue(OP_VLD, 6, .data(lvsl(9)));
    issue(OP_VPERM_V2, 8, 1, 2, 6);
    issue(OP_VPERM, 9, 1, 2, 6);
    rdchk("perm_v2 offset 9", 8, bytes_at(row, 9));
    rdchk("perm offset 9", 9, bytes_at(row, 9));

    // ---- Crossbar example and vec_sum4s --------------------------------------------
    issue(OP_VLD, 1, .data(128'hA0A1A2A3A4A5A6A7A8A9AAABACADAEAF));
    issue(OP_VLD, 2, .data(128'hB0B1B2B3B4B5B6B7B8B9BABBBCBDBEBF));
    issue(OP_VLD, 3, .data(128'h011418101615191A1C1C1C13081D1B0E));
    issue(OP_VPERM, 4, 1, 2, 3);
    rdchk("perm example", 4, 128'hA1B4B8B0B6B5B9BABCBCBCB3A8BDBBAE);
    issue(OP_VLD, 5, .data({32'd1, 32'd2, 32'd3, 32'd4}));
    issue(OP_VSUM4UBS, 6, 3, 5);
    rdchk("sum4s", 6, {32'd1 + 32'h01 + 32'h14 + 32'h18 + 32'h10,
                       32'd2 + 32'h16 + 32'h15 + 32'h19 + 32'h1A,
                       32'd3 + 32'h1C + 32'h1C + 32'h1C + 32'h13,
                       32'd4 + 32'h08 + 32'h1D + 32'h1B + 32'h0E});
    chk("no saturation yet", !vscr_sat);

    // ---- Saturation ----------------------------------------------------------------
    issue(OP_VLD, 1, .data({4{32'h6000_0000}}));
    issue(OP_VSUMSWS, 2, 1, 0);
    rdchk("sums saturates", 2, 128'h7FFF_FFFF);
    chk("vscr_sat set", vscr_sat);
    @(posedge clk); #1 sat_clr = 1'b1;
    @(posedge clk); #1 sat_clr = 1'b0;
    chk("vscr_sat cleared", !vscr_sat);

    // ---- Illegal opcode: no write-back ---------------------------------------------
    issue(OP_VLD, 20, .data(128'h1234));
    issue(op_e'(5'd31), 20, 1, 2, 3);
    rdchk("illegal writes nothing", 20, 128'h1234);

    // ---- Latency of each class: dependent instruction issue distance ------------------
    issue(OP_VLD, 1, .data(x[0]));
    drain();
    issue(OP_VMSUMUBM, 2, 1, 1, 0); t0 = last_issue;
    issue(OP_VADDUWM, 3, 2, 0);     lat_meas = last_issue - t0;
    chk($sformatf("complex latency 4 (got %0d)", lat_meas), lat_meas == 4);
    issue(OP_VPERM, 4, 1, 1, 0);    t0 = last_issue;
    issue(OP_VADDUWM, 5, 4, 0);     lat_meas = last_issue - t0;
    chk($sformatf("permute latency 2 (got %0d)", lat_meas), lat_meas == 2);
    issue(OP_VADDUWM, 6, 1, 1);     t0 = last_issue;
    issue(OP_VADDUWM, 7, 6, 6);     lat_meas = last_issue - t0;
    chk($sformatf("simple latency 1 (got %0d)", lat_meas), lat_meas == 1);
    // Write-back slot conflict: complex, simple, then permute landing on the same cycle.
    issue(OP_VMSUMUBM, 8, 1, 1, 0);
    issue(OP_VADDUWM, 9, 1, 1);
    issue(OP_VPERM, 10, 1, 1, 0);
    drain();

    chk("read-after-write stall seen", n_raw > 0);
    chk("write-back slot stall seen", n_wbc > 0);
    chk("forwarding seen", n_fwd > 0);
    chk("saturation seen", n_sat > 0);
    chk("illegal seen", n_illegal == 1);
    $display("raw stalls %0d, wb stalls %0d, forwards %0d, saturations %0d, illegal %0d, cycles %0d",
             n_raw, n_wbc, n_fwd, n_sat, n_illegal, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
