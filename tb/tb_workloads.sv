// Workload testbench of altivec_unit at its default configuration: the two
// kernels the unit is built for, at image sizes 256x256, 512x512 and 1024x1024.
//
//   dot product  sum of a(i)*b(i) over N*N unsigned bytes, in three forms:
//                CISC   vec_msum into four accumulators, vec_add, vec_sums
//                RISC#1 unpack 8=>16, vec_mladd, unpack 16=>32, vec_add, vec_sums
//                RISC#2 vec_mule/vec_mulo, unpack 16=>32, vec_add, vec_sums
//   FIR 4-tap    Y(i,j) = sum f(k) X(i,j+k) over an N*N image (zero past the
//                row end), in three forms:
//                msum   vec_perm_v1 windows, vec_msum (32-bit outputs)
//                mladd  vec_perm_v1 windows, unpack, 16-bit vec_mladd
//                mul    vec_perm_v1 windows, vec_mule/vec_mulo, 16-bit vec_add
//
// Data come from $urandom. The dot product is checked with the exact
// semantics of the 32-bit lanes (each lane wraps modulo 2^32, vec_sums
// saturates), which depend on which bytes each form gathers in a lane; the
// testbench also reports whether the 32-bit result equals the true sum. FIR
// outputs are checked as they are written back. Cycles per pixel (cpp) of
// each form are printed; they cover the unit only (operands arrive by VLD
// with no memory stalls).
module tb_workloads;
  import altivec_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
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

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic issue(op_e op, int vd, int va = 0, int vb = 0, int vc = 0, vec_t data = '0);
    in_instr = '{op: op, vd: vreg_t'(vd), va: vreg_t'(va), vb: vreg_t'(vb), vc: vreg_t'(vc), data: data};
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic drain();
    #1;
    while (busy) begin @(posedge clk); #1; end
  endtask

  function automatic vec_t rnd_vec();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic int unsigned rb(vec_t v, int i);
    return int'((v >> (8*(15-i))) & 128'hFF);
  endfunction
  function automatic vec_t lvsl(int s);
    vec_t r = '0;
    for (int i = 0; i < 16; i++) r = (r << 8) | vec_t'(8'(s + i));
    return r;
  endfunction

  // Expected write-back values of output registers, in order, per register.
  vec_t expq [32][$];
  always @(posedge clk) if (rst_n && dut.u_iss.wb_en && dut.u_iss.wb_addr >= 5'd24) begin
    if (expq[dut.u_iss.wb_addr].size() == 0) begin
      chk("unexpected output write", 1'b0);
    end else begin
      vec_t e;
      e = expq[dut.u_iss.wb_addr].pop_front();
      chk($sformatf("output v%0d", dut.u_iss.wb_addr), dut.u_iss.wb_data == e);
    end
  end

  // Lane map of each dot-product form: which 32-bit lane byte b lands in.
  function automatic int lane_of(int form, int b);
    case (form)
      0: return b / 4;                    // vec_msum: bytes 4w..4w+3
      1: return b % 4;                    // RISC#1: bytes j, j+4, j+8, j+12
      default: return (b % 8) / 2;        // RISC#2: bytes 2j, 2j+1, 2j+8, 2j+9
    endcase
  endfunction

  function automatic longint sat_sum(longint unsigned lanes [4]);
    longint s = 0;
    for (int w = 0; w < 4; w++) s += longint'(signed'(32'(lanes[w] & 64'hFFFF_FFFF)));
    if (s > 64'sd2147483647) s = 64'sd2147483647;
    if (s < -64'sd2147483648) s = -64'sd2147483648;
    return s;
  endfunction

  string form_name [3] = '{"CISC vec_msum", "RISC#1 vec_mladd", "RISC#2 vec_mule/mulo"};
  string fir_name  [3] = '{"msum", "mladd", "mul"};

  // Register use: v0 zero, v1/v2 operands or row vectors, v3..v6 accumulators,
  // v7..v19 temporaries, v20..v23 window controls (offsets 0..3),
  // v24..v31 FIR outputs.
  task automatic run_dot(int n, int form);
    longint unsigned lanes [4];
    longint unsigned truth;
    longint          exp, got;
    longint          t0;
    int              nv;
    vec_t            x, y;
    nv = n * n / 16;
    truth = 0;
    for (int w = 0; w < 4; w++) lanes[w] = 0;
    for (int r = 3; r <= 6; r++) issue(OP_VLD, r, .data('0));
    drain();
    t0 = cycle;
    for (int i = 0; i < nv; i++) begin
      int acc;
      acc = 3 + (i % 4);
      x = rnd_vec(); y = rnd_vec();
      for (int b = 0; b < 16; b++) begin
        longint unsigned p;
        p = longint'(rb(x, b) * rb(y, b));
        lanes[lane_of(form, b)] += p;
        truth += p;
      end
      issue(OP_VLD, 1 + 8*(i%2), .data(x));
      issue(OP_VLD, 2 + 8*(i%2), .data(y));
      case (form)
        0: issue(OP_VMSUMUBM, acc, 1 + 8*(i%2), 2 + 8*(i%2), acc);
        1: begin
          int s;
          s = 8*(i%2);
          issue(OP_VUPKHUB, 11, 0, 1 + s);
          issue(OP_VUPKLUB, 12, 0, 1 + s);
          issue(OP_VUPKHUB, 13, 0, 2 + s);
          issue(OP_VUPKLUB, 14, 0, 2 + s);
          issue(OP_VMLADDUHM, 15, 11, 13, 0);
          issue(OP_VMLADDUHM, 16, 12, 14, 0);
          issue(OP_VUPKHUH, 17, 0, 15);
          issue(OP_VUPKLUH, 18, 0, 15);
          issue(OP_VUPKHUH, 11, 0, 16);
          issue(OP_VUPKLUH, 12, 0, 16);
          issue(OP_VADDUWM, 3, 3, 17);
          issue(OP_VADDUWM, 4, 4, 18);
          issue(OP_VADDUWM, 5, 5, 11);
          issue(OP_VADDUWM, 6, 6, 12);
        end
        default: begin
          int s;
          s = 8*(i%2);
          issue(OP_VMULEUB, 15, 1 + s, 2 + s);
          issue(OP_VMULOUB, 16, 1 + s, 2 + s);
          issue(OP_VUPKHUH, 17, 0, 15);
          issue(OP_VUPKLUH, 18, 0, 15);
          issue(OP_VUPKHUH, 11, 0, 16);
          issue(OP_VUPKLUH, 12, 0, 16);
          issue(OP_VADDUWM, 3, 3, 17);
          issue(OP_VADDUWM, 4, 4, 18);
          issue(OP_VADDUWM, 5, 5, 11);
          issue(OP_VADDUWM, 6, 6, 12);
        end
      endcase
    end
    issue(OP_VADDUWM, 3, 3, 4);
    issue(OP_VADDUWM, 5, 5, 6);
    issue(OP_VADDUWM, 3, 3, 5);
    issue(OP_VSUMSWS, 7, 3, 0);
    drain();
    rd_addr = 5'd7;
    #1 got = longint'(signed'(rd_data[31:0]));
    exp = sat_sum(lanes);
    chk($sformatf("dot %0dx%0d %s", n, n, form_name[form]), got == exp && rd_data[127:32] == '0);
    $display("dot %4dx%-4d %-22s cpp %0.3f  result %0d  true sum %0d  %s", n, n, form_name[form],
             real'(cycle - t0) / real'(n * n), got, truth,
             (longint'(truth) == got) ? "exact" : "does not fit the 32-bit result");
  endtask

  task automatic run_fir(int n, int form);
    int unsigned f [4];
    longint      t0;
    int          outr;
    vec_t        cur, nxt, ex, exh, exl;
    byte unsigned pix [];
    outr = 24;
    for (int k = 0; k < 4; k++) f[k] = $urandom % 64;   // keeps 16-bit sums exact
    issue(OP_VLD, 19, .data({4{8'(f[0]), 8'(f[1]), 8'(f[2]), 8'(f[3])}}));
    for (int k = 0; k < 4; k++) begin
      issue(OP_VLD, 20 + k, .data(lvsl(k)));
      issue(OP_VLD, 7 + k, .data({8{16'(f[k])}}));     // halfword splats, v7..v10
      issue(OP_VLD, 11 + k, .data({16{8'(f[k])}}));    // byte splats, v11..v14
    end
    drain();
    t0 = cycle;
    pix = new[n + 16];
    for (int row = 0; row < n; row++) begin
      foreach (pix[i]) pix[i] = (i < n) ? 8'($urandom) : 8'd0;
      for (int blk = 0; blk < n / 16; blk++) begin
        for (int i = 0; i < 16; i++) begin
          cur = (cur << 8) | vec_t'(pix[16*blk + i]);
          nxt = (nxt << 8) | vec_t'(pix[16*blk + 16 + i]);
        end
        issue(OP_VLD, 1, .data(cur));
        issue(OP_VLD, 2, .data(nxt));
        case (form)
          0: for (int k = 0; k < 4; k++) begin
            // Word w of the result is Y(16 blk + 4w + k).
            ex = '0;
            for (int w = 0; w < 4; w++) begin
              int unsigned yv;
              yv = 0;
              for (int j = 0; j < 4; j++) yv += f[j] * pix[16*blk + 4*w + k + j];
              ex = (ex << 32) | vec_t'(yv);
            end
            expq[outr].push_back(ex);
            issue(OP_VPERM_V1, 15 + k, 1, 2, 20 + k);
            issue(OP_VMSUMUBM, outr, 15 + k, 19, 0);
            outr = (outr == 31) ? 24 : outr + 1;
          end
          1: begin
            exh = '0; exl = '0;
            for (int j = 0; j < 8; j++) begin
              int unsigned yh, yl;
              yh = 0; yl = 0;
              for (int k = 0; k < 4; k++) begin
                yh += f[k] * pix[16*blk + j + k];
                yl += f[k] * pix[16*blk + 8 + j + k];
              end
              exh = (exh << 16) | vec_t'(yh);
              exl = (exl << 16) | vec_t'(yl);
            end
            issue(OP_VLD, 3, .data('0));
            issue(OP_VLD, 4, .data('0));
            for (int k = 0; k < 4; k++) begin
              int hi, lo;
              hi = (k == 3) ? 24 : 3;
              lo = (k == 3) ? 25 : 4;
              issue(OP_VPERM_V1, 15 + k, 1, 2, 20 + k);
              issue(OP_VUPKHUB, 5, 0, 15 + k);
              issue(OP_VUPKLUB, 6, 0, 15 + k);
              if (k == 3) begin
                expq[24].push_back(exh);
                expq[25].push_back(exl);
              end
              issue(OP_VMLADDUHM, hi, 5, 7 + k, 3);
              issue(OP_VMLADDUHM, lo, 6, 7 + k, 4);
            end
          end
          default: begin
            // Even outputs j = 0,2,..,14 and odd outputs j = 1,3,..,15.
            exh = '0; exl = '0;
            for (int h = 0; h < 8; h++) begin
              int unsigned ye, yo;
              ye = 0; yo = 0;
              for (int k = 0; k < 4; k++) begin
                ye += f[k] * pix[16*blk + 2*h + k];
                yo += f[k] * pix[16*blk + 2*h + 1 + k];
              end
              exh = (exh << 16) | vec_t'(ye);
              exl = (exl << 16) | vec_t'(yo);
            end
            issue(OP_VLD, 3, .data('0));
            issue(OP_VLD, 4, .data('0));
            for (int k = 0; k < 4; k++) begin
              int ev, od;
              ev = (k == 3) ? 26 : 3;
              od = (k == 3) ? 27 : 4;
              issue(OP_VPERM_V1, 15 + k, 1, 2, 20 + k);
              issue(OP_VMULEUB, 5, 15 + k, 11 + k);
              issue(OP_VMULOUB, 6, 15 + k, 11 + k);
              if (k == 3) begin
                expq[26].push_back(exh);
                expq[27].push_back(exl);
              end
              issue(OP_VADDUHM, ev, 3, 5);
              issue(OP_VADDUHM, od, 4, 6);
            end
          end
        endcase
      end
    end
    drain();
    $display("fir %4dx%-4d %-22s cpp %0.3f", n, n, fir_name[form], real'(cycle - t0) / real'(n * n));
  endtask

  localparam int SIZES [3] = '{256, 512, 1024};

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; sat_clr = 1'b0; rd_addr = '0;
    in_instr = '{op: OP_NOP, default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    issue(OP_VLD, 0, .data('0));
    foreach (SIZES[s])
      for (int form = 0; form < 3; form++) run_dot(SIZES[s], form);
    foreach (SIZES[s])
      for (int form = 0; form < 3; form++) run_fir(SIZES[s], form);
    for (int r = 24; r < 32; r++) chk($sformatf("all outputs of v%0d seen", r), expq[r].size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
