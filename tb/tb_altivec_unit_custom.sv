// Testbench of a customized altivec_unit: only what the RISC #1 (vec_mladd)
// forms of the dot product and the 4-tap FIR need is built, i.e. no vec_msum,
// vec_sum4s, vec_mule/vec_mulo, full vec_perm or wide specialized permute.
// It runs both kernels in that form, checks the results, and checks that the
// opcodes of the units left out are reported illegal and write nothing.
module tb_altivec_unit_custom;
  import altivec_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   rst_n, in_valid, in_ready, illegal, vscr_sat, sat_clr, busy, stall_raw, stall_wb;
  instr_t in_instr;
  vreg_t  rd_addr;
  vec_t   rd_data;

  altivec_unit #(
    .EN_MSUM(1'b0), .EN_SUM4S(1'b0), .EN_MULEO(1'b0), .EN_PERM(1'b0), .EN_PERM_V2(1'b0)
  ) dut (.*);

  int n_illegal = 0;
  always @(posedge clk) if (rst_n && illegal) n_illegal++;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(op_e op, int vd, int va = 0, int vb = 0, int vc = 0, vec_t data = '0);
    in_instr = '{op: op, vd: vreg_t'(vd), va: vreg_t'(va), vb: vreg_t'(vb), vc: vreg_t'(vc), data: data};
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic rdchk(string what, int r, vec_t exp);
    #1;
    while (busy) begin @(posedge clk); #1; end
    rd_addr = vreg_t'(r);
    #1 chk($sformatf("%s: %032h vs %032h", what, rd_data, exp), rd_data == exp);
  endtask

  function automatic int unsigned rb(vec_t v, int i);
    return int'((v >> (8*(15-i))) & 128'hFF);
  endfunction
  function automatic vec_t lvsl(int s);
    vec_t r = '0;
    for (int i = 0; i < 16; i++) r = (r << 8) | vec_t'(8'(s + i));
    return r;
  endfunction

  initial begin
    vec_t x, y, cur, nxt, eh, el;
    longint unsigned dot;
    int unsigned f [4];
    int unsigned yh, yl;
    byte unsigned row [32];
    rst_n = 1'b0; in_valid = 1'b0; sat_clr = 1'b0; rd_addr = '0;
    in_instr = '{op: OP_NOP, default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Dot product of 8 vectors, RISC #1 form.
    dot = 0;
    issue(OP_VLD, 0, .data('0));
    issue(OP_VLD, 9, .data('0));
    issue(OP_VLD, 10, .data('0));
    for (int i = 0; i < 8; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      for (int j = 0; j < 16; j++) dot += rb(x, j) * rb(y, j);
      issue(OP_VLD, 1, .data(x));
      issue(OP_VLD, 2, .data(y));
      issue(OP_VUPKHUB, 5, 0, 1);
      issue(OP_VUPKLUB, 6, 0, 1);
      issue(OP_VUPKHUB, 7, 0, 2);
      issue(OP_VUPKLUB, 8, 0, 2);
      issue(OP_VMLADDUHM, 11, 5, 7, 0);
      issue(OP_VMLADDUHM, 12, 6, 8, 0);
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
    rdchk("dot risc1", 18, vec_t'(dot));

    // 4-tap FIR, 16 outputs, vec_perm_v1 windows and vec_mladd.
    foreach (row[i]) row[i] = 8'($urandom);
    for (int k = 0; k < 4; k++) f[k] = $urandom % 64;
    for (int i = 0; i < 16; i++) begin
      cur = (cur << 8) | vec_t'(row[i]);
      nxt = (nxt << 8) | vec_t'(row[16 + i]);
    end
    issue(OP_VLD, 1, .data(cur));
    issue(OP_VLD, 2, .data(nxt));
    issue(OP_VLD, 3, .data('0));
    issue(OP_VLD, 4, .data('0));
    for (int k = 0; k < 4; k++) begin
      issue(OP_VLD, 20, .data(lvsl(k)));
      issue(OP_VLD, 21, .data({8{16'(f[k])}}));
      issue(OP_VPERM_V1, 22, 1, 2, 20);
      issue(OP_VUPKHUB, 5, 0, 22);
      issue(OP_VUPKLUB, 6, 0, 22);
      issue(OP_VMLADDUHM, 3, 5, 21, 3);
      issue(OP_VMLADDUHM, 4, 6, 21, 4);
    end
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
    rdchk("fir hi", 3, eh);
    rdchk("fir lo", 4, el);

    // Units left out: opcodes are illegal and do not write.
    issue(OP_VLD, 25, .data(128'hC0FFEE));
    issue(OP_VMSUMUBM, 25, 1, 2, 3);
    issue(OP_VSUM4UBS, 25, 1, 2);
    issue(OP_VMULEUB, 25, 1, 2);
    issue(OP_VMULOUB, 25, 1, 2);
    issue(OP_VPERM, 25, 1, 2, 20);
    issue(OP_VPERM_V2, 25, 1, 2, 20);
    rdchk("left-out units write nothing", 25, 128'hC0FFEE);
    chk($sformatf("six illegal opcodes (got %0d)", n_illegal), n_illegal == 6);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
