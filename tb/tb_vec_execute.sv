// Self-checking testbench of vec_execute: every opcode is decoded to the right
// unit, latency class and write/illegal/saturation flags, in the full
// configuration and in a reduced one where some units are left out.
module tb_vec_execute;
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

  op_e        op;
  vec_t       a, b, c, ld, d, d_r;
  logic [2:0] lat, lat_r;
  logic       writes, illegal, sat, writes_r, illegal_r, sat_r;

  vec_execute dut (.op(op), .a(a), .b(b), .c(c), .ld_data(ld), .d(d), .lat(lat),
                   .writes(writes), .illegal(illegal), .sat(sat));
  // Reduced configuration: no vec_msum, no full vec_perm, no unpack.
  vec_execute #(.EN_MSUM(1'b0), .EN_PERM(1'b0), .EN_UNPACK(1'b0)) dut_r (
    .op(op), .a(a), .b(b), .c(c), .ld_data(ld), .d(d_r), .lat(lat_r),
    .writes(writes_r), .illegal(illegal_r), .sat(sat_r));

  function automatic int unsigned rb(vec_t v, int i);
    return int'((v >> (8*(15-i))) & 128'hFF);
  endfunction
  function automatic int unsigned rh(vec_t v, int i);
    return int'((v >> (16*(7-i))) & 128'hFFFF);
  endfunction
  function automatic longint unsigned rw(vec_t v, int i);
    return longint'((v >> (32*(3-i))) & 128'hFFFF_FFFF);
  endfunction

  // Independent reference of every opcode's result.
  function automatic vec_t ref_op(op_e o, vec_t x, vec_t y, vec_t z, vec_t l);
    vec_t r = '0;
    case (o)
      OP_VLD: r = l;
      OP_VADDUBM: for (int i = 0; i < 16; i++) r = (r << 8)  | vec_t'((rb(x,i) + rb(y,i)) & 32'hFF);
      OP_VADDUHM: for (int i = 0; i < 8; i++)  r = (r << 16) | vec_t'((rh(x,i) + rh(y,i)) & 32'hFFFF);
      OP_VADDUWM: for (int i = 0; i < 4; i++)  r = (r << 32) | vec_t'((rw(x,i) + rw(y,i)) & 64'hFFFF_FFFF);
      OP_VMSUMUBM: for (int w = 0; w < 4; w++) begin
        longint unsigned s = rw(z, w);
        for (int j = 0; j < 4; j++) s += rb(x, 4*w+j) * rb(y, 4*w+j);
        r = (r << 32) | vec_t'(s & 64'hFFFF_FFFF);
      end
      OP_VSUMSWS: begin
        longint s = longint'(signed'(32'(rw(y, 3))));
        for (int w = 0; w < 4; w++) s += longint'(signed'(32'(rw(x, w))));
        if (s > 64'sd2147483647) s = 64'sd2147483647;
        if (s < -64'sd2147483648) s = -64'sd2147483648;
        r = vec_t'(unsigned'(32'(s)));
      end
      OP_VSUM4UBS: for (int w = 0; w < 4; w++) begin
        longint unsigned s = rw(y, w);
        for (int j = 0; j < 4; j++) s += rb(x, 4*w+j);
        if (s > 64'hFFFF_FFFF) s = 64'hFFFF_FFFF;
        r = (r << 32) | vec_t'(s);
      end
      OP_VMLADDUHM: for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'((rh(x,i)*rh(y,i) + rh(z,i)) & 32'hFFFF);
      OP_VMULEUB:   for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'(rb(x,2*i)*rb(y,2*i));
      OP_VMULOUB:   for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'(rb(x,2*i+1)*rb(y,2*i+1));
      OP_VMULUHM:   for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'((rh(x,i)*rh(y,i)) & 32'hFFFF);
      OP_VPERM: for (int i = 0; i < 16; i++) begin
        int s = rb(z, i) % 32;
        r = (r << 8) | vec_t'(s < 16 ? rb(x, s) : rb(y, s-16));
      end
      OP_VPERM_V1, OP_VPERM_V2: begin
        int s = rb(z, 0) % ((o == OP_VPERM_V1) ? 4 : 16);
        for (int i = 0; i < 16; i++) r = (r << 8) | vec_t'(s+i < 16 ? rb(x, s+i) : rb(y, s+i-16));
      end
      OP_VUPKHUB: for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'(rb(y, i));
      OP_VUPKLUB: for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'(rb(y, i+8));
      OP_VUPKHSB: for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'(unsigned'(16'(signed'(8'(rb(y, i))))));
      OP_VUPKLSB: for (int i = 0; i < 8; i++) r = (r << 16) | vec_t'(unsigned'(16'(signed'(8'(rb(y, i+8))))));
      OP_VUPKHUH: for (int i = 0; i < 4; i++) r = (r << 32) | vec_t'(rh(y, i));
      OP_VUPKLUH: for (int i = 0; i < 4; i++) r = (r << 32) | vec_t'(rh(y, i+4));
      OP_VUPKHSH: for (int i = 0; i < 4; i++) r = (r << 32) | vec_t'(unsigned'(32'(signed'(16'(rh(y, i))))));
      OP_VUPKLSH: for (int i = 0; i < 4; i++) r = (r << 32) | vec_t'(unsigned'(32'(signed'(16'(rh(y, i+4))))));
      default: r = '0;
    endcase
    return r;
  endfunction

  function automatic int ref_lat(op_e o);
    if (o inside {OP_VLD, OP_VADDUBM, OP_VADDUHM, OP_VADDUWM}) return 1;
    if (o inside {OP_VPERM, OP_VPERM_V1, OP_VPERM_V2, OP_VUPKHUB, OP_VUPKLUB, OP_VUPKHUH,
                  OP_VUPKLUH, OP_VUPKHSB, OP_VUPKLSB, OP_VUPKHSH, OP_VUPKLSH}) return 2;
    return 4;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%0d", what, op); end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = op_e'(5'(n % 24));   // 0..22 are opcodes, 23 is unknown
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      c = {$urandom, $urandom, $urandom, $urandom};
      ld = {$urandom, $urandom, $urandom, $urandom};
      if (n % 48 >= 24) b = b >> 3;   // also non-saturating sums
      #1;
      if (n % 24 == 23) begin
        chk("unknown illegal", illegal && !writes);
      end else if (op == OP_NOP) begin
        chk("nop", !writes && !illegal);
      end else begin
        chk("result", d == ref_op(op, a, b, c, ld));
        chk("lat", int'(lat) == ref_lat(op));
        chk("writes", writes && !illegal);
        // Reduced configuration.
        if (op inside {OP_VMSUMUBM, OP_VPERM, OP_VUPKHUB, OP_VUPKLUB, OP_VUPKHUH, OP_VUPKLUH,
                       OP_VUPKHSB, OP_VUPKLSB, OP_VUPKHSH, OP_VUPKLSH})
          chk("reduced illegal", illegal_r && !writes_r);
        else
          chk("reduced result", !illegal_r && writes_r && d_r == d);
      end
    end
    // Saturation flag, directed.
    op = OP_VSUMSWS; a = {4{32'h7000_0000}}; b = '0; #1 chk("sums sat", sat);
    a = {4{32'h0000_0001}}; #1 chk("sums no sat", !sat);
    op = OP_VSUM4UBS; a = '1; b = {4{32'hFFFF_FFF0}}; #1 chk("sum4s sat", sat);
    b = '0; #1 chk("sum4s no sat", !sat);
    op = OP_VMSUMUBM; a = '1; b = '1; c = '1; #1 chk("msum never sat", !sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
