// Self-checking testbench of vec_unpack: 8=>16 and 16=>32 conversions, high/low half, zero/sign extension.
module tb_vec_unpack;
  import altivec_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Watchdog: give up after a fixed number of cycles.
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t rnd_vec();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Reference element access, written as shifts (element 0 = most significant).
  function automatic int unsigned rb(vec_t v, int i);
    return int'((v >> (8*(15-i))) & 128'hFF);
  endfunction
  function automatic int unsigned rh(vec_t v, int i);
    return int'((v >> (16*(7-i))) & 128'hFFFF);
  endfunction
  function automatic longint unsigned rw(vec_t v, int i);
    return longint'((v >> (32*(3-i))) & 128'hFFFF_FFFF);
  endfunction

  task automatic check(string what, vec_t got, vec_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  vec_t a, d;
  logic wide16, lo, sext;
  vec_unpack dut (.a(a), .wide16(wide16), .lo(lo), .sext(sext), .d(d));

  function automatic vec_t ref_upk(vec_t x, int w, int l, int s);
    vec_t r = '0;
    if (w == 0) begin
      for (int i = 0; i < 8; i++) begin
        int unsigned e = rb(x, i + 8*l);
        if (s != 0 && e >= 128) e += 32'hFF00;
        r = (r << 16) | vec_t'(e);
      end
    end else begin
      for (int i = 0; i < 4; i++) begin
        longint unsigned e = rh(x, i + 4*l);
        if (s != 0 && e >= 32768) e += 64'hFFFF_0000;
        r = (r << 32) | vec_t'(e);
      end
    end
    return r;
  endfunction

  initial begin
    a = 128'h00_01_7F_80_FF_02_03_04_F0_F1_F2_F3_10_11_12_13;
    wide16 = 0; lo = 0; sext = 0; #1 check("hub", d, 128'h0000_0001_007F_0080_00FF_0002_0003_0004);
    wide16 = 0; lo = 1; sext = 1; #1 check("lsb", d, 128'hFFF0_FFF1_FFF2_FFF3_0010_0011_0012_0013);
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); wide16 = n[0]; lo = n[1]; sext = n[2];
      #1 check("random", d, ref_upk(a, n % 2, (n / 2) % 2, (n / 4) % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
