// Self-checking testbench of vec_perm, including the printed crossbar example.
module tb_vec_perm;
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

  vec_t a, b, c, d;
  vec_perm dut (.a(a), .b(b), .c(c), .d(d));

  function automatic vec_t ref_perm(vec_t x, vec_t y, vec_t z);
    vec_t r = '0;
    for (int i = 0; i < 16; i++) begin
      int s = rb(z, i) % 32;
      r = (r << 8) | vec_t'(s < 16 ? rb(x, s) : rb(y, s - 16));
    end
    return r;
  endfunction

  initial begin
    // Byte values name their position: a = a0..aF -> 0xA0..0xAF, b -> 0xB0..0xBF.
    a = 128'hA0A1A2A3A4A5A6A7A8A9AAABACADAEAF;
    b = 128'hB0B1B2B3B4B5B6B7B8B9BABBBCBDBEBF;
    c = 128'h01141810161519_1A1C1C1C13081D1B0E;
    #1 check("crossbar example", d, 128'hA1B4B8B0B6B5B9BABCBCBCB3A8BDBBAE);
    c = 128'hE1F4F8F0F6F5F9FAFCFCFCF3E8FDFBEE;  // upper selector bits ignored
    #1 check("high bits", d, 128'hA1B4B8B0B6B5B9BABCBCBCB3A8BDBBAE);
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec(); c = rnd_vec();
      #1 check("random", d, ref_perm(a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
