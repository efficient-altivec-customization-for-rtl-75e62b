// Self-checking testbench of vec_msum: random and extreme operands against a word-by-word reference sum, modulo 2^32.
module tb_vec_msum;
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
  vec_msum dut (.a(a), .b(b), .c(c), .d(d));

  function automatic vec_t ref_msum(vec_t x, vec_t y, vec_t z);
    vec_t r = '0;
    for (int w = 0; w < 4; w++) begin
      longint unsigned s = rw(z, w);
      for (int j = 0; j < 4; j++) s += longint'(rb(x, 4*w+j)) * longint'(rb(y, 4*w+j));
      r = (r << 32) | vec_t'(s & 64'hFFFF_FFFF);
    end
    return r;
  endfunction

  initial begin
    // Worst case: all bytes 255 and accumulator near the top (wraps).
    a = '1; b = '1; c = {4{32'hFFFF_0000}}; #1 check("max", d, ref_msum(a, b, c));
    a = '0; b = '1; c = rnd_vec();           #1 check("zero", d, c);
    // One byte per word: product lands in its own word.
    a = 128'h02000000_00030000_00000400_00000005;
    b = 128'h07000000_00070000_00000700_00000007;
    c = 128'h00000001_00000002_00000003_00000004;
    #1 check("lanes", d, 128'h0000000F_00000017_0000001F_00000027);
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec(); c = rnd_vec();
      #1 check("random", d, ref_msum(a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
