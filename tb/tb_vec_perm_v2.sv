// Self-checking testbench of vec_perm_v2: unaligned windows of a || b at every supported offset.
module tb_vec_perm_v2;
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
  vec_perm_v2 dut (.a(a), .b(b), .c(c), .d(d));

  localparam int NOFF = 16;

  function automatic vec_t ref_win(vec_t x, vec_t y, int s);
    vec_t r = '0;
    for (int i = 0; i < 16; i++)
      r = (r << 8) | vec_t'(s + i < 16 ? rb(x, s + i) : rb(y, s + i - 16));
    return r;
  endfunction

  // Consecutive control vector s, s+1, ..., s+15 as used for unaligned loads.
  function automatic vec_t lvsl(int s);
    vec_t r = '0;
    for (int i = 0; i < 16; i++) r = (r << 8) | vec_t'(8'(s + i));
    return r;
  endfunction

  initial begin
    a = 128'hA0A1A2A3A4A5A6A7A8A9AAABACADAEAF;
    b = 128'hB0B1B2B3B4B5B6B7B8B9BABBBCBDBEBF;
    c = lvsl(1); #1 check("offset1", d, 128'hA1A2A3A4A5A6A7A8A9AAABACADAEAFB0);
    c = lvsl(3); #1 check("offset3", d, 128'hA3A4A5A6A7A8A9AAABACADAEAFB0B1B2);
    for (int n = 0; n < 3000; n++) begin
      int s;
      s = n % NOFF;
      a = rnd_vec(); b = rnd_vec();
      c = lvsl(s);
      #1 check("random", d, ref_win(a, b, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
