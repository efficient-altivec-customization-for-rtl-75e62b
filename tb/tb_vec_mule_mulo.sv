// Self-checking testbench of vec_mule_mulo: even and odd byte products.
module tb_vec_mule_mulo;
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

  vec_t a, b, d;
  logic odd;
  vec_mule_mulo dut (.a(a), .b(b), .odd(odd), .d(d));

  function automatic vec_t ref_mul(vec_t x, vec_t y, int o);
    vec_t r = '0;
    for (int h = 0; h < 8; h++)
      r = (r << 16) | vec_t'(rb(x, 2*h+o) * rb(y, 2*h+o));
    return r;
  endfunction

  initial begin
    a = 128'h0102030405060708090A0B0C0D0E0F10; b = {16{8'd2}};
    odd = 1'b0; #1 check("even", d, 128'h0002_0006_000A_000E_0012_0016_001A_001E);
    odd = 1'b1; #1 check("odd",  d, 128'h0004_0008_000C_0010_0014_0018_001C_0020);
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec(); odd = n[0];
      #1 check("random", d, ref_mul(a, b, n % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
