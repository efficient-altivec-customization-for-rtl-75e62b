// Self-checking testbench of vec_mladd: 16-bit multiply-add modulo 2^16.
module tb_vec_mladd;
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
  vec_mladd dut (.a(a), .b(b), .c(c), .d(d));

  function automatic vec_t ref_mladd(vec_t x, vec_t y, vec_t z);
    vec_t r = '0;
    for (int h = 0; h < 8; h++)
      r = (r << 16) | vec_t'((rh(x, h) * rh(y, h) + rh(z, h)) & 32'hFFFF);
    return r;
  endfunction

  initial begin
    a = {8{16'd255}}; b = {8{16'd255}}; c = '0; #1 check("pix", d, {8{16'hFE01}});
    a = '1; b = '1; c = '1; #1 check("wrap", d, {8{16'h0000}});
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec(); c = rnd_vec();
      #1 check("random", d, ref_mladd(a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
