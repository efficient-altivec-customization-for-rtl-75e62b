// Self-checking testbench of vec_mul16, including vec_add(vec_mul16(A,B),C) == vec_mladd(A,B,C) by reference.
module tb_vec_mul16;
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
  vec_mul16 dut (.a(a), .b(b), .d(d));

  function automatic vec_t ref_mul(vec_t x, vec_t y);
    vec_t r = '0;
    for (int h = 0; h < 8; h++)
      r = (r << 16) | vec_t'((rh(x, h) * rh(y, h)) & 32'hFFFF);
    return r;
  endfunction

  initial begin
    a = {8{16'h0100}}; b = {8{16'h0100}}; #1 check("lowhalf", d, '0);
    a = {8{16'd200}};  b = {8{16'd3}};    #1 check("small", d, {8{16'd600}});
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec();
      #1 check("random", d, ref_mul(a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
