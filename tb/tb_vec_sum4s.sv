// Self-checking testbench of vec_sum4s: unsigned quarter sums with saturation.
module tb_vec_sum4s;
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
  logic sat;
  vec_sum4s dut (.a(a), .b(b), .d(d), .sat(sat));

  task automatic run_one(string what);
    vec_t exp = '0;
    logic exp_sat = 1'b0;
    for (int w = 0; w < 4; w++) begin
      longint unsigned s = rw(b, w);
      for (int j = 0; j < 4; j++) s += rb(a, 4*w+j);
      if (s > 64'hFFFF_FFFF) begin s = 64'hFFFF_FFFF; exp_sat = 1'b1; end
      exp = (exp << 32) | vec_t'(s);
    end
    #1 check(what, d, exp);
    checks++;
    if (sat !== exp_sat) begin failures++; $display("FAIL %s sat", what); end
  endtask

  initial begin
    a = '1; b = {32'hFFFF_FC03, 32'hFFFF_FC04, 32'd0, 32'd7}; run_one("edge");
    a = 128'h01020304_05060708_090A0B0C_0D0E0F10; b = '0; run_one("ramp");
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec();
      if (n % 3 == 0) b = b | {4{32'hFFFF_F000}};
      run_one("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
