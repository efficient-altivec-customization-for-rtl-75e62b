// Self-checking testbench of vec_sums: signed sum-across with saturation against a 64-bit reference.
module tb_vec_sums;
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
  vec_sums dut (.a(a), .b(b), .d(d), .sat(sat));

  task automatic run_one(string what);
    longint s = longint'(signed'(32'(rw(b, 3))));
    logic exp_sat = 1'b0;
    vec_t exp;
    for (int w = 0; w < 4; w++) s += longint'(signed'(32'(rw(a, w))));
    if (s > 64'sd2147483647)       begin s = 64'sd2147483647;  exp_sat = 1'b1; end
    else if (s < -64'sd2147483648) begin s = -64'sd2147483648; exp_sat = 1'b1; end
    exp = {96'h0, 32'(s)};
    #1 check(what, d, exp);
    checks++;
    if (sat !== exp_sat) begin failures++; $display("FAIL %s sat", what); end
  endtask

  initial begin
    a = {32'd1, 32'd2, 32'd3, 32'd4}; b = {32'd9, 32'd9, 32'd9, 32'd100}; run_one("small");
    a = {4{32'h7000_0000}}; b = '0; run_one("pos_sat");
    a = {4{32'h9000_0000}}; b = '0; run_one("neg_sat");
    a = {32'hFFFF_FFFF, 32'd0, 32'd0, 32'd0}; b = {96'h0, 32'd5}; run_one("neg_one");
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec();
      if (n % 2 == 0) a = a >> 2;   // mix of saturating and non-saturating cases
      run_one("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
