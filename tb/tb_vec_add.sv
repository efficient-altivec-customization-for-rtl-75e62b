// Self-checking testbench of vec_add at byte, halfword and word element sizes.
module tb_vec_add;
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
  esz_e esz;
  vec_add dut (.a(a), .b(b), .esz(esz), .d(d));

  function automatic vec_t ref_add(vec_t x, vec_t y, int bytes);
    vec_t r = '0;
    int n = 16 / bytes;
    longint unsigned mask = (64'd1 << (8*bytes)) - 1;
    for (int e = 0; e < n; e++) begin
      longint unsigned ex = longint'((x >> (8*bytes*(n-1-e)))) & mask;
      longint unsigned ey = longint'((y >> (8*bytes*(n-1-e)))) & mask;
      r = (r << (8*bytes)) | vec_t'((ex + ey) & mask);
    end
    return r;
  endfunction

  initial begin
    a = '1; b = 128'h1;
    esz = ESZ_B; #1 check("carry_b", d, {{15{8'hFF}}, 8'h00});
    esz = ESZ_H; #1 check("carry_h", d, {{7{16'hFFFF}}, 16'h0000});
    esz = ESZ_W; #1 check("carry_w", d, {{3{32'hFFFF_FFFF}}, 32'h0});
    for (int n = 0; n < 3000; n++) begin
      a = rnd_vec(); b = rnd_vec();
      esz = esz_e'(n % 3);
      #1 check("random", d, ref_add(a, b, 1 << (n % 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
