// Self-checking testbench of vreg_file: reset to zero, random writes against a
// shadow array, write-through forwarding on all four read ports.
module tb_vreg_file;
  import altivec_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, we;
  vreg_t ra, rb, rc, rd, wa;
  vec_t  da, db, dc, dd, wd;
  vec_t  shadow [32];

  vreg_file #(.NREG(32)) dut (
    .clk(clk), .rst_n(rst_n), .ra_addr(ra), .rb_addr(rb), .rc_addr(rc), .rd_addr(rd),
    .ra_data(da), .rb_data(db), .rc_data(dc), .rd_data(dd), .we(we), .wa(wa), .wd(wd));

  function automatic vec_t expect_rd(vreg_t r);
    return (we && wa == r) ? wd : shadow[r];
  endfunction

  task automatic check(string what, vec_t got, vec_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; wa = '0; wd = '0; ra = '0; rb = '0; rc = '0; rd = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      shadow[i] = '0;
      rd = vreg_t'(i); #1 check("reset", dd, '0);
    end
    for (int n = 0; n < 5000; n++) begin
      we = ($urandom % 2) == 1;
      wa = vreg_t'($urandom);
      wd = {$urandom, $urandom, $urandom, $urandom};
      ra = vreg_t'($urandom); rb = vreg_t'($urandom); rc = vreg_t'($urandom);
      rd = (n % 4 == 0) ? wa : vreg_t'($urandom);
      #1;
      check("ra", da, expect_rd(ra));
      check("rb", db, expect_rd(rb));
      check("rc", dc, expect_rd(rc));
      check("rd", dd, expect_rd(rd));
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
