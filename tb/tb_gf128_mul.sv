// tb_gf128_mul: multiplies the GCM test case 2 values and random operands,
// compares with the textbook GCM product and checks the 128/DIGIT latency.
module tb_gf128_mul;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, busy, done;
  logic [127:0] a, b, p;

  gf128_mul dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .p);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(blk_t x, blk_t y, blk_t exp);
    int cyc;
    @(negedge clk);
    start = 1; a = x; b = y;
    @(negedge clk);
    start = 0; a = '0; b = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (p !== exp) begin
      failures++;
      $display("FAIL %032h * %032h = %032h exp %032h", x, y, p, exp);
    end
    if (cyc != 9) begin  // done seen at the negedge after edge 8
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    start = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(128'h0388dace60b6a392f328c2b971b2fe78, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
        128'h5e2ec746917062882c85b0685353deb7);
    run(128'h5e2ec746917062882c85b0685353deb7 ^ 128'd128, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
        128'hab6e47d42cec13bdf53a67b21257bddf ^ 128'h58e2fccefa7e3061367f1d57a4e7455a);
    run(128'h80000000000000000000000000000000, 128'h0123456789abcdef0011223344556677,
        128'h0123456789abcdef0011223344556677);   // 1 * y = y
    for (int i = 0; i < 40; i++) begin
      blk_t x = {$urandom, $urandom, $urandom, $urandom};
      blk_t y = {$urandom, $urandom, $urandom, $urandom};
      run(x, y, gcm_mul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
