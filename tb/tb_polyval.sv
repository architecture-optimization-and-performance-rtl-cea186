// tb_polyval: absorbs the RFC 8452 appendix A example and random block
// sequences, compares with POLYVAL computed from its own definition, and
// checks that clear restarts the accumulation.
module tb_polyval;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear, h_load, x_valid, busy, done;
  logic [127:0] h, x, s;

  polyval dut (.clk, .rst_n, .clear, .h_load, .h, .x_valid, .x, .busy, .done, .s);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic init(blk_t key);
    @(negedge clk);
    clear = 1; h_load = 1; h = key;
    @(negedge clk);
    clear = 0; h_load = 0; h = '0;
  endtask

  task automatic absorb(blk_t blk);
    @(negedge clk);
    x_valid = 1; x = blk;
    @(negedge clk);
    x_valid = 0; x = '0;
    while (!done) @(negedge clk);
  endtask

  task automatic chk(blk_t exp);
    @(negedge clk);
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL s = %032h exp %032h", s, exp);
    end
  endtask

  initial begin
    blk_t hk, acc;
    clear = 0; h_load = 0; x_valid = 0; h = 0; x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    init(128'h25629347589242761d31f826ba4b757b);
    absorb(128'h4f4f95668c83dfb6401762bb2d01a262);
    absorb(128'hd1a24ddd2721d006bbe45f20d3c9f362);
    chk(128'hf7a3b47b846119fae5b7866cf5e5b77e);
    for (int m = 0; m < 6; m++) begin
      hk = {$urandom, $urandom, $urandom, $urandom};
      acc = 0;
      init(hk);
      chk(0);
      for (int i = 0; i < 5; i++) begin
        blk_t xb = {$urandom, $urandom, $urandom, $urandom};
        absorb(xb);
        acc = dot(acc ^ xb, hk);
        chk(acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
