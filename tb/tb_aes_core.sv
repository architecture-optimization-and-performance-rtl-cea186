// tb_aes_core: encrypts FIPS-197 and GCM vectors and random blocks with both
// S-box forms (logic and ROM), compares with the reference AES-128 and
// checks the latency (10 clocks with logic S-boxes, 20 with ROM S-boxes).
module tb_aes_core;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start [2];
  logic [127:0] key [2], din [2], dout [2];
  logic         busy [2], done [2];

  aes_core #(.SBOX_ROM(1'b0)) dut_logic (.clk, .rst_n, .start(start[0]), .key(key[0]),
    .din(din[0]), .busy(busy[0]), .done(done[0]), .dout(dout[0]));
  aes_core #(.SBOX_ROM(1'b1)) dut_rom (.clk, .rst_n, .start(start[1]), .key(key[1]),
    .din(din[1]), .busy(busy[1]), .done(done[1]), .dout(dout[1]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int u, blk_t k, blk_t p, blk_t exp);
    int cyc = 0;
    @(negedge clk);
    start[u] = 1; key[u] = k; din[u] = p;
    @(negedge clk);
    start[u] = 0; key[u] = '0; din[u] = '0;   // inputs only matter with start
    cyc = 1;
    while (!done[u]) begin @(negedge clk); cyc++; end
    checks += 2;
    if (dout[u] !== exp) begin
      failures++;
      $display("FAIL unit %0d: %032h exp %032h", u, dout[u], exp);
    end
    if (cyc != (u ? 21 : 11)) begin  // done seen at the negedge after edge 10 (20)
      failures++;
      $display("FAIL unit %0d latency %0d", u, cyc);
    end
  endtask

  initial begin
    start[0] = 0; start[1] = 0;
    key[0] = 0; key[1] = 0; din[0] = 0; din[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int u = 0; u < 2; u++) begin
      run(u, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
          128'h69c4e0d86a7b0430d8cdb78070b4c55a);
      run(u, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
          128'h3925841d02dc09fbdc118597196a0b32);
      run(u, 128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
      for (int i = 0; i < 12; i++) begin
        blk_t k = {$urandom, $urandom, $urandom, $urandom};
        blk_t p = {$urandom, $urandom, $urandom, $urandom};
        run(u, k, p, aes128(k, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
