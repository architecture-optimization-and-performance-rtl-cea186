// tb_msg_buffer: fills both banks with random blocks, reads them back with
// the one-clock read latency, and checks that a write to one bank while the
// other is read leaves the read data intact.
module tb_msg_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, wbank, rbank;
  logic [5:0] waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [2][64];

  msg_buffer dut (.clk, .we, .wbank, .waddr, .wdata, .rbank, .raddr, .rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; waddr = 0; wdata = 0; rbank = 0; raddr = 0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        we = 1; wbank = b[0]; waddr = 6'(i);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        model[b][i] = wdata;
      end
    @(negedge clk) we = 0;
    // read bank 0 while rewriting bank 1
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      rbank = 0; raddr = 6'(i);
      we = 1; wbank = 1; waddr = 6'(63 - i);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[1][63 - i] = wdata;
      @(posedge clk) #1;
      checks++;
      if (rdata !== model[0][i]) begin
        failures++;
        $display("FAIL bank0[%0d]", i);
      end
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      rbank = 1; raddr = 6'(i);
      @(posedge clk) #1;
      checks++;
      if (rdata !== model[1][i]) begin
        failures++;
        $display("FAIL bank1[%0d]", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
