// tb_aes_sbox_rom: reads all 256 entries of the S-box ROM, checks each
// against the reference S-box and checks the one-clock read latency.
module tb_aes_sbox_rom;
  import siv_ref_pkg::*;
  logic clk = 0;
  logic [7:0] addr, data;
  int checks = 0, failures = 0;
  aes_sbox_rom dut (.clk(clk), .addr(addr), .data(data));
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) addr = 8'(i);
      @(posedge clk) #1;
      checks++;
      if (data !== sbox(8'(i))) begin
        failures++;
        $display("FAIL rom[%02h] = %02h exp %02h", i, data, sbox(8'(i)));
      end
      // the output only changes at a clock edge
      @(negedge clk) addr = 8'(i) ^ 8'hFF;
      #1;
      checks++;
      if (data !== sbox(8'(i))) begin
        failures++;
        $display("FAIL rom output changed without a clock edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
