// tb_aes_sbox: exhaustive check of the combinational S-box against the
// reference S-box, plus the published first and last rows of the AES table.
module tb_aes_sbox;
  import siv_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;
  aes_sbox dut (.a(a), .y(y));

  localparam logic [127:0] ROW0 = 128'h637c777bf26b6fc53001672bfed7ab76;
  localparam logic [127:0] ROWF = 128'h8ca1890dbfe6426841992d0fb054bb16;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (y !== sbox(8'(i))) begin
        failures++;
        $display("FAIL sbox(%02h) = %02h exp %02h", i, y, sbox(8'(i)));
      end
      if (i < 16 || i >= 240) begin
        checks++;
        if (y !== ((i < 16) ? ROW0[127-8*i -: 8] : ROWF[127-8*(i-240) -: 8])) begin
          failures++;
          $display("FAIL table sbox(%02h) = %02h", i, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
