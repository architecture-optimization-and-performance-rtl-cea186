// tb_siv_enc_ctrl: runs the encryption FSM with its own AES core and buffer.
// The testbench plays the authentication side: it writes the plaintext
// (zero-padded) into a bank, offers the hand-off record computed with the
// reference model, and then checks every ciphertext block and the tag
// against the reference AES-GCM-SIV output, under random back-pressure on
// the output, and that the bank is released exactly once per message.
module tb_siv_enc_ctrl;
  import siv_pkg::*;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ho_valid, ho_ready;
  handoff_t ho_data;
  logic aes_start, aes_busy, aes_done;
  logic [127:0] aes_key, aes_din, aes_dout;
  logic buf_rbank, we, wbank;
  logic [5:0] buf_raddr, waddr;
  logic [127:0] buf_rdata, wdata;
  logic bank_release, release_bank;
  logic out_valid, out_ready, out_is_tag;
  logic [127:0] out_data;

  siv_enc_ctrl dut (.clk, .rst_n, .ho_valid, .ho_ready, .ho_data,
    .aes_start, .aes_key, .aes_din, .aes_busy, .aes_done, .aes_dout,
    .buf_rbank, .buf_raddr, .buf_rdata, .bank_release, .release_bank,
    .out_valid, .out_ready, .out_data, .out_is_tag);
  aes_core u_aes (.clk, .rst_n, .start(aes_start), .key(aes_key), .din(aes_din),
    .busy(aes_busy), .done(aes_done), .dout(aes_dout));
  msg_buffer u_buf (.clk, .we(we), .wbank(wbank), .waddr(waddr), .wdata(wdata),
    .rbank(buf_rbank), .raddr(buf_raddr), .rdata(buf_rdata));

  int rel_count[2] = '{0, 0};
  always @(posedge clk) if (bank_release) rel_count[release_bank]++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h exp %032h", what, got, exp);
    end
  endtask

  task automatic one_msg(logic [127:0] key, logic [95:0] n, bytes_t ad, bytes_t pt, logic bank);
    blk_t ct[$], tag, k2, k3;
    int npt = (pt.size() + 15) / 16;
    int rel0;
    aead_siv(key, n, ad, pt, ct, tag);
    k2 = aes128(key, {8'd2, 24'd0, n});
    k3 = aes128(key, {8'd3, 24'd0, n});
    for (int i = 0; i < npt; i++) begin
      @(negedge clk);
      we = 1; wbank = bank; waddr = 6'(i); wdata = get_blk(pt, i);
    end
    @(negedge clk);
    we = 0;
    ho_valid = 1;
    ho_data = '{tag: tag, enc_key: {k2[127:64], k3[127:64]}, pt_len: len_t'(pt.size()), bank: bank};
    rel0 = rel_count[bank];
    while (!ho_ready) @(negedge clk);
    @(negedge clk);
    ho_valid = 0; ho_data = '0;
    for (int i = 0; i <= npt; i++) begin
      out_ready = ($urandom % 3) == 0;
      #1;
      while (!(out_valid && out_ready)) begin
        @(negedge clk);
        out_ready = ($urandom % 3) == 0;
        #1;
      end
      if (i < npt) begin
        chk("ct", out_data, ct[i]);
        chk("not tag", 128'(out_is_tag), 0);
      end else begin
        chk("tag", out_data, tag);
        chk("is tag", 128'(out_is_tag), 1);
      end
      @(negedge clk);
      out_ready = 0;
    end
    checks++;
    if (rel_count[bank] != rel0 + 1) begin
      failures++;
      $display("FAIL bank %0d released %0d times", bank, rel_count[bank] - rel0);
    end
  endtask

  initial begin
    bytes_t ad, pt;
    logic [127:0] key;
    ho_valid = 0; ho_data = 0; we = 0; wbank = 0; waddr = 0; wdata = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ad = new[0]; pt = new[8]; foreach (pt[i]) pt[i] = 0; pt[0] = 1;
    one_msg(128'h01000000000000000000000000000000, 96'h030000000000000000000000, ad, pt, 0);
    pt = new[0];
    one_msg(128'h01000000000000000000000000000000, 96'h030000000000000000000000, ad, pt, 1);
    for (int m = 0; m < 8; m++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      ad = new[$urandom % 20];
      pt = new[(m == 7) ? 1024 : 1 + $urandom % 70];
      foreach (ad[i]) ad[i] = byte'($urandom);
      foreach (pt[i]) pt[i] = byte'($urandom);
      one_msg(key, {$urandom, $urandom, $urandom}, ad, pt, m[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
