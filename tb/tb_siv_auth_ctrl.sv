// tb_siv_auth_ctrl: runs the authentication FSM with its own AES core,
// POLYVAL unit and buffer. For each message it checks the hand-off record
// (tag, encryption key, length, bank) against the reference AES-GCM-SIV
// model and the plaintext written to the buffer bank (zero past the length).
// The testbench plays the encryption side: it holds banks busy and delays
// the hand-off so that both waits of the FSM occur. Bytes past the message
// length are driven with random data, which must not affect the result.
module tb_siv_auth_ctrl;
  import siv_pkg::*;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] key;
  logic hdr_valid, hdr_ready, din_valid, din_ready;
  nonce_t hdr_nonce;
  len_t hdr_ad_len, hdr_pt_len;
  logic [127:0] din_data;
  logic aes_start, aes_busy, aes_done;
  logic [127:0] aes_key, aes_din, aes_dout;
  logic pv_clear, pv_h_load, pv_x_valid, pv_busy, pv_done;
  logic [127:0] pv_h, pv_x, pv_s;
  logic buf_we, buf_wbank, rbank;
  logic [5:0] buf_waddr, raddr;
  logic [127:0] buf_wdata, rdata;
  logic [1:0] bank_free;
  logic bank_claim, ho_valid, ho_ready, stall_bank, stall_slot;
  handoff_t ho_data;

  siv_auth_ctrl dut (.clk, .rst_n, .master_key(key),
    .hdr_valid, .hdr_ready, .hdr_nonce, .hdr_ad_len, .hdr_pt_len,
    .din_valid, .din_ready, .din_data,
    .aes_start, .aes_key, .aes_din, .aes_busy, .aes_done, .aes_dout,
    .pv_clear, .pv_h_load, .pv_h, .pv_x_valid, .pv_x, .pv_busy, .pv_done, .pv_s,
    .buf_we, .buf_wbank, .buf_waddr, .buf_wdata,
    .bank_free, .bank_claim, .ho_valid, .ho_ready, .ho_data, .stall_bank, .stall_slot);
  aes_core u_aes (.clk, .rst_n, .start(aes_start), .key(aes_key), .din(aes_din),
    .busy(aes_busy), .done(aes_done), .dout(aes_dout));
  polyval u_pv (.clk, .rst_n, .clear(pv_clear), .h_load(pv_h_load), .h(pv_h),
    .x_valid(pv_x_valid), .x(pv_x), .busy(pv_busy), .done(pv_done), .s(pv_s));
  msg_buffer u_buf (.clk, .we(buf_we), .wbank(buf_wbank), .waddr(buf_waddr),
    .wdata(buf_wdata), .rbank(rbank), .raddr(raddr), .rdata(rdata));

  int n_stall_bank = 0, n_stall_slot = 0;
  always @(posedge clk) begin
    if (stall_bank) n_stall_bank++;
    if (stall_slot) n_stall_slot++;
  end

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

  function automatic logic [127:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Drive one block of a byte array; bytes past its end are random.
  function automatic logic [127:0] blk_of(bytes_t d, int idx);
    logic [127:0] r = rnd();
    for (int i = 0; i < 16; i++)
      if (16*idx + i < d.size()) r[127-8*i -: 8] = d[16*idx + i];
    return r;
  endfunction

  task automatic one_msg(logic [95:0] n, bytes_t ad, bytes_t pt, int hold_bank, int hold_slot);
    blk_t ct[$], tag, k2, k3;
    int nad = (ad.size() + 15) / 16, npt = (pt.size() + 15) / 16;
    logic bank;
    aead_siv(key, n, ad, pt, ct, tag);
    k2 = aes128(key, {8'd2, 24'd0, n});
    k3 = aes128(key, {8'd3, 24'd0, n});
    bank = dut.bank;
    // the encryption side still holds this bank for a while
    bank_free = 2'b11;
    bank_free[bank] = 1'b0;
    @(negedge clk);
    hdr_valid = 1; hdr_nonce = n; hdr_ad_len = len_t'(ad.size()); hdr_pt_len = len_t'(pt.size());
    repeat (hold_bank) @(negedge clk);
    bank_free = 2'b11;
    #1;
    while (!hdr_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    hdr_valid = 0; hdr_nonce = '0; hdr_ad_len = '0; hdr_pt_len = '0;
    for (int i = 0; i < nad + npt; i++) begin
      din_valid = ($urandom % 4) != 0;
      din_data = (i < nad) ? blk_of(ad, i) : blk_of(pt, i - nad);
      #1;
      while (!(din_valid && din_ready)) begin
        @(negedge clk);
        din_valid = 1;
        #1;
      end
      @(negedge clk);
      din_valid = 0;
      din_data = rnd();
    end
    while (!ho_valid) @(negedge clk);
    repeat (hold_slot) begin
      #1;
      checks++;
      if (!stall_slot) begin failures++; $display("FAIL stall_slot not raised"); end
      @(negedge clk);
    end
    ho_ready = 1;
    chk("tag", ho_data.tag, tag);
    chk("enc_key", ho_data.enc_key, {k2[127:64], k3[127:64]});
    chk("len/bank", {ho_data.pt_len, ho_data.bank}, {len_t'(pt.size()), bank});
    @(negedge clk);
    ho_ready = 0;
    for (int i = 0; i < npt; i++) begin
      rbank = bank; raddr = 6'(i);
      @(negedge clk);
      chk("buffer", rdata, get_blk(pt, i));
    end
  endtask

  initial begin
    bytes_t ad, pt;
    key = 128'h01000000000000000000000000000000;
    hdr_valid = 0; hdr_nonce = 0; hdr_ad_len = 0; hdr_pt_len = 0;
    din_valid = 0; din_data = 0; bank_free = 2'b11; ho_ready = 0; rbank = 0; raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // RFC 8452 C.1 vectors: empty message, 8-byte plaintext
    ad = new[0]; pt = new[0];
    one_msg(96'h030000000000000000000000, ad, pt, 5, 3);
    pt = new[8]; foreach (pt[i]) pt[i] = 0; pt[0] = 1;
    one_msg(96'h030000000000000000000000, ad, pt, 0, 0);
    key = rnd();
    for (int m = 0; m < 8; m++) begin
      ad = new[$urandom % 40];
      pt = new[(m == 7) ? 1024 : $urandom % 70];
      foreach (ad[i]) ad[i] = byte'($urandom);
      foreach (pt[i]) pt[i] = byte'($urandom);
      one_msg({$urandom, $urandom, $urandom}, ad, pt, m % 3, m % 2);
    end
    checks++;
    if (n_stall_bank == 0 || n_stall_slot == 0) begin
      failures++;
      $display("FAIL waits not seen: bank %0d slot %0d", n_stall_bank, n_stall_slot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
