// tb_aes_gcm_siv_top: end-to-end test of the AES-GCM-SIV engine at its
// default parameters. A driver streams messages (RFC 8452 vectors, a
// message that fills a whole buffer bank, and random messages with empty
// and partial blocks) back to back; a collector takes the output under
// random back-pressure and compares every ciphertext block and tag with the
// reference model. It also counts the mechanisms of the two-FSM pipeline
// and fails if one never happened: authentication of one message
// overlapping encryption of another, each FSM waiting for the shared AES
// core, the wait for a free bank, the wait for
// the hand-off slot, output back-pressure, both banks in use, partial last
// blocks, empty plaintexts and a full-bank message. It prints the cycles
// per byte of the full-bank message.
module tb_aes_gcm_siv_top;
  import siv_pkg::*;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NMSG = 20;
  localparam int FULL = 64 * 16;   // bytes in one buffer bank

  logic [127:0] key;
  logic hdr_valid, hdr_ready, din_valid, din_ready, out_valid, out_ready, out_is_tag;
  logic stall_bank, stall_slot;
  nonce_t hdr_nonce;
  len_t hdr_ad_len, hdr_pt_len;
  logic [127:0] din_data, out_data;

  aes_gcm_siv_top dut (.clk, .rst_n, .key, .hdr_valid, .hdr_ready, .hdr_nonce,
    .hdr_ad_len, .hdr_pt_len, .din_valid, .din_ready, .din_data,
    .out_valid, .out_ready, .out_data, .out_is_tag, .stall_bank, .stall_slot);

  typedef struct {
    logic [95:0] nonce;
    bytes_t ad, pt;
  } msg_t;
  msg_t msgs[NMSG];
  blk_t exp_q[$];
  logic exp_tag_q[$];
  int total_out = 0;

  // mechanism counters
  int n_overlap = 0, n_stall_bank = 0, n_stall_slot = 0, n_backpressure = 0;
  int n_aes_wait_a = 0, n_aes_wait_e = 0;
  int n_bank1 = 0, n_partial = 0, n_empty = 0, n_full = 0;
  longint t_full_in = 0, t_full_tag = 0;
  int tags_seen = 0, hold_done = -1;

  always @(posedge clk) if (rst_n) begin
    // multiplier on one message while the AES core encrypts another
    if (dut.pv_busy && dut.aes_busy && dut.u_arb.owner_e) n_overlap++;
    // either FSM waiting because the shared AES core works for the other
    if (dut.a_aes_start && dut.a_aes_busy && dut.aes_busy && dut.u_arb.owner_e) n_aes_wait_a++;
    if (dut.e_aes_start && dut.e_aes_busy && dut.aes_busy && !dut.u_arb.owner_e) n_aes_wait_e++;
    if (stall_bank) n_stall_bank++;
    if (stall_slot) n_stall_slot++;
    if (out_valid && !out_ready) n_backpressure++;
    if (dut.buf_we && dut.buf_wbank) n_bank1++;
    if (hdr_valid && hdr_ready) begin
      if (hdr_pt_len % 16 != 0) n_partial++;
      if (hdr_pt_len == 0) n_empty++;
      if (32'(hdr_pt_len) == FULL) begin n_full++; t_full_in = $time; end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d outputs", total_out, exp_q.size() + total_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [127:0] blk_of(bytes_t d, int idx);
    logic [127:0] r = rnd();
    for (int i = 0; i < 16; i++)
      if (16*idx + i < d.size()) r[127-8*i -: 8] = d[16*idx + i];
    return r;
  endfunction

  task automatic drive();
    for (int m = 0; m < NMSG; m++) begin
      int nad = (msgs[m].ad.size() + 15) / 16, npt = (msgs[m].pt.size() + 15) / 16;
      @(negedge clk);
      hdr_valid = 1; hdr_nonce = msgs[m].nonce;
      hdr_ad_len = len_t'(msgs[m].ad.size()); hdr_pt_len = len_t'(msgs[m].pt.size());
      #1;
      while (!hdr_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      hdr_valid = 0;
      for (int i = 0; i < nad + npt; i++) begin
        din_valid = ($urandom % 8) != 0;
        din_data = (i < nad) ? blk_of(msgs[m].ad, i) : blk_of(msgs[m].pt, i - nad);
        #1;
        while (!(din_valid && din_ready)) begin @(negedge clk); din_valid = 1; #1; end
        @(negedge clk);
        din_valid = 0;
      end
    end
  endtask

  task automatic collect(int n);
    int got = 0;
    while (got < n) begin
      @(negedge clk);
      // long stretches of back-pressure now and then, so the hand-off waits
      out_ready = (($time / 4000) % 5 == 3) ? 1'b0 : (($urandom % 4) != 0);
      #1;
      // now and then hold a tag back long enough for the authentication
      // side to finish the next message while the slot is still occupied
      if (out_valid && out_is_tag && (tags_seen % 2 == 1) && hold_done != tags_seen) begin
        out_ready = 0;
        hold_done = tags_seen;
        repeat (150) @(negedge clk);
        out_ready = 1;
        #1;
      end
      if (out_valid && out_ready) begin
        blk_t e = exp_q.pop_front();
        logic et = exp_tag_q.pop_front();
        checks++;
        if (out_data !== e || out_is_tag !== et) begin
          failures++;
          $display("FAIL output %0d: %032h/%b exp %032h/%b", got, out_data, out_is_tag, e, et);
        end
        if (out_is_tag) begin
          tags_seen++;
          if (tags_seen == 3) t_full_tag = $time;   // message 2 is the full-bank one
        end
        got++;
        total_out++;
      end
    end
    @(negedge clk);
    out_ready = 0;
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int n_expected = 0;
    hdr_valid = 0; hdr_nonce = 0; hdr_ad_len = 0; hdr_pt_len = 0;
    din_valid = 0; din_data = 0; out_ready = 0;
    key = 128'h01000000000000000000000000000000;
    // RFC 8452 C.1: empty message and 8-byte plaintext, same key and nonce
    msgs[0].nonce = 96'h030000000000000000000000;
    msgs[0].ad = new[0]; msgs[0].pt = new[0];
    msgs[1].nonce = 96'h030000000000000000000000;
    msgs[1].ad = new[0]; msgs[1].pt = new[8];
    foreach (msgs[1].pt[i]) msgs[1].pt[i] = 0;
    msgs[1].pt[0] = 1;
    for (int m = 2; m < NMSG; m++) begin
      int pl;
      pl = (m == 2) ? FULL : (m == 5) ? 0 : (m % 3 == 0) ? $urandom % 40 : 1 + $urandom % 200;
      msgs[m].nonce = {$urandom, $urandom, $urandom};
      msgs[m].ad = new[(m % 4 == 0) ? 0 : $urandom % 48];
      msgs[m].pt = new[pl];
      foreach (msgs[m].ad[i]) msgs[m].ad[i] = byte'($urandom);
      foreach (msgs[m].pt[i]) msgs[m].pt[i] = byte'($urandom);
    end
    for (int m = 0; m < NMSG; m++) begin
      blk_t ct[$], tag;
      aead_siv(key, msgs[m].nonce, msgs[m].ad, msgs[m].pt, ct, tag);
      foreach (ct[i]) begin exp_q.push_back(ct[i]); exp_tag_q.push_back(1'b0); end
      exp_q.push_back(tag); exp_tag_q.push_back(1'b1);
    end
    // the first two outputs are the published RFC 8452 results
    checks += 2;
    if (exp_q[0] !== 128'hdc20e2d83f25705bb49e439eca56de25) begin failures++; $display("FAIL ref vector 1"); end
    if (exp_q[2] !== 128'h578782fff6013b815b287c22493a364c) begin failures++; $display("FAIL ref vector 2"); end
    n_expected = exp_q.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      drive();
      collect(n_expected);
    join
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    repeat (5) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL extra output"); end
    $display("mechanisms:");
    need("auth/enc overlap cycles", n_overlap);
    need("auth waits for shared AES", n_aes_wait_a);
    need("enc waits for shared AES", n_aes_wait_e);
    need("wait for free bank", n_stall_bank);
    need("wait for hand-off slot", n_stall_slot);
    need("output back-pressure", n_backpressure);
    need("bank 1 writes", n_bank1);
    need("partial last blocks", n_partial);
    need("empty plaintexts", n_empty);
    need("full-bank messages", n_full);
    if (t_full_tag > t_full_in)
      $display("full-bank message: %0d bytes, header to tag %0d cycles (with back-pressure)",
               FULL, (t_full_tag - t_full_in) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
