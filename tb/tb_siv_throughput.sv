// tb_siv_throughput: streams the same messages through two engines, one
// with logic S-boxes (the default) and one with S-boxes in memory
// (SBOX_ROM=1), with no output back-pressure. Checks every output against
// the reference model and measures, per engine, the clocks per 16-byte block
// of a full-bank message from its first ciphertext block to its tag, and the
// cycles per byte of the whole stream. The block rate is bounded by the
// encryption FSM: one AES call (10 clocks with logic S-boxes, 20 with
// memory S-boxes) plus two clocks of control per block, one clock of
// margin, and the share of the AES core taken by the five calls the
// authentication FSM makes for the next message.
module tb_siv_throughput;
  import siv_pkg::*;
  import siv_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NMSG = 6;
  localparam int FULL = 64 * 16;

  logic [127:0] key;
  logic hdr_valid [2], hdr_ready [2], din_valid [2], din_ready [2];
  logic out_valid [2], out_ready [2], out_is_tag [2];
  logic stall_bank [2], stall_slot [2];
  nonce_t hdr_nonce [2];
  len_t hdr_ad_len [2], hdr_pt_len [2];
  logic [127:0] din_data [2], out_data [2];

  aes_gcm_siv_top dut_logic (.clk, .rst_n, .key,
    .hdr_valid(hdr_valid[0]), .hdr_ready(hdr_ready[0]), .hdr_nonce(hdr_nonce[0]),
    .hdr_ad_len(hdr_ad_len[0]), .hdr_pt_len(hdr_pt_len[0]),
    .din_valid(din_valid[0]), .din_ready(din_ready[0]), .din_data(din_data[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0]),
    .out_is_tag(out_is_tag[0]), .stall_bank(stall_bank[0]), .stall_slot(stall_slot[0]));
  aes_gcm_siv_top #(.SBOX_ROM(1'b1)) dut_rom (.clk, .rst_n, .key,
    .hdr_valid(hdr_valid[1]), .hdr_ready(hdr_ready[1]), .hdr_nonce(hdr_nonce[1]),
    .hdr_ad_len(hdr_ad_len[1]), .hdr_pt_len(hdr_pt_len[1]),
    .din_valid(din_valid[1]), .din_ready(din_ready[1]), .din_data(din_data[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1]),
    .out_is_tag(out_is_tag[1]), .stall_bank(stall_bank[1]), .stall_slot(stall_slot[1]));

  typedef struct {
    logic [95:0] nonce;
    bytes_t ad, pt;
  } msg_t;
  msg_t msgs[NMSG];
  blk_t exp_all[$];
  logic exp_tag_all[$];
  int total_bytes = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(int u);
    for (int m = 0; m < NMSG; m++) begin
      int nad = (msgs[m].ad.size() + 15) / 16, npt = (msgs[m].pt.size() + 15) / 16;
      @(negedge clk);
      hdr_valid[u] = 1; hdr_nonce[u] = msgs[m].nonce;
      hdr_ad_len[u] = len_t'(msgs[m].ad.size()); hdr_pt_len[u] = len_t'(msgs[m].pt.size());
      #1;
      while (!hdr_ready[u]) begin @(negedge clk); #1; end
      @(negedge clk);
      hdr_valid[u] = 0;
      for (int i = 0; i < nad + npt; i++) begin
        din_valid[u] = 1;
        din_data[u] = (i < nad) ? get_blk(msgs[m].ad, i) : get_blk(msgs[m].pt, i - nad);
        #1;
        while (!din_ready[u]) begin @(negedge clk); #1; end
        @(negedge clk);
        din_valid[u] = 0;
      end
    end
  endtask

  task automatic collect(int u, int n, int lat);
    int got = 0, tags = 0;
    longint t_first = 0, t_full0 = 0, t_full1 = 0;
    out_ready[u] = 1;
    while (got < n) begin
      @(negedge clk);
      #1;
      if (out_valid[u]) begin
        checks++;
        if (out_data[u] !== exp_all[got] || out_is_tag[u] !== exp_tag_all[got]) begin
          failures++;
          $display("FAIL unit %0d output %0d", u, got);
        end
        if (got == 0) t_first = $time;
        // message 0 is a full-bank message: its blocks are outputs 0..63
        if (got == 0) t_full0 = $time;
        if (got == 64) t_full1 = $time;
        got++;
      end
    end
    begin
      real cpblk = real'(t_full1 - t_full0) / 10.0 / 64.0;
      real cpb = real'($time) / 10.0 / real'(total_bytes);
      // per block: AES call + control, plus the five AES calls of the next
      // message's authentication spread over the 64 blocks
      real bound = real'(lat + 3) + 5.0 * real'(lat + 2) / 64.0;
      $display("unit %0d (%s S-boxes): %0.2f clocks per block in a full-bank message, %0.3f cycles per plaintext byte over the stream",
               u, u ? "memory" : "logic", cpblk, cpb);
      checks++;
      if (cpblk > bound) begin
        failures++;
        $display("FAIL unit %0d block rate %0.2f above %0.2f", u, cpblk, bound);
      end
    end
  endtask

  initial begin
    int n;
    key = {$urandom, $urandom, $urandom, $urandom};
    for (int u = 0; u < 2; u++) begin
      hdr_valid[u] = 0; hdr_nonce[u] = 0; hdr_ad_len[u] = 0; hdr_pt_len[u] = 0;
      din_valid[u] = 0; din_data[u] = 0; out_ready[u] = 0;
    end
    for (int m = 0; m < NMSG; m++) begin
      int pl;
      pl = (m < 2) ? FULL : (m == 4) ? 0 : 1 + $urandom % 300;
      msgs[m].nonce = {$urandom, $urandom, $urandom};
      msgs[m].ad = new[16 * (m % 3)];
      msgs[m].pt = new[pl];
      foreach (msgs[m].ad[i]) msgs[m].ad[i] = byte'($urandom);
      foreach (msgs[m].pt[i]) msgs[m].pt[i] = byte'($urandom);
      total_bytes += pl;
    end
    for (int m = 0; m < NMSG; m++) begin
      blk_t ct[$], tag;
      aead_siv(key, msgs[m].nonce, msgs[m].ad, msgs[m].pt, ct, tag);
      foreach (ct[i]) begin exp_all.push_back(ct[i]); exp_tag_all.push_back(1'b0); end
      exp_all.push_back(tag); exp_tag_all.push_back(1'b1);
    end
    n = exp_all.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      drive(0);
      drive(1);
      collect(0, n, 10);
      collect(1, n, 20);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
