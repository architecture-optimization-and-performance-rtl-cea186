// aes_gcm_siv_top: pipelined AES-GCM-SIV (AES-128) authenticated encryption.
//
// AES-GCM-SIV resists nonce reuse because its ciphertext is keyed by the
// tag, which depends on the whole message; the price is that the tag must
// be finished before the first ciphertext block can be made. This engine
// hides that dependence by working on two messages at once with two FSMs:
//
//   siv_auth_ctrl  derives the message keys, authenticates message n+1 with
//                  the polyval multiplier and writes its plaintext into one
//                  bank of msg_buffer;
//   siv_enc_ctrl   encrypts message n from the other bank in counter mode,
//                  starting from the stored tag.
//
// As in the serial architecture there is one AES core and one multiplier:
// while the multiplier authenticates one message, the AES core encrypts the
// other. The AES core is shared through aes_arbiter; the authentication
// side needs it only five times per message (four key-derivation calls and
// the tag).
//
// They meet through flags held here: bank_busy[b] is set when the
// authentication FSM claims bank b and cleared when the encryption FSM
// releases it, and slot_full marks the stored hand-off record (tag,
// encryption key, length, bank) of a message that is authenticated but not
// yet taken for encryption. The split into two FSMs with flags and a stored
// tag follows the architecture; the bank buffer, the record contents and
// the stream interfaces are this design's own.
//
// Interface: key is the 128-bit master key, held stable while messages are
// in flight. A message is a header (nonce, AD and plaintext lengths in
// bytes, valid/ready) followed on din (valid/ready) by ceil(ad_len/16) AD
// blocks and then ceil(pt_len/16) plaintext blocks, byte 0 in bits
// [127:120]. The output stream gives ceil(pt_len/16) ciphertext blocks
// (bytes past the length are zero) and then the 16-byte tag (out_is_tag).
// stall_bank and stall_slot report the two points where the flags make the
// authentication FSM wait for the encryption FSM.
module aes_gcm_siv_top #(
  parameter bit          SBOX_ROM = 1'b0,   // S-boxes in ROM instead of logic
  parameter int unsigned DIGIT    = 16,     // multiplier bits per clock
  parameter int unsigned DEPTH    = 64      // buffer blocks per bank
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [127:0]        key,
  input  logic                hdr_valid,
  output logic                hdr_ready,
  input  siv_pkg::nonce_t     hdr_nonce,
  input  siv_pkg::len_t       hdr_ad_len,
  input  siv_pkg::len_t       hdr_pt_len,
  input  logic                din_valid,
  output logic                din_ready,
  input  logic [127:0]        din_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [127:0]        out_data,
  output logic                out_is_tag,
  // status: the authentication side waits for a free bank / an empty slot
  output logic                stall_bank,
  output logic                stall_slot
);
  import siv_pkg::*;

  localparam int unsigned AW = $clog2(DEPTH);

  // authentication side
  logic          a_aes_start, a_aes_busy, a_aes_done;
  block_t        a_aes_key, a_aes_din, a_aes_dout;
  logic          pv_clear, pv_h_load, pv_x_valid, pv_busy, pv_done;
  block_t        pv_h, pv_x, pv_s;
  logic          buf_we, buf_wbank, buf_rbank;
  logic [AW-1:0] buf_waddr, buf_raddr;
  block_t        buf_wdata, buf_rdata;
  logic          bank_claim, ho_valid, ho_ready;
  handoff_t      ho_data;
  // encryption side
  logic          e_aes_start, e_aes_busy, e_aes_done;
  block_t        e_aes_key, e_aes_din, e_aes_dout;
  logic          e_ho_ready, bank_release, release_bank;
  // shared AES core
  logic          aes_start, aes_busy, aes_done;
  block_t        aes_key, aes_din, aes_dout;
  // flags and stored record
  logic [1:0]    bank_busy;
  logic          slot_full;
  handoff_t      slot;

  siv_auth_ctrl #(.DEPTH(DEPTH)) u_auth (
    .clk, .rst_n, .master_key(key),
    .hdr_valid, .hdr_ready, .hdr_nonce, .hdr_ad_len, .hdr_pt_len,
    .din_valid, .din_ready, .din_data,
    .aes_start(a_aes_start), .aes_key(a_aes_key), .aes_din(a_aes_din),
    .aes_busy(a_aes_busy), .aes_done(a_aes_done), .aes_dout(a_aes_dout),
    .pv_clear, .pv_h_load, .pv_h, .pv_x_valid, .pv_x, .pv_busy, .pv_done, .pv_s,
    .buf_we, .buf_wbank, .buf_waddr, .buf_wdata,
    .bank_free(~bank_busy), .bank_claim,
    .ho_valid, .ho_ready, .ho_data,
    .stall_bank, .stall_slot
  );


  polyval #(.DIGIT(DIGIT)) u_polyval (
    .clk, .rst_n, .clear(pv_clear), .h_load(pv_h_load), .h(pv_h),
    .x_valid(pv_x_valid), .x(pv_x), .busy(pv_busy), .done(pv_done), .s(pv_s)
  );

  msg_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .we(buf_we), .wbank(buf_wbank), .waddr(buf_waddr), .wdata(buf_wdata),
    .rbank(buf_rbank), .raddr(buf_raddr), .rdata(buf_rdata)
  );

  siv_enc_ctrl #(.DEPTH(DEPTH)) u_enc (
    .clk, .rst_n,
    .ho_valid(slot_full), .ho_ready(e_ho_ready), .ho_data(slot),
    .aes_start(e_aes_start), .aes_key(e_aes_key), .aes_din(e_aes_din),
    .aes_busy(e_aes_busy), .aes_done(e_aes_done), .aes_dout(e_aes_dout),
    .buf_rbank, .buf_raddr, .buf_rdata,
    .bank_release, .release_bank,
    .out_valid, .out_ready, .out_data, .out_is_tag
  );

  // one AES core, shared by both FSMs
  aes_arbiter u_arb (
    .clk, .rst_n,
    .start_a(a_aes_start), .key_a(a_aes_key), .din_a(a_aes_din),
    .busy_a(a_aes_busy), .done_a(a_aes_done),
    .start_e(e_aes_start), .key_e(e_aes_key), .din_e(e_aes_din),
    .busy_e(e_aes_busy), .done_e(e_aes_done),
    .core_start(aes_start), .core_key(aes_key), .core_din(aes_din),
    .core_busy(aes_busy), .core_done(aes_done)
  );

  aes_core #(.SBOX_ROM(SBOX_ROM)) u_aes (
    .clk, .rst_n, .start(aes_start), .key(aes_key), .din(aes_din),
    .busy(aes_busy), .done(aes_done), .dout(aes_dout)
  );

  assign a_aes_dout = aes_dout;
  assign e_aes_dout = aes_dout;

  // ------------------------------------------------ synchronisation flags
  assign ho_ready = !slot_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_busy <= '0;
      slot_full <= 1'b0;
      slot      <= '0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (bank_claim && buf_wbank == b[0])           bank_busy[b] <= 1'b1;
        else if (bank_release && release_bank == b[0]) bank_busy[b] <= 1'b0;
      end
      if (ho_valid && ho_ready) begin
        slot      <= ho_data;
        slot_full <= 1'b1;
      end else if (slot_full && e_ho_ready) begin
        slot_full <= 1'b0;
      end
    end
  end

  // A bank is never claimed while the encryption side still holds it.
  a_bank_claim_free: assert property (@(posedge clk) disable iff (!rst_n)
    bank_claim |-> !bank_busy[buf_wbank])
    else $error("aes_gcm_siv_top: bank claimed while busy");

endmodule
