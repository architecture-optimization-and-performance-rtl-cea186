// siv_auth_ctrl: authentication FSM of the pipelined AES-GCM-SIV engine.
//
// AES-GCM-SIV authenticates first and encrypts second, and the ciphertext
// depends on the tag. To keep both halves of the hardware busy, this FSM
// authenticates message n+1 while siv_enc_ctrl encrypts message n; the two
// FSMs meet only through flags and a stored hand-off record.
//
// Per message (RFC 8452, AES-128 key):
//   1. take the header (nonce, AD length, plaintext length) once the buffer
//      bank it will write is free, and claim that bank;
//   2. derive the message keys with four AES calls on LE32(i) || nonce,
//      i = 0..3: blocks 0,1 give the authentication key (first 8 bytes of
//      each), blocks 2,3 the encryption key;
//   3. run POLYVAL over the AD blocks, the plaintext blocks (each also
//      written to the buffer) and the length block
//      LE64(8*AD length) || LE64(8*plaintext length); partial blocks are
//      zero-padded here, so the input bytes past the length are ignored;
//   4. XOR the nonce into the first 12 bytes, clear the top bit of byte 15
//      and encrypt with the encryption key: that is the tag;
//   5. wait until the hand-off slot is empty, store {tag, encryption key,
//      length, bank} in it, switch to the other bank.
// The ordering of steps and the flag synchronisation follow the two-FSM
// scheme of the architecture; the encodings are those of the standard.
//
// Interface: valid/ready header and data streams (data: AD blocks, then
// plaintext blocks, 16 bytes each, byte 0 in bits [127:120]); request/
// response ports to one aes_core, one polyval and the buffer write port;
// bank_free/bank_claim flags; ho_valid/ho_ready hand-off.
// Timing: one AES call takes the core's latency; one data block takes the
// multiplier latency plus one clock to accept the next block.
module siv_auth_ctrl #(
  parameter int unsigned DEPTH = 64,   // buffer blocks per bank
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [127:0]         master_key,
  // message header
  input  logic                 hdr_valid,
  output logic                 hdr_ready,
  input  siv_pkg::nonce_t      hdr_nonce,
  input  siv_pkg::len_t        hdr_ad_len,
  input  siv_pkg::len_t        hdr_pt_len,
  // AD then plaintext blocks
  input  logic                 din_valid,
  output logic                 din_ready,
  input  logic [127:0]         din_data,
  // AES core
  output logic                 aes_start,
  output logic [127:0]         aes_key,
  output logic [127:0]         aes_din,
  input  logic                 aes_busy,
  input  logic                 aes_done,
  input  logic [127:0]         aes_dout,
  // POLYVAL unit
  output logic                 pv_clear,
  output logic                 pv_h_load,
  output logic [127:0]         pv_h,
  output logic                 pv_x_valid,
  output logic [127:0]         pv_x,
  input  logic                 pv_busy,
  input  logic                 pv_done,
  input  logic [127:0]         pv_s,
  // buffer write port
  output logic                 buf_we,
  output logic                 buf_wbank,
  output logic [AW-1:0]        buf_waddr,
  output logic [127:0]         buf_wdata,
  // bank flags
  input  logic [1:0]           bank_free,
  output logic                 bank_claim,
  // hand-off to the encryption FSM
  output logic                 ho_valid,
  input  logic                 ho_ready,
  output siv_pkg::handoff_t    ho_data,
  // status
  output logic                 stall_bank,   // header waits for a free bank
  output logic                 stall_slot    // tag waits for the slot
);
  import siv_pkg::*;

  typedef enum logic [3:0] {
    A_IDLE, A_KD_START, A_KD_WAIT, A_PV_INIT, A_DATA, A_MUL,
    A_LEN_MUL, A_TAG_START, A_TAG_WAIT, A_HANDOFF
  } astate_t;

  astate_t  st;
  nonce_t   nonce;
  len_t     ad_len, pt_len, ad_rem, pt_rem;
  logic [1:0] kd_idx;
  block_t   auth_key, enc_key, tag;
  logic     bank;
  logic [AW-1:0] widx;

  // bytes in the current data block
  logic       in_ad, in_pt;
  logic [4:0] nb;
  len_t       rem;
  block_t     blk;

  assign in_ad = (ad_rem != '0);
  assign in_pt = !in_ad && (pt_rem != '0);
  assign rem   = in_ad ? ad_rem : pt_rem;
  assign nb    = (rem >= len_t'(16)) ? 5'd16 : rem[4:0];
  assign blk   = keep_bytes(din_data, nb);

  block_t len_block, s_tag;
  assign len_block = {rev64(64'(ad_len) << 3), rev64(64'(pt_len) << 3)};
  always_comb begin
    s_tag    = pv_s ^ {nonce, 32'h0};
    s_tag[7] = 1'b0;
  end

  // ------------------------------------------------------------ outputs
  assign hdr_ready  = (st == A_IDLE) && bank_free[bank];
  assign bank_claim = hdr_valid && hdr_ready;
  assign din_ready  = (st == A_DATA) && (in_ad || in_pt) && !pv_busy;

  assign aes_start  = (st == A_KD_START) || (st == A_TAG_START);
  assign aes_key    = (st == A_TAG_START) ? enc_key : master_key;
  assign aes_din    = (st == A_TAG_START) ? s_tag
                                          : {6'd0, kd_idx, 24'h0, nonce};

  assign pv_clear   = (st == A_PV_INIT);
  assign pv_h_load  = (st == A_PV_INIT);
  assign pv_h       = auth_key;
  assign pv_x_valid = (din_valid && din_ready) ||
                      ((st == A_DATA) && !in_ad && !in_pt && !pv_busy);
  assign pv_x       = (in_ad || in_pt) ? blk : len_block;

  assign buf_we     = din_valid && din_ready && in_pt;
  assign buf_wbank  = bank;
  assign buf_waddr  = widx;
  assign buf_wdata  = blk;

  assign ho_valid   = (st == A_HANDOFF);
  assign ho_data    = '{tag: tag, enc_key: enc_key, pt_len: pt_len, bank: bank};

  assign stall_bank = (st == A_IDLE) && hdr_valid && !bank_free[bank];
  assign stall_slot = (st == A_HANDOFF) && !ho_ready;

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= A_IDLE;
      nonce    <= '0;
      ad_len   <= '0;
      pt_len   <= '0;
      ad_rem   <= '0;
      pt_rem   <= '0;
      kd_idx   <= '0;
      auth_key <= '0;
      enc_key  <= '0;
      tag      <= '0;
      bank     <= 1'b0;
      widx     <= '0;
    end else begin
      unique case (st)
        A_IDLE: if (hdr_valid && hdr_ready) begin
          nonce  <= hdr_nonce;
          ad_len <= hdr_ad_len;
          pt_len <= hdr_pt_len;
          ad_rem <= hdr_ad_len;
          pt_rem <= hdr_pt_len;
          kd_idx <= '0;
          widx   <= '0;
          st     <= A_KD_START;
        end
        A_KD_START: if (!aes_busy) st <= A_KD_WAIT;
        A_KD_WAIT: if (aes_done) begin
          unique case (kd_idx)
            2'd0: auth_key[127:64] <= aes_dout[127:64];
            2'd1: auth_key[63:0]   <= aes_dout[127:64];
            2'd2: enc_key[127:64]  <= aes_dout[127:64];
            2'd3: enc_key[63:0]    <= aes_dout[127:64];
          endcase
          kd_idx <= kd_idx + 2'd1;
          st     <= (kd_idx == 2'd3) ? A_PV_INIT : A_KD_START;
        end
        A_PV_INIT: st <= A_DATA;
        A_DATA: begin
          if (din_valid && din_ready) begin
            if (in_ad) ad_rem <= ad_rem - len_t'(nb);
            else begin
              pt_rem <= pt_rem - len_t'(nb);
              widx   <= widx + 1'b1;
            end
            st <= A_MUL;
          end else if (!in_ad && !in_pt && !pv_busy) begin
            st <= A_LEN_MUL;
          end
        end
        A_MUL:     if (pv_done) st <= A_DATA;
        A_LEN_MUL: if (pv_done) st <= A_TAG_START;
        A_TAG_START: if (!aes_busy) st <= A_TAG_WAIT;
        A_TAG_WAIT: if (aes_done) begin
          tag <= aes_dout;
          st  <= A_HANDOFF;
        end
        A_HANDOFF: if (ho_ready) begin
          bank <= ~bank;
          st   <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  // The plaintext must fit in one buffer bank.
  a_pt_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (hdr_valid && hdr_ready) |-> (32'(hdr_pt_len) <= 32'(DEPTH) * 16))
    else $error("siv_auth_ctrl: plaintext longer than one buffer bank");

endmodule
