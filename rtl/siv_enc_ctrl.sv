// siv_enc_ctrl: encryption FSM of the pipelined AES-GCM-SIV engine.
//
// Takes the hand-off record of a message whose tag is already known and
// produces its ciphertext with AES in counter mode, as RFC 8452 defines it:
// the initial counter block is the tag with the top bit of byte 15 set, and
// only the first 32 bits (read little-endian) are incremented per block,
// modulo 2^32. Each keystream block is XORed with the plaintext block read
// back from the buffer bank named in the record; bytes past the plaintext
// length are output as zero. After the last ciphertext block the tag is
// output and the FSM takes the next record. The buffer bank is released
// as soon as its last plaintext block has been read. While it
// works, siv_auth_ctrl is already authenticating the next message.
//
// Interface: ho_valid/ho_ready take one record; aes_* drive this FSM's own
// aes_core; buf_rbank/buf_raddr/buf_rdata are the buffer read port (data
// one clock after the address); out_valid/out_ready/out_data/out_is_tag is
// the output stream (ciphertext blocks, then the tag with out_is_tag high);
// bank_release pulses with release_bank when a bank is no longer needed.
// The early release and the record format are this design's own choices.
// Timing: per block, one AES call plus the output handshake; the waiting
// for a full output (out_ready low) is the only back-pressure.
module siv_enc_ctrl #(
  parameter int unsigned DEPTH = 64,   // buffer blocks per bank
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // hand-off from the authentication FSM
  input  logic                 ho_valid,
  output logic                 ho_ready,
  input  siv_pkg::handoff_t    ho_data,
  // AES core
  output logic                 aes_start,
  output logic [127:0]         aes_key,
  output logic [127:0]         aes_din,
  input  logic                 aes_busy,
  input  logic                 aes_done,
  input  logic [127:0]         aes_dout,
  // buffer read port
  output logic                 buf_rbank,
  output logic [AW-1:0]        buf_raddr,
  input  logic [127:0]         buf_rdata,
  // bank flags
  output logic                 bank_release,
  output logic                 release_bank,
  // output stream
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [127:0]         out_data,
  output logic                 out_is_tag
);
  import siv_pkg::*;

  typedef enum logic [2:0] {E_IDLE, E_START, E_WAIT, E_OUT, E_TAG} estate_t;

  estate_t  st;
  block_t   tag, enc_key;
  logic     bank;
  block_t   ctr, ct;
  len_t     rem;
  logic [AW-1:0] ridx;
  logic [4:0] nb;

  assign nb = (rem >= len_t'(16)) ? 5'd16 : rem[4:0];

  assign ho_ready     = (st == E_IDLE);
  assign aes_start    = (st == E_START);
  assign aes_key      = enc_key;
  assign aes_din      = ctr;
  assign buf_rbank    = bank;
  assign buf_raddr    = ridx;
  assign out_valid    = (st == E_OUT) || (st == E_TAG);
  assign out_data     = (st == E_TAG) ? tag : ct;
  assign out_is_tag   = (st == E_TAG);
  // A bank is released as soon as its last plaintext block has been read
  // (or at once for an empty plaintext), so the authentication FSM can
  // start filling it while this FSM still outputs the last blocks.
  assign bank_release = ((st == E_WAIT) && aes_done && (rem == len_t'(nb))) ||
                        ((st == E_IDLE) && ho_valid && (ho_data.pt_len == '0));
  assign release_bank = (st == E_IDLE) ? ho_data.bank : bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= E_IDLE;
      tag     <= '0;
      enc_key <= '0;
      bank    <= 1'b0;
      ctr  <= '0;
      ct   <= '0;
      rem  <= '0;
      ridx <= '0;
    end else begin
      unique case (st)
        E_IDLE: if (ho_valid) begin
          tag      <= ho_data.tag;
          enc_key  <= ho_data.enc_key;
          bank     <= ho_data.bank;
          ctr      <= ho_data.tag;
          ctr[7]   <= 1'b1;
          rem      <= ho_data.pt_len;
          ridx     <= '0;
          st       <= (ho_data.pt_len == '0) ? E_TAG : E_START;
        end
        E_START: if (!aes_busy) st <= E_WAIT;
        E_WAIT: if (aes_done) begin
          ct <= keep_bytes(aes_dout ^ buf_rdata, nb);
          st <= E_OUT;
        end
        E_OUT: if (out_ready) begin
          rem            <= rem - len_t'(nb);
          ridx           <= ridx + 1'b1;
          ctr[127:96]    <= rev32(rev32(ctr[127:96]) + 32'd1);
          st             <= (rem == len_t'(nb)) ? E_TAG : E_START;
        end
        E_TAG: if (out_ready) st <= E_IDLE;
        default: st <= E_IDLE;
      endcase
    end
  end

  // Output data must hold while it waits for out_ready.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data) && $stable(out_is_tag)))
    else $error("siv_enc_ctrl: output changed while stalled");

endmodule
