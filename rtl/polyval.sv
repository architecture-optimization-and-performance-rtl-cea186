// polyval: POLYVAL accumulator of AES-GCM-SIV built on the GCM multiplier.
//
// POLYVAL (RFC 8452) is GHASH with the bytes of every block reversed and the
// key multiplied by x:  POLYVAL(H, X1..Xn) =
//   byte_rev(GHASH(mulX(byte_rev(H)), byte_rev(X1), ..., byte_rev(Xn))).
// This lets the AES-GCM-SIV datapath reuse the GF(2^128) multiplier of
// AES-GCM unchanged; the byte swaps are wiring and mulX is a shift and a
// conditional XOR, done once per message when the key is loaded.
// The accumulator is kept in the GCM domain: S <- (S ^ byte_rev(X)) * H'.
//
// Interface: clear (zero the accumulator) and h_load (take h, the
// POLYVAL-format key) may be given together between messages; x_valid
// (accepted when busy is low) absorbs one block x; done pulses when the
// block is absorbed; s is the current POLYVAL value in POLYVAL byte order.
// Timing: one block takes the multiplier's 128/DIGIT clocks.
module polyval #(
  parameter int unsigned DIGIT = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         h_load,
  input  logic [127:0] h,
  input  logic         x_valid,
  input  logic [127:0] x,
  output logic         busy,
  output logic         done,
  output logic [127:0] s
);
  import siv_pkg::*;

  block_t hg;    // key in GCM domain
  block_t acc;   // accumulator in GCM domain
  block_t prod;

  gf128_mul #(.DIGIT(DIGIT)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .start(x_valid && !busy),
    .a    (acc ^ byte_rev(x)),
    .b    (hg),
    .busy (busy),
    .done (done),
    .p    (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hg  <= '0;
      acc <= '0;
    end else begin
      if (h_load) hg <= mulx_ghash(byte_rev(h));
      if (clear) acc <= '0;
      else if (done) acc <= prod;
    end
  end

  assign s = byte_rev(acc);

endmodule
