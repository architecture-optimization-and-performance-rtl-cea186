// aes_arbiter: shares one aes_core between the two FSMs of AES-GCM-SIV.
//
// The serial architecture has a single AES block. Encryption (counter mode)
// uses it for every block; authentication only for the four key-derivation
// calls and the tag of each message, while its per-block work is done by
// the Galois-field multiplier. This arbiter lets both FSMs issue requests
// on the same request/response ports they would use with a core of their
// own. A request is granted when the core is idle; when both request in the
// same clock the one not granted last time wins (round robin). The core's
// done pulse is routed to the requester that owns the call in flight; dout
// is shared and is read by the owner when it sees its done.
//
// Interface per requester (a = authentication, e = encryption):
// start_x/key_x/din_x request, busy_x high when the request is not taken
// this clock, done_x one-cycle completion pulse. Core side: the plain
// aes_core ports. Round robin and routing are this design's own choices.
module aes_arbiter (
  input  logic         clk,
  input  logic         rst_n,
  // authentication FSM
  input  logic         start_a,
  input  logic [127:0] key_a,
  input  logic [127:0] din_a,
  output logic         busy_a,
  output logic         done_a,
  // encryption FSM
  input  logic         start_e,
  input  logic [127:0] key_e,
  input  logic [127:0] din_e,
  output logic         busy_e,
  output logic         done_e,
  // shared core
  output logic         core_start,
  output logic [127:0] core_key,
  output logic [127:0] core_din,
  input  logic         core_busy,
  input  logic         core_done
);

  logic owner_e;     // the call in flight belongs to the encryption FSM
  logic last_e;      // the last grant went to the encryption FSM
  logic gnt_a, gnt_e;

  always_comb begin
    gnt_a = 1'b0;
    gnt_e = 1'b0;
    if (!core_busy) begin
      if (start_a && start_e) begin
        gnt_e = !last_e;
        gnt_a = last_e;
      end else begin
        gnt_a = start_a;
        gnt_e = start_e;
      end
    end
  end

  assign busy_a     = !gnt_a;
  assign busy_e     = !gnt_e;
  assign core_start = gnt_a || gnt_e;
  assign core_key   = gnt_e ? key_e : key_a;
  assign core_din   = gnt_e ? din_e : din_a;
  assign done_a     = core_done && !owner_e;
  assign done_e     = core_done && owner_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_e <= 1'b0;
      last_e  <= 1'b0;
    end else if (core_start) begin
      owner_e <= gnt_e;
      last_e  <= gnt_e;
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(gnt_a && gnt_e))
    else $error("aes_arbiter: two grants");

endmodule
