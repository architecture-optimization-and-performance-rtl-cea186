// msg_buffer: two-bank plaintext store between the two FSMs of AES-GCM-SIV.
//
// AES-GCM-SIV must finish authenticating a message before it can encrypt
// it, so the plaintext is read twice. The authentication FSM writes the
// blocks of one message into one bank while the encryption FSM reads the
// previous message from the other bank; the FSMs swap banks per message.
// It is a simple dual-port RAM (one write port, one read port, common
// clock) whose top address bit is the bank.  Bank ownership is kept by
// flags outside this module.  Depth is this design's own choice.
//
// Interface: we/wbank/waddr/wdata write one block; rbank/raddr select a
// block whose data appears on rdata one clock later (synchronous read).
module msg_buffer #(
  parameter int unsigned DEPTH = 64,   // blocks per bank
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  logic [127:0]  wdata,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output logic [127:0]  rdata
);

  logic [127:0] mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, waddr}] <= wdata;
    rdata <= mem[{rbank, raddr}];
  end

endmodule
