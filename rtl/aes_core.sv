// aes_core: iterative AES-128 encryption with an on-the-fly key schedule.
//
// One AES block is encrypted at a time with a single round unit, as in a
// serial, low-area AE architecture. A start pulse loads the block XORed
// with the key (round 0) and the key as the first round key. Each round
// step then derives the next round key from the current one and applies
// SubBytes, ShiftRows, MixColumns (skipped in round 10) and AddRoundKey.
// Because the key schedule runs alongside the rounds, a new key can be used
// for every block, which the SIV mode needs (its keys change per message).
//
// SBOX_ROM selects how the 20 S-boxes (16 for the state, 4 for the key
// schedule) are built: 0 = combinational logic (aes_sbox), one round per
// clock; 1 = synchronous ROM (aes_sbox_rom), two clocks per round (address,
// then data). Both forms follow the S-box discussion of the architecture;
// the one-round-per-clock schedule is this design's own choice.
//
// Interface: start (one-cycle pulse, accepted only when busy is low), key and
// din sampled with start; busy high while rounds run; done pulses for one
// cycle with dout valid; dout holds until the next start.
// Timing: done is high 10 clocks after the clock edge that takes start
// (SBOX_ROM=0), or 20 clocks after it (SBOX_ROM=1).
module aes_core #(
  parameter bit SBOX_ROM = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);

  logic [127:0] state, rk;
  logic [3:0]   round;    // round about to be applied, 1..10
  logic [7:0]   rcon;
  logic         phase;    // ROM form only: 0 = address, 1 = data valid

  // ---------------------------------------------------------------- S-boxes
  logic [127:0] sub_state;
  logic [31:0]  sub_word;
  logic [31:0]  rot_w3;

  assign rot_w3 = {rk[23:0], rk[31:24]};   // RotWord(w3)

  for (genvar i = 0; i < 16; i++) begin : g_sb
    if (SBOX_ROM) begin : g_rom
      aes_sbox_rom u_sb (.clk(clk), .addr(state[8*i +: 8]), .data(sub_state[8*i +: 8]));
    end else begin : g_logic
      aes_sbox u_sb (.a(state[8*i +: 8]), .y(sub_state[8*i +: 8]));
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_kb
    if (SBOX_ROM) begin : g_rom
      aes_sbox_rom u_sb (.clk(clk), .addr(rot_w3[8*i +: 8]), .data(sub_word[8*i +: 8]));
    end else begin : g_logic
      aes_sbox u_sb (.a(rot_w3[8*i +: 8]), .y(sub_word[8*i +: 8]));
    end
  end

  // ---------------------------------------------------------- round datapath
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

  // Byte i of a block (byte 0 is the most significant).
  function automatic logic [7:0] byte_of(input logic [127:0] b, input int i);
    return b[127 - 8*i -: 8];
  endfunction

  logic [127:0] next_rk, next_state;

  always_comb begin
    logic [31:0]  t, w0, w1, w2, w3;
    logic [127:0] sr;
    logic [7:0]   a0, a1, a2, a3;
    a0 = '0; a1 = '0; a2 = '0; a3 = '0;
    // key schedule step
    t  = sub_word ^ {rcon, 24'h0};
    w0 = rk[127:96] ^ t;
    w1 = rk[95:64]  ^ w0;
    w2 = rk[63:32]  ^ w1;
    w3 = rk[31:0]   ^ w2;
    next_rk = {w0, w1, w2, w3};
    // ShiftRows: row r of column c takes row r of column (c + r) mod 4
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127 - 8*(4*c + r) -: 8] = byte_of(sub_state, 4*((c + r) % 4) + r);
    // MixColumns, skipped in the last round
    next_state = sr;
    if (round != 4'd10) begin
      for (int c = 0; c < 4; c++) begin
        a0 = byte_of(sr, 4*c);
        a1 = byte_of(sr, 4*c + 1);
        a2 = byte_of(sr, 4*c + 2);
        a3 = byte_of(sr, 4*c + 3);
        next_state[127 - 32*c -: 32] = {
          xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
          a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
          a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
          xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
      end
    end
    next_state = next_state ^ next_rk;
  end

  // ------------------------------------------------------------ sequencing
  logic step;   // a round is applied this clock
  assign step = busy && (!SBOX_ROM || phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      rk    <= '0;
      round <= '0;
      rcon  <= '0;
      phase <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state <= din ^ key;
        rk    <= key;
        round <= 4'd1;
        rcon  <= 8'h01;
        phase <= 1'b0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (SBOX_ROM) phase <= ~phase;
        if (step) begin
          state <= next_state;
          rk    <= next_rk;
          rcon  <= xtime(rcon);
          round <= round + 4'd1;
          if (round == 4'd10) begin
            busy <= 1'b0;
            done <= 1'b1;
            dout <= next_state;
          end
        end
      end
    end
  end

endmodule
