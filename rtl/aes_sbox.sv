// aes_sbox: the AES S-box as pure combinational logic.
//
// Each byte is mapped to its multiplicative inverse in GF(2^8) (modulo
// x^8+x^4+x^3+x+1, with 0 mapped to 0) followed by the AES affine
// transform with constant 0x63. The inverse is formed as a^254 by
// square-and-multiply, so the module holds no table. This is the
// "S-box in logic" form; aes_sbox_rom is the "S-box in memory" form.
// Interface: a (input byte) -> y (substituted byte), no clock, no latency.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);

  function automatic logic [7:0] gmul(input logic [7:0] x, input logic [7:0] z);
    logic [7:0] p, xx;
    p  = '0;
    xx = x;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) p = p ^ xx;
      xx = {xx[6:0], 1'b0} ^ (xx[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  logic [7:0] inv;

  always_comb begin
    logic [7:0] r, base;
    // a^254 = a^(2+4+8+16+32+64+128)
    r    = 8'h01;
    base = a;
    for (int k = 1; k < 8; k++) begin
      base = gmul(base, base);   // base = a^(2^k)
      r    = gmul(r, base);
    end
    inv = r;
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    y = y ^ 8'h63;
  end

endmodule
