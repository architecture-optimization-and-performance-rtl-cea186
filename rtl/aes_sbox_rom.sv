// aes_sbox_rom: the AES S-box held in a 256 x 8 on-chip memory.
//
// Instead of building the substitution table from logic, the table is
// loaded into a ROM that synthesis maps to an embedded memory block,
// trading logic elements for memory bits. The read is synchronous, as in
// FPGA block RAM: the address given in one cycle yields the byte in the
// next. The table contents are the standard AES S-box (multiplicative
// inverse in GF(2^8) followed by the affine transform with constant 0x63),
// one byte per line in aes_sbox.hex.
// Interface: clk, addr -> data one clock later.
module aes_sbox_rom (
  input  logic       clk,
  input  logic [7:0] addr,
  output logic [7:0] data
);

  logic [7:0] mem [256];

  initial $readmemh("rtl/aes_sbox.hex", mem);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
