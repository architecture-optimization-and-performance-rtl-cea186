// gf128_mul: digit-serial multiplier in GF(2^128), GCM convention.
//
// Computes p = a * b modulo x^128 + x^7 + x^2 + x + 1 in the bit order of
// GCM (bit 127 of a block is the coefficient of x^0). It is the Galois field
// multiplier of the AES-GCM datapath; POLYVAL of AES-GCM-SIV reuses it
// through a byte-reversal wrapper (polyval). Each clock it takes DIGIT bits
// of a, most significant first: for each bit it adds the running multiple
// v of b into the product when the bit is set, then multiplies v by x
// (a right shift with reduction constant 0xE1). DIGIT is this design's own
// choice; 128 gives a single-cycle multiplier.
//
// Interface: start (one-cycle pulse, accepted when busy is low) samples a
// and b; done pulses once with p valid; p holds until the next start.
// Timing: done is high 128/DIGIT clocks after the edge that takes start.
module gf128_mul #(
  parameter int unsigned DIGIT = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic         busy,
  output logic         done,
  output logic [127:0] p
);

  localparam int unsigned STEPS = 128 / DIGIT;

  initial begin
    assert (DIGIT >= 1 && DIGIT <= 128 && (128 % DIGIT) == 0)
      else $error("gf128_mul: DIGIT must divide 128");
  end

  logic [127:0] z, v, x;
  logic [$clog2(STEPS+1)-1:0] cnt;

  logic [127:0] z_n, v_n, x_n;

  always_comb begin
    z_n = z;
    v_n = v;
    x_n = x;
    for (int j = 0; j < DIGIT; j++) begin
      if (x_n[127]) z_n = z_n ^ v_n;
      v_n = siv_pkg::mulx_ghash(v_n);
      x_n = x_n << 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z    <= '0;
      v    <= '0;
      x    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      p    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        z    <= '0;
        v    <= b;
        x    <= a;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        z   <= z_n;
        v   <= v_n;
        x   <= x_n;
        cnt <= cnt + 1'b1;
        if (32'(cnt) == STEPS - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= z_n;
        end
      end
    end
  end

endmodule
