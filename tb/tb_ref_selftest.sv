// tb_ref_selftest: checks the reference models against published vectors.
// AES-128 (FIPS-197 appendices B and C.1), the GCM product and tag of GCM
// test case 2, POLYVAL (RFC 8452 appendix A) and AES-GCM-SIV vectors of
// RFC 8452 appendix C.1.
module tb_ref_selftest;
  import siv_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h exp %032h", what, got, exp);
    end
  endtask

  initial begin
    blk_t ct[$], tag, h, x1;
    bytes_t ad, pt;
    chk("aes C.1", aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff),
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    chk("aes B", aes128(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734),
        128'h3925841d02dc09fbdc118597196a0b32);
    h = aes128(0, 0);
    chk("gcm H", h, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    x1 = gcm_mul(128'h0388dace60b6a392f328c2b971b2fe78, h);
    chk("gcm X1", x1, 128'h5e2ec746917062882c85b0685353deb7);
    chk("gcm tag", gcm_mul(x1 ^ 128'd128, h) ^ aes128(0, 128'd1), 128'hab6e47d42cec13bdf53a67b21257bddf);
    chk("polyval", dot(dot(128'h4f4f95668c83dfb6401762bb2d01a262, 128'h25629347589242761d31f826ba4b757b)
                      ^ 128'hd1a24ddd2721d006bbe45f20d3c9f362, 128'h25629347589242761d31f826ba4b757b),
        128'hf7a3b47b846119fae5b7866cf5e5b77e);
    ad = new[0]; pt = new[0];
    aead_siv(128'h01000000000000000000000000000000, 96'h030000000000000000000000, ad, pt, ct, tag);
    chk("siv tag0", tag, 128'hdc20e2d83f25705bb49e439eca56de25);
    pt = new[8]; foreach (pt[i]) pt[i] = 0; pt[0] = 1;
    aead_siv(128'h01000000000000000000000000000000, 96'h030000000000000000000000, ad, pt, ct, tag);
    chk("siv tag8", tag, 128'h578782fff6013b815b287c22493a364c);
    chk("siv ct8", ct[0], {64'hb5d839330ac7b786, 64'h0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
