// aes_ref_pkg: a reference AES-128 encryptor for the testbenches.
//
// Written independently of the RTL: the S-box is built from log/antilog
// tables over the generator 3 of GF(2^8), and the cipher works on a byte
// array state. Checked against the FIPS-197 Appendix C.1 vector by the
// testbenches that use it.
package aes_ref_pkg;

  function automatic byte unsigned mul2(input byte unsigned b);
    return byte'((b << 1) ^ ((b & 8'h80) != 0 ? 8'h1b : 8'h00));
  endfunction

  function automatic void build_sbox(output byte unsigned sb [256]);
    byte unsigned alog [256];
    byte unsigned lg   [256];
    byte unsigned x, inv, s;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x;
      lg[x]   = byte'(i);
      x = byte'(x ^ mul2(x));   // multiply by 3
    end
    for (int a = 0; a < 256; a++) begin
      if (a == 0) inv = 0;
      else inv = alog[(255 - lg[a]) % 255];
      s = inv;
      for (int k = 0; k < 4; k++) begin
        inv = byte'((inv << 1) | (inv >> 7));
        s ^= inv;
      end
      sb[a] = byte'(s ^ 8'h63);
    end
  endfunction

  function automatic logic [127:0] aes128(input logic [127:0] key, input logic [127:0] blk);
    byte unsigned sb [256];
    byte unsigned k  [176];
    byte unsigned s  [16];
    byte unsigned t  [16];
    byte unsigned rc, a0, a1, a2, a3, tmp;
    logic [127:0] out;
    build_sbox(sb);
    for (int i = 0; i < 16; i++) begin
      k[i] = key[127-8*i -: 8];
      s[i] = blk[127-8*i -: 8];
    end
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      byte unsigned w0, w1, w2, w3;
      w0 = k[i-4]; w1 = k[i-3]; w2 = k[i-2]; w3 = k[i-1];
      if (i % 16 == 0) begin
        tmp = w0;
        w0 = byte'(sb[w1] ^ rc); w1 = sb[w2]; w2 = sb[w3]; w3 = sb[tmp];
        rc = mul2(rc);
      end
      k[i]   = byte'(k[i-16] ^ w0);
      k[i+1] = byte'(k[i-15] ^ w1);
      k[i+2] = byte'(k[i-14] ^ w2);
      k[i+3] = byte'(k[i-13] ^ w3);
    end
    for (int i = 0; i < 16; i++) s[i] ^= k[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = sb[s[i]];
      // shift rows: byte (row, col) takes from (row, col+row)
      for (int c = 0; c < 4; c++)
        for (int rw = 0; rw < 4; rw++)
          s[rw + 4*c] = t[rw + 4*((c + rw) % 4)];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          tmp = byte'(a0 ^ a1 ^ a2 ^ a3);
          s[4*c]   = byte'(a0 ^ tmp ^ mul2(byte'(a0 ^ a1)));
          s[4*c+1] = byte'(a1 ^ tmp ^ mul2(byte'(a1 ^ a2)));
          s[4*c+2] = byte'(a2 ^ tmp ^ mul2(byte'(a2 ^ a3)));
          s[4*c+3] = byte'(a3 ^ tmp ^ mul2(byte'(a3 ^ a0)));
        end
      end
      for (int i = 0; i < 16; i++) s[i] ^= k[16*r + i];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = s[i];
    return out;
  endfunction

  // Pad of a whole 128-byte line: segment k uses seed (va + 16k) + sn.
  function automatic logic [1023:0] line_pad(input logic [127:0] key, input logic [47:0] va,
                                             input logic [15:0] sn);
    logic [1023:0] p;
    for (int k = 0; k < 8; k++)
      p[128*k +: 128] = aes128(key, 128'(va + 48'(16 * k)) + 128'(sn));
    return p;
  endfunction

endpackage
