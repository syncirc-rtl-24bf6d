// Reference model of the AES S-box and AES-128 encryption for the
// testbenches. It is written independently of the circuits: the field
// inverse is found by search with a shift-and-add field multiplication, and
// the cipher works on a byte array.
package aes_ref_pkg;

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa, bb;
    p = 0; aa = a; bb = b;
    for (int i = 0; i < 8; i++) begin
      if (bb[0]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1B) : (aa << 1);
      bb = bb >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv, r;
    logic [7:0] c;
    inv = 0;
    for (int z = 1; z < 256; z++) if (ref_gmul(x, 8'(z)) == 8'h01) inv = 8'(z);
    c = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8] ^ c[i];
    return r;
  endfunction

  function automatic logic [127:0] ref_aes128(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] sb [256];
    logic [7:0] s [16], t [16], k [176];
    logic [7:0] tmp [4], rc;
    for (int i = 0; i < 256; i++) sb[i] = ref_sbox(8'(i));
    for (int i = 0; i < 16; i++) k[i] = key[127 - 8*i -: 8];
    rc = 8'h01;
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = k[i - 4 + j];
      if (i % 16 == 0) begin
        logic [7:0] t0;
        t0 = tmp[0];
        tmp[0] = sb[tmp[1]] ^ rc; tmp[1] = sb[tmp[2]]; tmp[2] = sb[tmp[3]]; tmp[3] = sb[t0];
        rc = ref_gmul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) k[i + j] = k[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ k[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = sb[s[i]];
      // ShiftRows: row rr of column c comes from column c + rr
      for (int c = 0; c < 4; c++) for (int rr = 0; rr < 4; rr++) s[4*c + rr] = t[4*((c + rr) % 4) + rr];
      if (r < 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = ref_gmul(a0, 2) ^ ref_gmul(a1, 3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ ref_gmul(a1, 2) ^ ref_gmul(a2, 3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ ref_gmul(a2, 2) ^ ref_gmul(a3, 3);
          s[4*c+3] = ref_gmul(a0, 3) ^ a1 ^ a2 ^ ref_gmul(a3, 2);
        end
      end
      for (int i = 0; i < 16; i++) s[i] ^= k[16*r + i];
    end
    for (int i = 0; i < 16; i++) ref_aes128[127 - 8*i -: 8] = s[i];
  endfunction

endpackage
