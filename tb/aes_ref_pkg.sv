// aes_ref_pkg: reference AES-128 encryption for the testbenches, written
// from the algorithm's definition: the S-box is computed as the GF(2^8)
// inverse followed by the affine map, not looked up, so it is independent of
// the table in the design.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = 0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] inv, b;
    inv = 0;
    // a^254 = a^-1 in GF(2^8)
    if (a != 0) begin
      logic [7:0] p; p = 8'h01;
      for (int i = 0; i < 254; i++) p = gmul(p, a);
      inv = p;
    end
    b = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
            ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return b;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] s [16], t [16], k [16], rc;
    for (int i = 0; i < 16; i++) begin
      s[i] = pt[127-8*i -: 8] ^ key[127-8*i -: 8];
      k[i] = key[127-8*i -: 8];
    end
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      logic [7:0] tmp [4];
      // key schedule
      tmp[0] = sbox(k[13]) ^ rc; tmp[1] = sbox(k[14]);
      tmp[2] = sbox(k[15]);      tmp[3] = sbox(k[12]);
      for (int j = 0; j < 4; j++) k[j] ^= tmp[j];
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rc = gmul(rc, 8'h02);
      // SubBytes + ShiftRows
      for (int c = 0; c < 4; c++)
        for (int w = 0; w < 4; w++)
          t[w + 4*c] = sbox(s[w + 4*((c + w) % 4)]);
      // MixColumns
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          s[4*c+0] = gmul(t[4*c], 2) ^ gmul(t[4*c+1], 3) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ gmul(t[4*c+1], 2) ^ gmul(t[4*c+2], 3) ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ gmul(t[4*c+2], 2) ^ gmul(t[4*c+3], 3);
          s[4*c+3] = gmul(t[4*c], 3) ^ t[4*c+1] ^ t[4*c+2] ^ gmul(t[4*c+3], 2);
        end
      end else begin
        for (int i = 0; i < 16; i++) s[i] = t[i];
      end
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    for (int i = 0; i < 16; i++) encrypt[127-8*i -: 8] = s[i];
  endfunction

  // CRC-16, polynomial 0x1021, preset 0xFFFF, MSB first, bit by bit.
  function automatic logic [15:0] crc16(input logic [7:0] bytes [], input int n);
    logic [15:0] c;
    c = 16'hFFFF;
    for (int i = 0; i < n; i++)
      for (int b = 7; b >= 0; b--) begin
        logic fb;
        fb = c[15] ^ bytes[i][b];
        c = c << 1;
        if (fb) c ^= 16'h1021;
      end
    return c;
  endfunction

endpackage
