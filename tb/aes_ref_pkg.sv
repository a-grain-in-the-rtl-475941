// aes_ref_pkg: straightforward FIPS-197 AES-128 reference model for the
// testbenches, written independently of the RTL. Its S-box finds the
// multiplicative inverse by exhaustive search (the RTL exponentiates), and
// the cipher works on a whole 16-byte block per round.
package aes_ref_pkg;

  typedef logic [7:0] blk_t [16];

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 8'h00;
    logic [7:0] x = a;
    logic [7:0] y = b;
    while (y != 0) begin
      if (y[0]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
      y = y >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv = 8'h00;
    if (a != 0)
      for (int y = 1; y < 256; y++)
        if (ref_gmul(a, 8'(y)) == 8'h01) inv = 8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  // AES-128 encryption; byte i of a block is row i%4, column i/4.
  function automatic blk_t aes128_enc(input blk_t key, input blk_t pt);
    logic [7:0] sb [256];
    blk_t s, t, k;
    logic [7:0] rc = 8'h01;
    logic [7:0] tmp [4];
    for (int i = 0; i < 256; i++) sb[i] = ref_sbox(8'(i));
    k = key;
    for (int i = 0; i < 16; i++) s[i] = pt[i] ^ k[i];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      // key expansion
      for (int r = 0; r < 4; r++) tmp[r] = sb[k[12 + (r + 1) % 4]];
      tmp[0] ^= rc;
      for (int r = 0; r < 4; r++) k[r] ^= tmp[r];
      for (int i = 4; i < 16; i++) k[i] ^= k[i - 4];
      rc = ref_gmul(rc, 8'h02);
      // SubBytes + ShiftRows
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) t[4*c + r] = sb[s[4*((c + r) % 4) + r]];
      // MixColumns
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[4*c + r] = ref_gmul(t[4*c + r], 8'h02) ^ ref_gmul(t[4*c + (r + 1) % 4], 8'h03)
                       ^ t[4*c + (r + 2) % 4] ^ t[4*c + (r + 3) % 4];
      end else begin
        s = t;
      end
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    return s;
  endfunction

endpackage
