// idea_ref_pkg: a plain procedural model of IDEA used by the testbenches:
// multiplication modulo 2^16+1 by direct arithmetic, the key schedule (25-bit
// rotations of the 128-bit key), the decryption subkeys and the cipher.
package idea_ref_pkg;

  typedef logic [15:0] sk_t [52];

  function automatic logic [15:0] mul(input logic [15:0] a, input logic [15:0] b);
    longint unsigned aa, bb;
    aa = (a == 0) ? 65536 : a;
    bb = (b == 0) ? 65536 : b;
    return 16'((aa * bb) % 65537);   // 65536 wraps to 0
  endfunction

  function automatic logic [15:0] inv(input logic [15:0] a);
    // a^(65537-2) mod 65537, with 0 standing for 65536
    longint unsigned base, r, e;
    base = (a == 0) ? 65536 : a;
    r = 1; e = 65535;
    while (e != 0) begin
      if (e[0]) r = (r * base) % 65537;
      base = (base * base) % 65537;
      e = e >> 1;
    end
    return 16'(r);
  endfunction

  function automatic sk_t enc_keys(input logic [127:0] key);
    sk_t z;
    logic [127:0] k = key;
    for (int n = 0; n < 52; n++) begin
      z[n] = k[127 - 16*(n % 8) -: 16];
      if (n % 8 == 7) k = {k[102:0], k[127:103]};
    end
    return z;
  endfunction

  function automatic sk_t dec_keys(input sk_t z);
    sk_t d;
    for (int r = 0; r < 9; r++) begin     // decryption round r+1 uses enc round 9-r
      int e = 6 * (8 - r);
      d[6*r + 0] = inv(z[e + 0]);
      d[6*r + 3] = inv(z[e + 3]);
      if (r == 0 || r == 8) begin
        d[6*r + 1] = -z[e + 1];
        d[6*r + 2] = -z[e + 2];
      end else begin
        d[6*r + 1] = -z[e + 2];
        d[6*r + 2] = -z[e + 1];
      end
      if (r < 8) begin
        d[6*r + 4] = z[6*(7 - r) + 4];
        d[6*r + 5] = z[6*(7 - r) + 5];
      end
    end
    return d;
  endfunction

  function automatic logic [63:0] cipher(input logic [63:0] blk, input sk_t z);
    logic [15:0] x1, x2, x3, x4, a, b, c, d, e, f, t;
    {x1, x2, x3, x4} = blk;
    for (int r = 0; r < 8; r++) begin
      a = mul(x1, z[6*r]);   b = x2 + z[6*r+1];
      c = x3 + z[6*r+2];     d = mul(x4, z[6*r+3]);
      e = mul(a ^ c, z[6*r+4]);
      f = mul((b ^ d) + e, z[6*r+5]);
      t = e + f;
      x1 = a ^ f; x2 = c ^ f; x3 = b ^ t; x4 = d ^ t;
    end
    return {mul(x1, z[48]), x3 + z[49], x2 + z[50], mul(x4, z[51])};
  endfunction

  // Hardware layout: the multiplicative subkeys are stored minus one.
  function automatic logic [15:0] hw_word(input sk_t z, input int n);
    int p = n % 6;
    if (n >= 48) p = (n - 48 == 0 || n - 48 == 3) ? 0 : 1;
    return (p == 0 || p == 3 || p == 4 || p == 5) ? z[n] - 16'd1 : z[n];
  endfunction

endpackage
