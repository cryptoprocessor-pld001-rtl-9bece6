// idea_ref_pkg: software reference model of IDEA for the testbenches.
//
// Plain integer arithmetic, written independently of the RTL: multiplication
// modulo 2^16+1 with 0 standing for 2^16, the standard key schedule, the
// encryption of one block and the derivation of the decryption subkeys.
package idea_ref_pkg;

  typedef logic [15:0] sk_t [52];

  function automatic logic [15:0] ref_mul(input logic [15:0] a, input logic [15:0] b);
    longint unsigned x, y, p;
    x = (a == 0) ? 65536 : a;
    y = (b == 0) ? 65536 : b;
    p = (x * y) % 65537;
    return (p == 65536) ? 16'd0 : p[15:0];
  endfunction

  function automatic logic [15:0] ref_inv(input logic [15:0] a);
    // a^(65537-2) mod 65537 (Fermat), 0 stands for 2^16 which is its own inverse
    logic [15:0] r, base;
    int e;
    r = 16'd1; base = a; e = 65535;
    while (e > 0) begin
      if (e[0]) r = ref_mul(r, base);
      base = ref_mul(base, base);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic sk_t ref_keys(input logic [127:0] key);
    sk_t z;
    logic [127:0] k;
    k = key;
    for (int n = 0; n < 52; n++) begin
      z[n] = k[127 - 16*(n%8) -: 16];
      if (n % 8 == 7) k = {k[102:0], k[127:103]};
    end
    return z;
  endfunction

  function automatic sk_t ref_dec_keys(input sk_t z);
    sk_t d;
    for (int r = 0; r < 9; r++) begin     // decryption round r uses round 8-r
      int s;
      s = 8 - r;
      d[6*r+0] = ref_inv(z[6*s+0]);
      d[6*r+3] = ref_inv(z[6*s+3]);
      if (r == 0 || r == 8) begin
        d[6*r+1] = -z[6*s+1];
        d[6*r+2] = -z[6*s+2];
      end else begin
        d[6*r+1] = -z[6*s+2];
        d[6*r+2] = -z[6*s+1];
      end
      if (r < 8) begin
        d[6*r+4] = z[6*(7-r)+4];
        d[6*r+5] = z[6*(7-r)+5];
      end
    end
    return d;
  endfunction

  function automatic logic [63:0] ref_crypt(input logic [63:0] blk, input sk_t z);
    logic [15:0] x1, x2, x3, x4, t0, t1, t2, a;
    {x1, x2, x3, x4} = blk;
    for (int r = 0; r < 8; r++) begin
      x1 = ref_mul(x1, z[6*r]);
      x2 = x2 + z[6*r+1];
      x3 = x3 + z[6*r+2];
      x4 = ref_mul(x4, z[6*r+3]);
      t0 = ref_mul(z[6*r+4], x1 ^ x3);
      t1 = ref_mul(z[6*r+5], t0 + (x2 ^ x4));
      t2 = t0 + t1;
      x1 = x1 ^ t1;
      x4 = x4 ^ t2;
      a  = x2 ^ t2;
      x2 = x3 ^ t1;
      x3 = a;
    end
    return {ref_mul(x1, z[48]), x3 + z[49], x2 + z[50], ref_mul(x4, z[51])};
  endfunction

  // key word n (0..8) in the RAM layout: subkey 6n+i in bits 16i+15..16i
  function automatic logic [95:0] key_word(input sk_t z, input int n);
    logic [95:0] w;
    w = '0;
    for (int i = 0; i < 6; i++)
      if (6*n + i < 52) w[16*i +: 16] = z[6*n+i];
    return w;
  endfunction

endpackage
