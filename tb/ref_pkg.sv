// ref_pkg: reference models for the testbenches, written independently of
// the RTL: AES-128 (FIPS-197) on byte arrays, with the S-box found by search
// for the multiplicative inverse, and G.711 mu-law coding written as a search
// over segment thresholds.
package ref_pkg;

  typedef logic [7:0]   bytes16_t [16];
  typedef logic [127:0] keys_t    [11];

  function automatic bytes16_t to_bytes(logic [127:0] b);
    bytes16_t r;
    for (int n = 0; n < 16; n++) r[n] = b[127-8*n -: 8];
    return r;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t a);
    logic [127:0] r;
    for (int n = 0; n < 16; n++) r[127-8*n -: 8] = a[n];
    return r;
  endfunction

  // Carry-less product reduced by 0x11b, computed on 16-bit intermediates.
  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = 16'h0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv;
    inv = 8'h00;
    for (int y = 1; y < 256; y++) if (mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    logic [7:0] r;
    r = 8'h00;
    for (int x = 0; x < 256; x++) if (sbox(8'(x)) == y) r = 8'(x);
    return r;
  endfunction

  // Tables built once by the testbench that needs them.
  logic [7:0] SB  [256];
  logic [7:0] ISB [256];
  function automatic void build_tables();
    for (int x = 0; x < 256; x++) SB[x] = sbox(8'(x));
    for (int x = 0; x < 256; x++) ISB[SB[x]] = 8'(x);
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    bytes16_t a = to_bytes(s);
    for (int n = 0; n < 16; n++) a[n] = SB[a[n]];
    return from_bytes(a);
  endfunction

  function automatic logic [127:0] inv_sub_bytes(logic [127:0] s);
    bytes16_t a = to_bytes(s);
    for (int n = 0; n < 16; n++) a[n] = ISB[a[n]];
    return from_bytes(a);
  endfunction

  // Byte n is row n%4, column n/4.
  function automatic logic [127:0] shift_rows(logic [127:0] s);
    bytes16_t a = to_bytes(s);
    bytes16_t b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[r + 4*c] = a[r + 4*((c + r) % 4)];
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] inv_shift_rows(logic [127:0] s);
    bytes16_t a = to_bytes(s);
    bytes16_t b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[r + 4*((c + r) % 4)] = a[r + 4*c];
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] mix_generic(logic [127:0] s, logic [7:0] k0, logic [7:0] k1,
                                               logic [7:0] k2, logic [7:0] k3);
    bytes16_t a = to_bytes(s);
    bytes16_t b;
    logic [7:0] k [4];
    k = '{k0, k1, k2, k3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b[4*c + r] = 8'h00;
        for (int j = 0; j < 4; j++) b[4*c + r] ^= mul(k[(j - r + 4) % 4], a[4*c + j]);
      end
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    return mix_generic(s, 8'h02, 8'h03, 8'h01, 8'h01);
  endfunction

  function automatic logic [127:0] inv_mix_columns(logic [127:0] s);
    return mix_generic(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
  endfunction

  function automatic keys_t key_schedule(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    keys_t k;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {SB[t[23:16]], SB[t[15:8]], SB[t[7:0]], SB[t[31:24]]} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    keys_t k = key_schedule(key);
    logic [127:0] s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [127:0] key);
    keys_t k = key_schedule(key);
    logic [127:0] s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = inv_sub_bytes(inv_shift_rows(s)) ^ k[r];
      if (r != 0) s = inv_mix_columns(s);
    end
    return s;
  endfunction

  // ---------------- G.711 mu-law, 14-bit linear ----------------
  function automatic logic [7:0] mulaw_encode(int x);
    int mag, seg, step, sgn;
    sgn = (x < 0) ? 1 : 0;
    mag = (x < 0) ? -x : x;
    if (mag > 8158) mag = 8158;
    mag += 33;
    seg = 0;
    while (mag >= (64 << seg)) seg++;
    step = (mag / (2 << seg)) % 16;
    return ~8'((sgn << 7) | (seg << 4) | step);
  endfunction

  function automatic int mulaw_decode(logic [7:0] code);
    logic [7:0] u = ~code;
    int mag = ((2 * int'(u[3:0]) + 33) * (1 << int'(u[6:4]))) - 33;
    return u[7] ? -mag : mag;
  endfunction

endpackage
