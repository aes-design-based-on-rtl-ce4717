// Reference model of AES-128 for the testbenches, written independently of
// the RTL: field multiplication by shift-and-add, S-box by exhaustive
// search for the inverse, state handled as a 16-byte array (byte 0 = most
// significant byte of the block, state row r / column c = byte r + 4c).
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    logic [8:0] t;
    r = 0;
    t = {1'b0, a};
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= t[7:0];
      t = t << 1;
      if (t[8]) t ^= 9'h11b;
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv(input logic [7:0] a);
    if (a == 0) return 0;
    for (int y = 1; y < 256; y++)
      if (gmul(a, 8'(y)) == 8'h01) return 8'(y);
    return 0;
  endfunction

  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] b, s;
    b = ginv(a);
    // affine map as a matrix product: rows are rotations of 8'b11111000
    s = 0;
    for (int i = 0; i < 8; i++)
      s[i] = ^(b & ({8'hf1, 8'hf1} >> (8 - i)));
    return s ^ 8'h63;
  endfunction

  // Tables filled once from sbox_calc; the inverse table by inverting it.
  logic [7:0] sbox_tab [256];
  logic [7:0] inv_tab  [256];
  bit         tab_ready = 0;

  function automatic void fill_tables();
    for (int i = 0; i < 256; i++) sbox_tab[i] = sbox_calc(8'(i));
    for (int i = 0; i < 256; i++) inv_tab[sbox_tab[i]] = 8'(i);
    tab_ready = 1;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    if (!tab_ready) fill_tables();
    return sbox_tab[a];
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] a);
    if (!tab_ready) fill_tables();
    return inv_tab[a];
  endfunction

  function automatic logic [7:0] get(input blk_t s, input int r, input int c);
    return s[127 - 8*(r + 4*c) -: 8];
  endfunction

  function automatic blk_t put(input blk_t s, input int r, input int c, input logic [7:0] v);
    blk_t o;
    o = s;
    o[127 - 8*(r + 4*c) -: 8] = v;
    return o;
  endfunction

  function automatic blk_t sub_bytes(input blk_t s, input bit inverse);
    blk_t o;
    for (int i = 0; i < 16; i++)
      o[8*i +: 8] = inverse ? inv_sbox(s[8*i +: 8]) : sbox(s[8*i +: 8]);
    return o;
  endfunction

  function automatic blk_t shift_rows(input blk_t s, input bit inverse);
    blk_t o;
    o = s;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inverse) o = put(o, r, c, get(s, r, (c + 4 - r) % 4));
        else         o = put(o, r, c, get(s, r, (c + r) % 4));
    return o;
  endfunction

  function automatic blk_t mix_columns(input blk_t s, input bit inverse);
    logic [7:0] m [4];
    logic [7:0] v;
    blk_t o;
    if (inverse) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else         m = '{8'h02, 8'h03, 8'h01, 8'h01};
    o = s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        v = 0;
        for (int k = 0; k < 4; k++) v ^= gmul(m[(k - r + 4) % 4], get(s, k, c));
        o = put(o, r, c, v);
      end
    return o;
  endfunction

  typedef blk_t keys_t [11];

  function automatic keys_t expand_key(input blk_t key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    keys_t k;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    keys_t k;
    blk_t s;
    k = expand_key(key);
    s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t key);
    keys_t k;
    blk_t s;
    k = expand_key(key);
    s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ k[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
