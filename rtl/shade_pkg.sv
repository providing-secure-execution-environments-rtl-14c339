// shade_pkg: types, constants and AES-128 arithmetic shared by the guard chain.
//
// Both guards work on 128-bit blocks with AES-128 in electronic-codebook (ECB)
// mode, so that the same plaintext always gives the same ciphertext; the outer
// guard relies on that to recognise heartbeat stores encrypted by the inner
// guard. The byte order is that of FIPS-197: bits [127:120] hold state byte 0
// (row 0, column 0), and state byte i sits in row i%4, column i/4.
//
// The S-box and its inverse are not typed in as tables: they are computed at
// elaboration by constant functions, as the multiplicative inverse in GF(2^8)
// (modulus x^8+x^4+x^3+x+1) followed by the AES affine map. The round
// functions below are pure combinational functions used by the cipher cores
// and the key expansion.
//
// Widths of the memory interface (32-bit addresses, one 128-bit block per
// transfer) and the 20-bit heartbeat timeout are this design's choices; AES
// and ECB are the choice the design follows for both guards.
package shade_pkg;

  localparam int unsigned ADDR_W  = 32;   // address width of a memory transfer
  localparam int unsigned BLOCK_W = 128;  // one AES block per transfer
  localparam int unsigned KEY_W   = 128;  // AES-128
  localparam int unsigned NR      = 10;   // AES-128 round count
  localparam int unsigned TIME_W  = 20;   // heartbeat timeout counter width

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [TIME_W-1:0]  hb_time_t;
  typedef logic [NR:0][BLOCK_W-1:0] rkeys_t;   // round keys 0..NR
  typedef logic [255:0][7:0] sbox_t;           // 256-entry byte table

  // One heartbeat-table entry: the inner-key-encrypted heartbeat store and the
  // window [min,max] of outer-guard cycles in which the next heartbeat must come.
  typedef struct packed {
    logic     valid;
    block_t   pattern;
    hb_time_t tmin;
    hb_time_t tmax;
  } hb_entry_t;

  // ---------------- GF(2^8) arithmetic ----------------
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic sbox_t gen_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(8'(i)));
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox();
    sbox_t t;
    logic [7:0] s;
    for (int i = 0; i < 256; i++) begin
      s = affine(gf_inv(8'(i)));
      t[s] = 8'(i);
    end
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox();

  // ---------------- state access ----------------
  function automatic logic [7:0] get_byte(input block_t s, input int unsigned i);
    return s[BLOCK_W-1-8*i -: 8];
  endfunction

  // ---------------- round functions ----------------
  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[BLOCK_W-1-8*i -: 8] = SBOX[get_byte(s, i)];
    return o;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[BLOCK_W-1-8*i -: 8] = INV_SBOX[get_byte(s, i)];
    return o;
  endfunction

  // Row r is rotated left by r columns.
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(4*c+r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(4*((c + r) % 4) + r) -: 8] = get_byte(s, 4*c + r);
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      o[BLOCK_W-1-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[BLOCK_W-1-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[BLOCK_W-1-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[BLOCK_W-1-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // Products by the InvMixColumns constants 9, 11, 13 and 14, as xtime chains.
  function automatic logic [31:0] mul_9_11_13_14(input logic [7:0] a);
    logic [7:0] a2, a4, a8;
    a2 = xtime(a);
    a4 = xtime(a2);
    a8 = xtime(a4);
    return {a8 ^ a, a8 ^ a2 ^ a, a8 ^ a4 ^ a, a8 ^ a4 ^ a2};
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t o;
    logic [7:0] m9 [4], m11 [4], m13 [4], m14 [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++)
        {m9[r], m11[r], m13[r], m14[r]} = mul_9_11_13_14(get_byte(s, 4*c + r));
      o[BLOCK_W-1-8*(4*c)   -: 8] = m14[0] ^ m11[1] ^ m13[2] ^ m9[3];
      o[BLOCK_W-1-8*(4*c+1) -: 8] = m9[0]  ^ m14[1] ^ m11[2] ^ m13[3];
      o[BLOCK_W-1-8*(4*c+2) -: 8] = m13[0] ^ m9[1]  ^ m14[2] ^ m11[3];
      o[BLOCK_W-1-8*(4*c+3) -: 8] = m11[0] ^ m13[1] ^ m9[2]  ^ m14[3];
    end
    return o;
  endfunction

  // Round constant for key-expansion step i (1..10): x^(i-1) in GF(2^8).
  function automatic logic [7:0] rcon(input int unsigned i);
    logic [7:0] r;
    r = 8'h01;
    for (int k = 1; k < 16; k++) if (k < i) r = xtime(r);
    return r;
  endfunction

  // One key-expansion step: round key i from round key i-1.
  function automatic block_t next_round_key(input block_t prev, input logic [7:0] rc);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = prev;
    t = {SBOX[w3[23:16]], SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    t[31:24] = t[31:24] ^ rc;
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
