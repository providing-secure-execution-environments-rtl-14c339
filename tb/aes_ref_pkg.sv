// aes_ref_pkg: behavioural AES-128 reference used only by the testbenches.
//
// Written independently of the RTL: the S-box is generated by walking the
// multiplicative group of GF(2^8) with generator 3 (p *= 3, q = p^-1), the
// state is a byte array, and the key schedule works on 32-bit words. It gives
// the testbenches expected values for arbitrary keys and blocks; fixed
// FIPS-197 vectors in the testbenches check this model itself.
package aes_ref_pkg;

  typedef logic [7:0] byte_arr_t [16];

  function automatic logic [7:0] rl(input logic [7:0] v, input int n);
    return 8'((v << n) | (v >> (8 - n)));
  endfunction

  function automatic void make_sbox(output logic [7:0] sb [256], output logic [7:0] isb [256]);
    logic [7:0] p, q, x;
    p = 8'd1; q = 8'd1;
    do begin
      p = p ^ 8'(p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ 8'(q << 1);
      q = q ^ 8'(q << 2);
      q = q ^ 8'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rl(q, 1) ^ rl(q, 2) ^ rl(q, 3) ^ rl(q, 4);
      sb[p] = x ^ 8'h63;
    end while (p != 8'd1);
    sb[0] = 8'h63;
    for (int i = 0; i < 256; i++) isb[sb[i]] = 8'(i);
  endfunction

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = 8'(a << 1) ^ (a[7] ? 8'h1b : 8'h00);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic void expand(input logic [127:0] key, output logic [31:0] w [44]);
    logic [7:0] sb [256], isb [256];
    logic [31:0] t;
    logic [7:0] rc;
    make_sbox(sb, isb);
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sb[t[23:16]] ^ rc, sb[t[15:8]], sb[t[7:0]], sb[t[31:24]]};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] sb [256], isb [256];
    logic [31:0] w [44];
    logic [7:0] s [16], t [16];
    make_sbox(sb, isb);
    expand(key, w);
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i/4][31-8*(i%4) -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
      for (int i = 0; i < 16; i++) t[i] = s[(i + 4*(i%4)) % 16];       // ShiftRows
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          s[4*c]   = mul(t[4*c],2) ^ mul(t[4*c+1],3) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ mul(t[4*c+1],2) ^ mul(t[4*c+2],3) ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ mul(t[4*c+2],2) ^ mul(t[4*c+3],3);
          s[4*c+3] = mul(t[4*c],3) ^ t[4*c+1] ^ t[4*c+2] ^ mul(t[4*c+3],2);
        end
      else
        s = t;
      for (int i = 0; i < 16; i++) s[i] ^= w[4*r + i/4][31-8*(i%4) -: 8];
    end
    for (int i = 0; i < 16; i++) encrypt[127-8*i -: 8] = s[i];
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    logic [7:0] sb [256], isb [256];
    logic [31:0] w [44];
    logic [7:0] s [16], t [16];
    make_sbox(sb, isb);
    expand(key, w);
    for (int i = 0; i < 16; i++) s[i] = ct[127-8*i -: 8] ^ w[40 + i/4][31-8*(i%4) -: 8];
    for (int r = 9; r >= 0; r--) begin
      for (int i = 0; i < 16; i++) t[(i + 4*(i%4)) % 16] = s[i];       // InvShiftRows
      for (int i = 0; i < 16; i++) s[i] = isb[t[i]] ^ w[4*r + i/4][31-8*(i%4) -: 8];
      if (r != 0)
        for (int c = 0; c < 4; c++) begin
          t[0] = s[4*c]; t[1] = s[4*c+1]; t[2] = s[4*c+2]; t[3] = s[4*c+3];
          s[4*c]   = mul(t[0],14) ^ mul(t[1],11) ^ mul(t[2],13) ^ mul(t[3],9);
          s[4*c+1] = mul(t[0],9)  ^ mul(t[1],14) ^ mul(t[2],11) ^ mul(t[3],13);
          s[4*c+2] = mul(t[0],13) ^ mul(t[1],9)  ^ mul(t[2],14) ^ mul(t[3],11);
          s[4*c+3] = mul(t[0],11) ^ mul(t[1],13) ^ mul(t[2],9)  ^ mul(t[3],14);
        end
    end
    for (int i = 0; i < 16; i++) decrypt[127-8*i -: 8] = s[i];
  endfunction

endpackage
