// ascon_ref_pkg: reference models for the testbenches.
//
// Written independently of the RTL: the permutation applies the 5-bit S-box as
// a table, column by column, and the linear layer with shift operators.  On top
// of it sit Ascon-128 encryption/decryption and Ascon-Hash over byte queues,
// and a bit-serial Trivium.
package ascon_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef byte unsigned bytes_t[$];

  localparam byte unsigned SBOX[32] = '{
    8'h04, 8'h0b, 8'h1f, 8'h14, 8'h1a, 8'h15, 8'h09, 8'h02,
    8'h1b, 8'h05, 8'h08, 8'h12, 8'h1d, 8'h03, 8'h06, 8'h1c,
    8'h1e, 8'h13, 8'h07, 8'h0e, 8'h00, 8'h0d, 8'h11, 8'h18,
    8'h10, 8'h0c, 8'h01, 8'h19, 8'h16, 8'h0a, 8'h0f, 8'h17};

  function automatic w64_t rotr(w64_t x, int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic void ref_perm(ref w64_t s[5], input int rounds);
    for (int r = 12 - rounds; r < 12; r++) begin
      w64_t t[5];
      s[2] ^= {56'd0, 8'((15 - r) * 16 + r)};
      for (int b = 0; b < 64; b++) begin
        int v;
        v = (int'(s[0][b]) << 4) | (int'(s[1][b]) << 3) | (int'(s[2][b]) << 2) |
            (int'(s[3][b]) << 1) | int'(s[4][b]);
        v = int'(SBOX[v]);
        t[0][b] = v[4]; t[1][b] = v[3]; t[2][b] = v[2]; t[3][b] = v[1]; t[4][b] = v[0];
      end
      s[0] = t[0] ^ rotr(t[0], 19) ^ rotr(t[0], 28);
      s[1] = t[1] ^ rotr(t[1], 61) ^ rotr(t[1], 39);
      s[2] = t[2] ^ rotr(t[2], 1)  ^ rotr(t[2], 6);
      s[3] = t[3] ^ rotr(t[3], 10) ^ rotr(t[3], 17);
      s[4] = t[4] ^ rotr(t[4], 7)  ^ rotr(t[4], 41);
    end
  endfunction

  // Bytes i*8..i*8+7 of q as a big-endian word, padded with 0x80 past the end.
  function automatic w64_t load_block(bytes_t q, int off, output int n);
    w64_t w = 0;
    n = 0;
    for (int k = 0; k < 8; k++) begin
      if (off + k < q.size()) begin
        w[63 - 8*k -: 8] = q[off + k];
        n++;
      end
    end
    if (n < 8) w[63 - 8*n -: 8] = 8'h80;
    return w;
  endfunction

  // Ascon-128. dec = 0: text is P, returns C in out.  dec = 1: text is C, returns P.
  function automatic void ref_aead(input logic [127:0] key, input logic [127:0] nonce,
                                   input bytes_t ad, input bytes_t text, input bit dec,
                                   output bytes_t out, output logic [127:0] tag);
    w64_t s[5];
    int n;
    out = {};
    s[0] = 64'h80400c0600000000; s[1] = key[127:64]; s[2] = key[63:0];
    s[3] = nonce[127:64]; s[4] = nonce[63:0];
    ref_perm(s, 12);
    s[3] ^= key[127:64]; s[4] ^= key[63:0];
    if (ad.size() > 0) begin
      for (int off = 0; off <= ad.size(); off += 8) begin
        s[0] ^= load_block(ad, off, n);
        ref_perm(s, 6);
        if (n < 8) break;
      end
    end
    s[4] ^= 64'd1;
    for (int off = 0; off <= text.size(); off += 8) begin
      w64_t blk, o;
      blk = load_block(text, off, n);
      for (int k = 0; k < n; k++) begin
        byte unsigned sb, tb;
        sb = s[0][63 - 8*k -: 8];
        tb = blk[63 - 8*k -: 8];
        out.push_back(sb ^ tb);
        if (dec) s[0][63 - 8*k -: 8] = tb; else s[0][63 - 8*k -: 8] = sb ^ tb;
      end
      if (n < 8) begin
        s[0][63 - 8*n -: 8] ^= 8'h80;
        break;
      end
      ref_perm(s, 6);
    end
    s[1] ^= key[127:64]; s[2] ^= key[63:0];
    ref_perm(s, 12);
    tag = {s[3] ^ key[127:64], s[4] ^ key[63:0]};
  endfunction

  function automatic logic [255:0] ref_hash(input bytes_t m);
    w64_t s[5];
    int n;
    logic [255:0] h;
    s[0] = 64'h00400c0000000100; s[1] = 0; s[2] = 0; s[3] = 0; s[4] = 0;
    ref_perm(s, 12);
    for (int off = 0; off <= m.size(); off += 8) begin
      s[0] ^= load_block(m, off, n);
      ref_perm(s, 12);
      if (n < 8) break;
    end
    for (int i = 0; i < 4; i++) begin
      h[255 - 64*i -: 64] = s[0];
      if (i < 3) ref_perm(s, 12);
    end
    return h;
  endfunction

  // Bit-serial Trivium.  st[0..287] are s1..s288 of the cipher description.
  function automatic bit trivium_step(ref bit st[288]);
    bit t1, t2, t3, z;
    t1 = st[65] ^ st[92];
    t2 = st[161] ^ st[176];
    t3 = st[242] ^ st[287];
    z  = t1 ^ t2 ^ t3;
    t1 = t1 ^ (st[90] & st[91]) ^ st[170];
    t2 = t2 ^ (st[174] & st[175]) ^ st[263];
    t3 = t3 ^ (st[285] & st[286]) ^ st[68];
    for (int i = 287; i > 177; i--) st[i] = st[i-1];
    st[177] = t2;
    for (int i = 176; i > 93; i--) st[i] = st[i-1];
    st[93] = t1;
    for (int i = 92; i > 0; i--) st[i] = st[i-1];
    st[0] = t3;
    return z;
  endfunction

endpackage
