// ascon_ref_pkg: reference model of ASCON-128 for the testbenches.
//
// Written independently of the RTL: the substitution layer uses the 5-bit
// S-box table of the ASCON specification applied column by column (bit j of
// x0..x4 forms one 5-bit input, x0 the most significant bit), not the
// bit-sliced Boolean form of the RTL. The model keeps its own state and
// offers the encryption as steps: init, absorb AD, encrypt block, tag.
package ascon_ref_pkg;

  typedef logic [63:0] st_t [5];

  localparam logic [4:0] SBOX [32] = '{
    5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
    5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
    5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
    5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17};

  function automatic logic [63:0] rotr(logic [63:0] v, int n);
    logic [127:0] d;
    d = {v, v} >> n;
    return d[63:0];
  endfunction

  function automatic void permute(ref st_t s, input int rounds);
    for (int r = 12 - rounds; r < 12; r++) begin
      logic [63:0] t [5];
      s[2] ^= 64'((15 - r) * 16 + r);
      for (int j = 0; j < 64; j++) begin
        logic [4:0] in, out;
        in  = {s[0][j], s[1][j], s[2][j], s[3][j], s[4][j]};
        out = SBOX[in];
        t[0][j] = out[4]; t[1][j] = out[3]; t[2][j] = out[2];
        t[3][j] = out[1]; t[4][j] = out[0];
      end
      s[0] = t[0] ^ rotr(t[0], 19) ^ rotr(t[0], 28);
      s[1] = t[1] ^ rotr(t[1], 61) ^ rotr(t[1], 39);
      s[2] = t[2] ^ rotr(t[2], 1)  ^ rotr(t[2], 6);
      s[3] = t[3] ^ rotr(t[3], 10) ^ rotr(t[3], 17);
      s[4] = t[4] ^ rotr(t[4], 7)  ^ rotr(t[4], 41);
    end
  endfunction

  function automatic void init(ref st_t s, input logic [127:0] key, input logic [127:0] nonce);
    s[0] = 64'h80400c0600000000;
    s[1] = key[127:64];
    s[2] = key[63:0];
    s[3] = nonce[127:64];
    s[4] = nonce[63:0];
    permute(s, 12);
    s[3] ^= key[127:64];
    s[4] ^= key[63:0];
  endfunction

  function automatic void absorb_ad(ref st_t s, input logic [63:0] blk);
    s[0] ^= blk;
    permute(s, 6);
  endfunction

  function automatic void sep(ref st_t s);
    s[4] ^= 64'd1;
  endfunction

  // encrypt one (padded) block; the last block is not followed by p^6
  function automatic logic [63:0] enc(ref st_t s, input logic [63:0] blk, input bit last);
    logic [63:0] c;
    s[0] ^= blk;
    c = s[0];
    if (!last) permute(s, 6);
    return c;
  endfunction

  function automatic logic [127:0] tag(ref st_t s, input logic [127:0] key);
    s[1] ^= key[127:64];
    s[2] ^= key[63:0];
    permute(s, 12);
    return {s[3] ^ key[127:64], s[4] ^ key[63:0]};
  endfunction

endpackage
