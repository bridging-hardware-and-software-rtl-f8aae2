// ascon_round: one round of the ASCON permutation, purely combinational.
//
// The 320-bit state is five 64-bit words x0..x4. A round adds the round
// constant to x2, applies the 5-bit S-box bit-sliced across the five words and
// then the per-word linear diffusion layer (x ^= (x >>> a) ^ (x >>> b) with
// the rotation pairs 19/28, 61/39, 1/6, 10/17, 7/41). The round constant for
// round i of the 12-round schedule is {~i[3:0], i[3:0]} (0xf0, 0xe1, ...,
// 0x4b); a 6-round permutation uses rounds 6..11 of that schedule. The caller
// passes the schedule index.
//
// The algorithm is the published ASCON permutation; the source description
// only names ASCON. One round per call is this design's choice.
module ascon_round (
  input  logic [63:0] x_i [5],
  input  logic [3:0]  round_i,     // index into the 12-round schedule
  output logic [63:0] x_o [5]
);

  function automatic logic [63:0] ror64(input logic [63:0] v, input int unsigned n);
    return (v >> n) | (v << (64 - n));
  endfunction

  logic [63:0] a [5];
  logic [63:0] t [5];
  logic [63:0] s [5];

  always_comb begin
    for (int i = 0; i < 5; i++) a[i] = x_i[i];
    // constant addition
    a[2] = a[2] ^ {56'd0, ~round_i, round_i};
    // substitution layer
    a[0] = a[0] ^ a[4];
    a[4] = a[4] ^ a[3];
    a[2] = a[2] ^ a[1];
    for (int i = 0; i < 5; i++) t[i] = ~a[i] & a[(i + 1) % 5];
    for (int i = 0; i < 5; i++) s[i] = a[i] ^ t[(i + 1) % 5];
    s[1] = s[1] ^ s[0];
    s[0] = s[0] ^ s[4];
    s[3] = s[3] ^ s[2];
    s[2] = ~s[2];
    // linear diffusion layer
    x_o[0] = s[0] ^ ror64(s[0], 19) ^ ror64(s[0], 28);
    x_o[1] = s[1] ^ ror64(s[1], 61) ^ ror64(s[1], 39);
    x_o[2] = s[2] ^ ror64(s[2], 1)  ^ ror64(s[2], 6);
    x_o[3] = s[3] ^ ror64(s[3], 10) ^ ror64(s[3], 17);
    x_o[4] = s[4] ^ ror64(s[4], 7)  ^ ror64(s[4], 41);
  end

endmodule
