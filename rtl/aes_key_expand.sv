// aes_key_expand: one step of the AES-128 key schedule on plain values.
//
// Given round key i (four 32-bit words w0..w3, w0 in bits 127:96) and the round constant of
// round i+1, returns round key i+1: t = SubWord(RotWord(w3)) ^ {rcon, 24'h0}, then
// w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. It also returns the next round
// constant (rcon * 2 in GF(2^8)). The core calls it once per round, so only one round key is
// ever stored. The schedule is standard AES-128 (FIPS-197); computing it in plain
// and garbling each round key where it is used is this design's reading of the original description.
// Combinational.
module aes_key_expand
  import gc_pkg::*;
(
  input  logic [127:0] key_in,
  input  logic [7:0]   rcon,
  output logic [127:0] key_out,
  output logic [7:0]   rcon_next
);

  logic [31:0] w [4];
  logic [31:0] n [4];
  logic [31:0] t;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_in[127 - 32*i -: 32];
    t = {SBOX[w[3][23:16]], SBOX[w[3][15:8]], SBOX[w[3][7:0]], SBOX[w[3][31:24]]}
        ^ {rcon, 24'h0};
    n[0] = w[0] ^ t;
    n[1] = w[1] ^ n[0];
    n[2] = w[2] ^ n[1];
    n[3] = w[3] ^ n[2];
    key_out   = {n[0], n[1], n[2], n[3]};
    rcon_next = xtime(rcon);
  end

endmodule
