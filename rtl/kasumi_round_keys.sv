// kasumi_round_keys - combinational generator of one KASUMI round-key set.
//
// Inputs are the eight key words K1..K8 and the eight modified words
// K'j = Kj xor Cj, already rotated by the key scheduler so that word 1 is the
// word that belongs to the round being served. The outputs follow the KASUMI
// key schedule:
//   KL1 = ROL1(K1)   KL2 = K'3
//   KO1 = ROL5(K2)   KO2 = ROL8(K6)   KO3 = ROL13(K7)
//   KI1 = K'5        KI2 = K'4        KI3 = K'8
// The key scheduler holds two copies of this block: one fed with the words as
// stored (odd round) and one fed with them rotated by one word (even round).
// KL2 and KI1..KI3 are plain selections of K' words, so half of the outputs
// have no logic behind them; that is the nature of the KASUMI key schedule.
module kasumi_round_keys
  import kasumi_pkg::*;
(
  input  logic [127:0] k,
  input  logic [127:0] kp,
  output round_keys_t  rk
);

  // Word j (1..8) of a 128-bit key vector; word 1 is the top word.
  function automatic word_t kw(input logic [127:0] v, input int unsigned j);
    return v[127 - 16*(j-1) -: 16];
  endfunction

  always_comb begin
    rk.kl1 = rol16(kw(k, 1), 1);
    rk.kl2 = kw(kp, 3);
    rk.fo.ko1 = rol16(kw(k, 2), 5);
    rk.fo.ko2 = rol16(kw(k, 6), 8);
    rk.fo.ko3 = rol16(kw(k, 7), 13);
    rk.fo.ki1 = kw(kp, 5);
    rk.fo.ki2 = kw(kp, 4);
    rk.fo.ki3 = kw(kp, 8);
  end

endmodule
