// kasumi_key_sched - round-key scheduler serving two rounds at a time.
//
// The scheduler stores the key words K1..K8 and K'1..K'8 (K' = K xor C) in two
// 128-bit registers. Two copies of kasumi_round_keys read them: the first
// directly (odd round i), the second through a one-word left rotation (even
// round i+1). Each time adv is high both registers rotate left by two words,
// which moves the outputs on to the next round pair. After four advances the
// registers hold the original key again, so consecutive blocks under the same
// key need no reload.
//
// Timing: load (priority) and adv act on the rising clock edge. adv is the
// divide-by-three enable from kasumi_clkdiv3, so the round keys stay constant
// for the three cycles of a round pair. Running the scheduler from a clock
// enable on the system clock, instead of from a separately divided clock net,
// is this design's choice.
module kasumi_key_sched
  import kasumi_pkg::*;
(
  input  logic         clk,
  input  logic         load,
  input  logic [127:0] key,
  input  logic         adv,
  output round_keys_t  rk_odd,
  output round_keys_t  rk_even
);

  logic [127:0] k_q, kp_q;

  always_ff @(posedge clk) begin
    if (load) begin
      k_q  <= key;
      kp_q <= key ^ KEY_CONST;
    end else if (adv) begin
      k_q  <= {k_q[95:0],  k_q[127:96]};
      kp_q <= {kp_q[95:0], kp_q[127:96]};
    end
  end

  kasumi_round_keys u_rk_odd (
    .k  (k_q),
    .kp (kp_q),
    .rk (rk_odd)
  );

  kasumi_round_keys u_rk_even (
    .k  ({k_q[111:0],  k_q[127:112]}),
    .kp ({kp_q[111:0], kp_q[127:112]}),
    .rk (rk_even)
  );

endmodule
