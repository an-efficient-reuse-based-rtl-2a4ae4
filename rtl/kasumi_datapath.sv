// kasumi_datapath - reusable datapath computing two KASUMI rounds in three cycles.
//
// KASUMI is an eight-round Feistel cipher on 64 bits (L || R). An odd round
// computes L' = FO(FL(L)) xor R, an even round L' = FL(FO(L)) xor R, and in
// both R' = L. This datapath holds one odd/even pair of rounds:
//
//   cur_l --FL(odd)--> x --+
//                          superFO --> li = FO_odd(x) xor cur_r  (= L_i = R_i+1)
//   cur_r -----------------+       --> z  = FO_even(L_i)
//   z --FL(even)--> xor lprev --> L_i+1
//
// and is used four times per block. In the first step of the first pair the
// multiplexors select the plaintext register; in the first step of every
// other pair they select the previous pair's results (L_i+1, R_i+1), formed
// combinationally from the FI outputs that arrive in that very cycle. After
// the fourth pair the same expression yields the ciphertext.
//
// Interface and timing: load captures pt at a rising edge. step (0..2) and
// first come from the controller; rk_odd/rk_even from the key scheduler,
// stable over the three steps of a pair. ct = {L8, R8} is valid in the cycle
// after the last step of the fourth pair (it is combinational from
// registers). The even round's KL is captured in step 2 because the even FL is
// evaluated one cycle later, when the key scheduler has moved on; this extra
// register is this design's own choice.
module kasumi_datapath
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic [63:0] pt,
  input  logic        first,
  input  logic [1:0]  step,
  input  round_keys_t rk_odd,
  input  round_keys_t rk_even,
  output logic [63:0] ct
);

  logic [63:0] pt_q;
  logic [31:0] lprev_q;          // L_i-1 of the current pair (the even round's R)
  word_t       kl1_even_q, kl2_even_q;

  logic [31:0] cur_l, cur_r, x, li, z, fl_even_y, next_l;

  kasumi_fl u_fl_odd (
    .x   (cur_l),
    .kl1 (rk_odd.kl1),
    .kl2 (rk_odd.kl2),
    .y   (x)
  );

  kasumi_super_fo u_super_fo (
    .clk     (clk),
    .step    (step),
    .x       (x),
    .r       (cur_r),
    .fo_odd  (rk_odd.fo),
    .fo_even (rk_even.fo),
    .li      (li),
    .z       (z)
  );

  kasumi_fl u_fl_even (
    .x   (z),
    .kl1 (kl1_even_q),
    .kl2 (kl2_even_q),
    .y   (fl_even_y)
  );

  always_comb begin
    next_l = fl_even_y ^ lprev_q;
    if (first) begin
      cur_l = pt_q[63:32];
      cur_r = pt_q[31:0];
    end else begin
      cur_l = next_l;
      cur_r = li;
    end
  end

  always_ff @(posedge clk) begin
    if (load)         pt_q    <= pt;
    if (step == 2'd0) lprev_q <= cur_l;
    if (step == 2'd2) begin
      kl1_even_q <= rk_even.kl1;
      kl2_even_q <= rk_even.kl2;
    end
  end

  assign ct = {next_l, li};

endmodule
