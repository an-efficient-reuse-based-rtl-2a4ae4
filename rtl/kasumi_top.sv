// kasumi_top - KASUMI block-cipher core, one 64-bit block every 12 cycles.
//
// The core encrypts with KASUMI (64-bit block, 128-bit key, eight Feistel
// rounds). Rather than unrolling the rounds it reuses a small datapath that
// computes an odd and an even round together in three cycles (superFO with a
// single dual-port FI unit and four dual-port S-box ROMs), so a block takes
// four passes, 12 cycles. A 12-state controller sequences the datapath; a
// divide-by-three divider paces the key scheduler, which produces the round
// keys of two rounds at a time and keeps them stable for a whole round pair.
//
// Interface (handshake of this design's own choosing):
//   start_i/ready_o  a block (pt_i, key_i) is taken at a rising edge where
//                    both are high; ready_o is high when idle and in the
//                    last processing cycle, so blocks may stream back to back.
//   done_o/ct_o      done_o pulses 12 rising edges after the taking edge;
//                    ct_o holds the ciphertext during that cycle only.
// Only encryption is provided (the direction used by the 3GPP f8 and f9
// modes). rst_n is an asynchronous active-low reset of the control state.
module kasumi_top
  import kasumi_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [127:0] key_i,
  input  logic [63:0]  pt_i,
  output logic         ready_o,
  output logic         done_o,
  output logic [63:0]  ct_o
);

  logic        load, busy, first;
  logic [1:0]  step, div_phase;
  logic        key_adv;
  round_keys_t rk_odd, rk_even;

  kasumi_ctrl u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start_i),
    .ready (ready_o),
    .load  (load),
    .busy  (busy),
    .step  (step),
    .first (first),
    .done  (done_o)
  );

  kasumi_clkdiv3 u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .sync  (load),
    .run   (busy),
    .phase (div_phase),
    .tick  (key_adv)
  );

  kasumi_key_sched u_keys (
    .clk     (clk),
    .load    (load),
    .key     (key_i),
    .adv     (key_adv),
    .rk_odd  (rk_odd),
    .rk_even (rk_even)
  );

  kasumi_datapath u_dp (
    .clk     (clk),
    .load    (load),
    .pt      (pt_i),
    .first   (first),
    .step    (step),
    .rk_odd  (rk_odd),
    .rk_even (rk_even),
    .ct      (ct_o)
  );

  // The divided clock must stay in phase with the controller's step count.
  divider_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (div_phase == step))
    else $error("kasumi_top: key-scheduler divider out of phase");

endmodule
