// kasumi_fi_dp - two KASUMI FI functions sharing four dual-port S-box ROMs.
//
// FI is a four-round Feistel network on a 16-bit word split into a 9-bit
// half (bits 15:7) and a 7-bit half (bits 6:0), with the S9 box applied in
// rounds 1 and 3 and the S7 box in rounds 2 and 4; KI supplies 7 bits
// (KI[15:9]) and 9 bits (KI[8:0]) between rounds 2 and 3. Two FI evaluations
// (ports A and B) run side by side, and each S-box position is one dual-port
// ROM serving both ports, so the whole unit has two S9 and two S7 ROMs.
//
// Timing: the ROMs are synchronous. The upper pair (first S9 and first S7)
// registers on the falling edge, the lower pair (second S9 and second S7) on
// the rising edge. Inputs presented after rising edge n are therefore looked
// up at the falling edge in cycle n, the middle XORs settle in the second half
// of the cycle, the lower ROMs register at rising edge n+1 and the outputs are
// valid from edge n+1 on: one cycle of latency, one new pair of operands per
// cycle. The small synchronising registers (falling edge: 7-bit half and KI;
// rising edge: the 7-bit round-2 result) keep the XOR operands aligned with
// the ROM outputs. The split of the registers between the two edges follows
// the structure described for the design; the exact placement is this
// design's own.
module kasumi_fi_dp
  import kasumi_pkg::*;
(
  input  logic  clk,
  input  word_t a_in,
  input  word_t a_ki,
  input  word_t b_in,
  input  word_t b_ki,
  output word_t a_out,
  output word_t b_out
);

  // Upper S-boxes (falling edge).
  logic [8:0] s9u_a, s9u_b;
  logic [6:0] s7u_a, s7u_b;
  // Lower S-boxes (rising edge).
  logic [8:0] s9l_a, s9l_b;
  logic [6:0] s7l_a, s7l_b;

  // Falling-edge synchronising registers.
  logic [6:0] r0n_a, r0n_b;
  word_t      kin_a, kin_b;
  // Rising-edge synchronising registers.
  logic [6:0] r2p_a, r2p_b;

  // Middle of the network (between upper and lower S-boxes).
  logic [8:0] r1_a, r1_b, l2_a, l2_b;
  logic [6:0] r2_a, r2_b;
  // Bottom of the network.
  logic [8:0] r3_a, r3_b;
  logic [6:0] l4_a, l4_b;

  kasumi_s9_rom #(.NEG_EDGE(1'b1)) u_s9_upper (
    .clk(clk), .addr_a(a_in[15:7]), .addr_b(b_in[15:7]), .data_a(s9u_a), .data_b(s9u_b));
  kasumi_s7_rom #(.NEG_EDGE(1'b1)) u_s7_upper (
    .clk(clk), .addr_a(a_in[6:0]),  .addr_b(b_in[6:0]),  .data_a(s7u_a), .data_b(s7u_b));

  always_ff @(negedge clk) begin
    r0n_a <= a_in[6:0];
    r0n_b <= b_in[6:0];
    kin_a <= a_ki;
    kin_b <= b_ki;
  end

  always_comb begin
    // Round 1: R1 = S9(L0) xor ZE(R0); round 2: R2 = S7(R0) xor TR(R1) xor KI1.
    r1_a = s9u_a ^ {2'b00, r0n_a};
    r1_b = s9u_b ^ {2'b00, r0n_b};
    l2_a = r1_a ^ kin_a[8:0];
    l2_b = r1_b ^ kin_b[8:0];
    r2_a = s7u_a ^ r1_a[6:0] ^ kin_a[15:9];
    r2_b = s7u_b ^ r1_b[6:0] ^ kin_b[15:9];
  end

  kasumi_s9_rom #(.NEG_EDGE(1'b0)) u_s9_lower (
    .clk(clk), .addr_a(l2_a), .addr_b(l2_b), .data_a(s9l_a), .data_b(s9l_b));
  kasumi_s7_rom #(.NEG_EDGE(1'b0)) u_s7_lower (
    .clk(clk), .addr_a(r2_a), .addr_b(r2_b), .data_a(s7l_a), .data_b(s7l_b));

  always_ff @(posedge clk) begin
    r2p_a <= r2_a;
    r2p_b <= r2_b;
  end

  always_comb begin
    // Round 3: R3 = S9(L2) xor ZE(R2); round 4: L4 = S7(R2) xor TR(R3).
    r3_a  = s9l_a ^ {2'b00, r2p_a};
    r3_b  = s9l_b ^ {2'b00, r2p_b};
    l4_a  = s7l_a ^ r3_a[6:0];
    l4_b  = s7l_b ^ r3_b[6:0];
    a_out = {l4_a, r3_a};
    b_out = {l4_b, r3_b};
  end

endmodule
