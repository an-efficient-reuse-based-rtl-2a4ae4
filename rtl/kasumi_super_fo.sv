// kasumi_super_fo - both FO functions of an odd/even KASUMI round pair.
//
// For a round pair (odd round i, even round i+1) the core needs
//   Y   = FO_i(X)          with X the FL output of the odd round,
//   L_i = Y xor R          (the odd round's new left half),
//   Z   = FO_i+1(L_i)      (the even round's FO output).
// Each FO is a three-round Feistel network of FI functions, six FI calls in
// all. Ordered by their data dependencies, the six calls fall into three
// sections of two calls each, and with some XORs whose second input is zero
// every section has the same shape:
//   u = FI_A result xor carry
//   v = FI_B result xor u [xor R_low in section 2]
//   next FI_A operand = u [xor R_low in section 2],
//   next FI_B operand = v [xor R_high in section 1]
// so one dual-port FI (two FI calls per cycle) plus a few multiplexors
// evaluate both FO functions in three cycles:
//   step 0: FI(Xh^KO1,KI1)      FI(Xl^KO2,KI2)                (odd round)
//   step 1: FI(a1^KO3,KI3)      FI(a2^Rh^KO1',KI1')           (odd / even)
//   step 2: FI(yr^KO2',KI2')    FI(b1^KO3',KI3')              (even round)
// where a1,a2,a3 are the odd FO's Feistel words, yr = a3^Rl and b1 is the
// even FO's first word. Because the FI has one cycle of latency, the results
// of step 2 appear in the following cycle (step 0 of the next pair, or the
// cycle after the last pair), where z = {b2, b3} is formed combinationally.
//
// Interface and timing: x and r are sampled in step 0 (r is kept for steps 1
// and 2). fo_odd and fo_even (KO and KI of the two rounds) must be stable
// during steps 0..2. li is a register loaded at the end of step 2 (its upper
// half is computed in step 1 and carried one extra cycle). z is valid in the
// cycle after step 2. The step count comes from the core's 12-state
// controller; the three-section structure and the one-cycle delay of the odd
// round's result follow the original architecture, while the assignment of
// the FI calls to the two ports is worked out here from the data dependencies.
module kasumi_super_fo
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic [1:0]  step,
  input  logic [31:0] x,
  input  logic [31:0] r,
  input  fo_keys_t    fo_odd,
  input  fo_keys_t    fo_even,
  output logic [31:0] li,
  output logic [31:0] z
);

  word_t fa, fb;            // dual-port FI results (previous step's calls)
  word_t a_in, a_ki, b_in, b_ki;
  word_t u, v;
  word_t m_lo, m_hi;        // section XOR inputs: R half or zero
  word_t c_q;               // carry word between sections
  word_t rh_q, rl_q;        // R of the odd round, kept for steps 1 and 2
  logic [31:0] li_q;

  always_comb begin
    m_lo = (step == 2'd2) ? rl_q : '0;
    m_hi = (step == 2'd1) ? rh_q : '0;
    u    = fa ^ c_q;
    v    = fb ^ u ^ m_lo;
    unique case (step)
      2'd0: begin
        a_in = x[31:16] ^ fo_odd.ko1;  a_ki = fo_odd.ki1;
        b_in = x[15:0]  ^ fo_odd.ko2;  b_ki = fo_odd.ki2;
      end
      2'd1: begin
        a_in = u ^ fo_odd.ko3;          a_ki = fo_odd.ki3;
        b_in = v ^ m_hi ^ fo_even.ko1;  b_ki = fo_even.ki1;
      end
      default: begin
        a_in = u ^ m_lo ^ fo_even.ko2;  a_ki = fo_even.ki2;
        b_in = v ^ fo_even.ko3;         b_ki = fo_even.ki3;
      end
    endcase
  end

  kasumi_fi_dp u_fi (
    .clk   (clk),
    .a_in  (a_in),
    .a_ki  (a_ki),
    .b_in  (b_in),
    .b_ki  (b_ki),
    .a_out (fa),
    .b_out (fb)
  );

  always_ff @(posedge clk) begin
    if (step == 2'd0) begin
      c_q  <= x[15:0];
      rh_q <= r[31:16];
      rl_q <= r[15:0];
    end else begin
      c_q <= v;
    end
    if (step == 2'd2) li_q <= {c_q ^ rh_q, u ^ rl_q};
  end

  assign li = li_q;
  assign z  = {u, v};

  step_in_range: assert property (@(posedge clk) step != 2'd3)
    else $error("kasumi_super_fo: step out of range");

endmodule
