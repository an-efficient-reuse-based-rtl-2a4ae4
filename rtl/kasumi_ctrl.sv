// kasumi_ctrl - 12-state controller of the KASUMI core.
//
// States S0..S11 cover the four round pairs of a block, three cycles each; a
// further IDLE state waits for work. In every processing state the controller
// drives step = state mod 3 (the superFO section and multiplexor selects) and
// first = (state == S0), which makes the datapath take the plaintext rather
// than the fed-back round result.
//
// Handshake (this design's own): start is taken when ready is high, which is
// in IDLE and in S11, so blocks can follow each other with no gap. A taken
// start raises load for one cycle (plaintext and key are captured at that
// edge) and the next state is S0. done is a registered pulse, high in the
// cycle after S11, i.e. 12 rising edges after the edge that took start; the
// datapath's ciphertext is valid in that cycle.
module kasumi_ctrl
  import kasumi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  output logic       load,
  output logic       busy,
  output logic [1:0] step,
  output logic       first,
  output logic       done
);

  ctrl_state_t state_q, state_d;
  logic        done_q;

  always_comb begin
    ready = (state_q == ST_IDLE) || (state_q == ST_S11);
    load  = start && ready;
    busy  = (state_q != ST_IDLE);
    first = (state_q == ST_S0);
    unique case (state_q)
      ST_S0, ST_S3, ST_S6, ST_S9:  step = 2'd0;
      ST_S1, ST_S4, ST_S7, ST_S10: step = 2'd1;
      ST_S2, ST_S5, ST_S8, ST_S11: step = 2'd2;
      default:                     step = 2'd0;
    endcase

    unique case (state_q)
      ST_IDLE: state_d = load ? ST_S0 : ST_IDLE;
      ST_S11:  state_d = load ? ST_S0 : ST_IDLE;
      default: state_d = ctrl_state_t'(state_q + 4'd1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      done_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      done_q  <= (state_q == ST_S11);
    end
  end

  assign done = done_q;

endmodule
