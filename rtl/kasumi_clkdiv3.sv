// kasumi_clkdiv3 - divide-by-three frequency divider for the key scheduler.
//
// A three-state FSM (P0 -> P1 -> P2 -> P0) advances on every rising edge while
// run is high. tick is high in phase P2, i.e. once every three cycles, and is
// used as the clock enable of the key scheduler: the scheduler thus changes
// state at one third of the system clock rate. sync forces the next phase to
// P0 so that the divider lines up with the start of a block; it wins over run.
// Output phase exposes the state for checking against the main controller.
module kasumi_clkdiv3 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,
  input  logic       run,
  output logic [1:0] phase,
  output logic       tick
);

  typedef enum logic [1:0] {P0 = 2'd0, P1 = 2'd1, P2 = 2'd2} div_state_t;

  div_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    if (sync) begin
      state_d = P0;
    end else if (run) begin
      unique case (state_q)
        P0:      state_d = P1;
        P1:      state_d = P2;
        default: state_d = P0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= P0;
    else        state_q <= state_d;
  end

  assign phase = state_q;
  assign tick  = run && (state_q == P2);

endmodule
