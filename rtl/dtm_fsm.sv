// dtm_fsm: dual-state threshold policy for dynamic frequency scaling.
//
// State FAST runs the emulated cores at the full frequency. As soon as any
// sensor reports a temperature above the upper threshold, the policy moves to
// SLOW, in which the clock manager runs the cores at the reduced frequency.
// It returns to FAST only when every sensor is below the lower threshold, so
// the gap between the two thresholds gives hysteresis. enable_i = 0 keeps
// the policy in FAST (DFS off). slow_o is registered; switch_o pulses on
// every change of state.
//
// Origin: a two-state policy switching between a high and a low frequency on
// an upper and a lower temperature threshold follows the framework
// description; the rule 'slow when any sensor is hot, fast again when all are
// cool' is this design's own.
module dtm_fsm #(
  parameter int unsigned NS = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable_i,
  input  logic [NS-1:0] hot_i,
  input  logic [NS-1:0] cool_i,
  output logic          slow_o,
  output logic          switch_o
);
  typedef enum logic {FAST, SLOW} dtm_state_e;
  dtm_state_e state, nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      FAST: if (enable_i && (|hot_i)) nxt = SLOW;
      SLOW: if (!enable_i || (&cool_i)) nxt = FAST;
      default: nxt = FAST;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= FAST;
      switch_o <= 1'b0;
    end else begin
      state    <= nxt;
      switch_o <= (nxt != state);
    end
  end

  assign slow_o = (state == SLOW);

endmodule
