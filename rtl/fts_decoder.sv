// fts_decoder: first-to-spike decision.
//
// The class of a sample is the output neuron that spikes first. For every
// time step whose output spikes arrive with `valid`, the unit checks whether
// any neuron spiked; the first such step of the sample sets `decided`,
// stores the step and the neuron. When several neurons spike in the same
// step the lowest index is taken (a priority encoder); the document does not
// say how a tie is broken, so that rule is this design's choice. `clear`
// starts a new sample.
//
// Timing: `fire` is combinational (some neuron spiked in this valid step);
// decided, decision and decision_t update on the clock edge and hold until
// clear.
module fts_decoder #(
  parameter int unsigned N_OUT = spinaps_pkg::N_OUT_D,
  parameter int unsigned TW    = 4,
  localparam int unsigned IW   = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic [N_OUT-1:0] spikes,
  input  logic [TW-1:0]    t,
  output logic             fire,
  output logic             decided,
  output logic [IW-1:0]    decision,
  output logic [TW-1:0]    decision_t
);

  logic [IW-1:0] first;

  always_comb begin
    first = '0;
    for (int i = N_OUT - 1; i >= 0; i--) if (spikes[i]) first = IW'(i);
  end

  assign fire = valid && (spikes != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decided    <= 1'b0;
      decision   <= '0;
      decision_t <= '0;
    end else if (clear) begin
      decided    <= 1'b0;
      decision   <= '0;
      decision_t <= '0;
    end else if (fire && !decided) begin
      decided    <= 1'b1;
      decision   <= first;
      decision_t <= t;
    end
  end

endmodule
