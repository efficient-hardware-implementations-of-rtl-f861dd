// spike_window_gen: input spike registers and the shared spike window mux.
//
// Every input neuron owns a T-bit serial-in, parallel-out register (In. Reg).
// When shift_en is high the spike of the current time step enters bit 0 of
// each register and older spikes move up, so bit k holds the spike from k+1
// steps before the step being computed. One multiplexer, shared by all input
// neurons because they are visited one at a time, picks the register of
// neuron nidx and keeps the TAU most recent bits, but only the first `sel`
// of them: the controller drives sel = t-1, the number of steps that have
// already delivered spikes. Bit k of `window` is therefore the spike at
// t-1-k, i.e. the read enable of kernel word line k of that neuron, or zero
// when t-1-k < 1. This follows the document (In. Reg, shared mux selected by
// the controller for every t); the bit order and the clear input are this
// design's choices. For inputs whose sign matters (features in [-1, 1]) a
// sign register per input neuron is loaded on clear from in_sign; `neg`
// gives the sign of neuron nidx so that its weights can be negated.
//
// Timing: clear and shift_en act on the rising clock edge (clear wins);
// window is combinational from nidx, sel and the registers.
module spike_window_gen #(
  parameter int unsigned N_IN = spinaps_pkg::N_IN_D,
  parameter int unsigned T    = spinaps_pkg::T_D,
  parameter int unsigned TAU  = spinaps_pkg::TAU_D,
  localparam int unsigned NW  = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned SW  = $clog2(T + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              shift_en,
  input  logic [N_IN-1:0]   in_spikes,
  input  logic [N_IN-1:0]   in_sign,
  input  logic [SW-1:0]     sel,
  input  logic [NW-1:0]     nidx,
  output logic [TAU-1:0]    window,
  output logic              neg
);

  if (TAU > T) begin : g_bad_tau
    $error("spike_window_gen: TAU must not exceed T");
  end

  logic [T-1:0]    in_reg [N_IN];
  logic [N_IN-1:0] sign_reg;   // 1: input of that neuron is negative

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) in_reg[i] <= '0;
      sign_reg <= '0;
    end else if (clear) begin
      for (int i = 0; i < N_IN; i++) in_reg[i] <= '0;
      sign_reg <= in_sign;
    end else if (shift_en) begin
      for (int i = 0; i < N_IN; i++) in_reg[i] <= {in_reg[i][T-2:0], in_spikes[i]};
    end
  end

  // Shared multiplexer
  logic [T-1:0] sel_reg;
  always_comb begin
    sel_reg = in_reg[nidx];
    neg     = sign_reg[nidx];
    for (int k = 0; k < TAU; k++) begin
      window[k] = (32'(k) < 32'(sel)) ? sel_reg[k] : 1'b0;
    end
  end

endmodule
