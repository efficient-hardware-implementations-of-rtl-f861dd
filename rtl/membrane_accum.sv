// membrane_accum: membrane potential accumulators of the output neurons.
//
// One ACC_W-bit signed adder and register per output neuron, fed in
// parallel from one synaptic word line: u_i = gamma_i + sum of w_ji over the
// active word lines (Eq. 5.1 with binary kernels). A word flagged `bias`
// loads the registers with the sign-extended gamma values; every other word
// adds its sign-extended weights, negated when `neg` is set (an input
// neuron whose feature is negative). Weights are two's-complement B-bit
// numbers with the same fixed-point scale as u. The 18-bit adder, the
// per-neuron adders and the sign flip follow the document; two's complement
// and negation for the sign flip are this design's choices.
//
// Timing: `valid` qualifies wdata for one cycle; the registers update on
// that clock edge, so u reflects a word one cycle after it is presented.
// Sums wrap at ACC_W bits (18 bits hold 2048 reads of 8-bit weights, more
// than the 1793 lines a step can read, so no wrap occurs at the defaults).
module membrane_accum #(
  parameter int unsigned N_OUT = spinaps_pkg::N_OUT_D,
  parameter int unsigned B     = spinaps_pkg::B_D,
  parameter int unsigned ACC_W = spinaps_pkg::ACC_W_D
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic                    bias,
  input  logic                    neg,
  input  logic [N_OUT*B-1:0]      wdata,
  output logic signed [ACC_W-1:0] u [N_OUT]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) u[i] <= '0;
    end else if (valid) begin
      for (int i = 0; i < N_OUT; i++) begin
        logic signed [ACC_W-1:0] w;
        w = ACC_W'($signed(wdata[i*B +: B]));
        if (bias)     u[i] <= w;
        else if (neg) u[i] <= u[i] - w;
        else          u[i] <= u[i] + w;
      end
    end
  end

endmodule
