// spike_gen: probabilistic output spike generation.
//
// N_OUT / PWL_SHARE piecewise-linear sigmoid generators are each shared by
// PWL_SHARE output neurons. After `start` the unit takes PWL_SHARE cycles;
// in cycle c generator g serves neuron g*PWL_SHARE + c: it clips that
// neuron's membrane potential, computes its 8-bit spike probability and
// issues a spike when the probability is greater than the 8-bit random
// number `rnd` taken from the shared LFSR in that cycle. The sharing factor
// of 16, the comparison with 8 LFSR bits and the "greater than" rule follow
// the document; the neuron-to-generator assignment and using the same random
// byte for all generators in a cycle are this design's choices.
//
// Timing: `start` pulses for one cycle; the generators work in the
// PWL_SHARE cycles that follow; `done` pulses in the cycle after the last
// one, when `spikes` (registered, cleared by start) is complete.
module spike_gen #(
  parameter int unsigned N_OUT     = spinaps_pkg::N_OUT_D,
  parameter int unsigned ACC_W     = spinaps_pkg::ACC_W_D,
  parameter int unsigned FRAC      = spinaps_pkg::FRAC_D,
  parameter int unsigned PWL_SHARE = spinaps_pkg::PWL_SHARE_D,
  localparam int unsigned NG       = N_OUT / PWL_SHARE,
  localparam int unsigned CW       = (PWL_SHARE > 1) ? $clog2(PWL_SHARE) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] u [N_OUT],
  input  logic [7:0]              rnd,
  output logic [N_OUT-1:0]        spikes,
  output logic                    busy,
  output logic                    done
);

  if (NG * PWL_SHARE != N_OUT) begin : g_bad_share
    $error("spike_gen: N_OUT must be a multiple of PWL_SHARE");
  end

  logic          active;
  logic [CW-1:0] c;
  logic [7:0]    prob [NG];

  for (genvar g = 0; g < NG; g++) begin : g_pwl
    logic signed [ACC_W-1:0] u_sel;
    assign u_sel = u[g * PWL_SHARE + int'(c)];
    pwl_sigmoid #(.ACC_W(ACC_W), .FRAC(FRAC)) u_pwl (
      .u(u_sel), .u_clip(), .prob(prob[g])
    );
  end

  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      c      <= '0;
      spikes <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        c      <= '0;
        spikes <= '0;
      end else if (active) begin
        for (int g = 0; g < NG; g++) spikes[g * PWL_SHARE + int'(c)] <= (prob[g] > rnd);
        if (c == CW'(PWL_SHARE - 1)) begin
          active <= 1'b0;
          c      <= '0;
          done   <= 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

endmodule
