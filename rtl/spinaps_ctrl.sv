// spinaps_ctrl: controller of the SpinAPS core.
//
// Runs one sample of first-to-spike inference. `start` clears the input
// spike registers, the accumulators' decision state and sets t = 1. Each
// time step t then goes through:
//   S_WAIT  accept the input spike vector x_t (in_valid / in_ready);
//   S_SCAN  the address sequencer reads gamma and every active kernel word
//           line, the accumulators build u_t from the spikes of steps
//           t-TAU .. t-1 (sel = t-1 tells the window mux how many exist);
//   S_DRAIN one cycle for the last read to reach the accumulators; the
//           spike generator is started;
//   S_FIRE  the shared PWL generators issue the output spikes; when they are
//           complete out_valid pulses. If a neuron fired, or t = T, the
//           sample ends (done); otherwise x_t is shifted into the input
//           registers, t advances and the next step begins;
//   S_ROUTE after a step with output spikes, the fan-out unit looks up and
//           sends their destination packets; the core is idle after it.
// The document gives the steps (read active lines, accumulate, sigmoid,
// compare with the LFSR, stop at the first spike) and says the controller
// drives the window mux select for every t; the state sequence and the
// handshakes are this design's choices. x_t only affects steps after t, as
// in the membrane potential of Eq. 5.1, so the last input vector of a
// presentation is accepted but never used.
//
// Timing: one step takes 1 (accept) + 1 (gamma) + sum_j max(1, popcount
// window_j) + 1 (drain) + PWL_SHARE + 1 cycles, plus RD_CYC - 1 wait
// cycles per array read when the array is slower than the logic.
module spinaps_ctrl
  import spinaps_pkg::*;
#(
  parameter int unsigned T         = spinaps_pkg::T_D,
  localparam int unsigned TW       = $clog2(T + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          hold_we,     // latch x_t
  output logic          clear,       // new sample
  output logic          shift_en,    // x_t into the input registers
  output logic [TW-1:0] t,
  output logic [TW-1:0] sel,
  output logic          agen_start,
  input  logic          agen_done,
  output logic          sgen_start,
  input  logic          sgen_done,
  input  logic          fire,        // some output neuron spiked (valid with sgen_done)
  output logic          fo_start,    // send the destinations of this step's spikes
  input  logic          fo_done,
  output logic          out_valid,
  output logic          done,
  output logic          busy,
  output ctrl_state_e   state
);

  always_comb begin
    in_ready   = (state == S_WAIT);
    hold_we    = in_ready && in_valid;
    agen_start = hold_we;
    clear      = (state == S_IDLE) && start;
    sgen_start = (state == S_DRAIN);
    out_valid  = (state == S_FIRE) && sgen_done;
    done       = out_valid && (fire || t == TW'(T));
    shift_en   = out_valid && !done;
    fo_start   = out_valid && fire;
    sel        = t - 1'b1;
    busy       = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t     <= TW'(1);
    end else begin
      unique case (state)
        S_IDLE:  if (start) begin
                   state <= S_WAIT;
                   t     <= TW'(1);
                 end
        S_WAIT:  if (in_valid) state <= S_SCAN;
        S_SCAN:  if (agen_done) state <= S_DRAIN;
        S_DRAIN: state <= S_FIRE;
        S_FIRE:  if (sgen_done) begin
                   if (fire)      state <= S_ROUTE;
                   else if (done) state <= S_IDLE;
                   else begin
                     state <= S_WAIT;
                     t     <= t + 1'b1;
                   end
                 end
        S_ROUTE: if (fo_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Sequencing rules
  a_fo_done_in_route: assert property (@(posedge clk) disable iff (!rst_n)
    fo_done |-> state == S_ROUTE);
  a_done_in_scan: assert property (@(posedge clk) disable iff (!rst_n)
    agen_done |-> state == S_SCAN);
  a_t_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (t >= TW'(1) && t <= TW'(T)));

endmodule
