// spinaps_pkg: constants and types shared by the SpinAPS neuro-synaptic core.
//
// The core implements first-to-spike inference for a two-layer probabilistic
// spiking network of Generalized Linear Model (GLM) neurons with binary
// stimulus kernels. The default sizes are the baseline configuration: 256
// input and 256 output neurons, 8-bit synapses, a spike integration window of
// tau = 7 within a presentation of T = 8 time steps, 18-bit membrane
// potentials and a 2048 x 2048-bit synaptic array. The fixed-point format
// (4 fractional bits) and the controller states are this design's own choice.
package spinaps_pkg;

  // Baseline sizes
  localparam int unsigned N_IN_D      = 256;  // input (presynaptic) neurons
  localparam int unsigned N_OUT_D     = 256;  // output neurons
  localparam int unsigned B_D         = 8;    // synapse precision (bits, incl. sign)
  localparam int unsigned TAU_D       = 7;    // spike integration window
  localparam int unsigned T_D         = 8;    // presentation time (time steps)
  localparam int unsigned ACC_W_D     = 18;   // membrane potential width
  localparam int unsigned PWL_SHARE_D = 16;   // output neurons per PWL generator
  localparam int unsigned WL_D        = 2048; // word lines of the synaptic array
  localparam int unsigned LFSR_W_D    = 16;   // LFSR width

  // Fixed point: weights, bias and membrane potential share one scale with
  // FRAC_D fractional bits; the clipped potential is Q3.4 in [-8, 8).
  localparam int unsigned FRAC_D      = 4;
  // logic clock cycles per array read: 500 MHz logic, 100 MHz array.
  localparam int unsigned RD_CYC_D    = 5;

  // Controller states
  typedef enum logic [2:0] {
    S_IDLE,   // waiting for start
    S_WAIT,   // waiting for the input spike vector of step t
    S_SCAN,   // gamma line, then the active kernel word lines, one per array cycle
    S_DRAIN,  // last read leaves the memory / accumulator pipeline
    S_FIRE,   // PWL generators walk their PWL_SHARE neurons; decision
    S_ROUTE   // destinations of the output spikes are looked up and sent
  } ctrl_state_e;

endpackage
