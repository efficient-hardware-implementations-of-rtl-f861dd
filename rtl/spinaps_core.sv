// spinaps_core: SpinAPS neuro-synaptic core for first-to-spike inference of
// probabilistic (GLM) spiking networks with binary stimulus kernels.
//
// Inputs arrive as one spike vector of N_IN bits per algorithmic time step t
// (rate-coded Bernoulli spikes, produced outside the core) plus a sign bit
// per input neuron loaded at `start`. For each step the core computes, for
// all N_OUT output neurons at once,
//   u_i(t) = gamma_i + sum_j sum_{k=1..TAU} s_j(t-k) * w_{j,i,k}
// by reading one synaptic word line per array cycle (RD_CYC logic cycles,
// 5 by default for a 100 MHz array under 500 MHz logic): first the gamma line, then
// every kernel line j*TAU + (k-1) whose input spike s_j(t-k) is 1. The
// output neurons' probabilities come from a clipped piecewise-linear
// sigmoid; a neuron spikes when its probability exceeds an LFSR byte. The
// sample ends at the first output spike (its neuron is the class) or after T
// steps without one.
//
// Blocks: spike_window_gen (In. Regs + shared window mux), wl_addr_gen
// (word-line sequencer), stt_syn_mem (synaptic array), membrane_accum
// (18-bit adders per output neuron), spike_gen (shared PWL generators and
// comparators), lfsr16, fts_decoder, fanout_unit (destination packets of
// the output spikes, read from spare word lines) and spinaps_ctrl. The array organisation,
// widths and sharing factors are the document's; handshakes, the program
// port and the fixed-point scale (FRAC = 4 fractional bits by default; a
// reduced-precision core with B = 5 can use FRAC = 1 so that its weights
// span [-8, 8) in coarser steps) are this design's.
//
// Interface: program the memory through prog_* (word line prog_addr,
// neuron i in prog_data[i*B +: B], two's complement, FRAC fractional bits),
// optionally seed the LFSR, pulse `start` with in_sign, then hand over one
// spike vector per step with in_valid/in_ready. out_valid pulses with each
// step's out_spikes and out_t; `done` pulses at the end of the sample with
// decided / decision / decision_t valid until the next start. If the last
// step had spikes, the core then stays busy while it sends one packet
// (destination core, destination word line) per stored destination of
// every spiking neuron on pkt_valid / pkt_ready; busy falls after that.
// Timing per step: see spinaps_ctrl (about 20 cycles plus one cycle per
// active word line and per input neuron with an empty window).
module spinaps_core
  import spinaps_pkg::*;
#(
  parameter int unsigned N_IN      = spinaps_pkg::N_IN_D,
  parameter int unsigned N_OUT     = spinaps_pkg::N_OUT_D,
  parameter int unsigned B         = spinaps_pkg::B_D,
  parameter int unsigned TAU       = spinaps_pkg::TAU_D,
  parameter int unsigned T         = spinaps_pkg::T_D,
  parameter int unsigned ACC_W     = spinaps_pkg::ACC_W_D,
  parameter int unsigned PWL_SHARE = spinaps_pkg::PWL_SHARE_D,
  parameter int unsigned WL        = spinaps_pkg::WL_D,
  parameter int unsigned FRAC      = spinaps_pkg::FRAC_D,
  parameter int unsigned RD_CYC    = spinaps_pkg::RD_CYC_D,
  localparam int unsigned AW       = $clog2(WL),
  localparam int unsigned TW       = $clog2(T + 1),
  localparam int unsigned IW       = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  localparam int unsigned NW       = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // synaptic memory programming
  input  logic                 prog_we,
  input  logic [AW-1:0]        prog_addr,
  input  logic [N_OUT*B-1:0]   prog_data,
  // LFSR seed
  input  logic                 lfsr_seed_we,
  input  logic [15:0]          lfsr_seed,
  // sample control and input spikes
  input  logic                 start,
  input  logic [N_IN-1:0]      in_sign,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [N_IN-1:0]      in_spikes,
  // output spikes and decision
  output logic                 out_valid,
  output logic [N_OUT-1:0]     out_spikes,
  output logic [TW-1:0]        out_t,
  output logic                 done,
  output logic                 decided,
  output logic [IW-1:0]        decision,
  output logic [TW-1:0]        decision_t,
  output logic                 busy,
  // destination packets of the output spikes
  output logic                 pkt_valid,
  input  logic                 pkt_ready,
  output logic [11:0]          pkt_core,
  output logic [10:0]          pkt_wl
);

  if (N_IN * TAU >= WL) begin : g_bad_wl
    $error("spinaps_core: the kernels and the gamma line need more than WL word lines");
  end

  // ---------------------------------------------------------------- control
  ctrl_state_e   state;
  logic          hold_we, clear, shift_en, agen_start, agen_done;
  logic          sgen_start, sgen_done, fire, fo_start, fo_done;
  logic [TW-1:0] t, sel;

  spinaps_ctrl #(.T(T)) u_ctrl (
    .clk, .rst_n, .start, .in_valid, .in_ready, .hold_we, .clear, .shift_en,
    .t, .sel, .agen_start, .agen_done, .sgen_start, .sgen_done, .fire,
    .fo_start, .fo_done, .out_valid, .done, .busy, .state
  );

  // input spikes of the current step, held until they are shifted in
  logic [N_IN-1:0] hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       hold <= '0;
    else if (hold_we) hold <= in_spikes;
  end

  // ------------------------------------------------------- spike windows
  logic [NW-1:0]  nidx;
  logic [TAU-1:0] window;
  logic           neg;

  spike_window_gen #(.N_IN(N_IN), .T(T), .TAU(TAU)) u_win (
    .clk, .rst_n, .clear, .shift_en, .in_spikes(hold), .in_sign,
    .sel, .nidx, .window, .neg
  );

  // ------------------------------------------------ word-line sequencing
  logic          rd_en, rd_neg, rd_bias, agen_busy;
  logic [AW-1:0] rd_addr;

  wl_addr_gen #(.N_IN(N_IN), .TAU(TAU), .WL(WL), .RD_CYC(RD_CYC)) u_agen (
    .clk, .rst_n, .start(agen_start), .nidx, .window, .neg,
    .rd_en, .rd_addr, .rd_neg, .rd_bias, .busy(agen_busy), .done(agen_done)
  );

  // ------------------------------------------------------ synaptic array
  logic [N_OUT*B-1:0] rd_data;

  // the fan-out unit reads the array only while the sequencer is idle
  logic          fo_rd_en, mem_rd_en;
  logic [AW-1:0] fo_rd_addr, mem_rd_addr;
  assign mem_rd_en   = rd_en | fo_rd_en;
  assign mem_rd_addr = fo_rd_en ? fo_rd_addr : rd_addr;

  stt_syn_mem #(.WL(WL), .WIDTH(N_OUT * B)) u_mem (
    .clk, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data,
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  // read sideband, aligned with rd_data
  logic rd_en_q, rd_neg_q, rd_bias_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_en_q   <= 1'b0;
      rd_neg_q  <= 1'b0;
      rd_bias_q <= 1'b0;
    end else begin
      rd_en_q   <= rd_en;
      rd_neg_q  <= rd_neg;
      rd_bias_q <= rd_bias;
    end
  end

  // ------------------------------------------------ membrane potentials
  logic signed [ACC_W-1:0] u [N_OUT];

  membrane_accum #(.N_OUT(N_OUT), .B(B), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .valid(rd_en_q), .bias(rd_bias_q), .neg(rd_neg_q),
    .wdata(rd_data), .u
  );

  // --------------------------------------------------- spike generation
  logic [15:0] lfsr_q;
  logic        sgen_busy;

  lfsr16 u_lfsr (
    .clk, .rst_n, .en(sgen_busy), .seed_we(lfsr_seed_we), .seed(lfsr_seed),
    .q(lfsr_q)
  );

  spike_gen #(.N_OUT(N_OUT), .ACC_W(ACC_W), .PWL_SHARE(PWL_SHARE), .FRAC(FRAC)) u_sgen (
    .clk, .rst_n, .start(sgen_start), .u, .rnd(lfsr_q[15:8]),
    .spikes(out_spikes), .busy(sgen_busy), .done(sgen_done)
  );

  assign out_t = t;

  // --------------------------------------------------- first-to-spike
  fts_decoder #(.N_OUT(N_OUT), .TW(TW)) u_fts (
    .clk, .rst_n, .clear, .valid(out_valid), .spikes(out_spikes), .t,
    .fire, .decided, .decision, .decision_t
  );

  // ------------------------------------------------------ spike fan-out
  logic fo_busy;

  fanout_unit #(.N_OUT(N_OUT), .WIDTH(N_OUT * B), .WL(WL), .BASE_WL(N_IN * TAU + 1)) u_fo (
    .clk, .rst_n, .start(fo_start), .spikes(out_spikes),
    .rd_en(fo_rd_en), .rd_addr(fo_rd_addr), .rd_data,
    .pkt_valid, .pkt_ready, .pkt_core, .pkt_wl, .busy(fo_busy), .done(fo_done)
  );

  // ------------------------------------------------------- interface rules
  a_fo_in_route: assert property (@(posedge clk) disable iff (!rst_n)
    fo_busy |-> state == S_ROUTE);
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_en && fo_rd_en));
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready && busy && state == S_WAIT |=> in_valid);
  a_no_prog_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    prog_we |-> !busy);
  a_one_read_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> agen_busy);

endmodule
