// spinaps_run_harness: drives one SpinAPS core of any size through a set of
// rate-coded samples and checks it against a reference model (potentials
// from the binary-kernel GLM equation, the clipped piecewise-linear sigmoid
// in real arithmetic, the shared LFSR, the first-to-spike decision and the
// exact cycle count of every step). Only the first N_CLASS output neurons
// carry a random network (weights in [W_LO, W_HI], gamma in [G_LO, G_HI],
// in steps of 2^-FRAC); the others get zero weights and the most negative
// gamma of B bits, which keeps them silent at B = 8. Inputs are rate coded: each input neuron gets
// an intensity in [0, 1] (a fraction of them zero, as in images), spikes
// with that probability each step, and is negative with probability
// NEG_PCT percent. Used by tb_spinaps_workloads; reports checks, failures,
// the mean number of word-line visits per step and the mean cycles per step.
module spinaps_run_harness #(
  parameter string NAME     = "core",
  parameter int    N_IN     = 784,
  parameter int    N_OUT    = 16,
  parameter int    N_CLASS  = 10,
  parameter int    TAU      = 8,
  parameter int    T        = 8,
  parameter int    WL       = 8192,
  parameter int    SAMPLES  = 6,
  parameter int    ZERO_PCT = 50,
  parameter int    NEG_PCT  = 0,
  parameter int    B        = spinaps_pkg::B_D,
  parameter int    FRAC     = spinaps_pkg::FRAC_D,
  parameter int    RD_CYC   = spinaps_pkg::RD_CYC_D,
  parameter int    W_LO     = -3,
  parameter int    W_HI     = 4,
  parameter int    G_LO     = -128,
  parameter int    G_HI     = -90
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import spinaps_pkg::*;

  localparam int AW = $clog2(WL), TW = $clog2(T + 1), SH = PWL_SHARE_D;
  localparam int GAMMA = N_IN * TAU;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 prog_we = 0;
  logic [AW-1:0]        prog_addr = '0;
  logic [N_OUT*B-1:0]   prog_data = '0;
  logic                 lfsr_seed_we = 0;
  logic [15:0]          lfsr_seed = '0;
  logic                 start = 0;
  logic [N_IN-1:0]      in_sign = '0;
  logic                 in_valid = 0;
  logic                 in_ready;
  logic [N_IN-1:0]      in_spikes = '0;
  logic                 out_valid, done, decided, busy;
  logic [N_OUT-1:0]     out_spikes;
  logic [TW-1:0]        out_t, decision_t;
  logic [$clog2(N_OUT)-1:0] decision;
  logic                 pkt_valid, pkt_ready = 1;
  logic [11:0]          pkt_core;
  logic [10:0]          pkt_wl;
  int                   n_pkts = 0, n_pkt_stall = 0, n_no_dest = 0;
  localparam int FO_BASE = GAMMA + 1, ENT_W = 23, NEUR_W = 4 * ENT_W, PER_LINE = N_OUT * B / NEUR_W;
  localparam int FO_LINES = (N_OUT + PER_LINE - 1) / PER_LINE;

  // destination entries of every neuron; fill = all ones gives "no destination"
  task automatic program_dest(input bit none);
    logic [N_OUT*B-1:0] d;
    for (int l = 0; l < FO_LINES; l++) begin
      d = '1;
      if (!none)
        for (int p = 0; p < PER_LINE; p++)
          for (int e = 0; e < 4; e++) begin
            logic [22:0] ent;
            ent = {12'($urandom), 11'($urandom_range(2047))};
            if ($urandom_range(4) == 0) ent[10:0] = '1;
            d[p*NEUR_W + e*ENT_W +: ENT_W] = ent;
          end
      program_line(FO_BASE + l, d);
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  // packets expected for the spikes of the last step, lowest neuron first
  task automatic collect_packets(input logic [N_OUT-1:0] sp);
    logic [22:0] exp_q [$];
    int got = 0;
    for (int n = 0; n < N_OUT; n++) if (sp[n])
      for (int e = 0; e < 4; e++) begin
        logic [22:0] ent;
        ent = ref_mem[FO_BASE + n / PER_LINE][(n % PER_LINE) * NEUR_W + e * ENT_W +: ENT_W];
        if (ent[10:0] != 11'h7FF) exp_q.push_back(ent);
        else n_no_dest++;
      end
    while (busy) begin
      pkt_ready = ($urandom_range(3) != 0);
      if (pkt_valid && !pkt_ready) n_pkt_stall++;
      if (pkt_valid && pkt_ready) begin
        check(got < exp_q.size() && {pkt_core, pkt_wl} == exp_q[got],
              $sformatf("packet %0d = %h/%h", got, pkt_core, pkt_wl));
        got++;
      end
      @(negedge clk);
    end
    pkt_ready = 1;
    n_pkts += got;
    check(got == exp_q.size(), $sformatf("%0d packets, expected %0d", got, exp_q.size()));
  endtask

  spinaps_core #(.N_IN(N_IN), .N_OUT(N_OUT), .B(B), .FRAC(FRAC), .RD_CYC(RD_CYC), .TAU(TAU), .T(T), .WL(WL)) dut (.*);

  initial begin finished = 0; checks = 0; failures = 0; end
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s FAIL @%0d: %s", NAME, cyc, what);
    end
  endtask

  // ------------------------------------------------------ reference model
  logic [N_OUT*B-1:0] ref_mem [WL];
  logic [N_IN-1:0]    x [1:T];
  logic [15:0]        ref_lfsr;

  // mechanism counters
  int n_bias_only = 0, n_empty = 0, n_neg = 0, n_clip_hi = 0, n_clip_lo = 0;
  int n_early = 0, n_tie = 0, n_silent = 0, n_stall = 0, n_reseed = 0, n_decided = 0;

  int dbg_u [N_OUT]; logic [7:0] dbg_r [N_OUT];
  function automatic int wgt(int line, int i);
    logic signed [B-1:0] w;
    w = ref_mem[line][i*B +: B];
    return int'(w);
  endfunction

  function automatic int pwl_ref(int u);
    int c;
    real xr, m, f, y;
    int ineg;
    c = (u > 127) ? 127 : (u < -128) ? -128 : u;
    xr = real'(c) / (2.0 ** FRAC);
    m = (xr < 0) ? -xr : xr;
    f = m - $floor(m);
    y = (0.5 - f / 4.0) / (2.0 ** $floor(m));
    ineg = int'($floor(256.0 * y));
    if (c <= 0) return ineg;
    return (256 - ineg > 255) ? 255 : 256 - ineg;
  endfunction

  function automatic logic [15:0] lfsr_next(logic [15:0] q);
    return {q[14:0], q[15] ^ q[13] ^ q[12] ^ q[10]};
  endfunction

  // expected spikes of step t; visits = word-line visits of the scan
  int n_reads;  // array reads of the step, gamma included
  task automatic model_step(input int t, output logic [N_OUT-1:0] sp, output int visits);
    int u [N_OUT];
    logic [7:0] rnd [SH];
    visits = 0;
    n_reads = 1;
    for (int i = 0; i < N_OUT; i++) u[i] = wgt(GAMMA, i);
    for (int j = 0; j < N_IN; j++) begin
      int cnt = 0;
      for (int k = 0; k < TAU; k++) begin
        int ts = t - 1 - k;
        if (ts >= 1 && x[ts][j]) begin
          cnt++;
          if (in_sign[j]) n_neg++;
          for (int i = 0; i < N_OUT; i++)
            u[i] += in_sign[j] ? -wgt(j*TAU + k, i) : wgt(j*TAU + k, i);
        end
      end
      n_reads += cnt;
      if (cnt == 0) n_empty++;
      visits += (cnt == 0) ? 1 : cnt;
    end
    if (visits == N_IN) n_bias_only++;
    for (int c = 0; c < SH; c++) begin
      rnd[c] = ref_lfsr[15:8];
      ref_lfsr = lfsr_next(ref_lfsr);
    end
    for (int i = 0; i < N_OUT; i++) begin
      if (u[i] > 127) n_clip_hi++;
      if (u[i] < -128) n_clip_lo++;
      sp[i] = pwl_ref(u[i]) > int'(rnd[i % SH]);
      dbg_u[i] = u[i]; dbg_r[i] = rnd[i % SH];
    end
  endtask

  // ------------------------------------------------------------ drivers
  // Inputs change at the falling edge; the design samples them at the rising one.
  task automatic program_line(input int line, input logic [N_OUT*B-1:0] d);
    @(negedge clk);
    prog_we   = 1;
    prog_addr = AW'(line);
    prog_data = d;
    ref_mem[line] = d;
  endtask

  // random network on the first N_CLASS outputs, silent others
  task automatic program_mem(input int lo, input int hi, input int glo, input int ghi);
    logic [N_OUT*B-1:0] d;
    for (int l = 0; l <= GAMMA; l++) begin
      for (int i = 0; i < N_OUT; i++) begin
        int v;
        if (i >= N_CLASS)   v = (l == GAMMA) ? -(1 << (B - 1)) : 0;
        else if (l == GAMMA) v = glo + int'($urandom_range(ghi - glo));
        else                 v = lo + int'($urandom_range(hi - lo));
        d[i*B +: B] = B'(v);
      end
      program_line(l, d);
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic seed(input logic [15:0] s);
    @(negedge clk);
    lfsr_seed_we = 1;
    lfsr_seed    = s;
    @(negedge clk);
    lfsr_seed_we = 0;
    ref_lfsr = s;
    n_reseed++;
  endtask

  longint tot_visits = 0, tot_cycles = 0, tot_steps = 0;

  task automatic run_sample();
    logic [N_OUT-1:0] sp;
    logic [N_IN-1:0] sign;
    int visits;
    longint t_acc;
    int exp_dec = -1, exp_dt = 0, last_t = 0;
    int inten [N_IN];
    for (int j = 0; j < N_IN; j++) begin
      inten[j] = ($urandom_range(99) < ZERO_PCT) ? 0 : int'($urandom_range(1000));
      sign[j]  = ($urandom_range(99) < NEG_PCT);
    end
    for (int t = 1; t <= T; t++)
      for (int j = 0; j < N_IN; j++) x[t][j] = (int'($urandom_range(999)) < inten[j]);
    @(negedge clk);
    in_sign = sign;
    start   = 1;
    @(negedge clk);
    start   = 0;
    for (int t = 1; t <= T; t++) begin
      // occasional stall: the core waits with in_ready high
      if ($urandom_range(3) == 0) begin
        repeat (2) @(negedge clk);
        if (in_ready) n_stall++;
      end
      in_valid  = 1;
      in_spikes = x[t];
      while (!in_ready) @(negedge clk);
      t_acc = cyc;
      @(negedge clk);
      in_valid = 0;
      model_step(t, sp, visits);
      while (!out_valid) @(negedge clk);
      tot_visits += visits; tot_cycles += cyc - t_acc; tot_steps++;
      check(cyc - t_acc == longint'(19 + visits + (RD_CYC - 1) * n_reads),
            $sformatf("step %0d latency %0d expected %0d", t, cyc - t_acc, 19 + visits + (RD_CYC - 1) * n_reads));
      check(out_spikes == sp, $sformatf("step %0d spikes differ", t));
      for (int i = 0; i < N_OUT; i++) if (out_spikes[i] != sp[i]) $display("  n%0d dut=%b u=%0d ref=%b u=%0d p=%0d r=%0d", i, out_spikes[i], dut.u[i], sp[i], dbg_u[i], pwl_ref(dbg_u[i]), dbg_r[i]);
      check(int'(out_t) == t, "out_t");
      last_t = t;
      if (sp != '0) begin
        for (int i = N_OUT - 1; i >= 0; i--) if (sp[i]) exp_dec = i;
        exp_dt = t;
        if ($countones(sp) > 1) n_tie++;
        if (t < T) n_early++;
      end
      check(done == (sp != '0 || t == T), $sformatf("done at step %0d", t));
      if (done) begin
        @(negedge clk);
        if (sp != '0) collect_packets(sp);
        else for (int w = 0; w < 20000 && busy; w++) @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    check(!busy, "busy after done");
    if (exp_dec < 0) begin
      n_silent++;
      check(!decided, "decided without spike");
    end else begin
      n_decided++;
      check(decided && int'(decision) == exp_dec && int'(decision_t) == exp_dt,
            $sformatf("decision %0d@%0d expected %0d@%0d", decision, decision_t, exp_dec, exp_dt));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_mem(W_LO, W_HI, G_LO, G_HI);
    program_dest(0);
    seed(16'h5A5A);
    for (int n = 0; n < SAMPLES; n++) run_sample();
    $display("%s: %0d samples, decided=%0d early=%0d silent=%0d, %0d steps, mean word-line visits/step=%0d, mean cycles/step=%0d",
             NAME, SAMPLES, n_decided, n_early, n_silent, tot_steps,
             tot_visits / (tot_steps > 0 ? tot_steps : 1), tot_cycles / (tot_steps > 0 ? tot_steps : 1));
    check(n_decided > 0, "no sample decided");
    check(n_bias_only > 0, "no bias-only step");
    check(NEG_PCT == 0 || n_neg > 0, "no negated input");
    finished = 1;
  end

endmodule
