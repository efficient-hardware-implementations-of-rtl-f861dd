// tb_spinaps_core: end-to-end test of the SpinAPS core at its default size
// (256 x 256 neurons, 8-bit synapses, T = 8, tau = 7, 2048 word lines).
//
// The testbench programs the synaptic array, seeds the LFSR and runs several
// samples. An independent reference model computes, for every time step, the
// membrane potentials from Eq. 5.1 (binary kernels), the clipped PWL sigmoid
// in real arithmetic, the LFSR bytes and the resulting output spikes, the
// first-to-spike decision and the exact number of cycles from accepting an
// input vector to its out_valid (19 + number of word-line visits + 4 wait
// cycles per array read). Every
// mechanism of the core is counted and must occur at least once: steps with
// only the bias, empty windows, negated inputs, clipping at both ends, early
// decisions, ties, samples without any spike, input stalls, LFSR reseed,
// and the destination packets sent for the spikes that end a sample
// (including back-pressure and entries marked as no destination).
module tb_spinaps_core;
  import spinaps_pkg::*;

  localparam int N_IN = N_IN_D, N_OUT = N_OUT_D, B = B_D, TAU = TAU_D, T = T_D;
  localparam int WL = WL_D, AW = $clog2(WL_D), TW = $clog2(T_D + 1), SH = PWL_SHARE_D;
  localparam int GAMMA = N_IN * TAU, RD_CYC = RD_CYC_D;

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
  localparam int FO_BASE = GAMMA + 1, ENT_W = 23, NEUR_W = 4 * ENT_W, PER_LINE = N_OUT * B_D / NEUR_W;
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

  spinaps_core dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
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
    xr = real'(c) / 16.0;
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

  // kind 0: random weights in [lo, hi], gamma in [glo, ghi]
  task automatic program_mem(input int lo, input int hi, input int glo, input int ghi);
    logic [N_OUT*B-1:0] d;
    for (int l = 0; l <= GAMMA; l++) begin
      for (int i = 0; i < N_OUT; i++) begin
        int v;
        if (l == GAMMA) v = glo + int'($urandom_range(ghi - glo));
        else            v = lo + int'($urandom_range(hi - lo));
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

  task automatic run_sample(input int density_pct, input logic [N_IN-1:0] sign);
    logic [N_OUT-1:0] sp;
    int visits;
    longint t_acc;
    int exp_dec = -1, exp_dt = 0, last_t = 0;
    for (int t = 1; t <= T; t++)
      for (int j = 0; j < N_IN; j++) x[t][j] = ($urandom_range(99) < density_pct);
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

    // 1) random network, gamma low so that decisions take a few steps
    program_mem(-3, 4, -128, -100);
    program_dest(0);
    seed(16'h1234);
    for (int s = 0; s < 8; s++) run_sample(5 + 5 * s, N_IN'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}));

    // 2) silent network: all weights -1, gamma -8.0
    program_mem(-1, -1, -128, -128);
    seed(16'hBEEF);
    run_sample(50, '0);
    // same network with every input negated: weights add up, all neurons fire
    run_sample(100, '1);

    // 3) strongly driven random network (clipping at both ends)
    program_mem(-128, 127, -128, 127);
    seed(16'h0001);
    run_sample(30, '0);
    run_sample(30, '1);

    $display("mechanisms: bias_only=%0d empty_windows=%0d negated_reads=%0d clip_hi=%0d clip_lo=%0d",
             n_bias_only, n_empty, n_neg, n_clip_hi, n_clip_lo);
    $display("            decided=%0d early=%0d ties=%0d silent=%0d stalls=%0d reseeds=%0d",
             n_decided, n_early, n_tie, n_silent, n_stall, n_reseed);
    $display("            packets=%0d packet_stalls=%0d empty_destinations=%0d", n_pkts, n_pkt_stall, n_no_dest);
    check(n_pkts > 0, "no packet");
    check(n_pkt_stall > 0, "no packet stall");
    check(n_no_dest > 0, "no empty destination");
    check(n_bias_only > 0, "no bias-only step");
    check(n_empty > 0, "no empty window");
    check(n_neg > 0, "no negated input");
    check(n_clip_hi > 0, "no clip high");
    check(n_clip_lo > 0, "no clip low");
    check(n_early > 0, "no early decision");
    check(n_tie > 0, "no tie");
    check(n_silent > 0, "no silent sample");
    check(n_stall > 0, "no stall");
    check(n_reseed > 0, "no reseed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
