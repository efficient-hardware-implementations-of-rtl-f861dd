// tb_fanout_unit: a model memory behind the unit's read port holds random
// destination entries (some marked "no destination"). For random spike
// vectors the packets must come out lowest neuron first, entry 0 first,
// skipping empty entries, hold steady under back-pressure, and `done` must
// pulse once at the end (one cycle after start for an empty vector).
module tb_fanout_unit;
  localparam int N_OUT = 32, WIDTH = 256, WL = 64, BASE = 40;
  localparam int ENT_W = 23, NEUR_W = 4 * ENT_W, PER_LINE = WIDTH / NEUR_W;
  localparam int AW = $clog2(WL);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, rd_en, pkt_valid, pkt_ready = 0, busy, done;
  logic [N_OUT-1:0] spikes = '0;
  logic [AW-1:0] rd_addr;
  logic [WIDTH-1:0] rd_data;
  logic [11:0] pkt_core;
  logic [10:0] pkt_wl;

  fanout_unit #(.N_OUT(N_OUT), .WIDTH(WIDTH), .WL(WL), .BASE_WL(BASE), .RD_CYC(3)) dut (.*);

  logic [WIDTH-1:0] mem [WL];
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    for (int l = 0; l < WL; l++)
      for (int b = 0; b < WIDTH; b += 32) mem[l][b +: 32] = $urandom;
    for (int l = BASE; l < WL; l++)
      for (int p = 0; p < PER_LINE; p++)
        for (int e = 0; e < 4; e++)
          if ($urandom_range(3) == 0) mem[l][p*NEUR_W + e*ENT_W +: 11] = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 60; rep++) begin
      automatic logic [22:0] exp_q [$];
      automatic int got = 0, dones = 0;
      logic [11:0] hc;
      logic [10:0] hw;
      bit held = 0;
      spikes = (rep % 10 == 0) ? '0 : N_OUT'($urandom & $urandom);
      for (int n = 0; n < N_OUT; n++) if (spikes[n])
        for (int e = 0; e < 4; e++) begin
          logic [22:0] ent;
          ent = mem[BASE + n / PER_LINE][(n % PER_LINE) * NEUR_W + e * ENT_W +: ENT_W];
          if (ent[10:0] != 11'h7FF) exp_q.push_back(ent);
        end
      start = 1;
      @(negedge clk);
      start = 0;
      spikes = N_OUT'($urandom);   // must have been latched
      for (int c = 0; c < 2000; c++) begin
        if (done) dones++;
        if (held) chk(pkt_valid && pkt_core == hc && pkt_wl == hw, "packet held under back-pressure");
        pkt_ready = 1'($urandom);
        held = pkt_valid && !pkt_ready;
        hc = pkt_core; hw = pkt_wl;
        if (pkt_valid && pkt_ready) begin
          chk(got < exp_q.size() && {pkt_core, pkt_wl} == exp_q[got], $sformatf("packet %0d", got));
          got++;
        end
        if (!busy && c > 0) break;
        @(negedge clk);
      end
      chk(got == exp_q.size(), $sformatf("rep %0d: %0d packets, expected %0d", rep, got, exp_q.size()));
      chk(dones == 1, $sformatf("rep %0d: done pulsed %0d times", rep, dones));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
