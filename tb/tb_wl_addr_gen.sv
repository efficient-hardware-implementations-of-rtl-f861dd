// tb_wl_addr_gen: checks the word-line read sequence. A model window per
// input neuron is served combinationally on nidx; the expected sequence is
// the gamma line, then for each neuron in order the lines j*TAU+k of its set
// window bits, lowest k first, with the neuron's sign. Also checks the
// exact scan length (1 + sum of max(1, popcount) + (RD_CYC-1) per read),
// that reads are RD_CYC cycles apart, and the done pulse. RD_CYC = 3 here.
module tb_wl_addr_gen;
  localparam int N_IN = 12, TAU = 7, WL = 128, AW = $clog2(WL), GAMMA = N_IN * TAU, RD_CYC = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, neg, rd_en, rd_neg, rd_bias, busy, done;
  logic [$clog2(N_IN)-1:0] nidx;
  logic [TAU-1:0] window;
  logic [AW-1:0] rd_addr;

  wl_addr_gen #(.N_IN(N_IN), .TAU(TAU), .WL(WL), .RD_CYC(RD_CYC)) dut (.*);

  logic [TAU-1:0] win [N_IN];
  logic [N_IN-1:0] sgn;
  assign window = win[nidx];
  assign neg = sgn[nidx];

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      automatic int exp_addr [$];
      automatic bit exp_neg [$];
      automatic int visits = 0, cycles = 0, got = 0, last_rd = 0;
      for (int j = 0; j < N_IN; j++) begin
        win[j] = (rep == 0) ? '0 : (rep == 1) ? '1 : TAU'($urandom & $urandom);
        sgn[j] = 1'($urandom);
        visits += (win[j] == 0) ? 1 : $countones(win[j]);
        for (int k = 0; k < TAU; k++) if (win[j][k]) begin
          exp_addr.push_back(j * TAU + k);
          exp_neg.push_back(sgn[j]);
        end
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      // gamma first
      chk(rd_en && rd_bias && int'(rd_addr) == GAMMA, "gamma read first");
      @(negedge clk);
      forever begin
        cycles++;
        if (rd_en) begin
          chk(!rd_bias, "bias flag only on gamma");
          chk(cycles - last_rd >= RD_CYC, $sformatf("reads %0d cycles apart", cycles - last_rd));
          last_rd = cycles;
          if (got < exp_addr.size()) begin
            chk(int'(rd_addr) == exp_addr[got] && rd_neg == exp_neg[got],
                $sformatf("read %0d addr %0d expected %0d", got, rd_addr, exp_addr[got]));
          end else chk(0, "extra read");
          got++;
        end
        if (done) break;
        @(negedge clk);
      end
      chk(got == exp_addr.size(), $sformatf("reads %0d expected %0d", got, exp_addr.size()));
      chk(cycles == visits + (RD_CYC - 1) * (1 + exp_addr.size()),
          $sformatf("scan cycles %0d expected %0d", cycles, visits + (RD_CYC - 1) * (1 + exp_addr.size())));
      @(negedge clk);
      chk(!busy && !rd_en, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
