// tb_spike_gen: random membrane potentials and a new random byte every
// cycle; the expected spike of neuron i is p(u_i) > rnd of cycle i mod 16,
// with p from the sigmoid approximation in real arithmetic. Checks the
// PWL_SHARE-cycle schedule (done exactly PWL_SHARE+1 cycles after start).
module tb_spike_gen;
  localparam int N_OUT = 48, ACC_W = 18, SH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic signed [ACC_W-1:0] u [N_OUT];
  logic [7:0] rnd = '0;
  logic [N_OUT-1:0] spikes;

  spike_gen #(.N_OUT(N_OUT), .ACC_W(ACC_W), .PWL_SHARE(SH)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_p(int v);
    int c = (v > 127) ? 127 : (v < -128) ? -128 : v;
    real m = (c < 0 ? -c : c) / 16.0;
    real f = m - $floor(m);
    int pn = int'($floor(256.0 * (0.5 - f / 4.0) / (2.0 ** $floor(m))));
    if (c <= 0) return pn;
    return (256 - pn > 255) ? 255 : 256 - pn;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 30; rep++) begin
      logic [7:0] r [SH];
      logic [N_OUT-1:0] e;
      int n;
      for (int i = 0; i < N_OUT; i++) u[i] = ACC_W'($signed(10'($urandom)) - 100);
      for (int c = 0; c < SH; c++) r[c] = 8'($urandom);
      for (int i = 0; i < N_OUT; i++) e[i] = ref_p(int'(u[i])) > int'(r[i % SH]);
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0;
      for (int c = 0; c < SH; c++) begin
        rnd = r[c];
        checks++;
        if (!busy || done) begin failures++; $display("FAIL busy/done in cycle %0d", c); end
        @(negedge clk);
      end
      rnd = 8'($urandom);
      checks++;
      if (!done || busy) begin failures++; $display("FAIL done timing"); end
      checks++;
      if (spikes !== e) begin failures++; $display("FAIL spikes %h expected %h", spikes, e); end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
