// tb_spike_window_gen: checks the input spike registers and the shared
// window multiplexer against a history model. Random spike vectors are
// shifted in for a full presentation, and after every step the windows of
// random neurons are compared for every select value (bit k = spike k+1
// steps back, masked beyond sel). Also checks clear and the sign registers.
module tb_spike_window_gen;
  localparam int N_IN = 16, T = 8, TAU = 7, SW = $clog2(T + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, shift_en = 0, neg;
  logic [N_IN-1:0] in_spikes = '0, in_sign = '0;
  logic [SW-1:0] sel = '0;
  logic [$clog2(N_IN)-1:0] nidx = '0;
  logic [TAU-1:0] window;

  spike_window_gen #(.N_IN(N_IN), .T(T), .TAU(TAU)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N_IN-1:0] hist [$];   // hist[0] = most recent vector
  logic [N_IN-1:0] sign_m;

  task automatic check_all();
    for (int j = 0; j < N_IN; j++)
      for (int s = 0; s <= T; s++) begin
        logic [TAU-1:0] e;
        nidx = j[$clog2(N_IN)-1:0];
        sel = SW'(s);
        #1;
        for (int k = 0; k < TAU; k++) e[k] = (k < s && k < hist.size()) ? hist[k][j] : 1'b0;
        checks++;
        if (window !== e || neg !== sign_m[j]) begin
          failures++;
          $display("FAIL j=%0d sel=%0d window=%b expected %b", j, s, window, e);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      clear = 1;
      in_sign = N_IN'($urandom);
      sign_m = in_sign;
      @(negedge clk);
      clear = 0;
      hist.delete();
      check_all();
      for (int t = 0; t < T + 2; t++) begin
        in_spikes = N_IN'($urandom);
        shift_en = 1;
        hist.push_front(in_spikes);
        @(negedge clk);
        shift_en = 0;
        in_spikes = N_IN'($urandom);   // ignored without shift_en
        @(negedge clk);
        check_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
