// tb_fts_decoder: random spike vectors, mostly empty; the first valid step
// with any spike must set decided, its lowest-index neuron and its step,
// and later steps must not change them until clear.
module tb_fts_decoder;
  localparam int N_OUT = 64, TW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, valid = 0, fire, decided;
  logic [N_OUT-1:0] spikes = '0;
  logic [TW-1:0] t = '0, decision_t;
  logic [$clog2(N_OUT)-1:0] decision;

  fts_decoder #(.N_OUT(N_OUT), .TW(TW)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_dec;
    int m_n, m_t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 100; s++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      m_dec = 0; m_n = 0; m_t = 0;
      for (int st = 1; st <= 8; st++) begin
        valid = 1'($urandom);
        t = TW'(st);
        spikes = '0;
        if ($urandom_range(3) == 0)
          for (int k = 0; k < 1 + $urandom_range(3); k++) spikes[$urandom_range(N_OUT - 1)] = 1;
        #1;
        checks++;
        if (fire != (valid && spikes != 0)) begin failures++; $display("FAIL fire"); end
        if (valid && spikes != 0 && !m_dec) begin
          m_dec = 1; m_t = st;
          for (int i = N_OUT - 1; i >= 0; i--) if (spikes[i]) m_n = i;
        end
        @(negedge clk);
        checks++;
        if (decided != m_dec || (m_dec && (int'(decision) != m_n || int'(decision_t) != m_t))) begin
          failures++;
          $display("FAIL s=%0d st=%0d decided=%b %0d@%0d expected %b %0d@%0d", s, st, decided, decision, decision_t, m_dec, m_n, m_t);
        end
      end
      valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
