// tb_spinaps_workloads: runs the core at the sizes of the two benchmark
// networks, each as one enlarged core. Handwritten digits: 784 inputs,
// 10 classes (on 16 outputs), T = tau = 8, 6273 word lines used of 8192.
// Activity recognition: 561 signed features, 6 classes (on 16 outputs),
// T = tau = 16, 8977 word lines of 9216. Reduced precision: a 256-input,
// 32-output core with 5-bit synapses and 1 fractional bit (weights and
// gamma in [-8, 7.5] in steps of 1/2), 10 classes. Weights are random, not trained,
// so the test checks the data path, timing and decisions against the
// reference model, not accuracy.
module tb_spinaps_workloads;
  logic fin_d, fin_h, fin_r;
  int ch_d, fa_d, ch_h, fa_h, ch_r, fa_r;

  spinaps_run_harness #(.NAME("digits"), .N_IN(784), .N_OUT(16), .N_CLASS(10),
                        .TAU(8), .T(8), .WL(8192), .SAMPLES(6), .ZERO_PCT(80), .NEG_PCT(0))
    u_digits (.finished(fin_d), .checks(ch_d), .failures(fa_d));

  spinaps_run_harness #(.NAME("activity"), .N_IN(561), .N_OUT(16), .N_CLASS(6),
                        .TAU(16), .T(16), .WL(9216), .SAMPLES(6), .ZERO_PCT(10), .NEG_PCT(40))
    u_activity (.finished(fin_h), .checks(ch_h), .failures(fa_h));

  spinaps_run_harness #(.NAME("b5"), .N_IN(256), .N_OUT(32), .N_CLASS(10),
                        .TAU(7), .T(8), .WL(2048), .SAMPLES(8), .ZERO_PCT(50), .NEG_PCT(20),
                        .B(5), .FRAC(1), .W_LO(-3), .W_HI(3), .G_LO(-16), .G_HI(-9))
    u_b5 (.finished(fin_r), .checks(ch_r), .failures(fa_r));

  initial begin
    fork
      begin
        wait (fin_d && fin_h && fin_r);
        $display("TB_RESULT checks=%0d failures=%0d", ch_d + ch_h + ch_r, fa_d + fa_h + fa_r);
      end
      begin
        #20ms;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", ch_d + ch_h + ch_r, fa_d + fa_h + fa_r + 1);
      end
    join_any
    $finish;
  end
endmodule
