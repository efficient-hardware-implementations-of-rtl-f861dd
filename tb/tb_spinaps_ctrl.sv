// tb_spinaps_ctrl: drives the controller with models of the address
// sequencer (done after a random number of cycles) and of the spike
// generator (done PWL_SHARE+1 cycles after its start), and a random fire
// result. Checks the step sequence, the select value t-1, the input
// handshake, the shift of the input registers only between steps, and that
// a sample ends at the first firing step or after T steps.
module tb_spinaps_ctrl;
  import spinaps_pkg::*;
  localparam int T = 8, TW = $clog2(T + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, in_ready, hold_we, clear, shift_en;
  logic [TW-1:0] t, sel;
  logic agen_start, agen_done = 0, sgen_start, sgen_done = 0, fire = 0;
  logic out_valid, done, busy, fo_start, fo_done = 0;
  ctrl_state_e state;

  spinaps_ctrl #(.T(T)) dut (.*);

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

  int n_fire_end = 0, n_t_end = 0, n_routed = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      automatic int fire_at = (s % 4 == 0) ? 99 : 1 + $urandom_range(T - 1);
      chk(!busy && !in_ready, "idle before start");
      start = 1;
      #1 chk(clear, "clear with start");
      @(negedge clk);
      start = 0;
      for (int st = 1; st <= T; st++) begin
        automatic int scan = 1 + $urandom_range(20);
        repeat ($urandom_range(2)) begin
          chk(in_ready && !hold_we && !agen_start, "waiting for input");
          @(negedge clk);
        end
        chk(in_ready && int'(t) == st && int'(sel) == st - 1, $sformatf("ready at step %0d t=%0d", st, t));
        in_valid = 1;
        #1 chk(hold_we && agen_start, "accept");
        @(negedge clk);
        in_valid = 0;
        chk(!in_ready, "not ready while scanning");
        repeat (scan) begin
          chk(!sgen_start && !out_valid && !shift_en, "scan");
          @(negedge clk);
        end
        agen_done = 1;
        @(negedge clk);
        agen_done = 0;
        chk(sgen_start, "spike generator started after the drain cycle");
        @(negedge clk);
        repeat (16) begin
          chk(!out_valid, "no output before spikes complete");
          @(negedge clk);
        end
        sgen_done = 1;
        fire = (st == fire_at);
        #1;
        chk(out_valid, "out_valid");
        chk(done == (fire || st == T), $sformatf("done at step %0d", st));
        chk(shift_en == !done, "shift only between steps");
        chk(fo_start == fire, "fan-out started on a step with spikes");
        if (done) begin
          if (fire) n_fire_end++; else n_t_end++;
        end
        @(negedge clk);
        sgen_done = 0;
        if (fire) begin
          repeat (1 + $urandom_range(6)) begin
            chk(busy && !in_ready, "busy while routing");
            @(negedge clk);
          end
          fo_done = 1;
          @(negedge clk);
          fo_done = 0;
          n_routed++;
        end
        fire = 0;
        if (st == fire_at || st == T) begin
          chk(!busy, "idle after done");
          break;
        end
      end
    end
    chk(n_fire_end > 0 && n_t_end > 0 && n_routed > 0, "both sample endings and routing seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
