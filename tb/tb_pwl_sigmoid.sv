// tb_pwl_sigmoid: sweeps the membrane potential over and beyond the clip
// range and compares clip and probability with the sigmoid approximation
// evaluated in real arithmetic: y = (1/2 - F/4) / 2^I for x <= 0 (|x| = I+F)
// and p(x) = 256 - p(-x), at most 255, for x > 0. Spot values: x = 0 -> 128,
// x = -1 -> 64, x = -0.5 -> 96, x = -8 -> 0, x = +8 -> 255.
module tb_pwl_sigmoid;
  localparam int ACC_W = 18;
  logic signed [ACC_W-1:0] u;
  logic signed [7:0] u_clip;
  logic [7:0] prob;

  pwl_sigmoid #(.ACC_W(ACC_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
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

  task automatic try(int v, int exp_p = -1);
    int c = (v > 127) ? 127 : (v < -128) ? -128 : v;
    u = ACC_W'(v);
    #1;
    checks++;
    if (int'(u_clip) != c || int'(prob) != ref_p(v) || (exp_p >= 0 && int'(prob) != exp_p)) begin
      failures++;
      $display("FAIL u=%0d clip=%0d prob=%0d expected %0d/%0d", v, u_clip, prob, c, ref_p(v));
    end
  endtask

  initial begin
    for (int v = -300; v <= 300; v++) try(v);
    try(0, 128); try(-16, 64); try(-8, 96); try(-128, 0); try(127, 255);
    try(-131072); try(131071); try(-129); try(128, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
