// tb_membrane_accum: random sequences of bias loads, additions and negated
// additions of random 8-bit weight words, compared with integer sums.
module tb_membrane_accum;
  localparam int N_OUT = 8, B = 8, ACC_W = 18;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid = 0, bias = 0, neg = 0;
  logic [N_OUT*B-1:0] wdata = '0;
  logic signed [ACC_W-1:0] u [N_OUT];

  membrane_accum #(.N_OUT(N_OUT), .B(B), .ACC_W(ACC_W)) dut (.*);

  int m [N_OUT];
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OUT; i++) m[i] = 0;
    for (int c = 0; c < 3000; c++) begin
      valid = ($urandom_range(3) != 0);
      bias  = (c % 200 == 0);
      neg   = 1'($urandom);
      wdata = {$urandom, $urandom};
      if (valid)
        for (int i = 0; i < N_OUT; i++) begin
          automatic int w = int'($signed(wdata[i*B +: B]));
          if (bias) m[i] = w;
          else m[i] = neg ? m[i] - w : m[i] + w;
        end
      @(negedge clk);
      for (int i = 0; i < N_OUT; i++) begin
        checks++;
        if (int'(u[i]) != m[i]) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d i=%0d u=%0d exp=%0d", c, i, u[i], m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
