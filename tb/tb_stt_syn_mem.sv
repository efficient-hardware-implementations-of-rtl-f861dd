// tb_stt_syn_mem: writes random words to random lines and reads them back
// through the one-cycle read port, comparing with a model array; checks that
// rd_data holds when rd_en is low and that a read of a line written in the
// same cycle returns the old contents.
module tb_stt_syn_mem;
  localparam int WL = 64, WIDTH = 40, AW = $clog2(WL);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, we = 0;
  logic [AW-1:0] rd_addr = '0, waddr = '0;
  logic [WIDTH-1:0] rd_data, wdata = '0;

  stt_syn_mem #(.WL(WL), .WIDTH(WIDTH)) dut (.*);

  logic [WIDTH-1:0] m [WL];
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int l = 0; l < WL; l++) begin
      we = 1; waddr = AW'(l); wdata = {$urandom, $urandom}; m[l] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 500; i++) begin
      logic [WIDTH-1:0] exp_d, held;
      automatic int a = $urandom_range(WL - 1);
      rd_en = 1; rd_addr = AW'(a);
      exp_d = m[a];
      if ($urandom_range(1)) begin   // write the same line in the same cycle
        we = 1; waddr = AW'(a); wdata = {$urandom, $urandom}; m[a] = wdata;
      end
      @(negedge clk);
      we = 0;
      checks++;
      if (rd_data !== exp_d) begin failures++; $display("FAIL read %0d", a); end
      held = rd_data;
      rd_en = 0; rd_addr = AW'($urandom);
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
