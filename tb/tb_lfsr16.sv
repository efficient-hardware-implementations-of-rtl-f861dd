// tb_lfsr16: compares the register with a software model of the polynomial
// x^16 + x^14 + x^13 + x^11 + 1, checks that en low holds it, that the seed
// load works (zero seed becomes 1) and that the period is 65535.
module tb_lfsr16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, seed_we = 0;
  logic [15:0] seed = '0, q;

  lfsr16 dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    logic [15:0] m, first;
    int period;
    repeat (2) @(negedge clk);
    rst_n = 1;
    seed_we = 1; seed = 16'h0000;
    @(negedge clk);
    chk(q == 16'h0001, "zero seed replaced by 1");
    seed = 16'hC0DE;
    @(negedge clk);
    seed_we = 0;
    m = 16'hC0DE;
    chk(q == m, "seed loaded");
    for (int i = 0; i < 300; i++) begin
      en = 1'($urandom);
      @(negedge clk);
      if (en) m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
      chk(q == m, $sformatf("step %0d q=%h expected %h", i, q, m));
    end
    en = 1;
    first = q;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q != first && period < 70000);
    chk(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
