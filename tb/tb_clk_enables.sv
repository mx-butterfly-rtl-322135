// tb_clk_enables: measures the spacing of each clock enable (56, 16 and 4
// clocks) and the 3 kHz square wave (16667 clocks per half period, tick on
// each rising edge) at the default parameters.
module tb_clk_enables;
  logic clk = 0, rst = 1;
  logic cpu_ce, avg_ce, pix_ce, clk3k, tick3k;
  int checks = 0, failures = 0;
  int cyc = 0;
  int last [5] = '{-1, -1, -1, -1, -1};
  int bad [5] = '{0, 0, 0, 0, 0};
  int seen [5] = '{0, 0, 0, 0, 0};
  logic k3_q = 0;

  clk_enables dut (.*);
  always #5 clk = ~clk;

  task automatic note(int i, int period);
    if (last[i] >= 0 && cyc - last[i] != period) bad[i]++;
    last[i] = cyc;
    seen[i]++;
  endtask

  always @(negedge clk) if (!rst) begin
    cyc++;
    if (cpu_ce) note(0, 56);
    if (avg_ce) note(1, 16);
    if (pix_ce) note(2, 4);
    if (clk3k != k3_q) note(3, 16667);
    if (tick3k) begin
      note(4, 33334);
      if (!(clk3k && !k3_q)) bad[4]++;
    end
    k3_q = clk3k;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (120000) @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (bad[i] != 0 || seen[i] < 3) begin
        failures++; $display("FAIL enable %0d: %0d wrong spacings, %0d seen", i, bad[i], seen[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
