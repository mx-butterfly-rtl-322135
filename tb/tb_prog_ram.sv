// tb_prog_ram: fills the 1 KB program RAM with a pattern, reads it back
// with one-clock latency, and overwrites part of it.
module tb_prog_ram;
  logic clk = 0, we = 0;
  logic [9:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  prog_ram dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] pat(int a, int s); return 8'((a * 13 + s) ^ (a >> 3)); endfunction

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; addr = 10'(a); wdata = pat(a, 0);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 1024; a += 100) begin
      @(negedge clk); we = 1; addr = 10'(a); wdata = pat(a, 77);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); addr = 10'(a);
      @(negedge clk);
      checks++;
      if (rdata !== pat(a, (a % 100 == 0) ? 77 : 0)) begin
        failures++; $display("FAIL %0d: %0h", a, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
