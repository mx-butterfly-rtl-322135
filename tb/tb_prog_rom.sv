// tb_prog_rom: loads a 64-byte test image (byte i = (7*i+3) mod 256, in
// tb/prog_rom_test.hex) and checks it reads back with one-clock latency,
// and that the rest of the ROM reads as the fill value 0xEA.
module tb_prog_rom;
  logic clk = 0;
  logic [13:0] addr = 0;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  prog_rom #(.INIT_FILE("tb/prog_rom_test.hex")) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 12288; a += (a < 80 ? 1 : 97)) begin
      @(negedge clk); addr = 14'(a);
      @(negedge clk);
      checks++;
      if (rdata !== ((a < 64) ? 8'((7 * a + 3) % 256) : 8'hEA)) begin
        failures++; $display("FAIL %0d: %0h", a, rdata);
      end
    end
    @(negedge clk); addr = 14'(12287); @(negedge clk);
    checks++; if (rdata !== 8'hEA) failures++;
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
