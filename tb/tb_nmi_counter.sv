// tb_nmi_counter: pulses the 3 kHz tick and checks that nmi rises every 14
// ticks (count 2..15), is held for exactly one tick period, and that the
// first NMI after reset comes after 13 ticks (2 -> 15).
module tb_nmi_counter;
  logic clk = 0, rst = 1, tick3k = 0, nmi;
  int checks = 0, failures = 0;
  int ticks = 0, last_rise = -1, nrise = 0;
  logic nmi_q = 0;

  nmi_counter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d expected %0d", what, g, e); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    chk("no nmi after reset", nmi, 0);
    for (int i = 1; i <= 14 * 5 + 3; i++) begin
      @(negedge clk); tick3k = 1;
      @(negedge clk); tick3k = 0;
      repeat (3) @(negedge clk);
      ticks = i;
      if (nmi && !nmi_q) begin
        if (last_rise < 0) chk("first NMI after 13 ticks", ticks, 13);
        else chk("NMI every 14 ticks", ticks - last_rise, 14);
        last_rise = ticks;
        nrise++;
      end
      if (!nmi && nmi_q) chk("NMI held one tick", ticks - last_rise, 1);
      nmi_q = nmi;
    end
    chk("number of NMIs", nrise, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
