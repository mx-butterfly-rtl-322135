// tb_pokey: checks the POKEY subset with the chip enable high on every
// clock: the fast pot scan latch, the period of the random number
// generator in 9-bit (511) and 17-bit (131071) mode, tone frequencies
// (1.79 MHz clocking, 64 kHz base clock, 16-bit joined pair), volume-only
// output and the summing of channels, the high-pass filter (channel 1
// sampled by channel 3 at the same rate gives a constant output, without
// the filter the tone returns) and the period of 4-bit polynomial noise.
// Expected values are worked out from the register settings, not read
// from the design.
module tb_pokey;
  logic clk = 0, rst = 1, ce = 1, we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata, pot_in = 0;
  logic [5:0] audio_level;
  int checks = 0, failures = 0;
  byte unsigned rnd [200000];

  pokey dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d expected %0d", what, g, e); end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); we = 1; addr = 4'(a); wdata = 8'(d);
    @(negedge clk); we = 0;
  endtask

  // record RANDOM for n clocks
  task automatic sample(int n);
    @(negedge clk); addr = 4'hA;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); rnd[i] = rdata;
    end
  endtask

  // time between two level changes, in clocks
  task automatic half_period(output int t);
    logic [5:0] l0;
    int c = 0;
    @(negedge clk); l0 = audio_level;
    while (audio_level == l0) begin @(negedge clk); c++; end
    l0 = audio_level; c = 0;
    while (audio_level == l0) begin @(negedge clk); c++; end
    t = c;
  endtask

  int t, same, diff;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // pot scan
    pot_in = 8'hA5; wr(4'hB, 0);
    @(negedge clk); addr = 4'h8; pot_in = 8'h0F; #1;
    chk("ALLPOT latched", rdata, 8'hA5);
    wr(4'hB, 0); @(negedge clk); addr = 4'h8; #1;
    chk("ALLPOT rescanned", rdata, 8'h0F);
    // 9-bit RNG
    wr(8, 8'h80);
    sample(2000);
    same = 0; diff = 0;
    for (int i = 0; i < 1000; i++) begin
      if (rnd[i] == rnd[i + 511]) same++;
      if (rnd[i] != rnd[i + 255]) diff++;
    end
    chk("9-bit period 511", same, 1000);
    chk("9-bit not periodic at 255", diff > 500, 1);
    // 17-bit RNG
    wr(8, 8'h00);
    sample(131071 + 2000);
    same = 0; diff = 0;
    for (int i = 0; i < 2000; i++) begin
      if (rnd[i] == rnd[i + 131071]) same++;
      if (rnd[i] != rnd[i + 511]) diff++;
    end
    chk("17-bit period 131071", same, 2000);
    chk("17-bit not periodic at 511", diff > 1000, 1);
    // tone on channel 1 clocked at 1.79 MHz: divide by AUDF+1 = 10
    wr(8, 8'h40); wr(0, 9); wr(1, 8'hA7);
    half_period(t); chk("ch1 fast tone half period", t, 10);
    wr(1, 8'h00);
    // channel 2 on the 64 kHz base clock: AUDF 1 -> 2 base ticks of 28
    wr(8, 8'h00); wr(2, 1); wr(3, 8'hA3);
    half_period(t); chk("ch2 64k tone half period", t, 56);
    // 15 kHz base: 2 ticks of 114
    wr(8, 8'h01);
    half_period(t); chk("ch2 15k tone half period", t, 228);
    wr(3, 8'h00);
    // channels 1+2 joined, clocked at 1.79 MHz: divide by 0x012C+1 = 301
    wr(8, 8'h50); wr(0, 8'h2C); wr(2, 8'h01); wr(3, 8'hA5); wr(9, 0);
    half_period(t); chk("joined 16-bit half period", t, 301);
    // volume only on channel 3 adds a constant 8
    wr(5, 8'h18);
    repeat (5) @(negedge clk);
    chk("level is 8 or 13", (audio_level == 8) || (audio_level == 13), 1);
    half_period(t); chk("joined pair still 301 with ch3 on", t, 301);
    // high-pass on channel 1, sampled by channel 3 at the same rate and
    // phase: the filter flip-flop always holds the previous output, so the
    // XOR is constant and the tone is removed
    wr(3, 8'h00); wr(5, 8'hA0); wr(0, 9); wr(4, 9); wr(1, 8'hA4);
    wr(8, 8'h64); wr(9, 0);
    repeat (30) @(negedge clk);
    same = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); if (audio_level == 4) same++;
    end
    chk("high-pass removes equal-rate tone", same, 200);
    // same channels without the filter: the tone is back
    wr(8, 8'h60);
    half_period(t); chk("unfiltered tone half period", t, 10);
    // channel 1 on the 4-bit polynomial every clock: period 15, not 5 or 3
    wr(5, 8'h00); wr(0, 0); wr(1, 8'hC4); wr(8, 8'h40);
    repeat (5) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      @(negedge clk); rnd[i] = 8'(audio_level);
    end
    same = 0; diff = 0;
    for (int i = 0; i < 45; i++) begin
      if (rnd[i] == rnd[i + 15]) same++;
      if (rnd[i] != rnd[i + 5] || rnd[i] != rnd[i + 3]) diff++;
    end
    chk("4-bit noise period 15", same, 45);
    chk("4-bit noise not periodic at 5 or 3", diff > 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
