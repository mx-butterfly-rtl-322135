// tb_avg: runs a small vector program on the AVG with a behavioural 16-bit
// synchronous memory and checks the line segments it emits, the register
// effects of SCALE/STAT/CNTR, JSR/RET through the return stack, the blank
// vector, the halt, the instruction timing (3 cycles per 16-bit
// instruction, 8 for VECTOR), waiting on a full queue and vgrst, and a
// second program that nests JSR to the full return-stack depth of 4 and
// jumps over a HALT with JMP.
//
// Program (byte addresses):
//   0 SCALE lin 0 bin 0   2 STAT int 5 col 2   4 CNTR   6 JSR 16
//   8 SVEC dx -2 dy 3 z 1 (doubled: -4, 6)
//  10 VECTOR dy 100 dx -50 z 3           14 HALT
//  16 SCALE lin 128 bin 1 (factor 1/4)   18 VECTOR dy 40 dx 0 z 0 (blank)
//  22 RET
// Beam after the blank vector: (0, 40/4=10). SVEC: (-1, 11) -> line
// (320,235)-(319,235) int 5. VECTOR: dx -50/2=-25>>1=-13, dy 100/2=50>>1=25,
// beam (-14, 36) -> line (319,235)-(313,222) int 6 (=2*3).
module tb_avg;
  import bz_pkg::*;
  logic clk = 0, rst = 1, ce = 1, vggo = 0, vgrst = 0, line_full = 0;
  logic [AVG_PC_W-2:0] mem_addr;
  logic [15:0] mem_rdata;
  line_t line;
  logic line_wr, halt;
  logic [3:0] color;
  int checks = 0, failures = 0;
  logic [15:0] mem [64];
  int nlines, cyc, t_go, t_halt;
  line_t got [4];
  line_t last;

  avg dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) mem_rdata <= mem[mem_addr[5:0]];

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d expected %0d", what, g, e); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (line_wr && ce) begin
      if (nlines < 4) got[nlines] <= line;
      last <= line;
      nlines <= nlines + 1;
    end
  end

  task automatic check_lines(string tag);
    chk({tag, " nlines"}, nlines, 2);
    chk({tag, " l0 x0"}, got[0].x0, 320); chk({tag, " l0 y0"}, got[0].y0, 235);
    chk({tag, " l0 x1"}, got[0].x1, 319); chk({tag, " l0 y1"}, got[0].y1, 235);
    chk({tag, " l0 int"}, got[0].intensity, 5);
    chk({tag, " l1 x0"}, got[1].x0, 319); chk({tag, " l1 y0"}, got[1].y0, 235);
    chk({tag, " l1 x1"}, got[1].x1, 313); chk({tag, " l1 y1"}, got[1].y1, 222);
    chk({tag, " l1 int"}, got[1].intensity, 6);
  endtask

  task automatic go();
    @(negedge clk); vggo = 1; nlines = 0; t_go = cyc;
    @(negedge clk); vggo = 0;
    chk("halt drops on vggo", halt, 0);
  endtask

  initial begin
    cyc = 0; nlines = 0;
    foreach (mem[i]) mem[i] = 16'h2000;
    mem[0]  = 16'h7000; mem[1] = 16'h6052; mem[2] = 16'h8000; mem[3] = 16'hA008;
    mem[4]  = 16'h433E; mem[5] = 16'h0064; mem[6] = 16'h7FCE; mem[7] = 16'h2000;
    mem[8]  = 16'h7180; mem[9] = 16'h0028; mem[10] = 16'h0000; mem[11] = 16'hC000;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    chk("halted after reset", halt, 1);

    // run 1: every cycle enabled
    go();
    wait (halt); t_halt = cyc;
    // 8 short instructions x 3 cycles + 2 VECTOR x 8 cycles = 40, after the vggo edge
    chk("cycles go->halt", t_halt - t_go, 41);  // vggo edge + 40
    @(negedge clk);
    check_lines("run1");
    chk("color", color, 2);
    chk("stays halted", halt, 1);

    // run 2: queue full for a while -> the first visible vector waits
    line_full = 1;
    go();
    repeat (100) @(negedge clk);
    chk("waiting, not halted", halt, 0);
    chk("no line while full", nlines, 0);
    line_full = 0;
    wait (halt); t_halt = cyc;
    chk("run2 longer by the wait", (t_halt - t_go) > 100, 1);
    @(negedge clk);
    check_lines("run2");

    // run 3: AVG enable every 3rd clock, timing scales with it
    fork
      forever begin @(negedge clk); ce = (cyc % 3 == 0); end
    join_none
    repeat (2) @(negedge clk);
    go();
    wait (halt); t_halt = cyc;
    chk("run3 cycles about 3x40", ((t_halt - t_go) >= 119) && ((t_halt - t_go) <= 123), 1);
    @(negedge clk);
    check_lines("run3");

    // vgrst during a run stops it
    go();
    repeat (20) @(negedge clk);
    vgrst = 1; @(negedge clk); vgrst = 0;
    chk("halt after vgrst", halt, 1);
    repeat (200) @(negedge clk);
    chk("no more lines after vgrst", nlines <= 1, 1);

    // run 4: JSR nested to the full stack depth of 4, then a JMP.
    //   w0 STAT int 7  w1 SCALE 0  w2 CNTR  w3 JSR w10  w4 JMP w8
    //   w5-7 HALT (jumped over)  w8 SVEC  w9 HALT
    //   w10 SVEC, JSR w14, RET   w14 SVEC, JSR w18, RET
    //   w18 SVEC, JSR w22, RET   w22 SVEC, RET
    // Each SVEC has dx = 1 (2 after doubling, 1 pixel) and z = 1, so the
    // beam walks right one pixel per vector: five segments ending at
    // x = 325. A shallower stack would return to the wrong place.
    foreach (mem[i]) mem[i] = 16'h2000;
    mem[0]  = 16'h6071; mem[1] = 16'h7000; mem[2] = 16'h8000; mem[3] = 16'hA00A;
    mem[4]  = 16'hE008; mem[8] = 16'h4021; mem[9] = 16'h2000;
    mem[10] = 16'h4021; mem[11] = 16'hA00E; mem[12] = 16'hC000;
    mem[14] = 16'h4021; mem[15] = 16'hA012; mem[16] = 16'hC000;
    mem[18] = 16'h4021; mem[19] = 16'hA016; mem[20] = 16'hC000;
    mem[22] = 16'h4021; mem[23] = 16'hC000;
    go();
    for (int i = 0; i < 3000 && !halt; i++) @(negedge clk);
    repeat (4) @(negedge clk);
    chk("nested: halted", halt, 1);
    chk("nested: segments", nlines, 5);
    chk("nested: first x0", got[0].x0, 320);
    chk("nested: last x0", last.x0, 324);
    chk("nested: last x1", last.x1, 325);
    chk("nested: last y1", last.y1, 240);
    chk("nested: intensity register", last.intensity, 7);

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
