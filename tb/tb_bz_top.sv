// tb_bz_top: end-to-end test of the whole board at its default parameters.
//
// The testbench plays the 6502: on its clock enable it writes a vector
// program into vector RAM, strobes vector-go, polls the AVG halt bit at
// 0x0800 and exercises the other memory-mapped blocks. The program draws
// three 10x10-pixel squares through a JSR'd subroutine of eight short
// vectors (intensity field 2 -> 4) with blank long vectors in between, a
// JMP over a HALT, and a 45-degree long vector at the STAT intensity (9)
// that climbs into the red part of the screen:
//   squares with top-left corners (220,190), (300,190), (380,190)
//   diagonal (380+i, 190-i), i = 0..120
// The image read back from the VGA outputs over one whole frame must match
// that picture exactly, first from page B, then (after a second vector-go)
// from page A.
//
// The first vector-go is issued while the frame buffer is still clearing,
// so the AVG fills the line queue and must wait; the run counts how often
// each mechanism happened and fails if one never did: AVG waiting on a full
// queue, the queue ignoring a held write strobe, JSR/RET/JMP, blank vectors,
// a vector-go remembered during a clear, page swaps, NMI, POKEY random and
// pot scan and audio, the Math Box strobe and result read, RAM and ROM.
// Each page clear is timed: 307200 clocks (one word per clock, 3.07 ms)
// from the swap to the end of the clear.
module tb_bz_top;
  logic        clk = 0, rst = 1;
  logic        cpu_ce, cpu_nmi, cpu_we = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0]  cpu_wdata = 0, cpu_rdata;
  logic        mb_we, mb_done = 1;
  logic [4:0]  mb_op;
  logic [7:0]  mb_wdata, mb_lo = 8'h3C, mb_hi = 8'hC3;
  logic [5:0]  in0 = 6'h01;
  logic [7:0]  opt_a = 8'h00, opt_b = 8'h00, pot_in = 8'h96;
  logic        vga_hsync, vga_vsync, audio_out, watchdog_clr;
  logic [3:0]  vga_r, vga_g, vga_b;
  logic [7:0]  sound_latch, coin_ctr;
  int checks = 0, failures = 0;

  bz_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0h expected %0h", what, g, e); end
  endtask

  // ---------------- CPU bus cycles ----------------
  task automatic cpu_wr(int a, int d);
    @(negedge clk); cpu_addr = 16'(a); cpu_we = 1; cpu_wdata = 8'(d);
    while (!cpu_ce) @(negedge clk);
    @(negedge clk); cpu_we = 0;
  endtask
  task automatic cpu_rd(int a, output logic [7:0] d);
    @(negedge clk); cpu_addr = 16'(a); cpu_we = 0;
    @(negedge clk); @(negedge clk);
    d = cpu_rdata;
  endtask
  task automatic vwr(int w, int word);
    cpu_wr(16'h2000 + 2 * w, word & 8'hFF);
    cpu_wr(16'h2000 + 2 * w + 1, (word >> 8) & 8'hFF);
  endtask

  // ---------------- expected picture ----------------
  function automatic int expected(int x, int y);
    if (x - 380 >= 0 && x - 380 <= 120 && y == 190 - (x - 380)) return 9;
    for (int s = 0; s < 3; s++) begin
      int x0 = 220 + 80 * s, y0 = 190;
      if (x >= x0 && x <= x0 + 10 && y >= y0 && y <= y0 + 10 &&
          (x == x0 || x == x0 + 10 || y == y0 || y == y0 + 10)) return 4;
    end
    return 0;
  endfunction

  // compare one full VGA frame with the expected picture
  task automatic check_frame(string tag);
    int h, v, bad = 0, lit = 0, red = 0, n = 0;
    @(posedge dut.u_vga.frame_start);
    while (n < 800 * 525) begin
      @(negedge clk);
      if (cpu_ce_dummy || dut.pix_ce) begin
        h = int'(dut.u_vga.hcnt); v = int'(dut.u_vga.vcnt);
        @(negedge clk);
        if (h < 640 && v < 480) begin
          int e = expected(h, v);
          int gr = (v < 96) ? int'(vga_r) : int'(vga_g);
          int other = (v < 96) ? int'(vga_g) : int'(vga_r);
          if (gr != e || other != 0 || vga_b != 0) begin
            bad++;
            if (bad < 6) $display("FAIL %s pixel (%0d,%0d): %0d expected %0d", tag, h, v, gr, e);
          end
          if (gr != 0) lit++;
          if (v < 96 && vga_r != 0) red++;
        end
        n++;
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d wrong pixels", tag, bad); end
    // 121 diagonal + 3 x 40 square pixels, one shared corner
    chk({tag, " lit pixels"}, lit, 121 + 3 * 40 - 1);
    chk({tag, " red pixels (rows 70..95)"}, red, 26);
  endtask
  logic cpu_ce_dummy = 0;

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_held = 0, n_jsr = 0, n_ret = 0, n_jmp = 0, n_blank = 0, n_swap = 0;
  int n_gomem = 0, n_nmi = 0, n_mb = 0, n_lines = 0, n_pix = 0, n_audio = 0;
  logic nmi_q = 0, aud_q = 0, clr_q = 0;
  // page clear length: swap to end of clear, expected one word per clock
  int cyc_c = 0, t_swap = 0, n_clr = 0, n_clr_bad = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_avg.ce && dut.u_avg.stall && !dut.u_avg.halt && dut.u_avg.cnt == 3'd1) n_stall++;
    if (dut.u_lrq.wr && dut.u_lrq.wr_q) n_held++;
    if (dut.u_avg.exec && dut.u_avg.dec.push) n_jsr++;
    if (dut.u_avg.exec && dut.u_avg.dec.pop) n_ret++;
    if (dut.u_avg.exec && dut.u_avg.dec.jump && !dut.u_avg.dec.push) n_jmp++;
    if (dut.u_avg.exec && dut.u_avg.dec.draw && dut.u_avg.dec.z == 0) n_blank++;
    if (dut.u_fb.swap) begin n_swap++; t_swap = cyc_c; end
    if (dut.u_fb.clr_done && !clr_q && !dut.u_fb.accept) begin
      n_clr++;
      if (cyc_c - t_swap != 307200) begin
        n_clr_bad++; $display("FAIL clear took %0d cycles", cyc_c - t_swap);
      end
    end
    clr_q <= dut.u_fb.clr_done;
    cyc_c++;
    if (dut.u_fb.vggo && !dut.u_fb.clr_done && !dut.u_fb.accept) n_gomem++;
    if (cpu_nmi && !nmi_q) n_nmi++;
    nmi_q <= cpu_nmi;
    if (mb_we && mb_op == 5'h0B) n_mb++;
    if (dut.u_lrq.push) n_lines++;
    if (dut.pix_we) n_pix++;
    if (audio_out != aud_q) n_audio++;
    aud_q <= audio_out;
  end

  task automatic mech(string what, int n);
    checks++;
    $display("mechanism %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  logic [7:0] d, r1, r2;
  int t0;
  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    // program RAM and ROM
    cpu_wr(16'h0100, 8'h5A); cpu_rd(16'h0100, d); chk("program RAM", d, 8'h5A);
    cpu_rd(16'h7FFC, d); chk("program ROM fill", d, 8'hEA);
    // vector program
    vwr(0, 16'h6090);                 // STAT intensity 9
    vwr(1, 16'h7000);                 // SCALE lin 0 bin 0
    vwr(2, 16'h8000);                 // CNTR
    vwr(3, 16'h0064); vwr(4, 16'h1F38); // VECTOR blank to (-200,100) -> screen (220,190)
    vwr(5, 16'hA014);                 // JSR square
    vwr(6, 16'h0000); vwr(7, 16'h00A0); // VECTOR blank dx +160 -> screen +80
    vwr(8, 16'hA014);                 // JSR square
    vwr(9, 16'h0000); vwr(10, 16'h00A0);
    vwr(11, 16'hA014);                // JSR square
    vwr(12, 16'hE00E);                // JMP 14
    vwr(13, 16'h2000);                // HALT (jumped over)
    vwr(14, 16'h00F0); vwr(15, 16'h20F0); // VECTOR dx +240 dy +240, z 1
    vwr(16, 16'h2000);                // HALT
    for (int i = 0; i < 2; i++) begin
      vwr(20 + i, 16'h4045);          // right 5
      vwr(22 + i, 16'h5B40);          // down 5
      vwr(24 + i, 16'h405B);          // left 5
      vwr(26 + i, 16'h4540);          // up 5
    end
    vwr(28, 16'hC000);                // RET
    cpu_rd(16'h200B, d); chk("vector RAM read back high", d, 8'hA0);
    cpu_rd(16'h200A, d); chk("vector RAM read back low", d, 8'h14);
    // frame 1: vector-go while page B is still being cleared
    chk("frame buffer clearing B", dut.u_fb.state, 1);
    cpu_wr(16'h1200, 0);
    t0 = 0;
    do begin cpu_rd(16'h0800, d); t0++; end while (!d[6] && t0 < 1000000);
    chk("IN0 low bits", d[5:0], 6'h01);
    chk("AVG halted", d[6], 1);
    wait (dut.u_fb.state == 2'd3);   // CLEAR_A: page B shown
    check_frame("page B");
    // POKEY: pot scan, random, a tone
    cpu_wr(16'h182B, 0); cpu_rd(16'h1828, d); chk("POKEY ALLPOT", d, 8'h96);
    cpu_rd(16'h182A, r1); repeat (777) @(negedge clk); cpu_rd(16'h182A, r2);
    chk("POKEY random changes", r1 != r2, 1);
    cpu_wr(16'h1828, 8'h40); cpu_wr(16'h1820, 8'd20); cpu_wr(16'h1821, 8'hAF);
    // Math Box port
    cpu_wr(16'h186B, 8'h00); cpu_rd(16'h1810, d); chk("Math Box low", d, 8'h3C);
    cpu_rd(16'h1818, d); chk("Math Box high", d, 8'hC3);
    cpu_rd(16'h1800, d); chk("Math Box status", d, 8'h80);
    cpu_wr(16'h1840, 8'h81); chk("sound latch", sound_latch, 8'h81);
    // frame 2: redraw into page A after its clear
    cpu_wr(16'h1200, 0);
    wait (dut.u_fb.state == 2'd1);   // CLEAR_B: page A shown
    check_frame("page A");
    // vector reset stops a running AVG
    cpu_wr(16'h1200, 0); repeat (50) @(negedge clk);
    cpu_wr(16'h1600, 0); cpu_rd(16'h0800, d); chk("halt after vector reset", d[6], 1);
    mech("AVG waits on full line queue", n_stall);
    mech("queue ignores held write strobe", n_held);
    mech("JSR", n_jsr);
    mech("RET", n_ret);
    mech("JMP", n_jmp);
    mech("blank vector", n_blank);
    mech("vector-go remembered during clear", n_gomem);
    mech("page swap", n_swap);
    mech("NMI", n_nmi);
    mech("Math Box operation strobe", n_mb);
    mech("PWM audio edges", n_audio);
    chk("segments queued (2 frames x 25)", n_lines, 50);
    // reset, frame 1, frame 2, and the run stopped by vector reset
    chk("swaps", n_swap, 4);
    mech("full page clears", n_clr);
    chk("page clears of 307200 cycles (3.07 ms)", n_clr_bad, 0);
    $display("pixels written %0d", n_pix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
