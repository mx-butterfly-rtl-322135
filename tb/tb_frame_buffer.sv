// tb_frame_buffer: walks the frame buffer through WRITE_A -> CLEAR_B ->
// WRITE_B -> CLEAR_A -> WRITE_A with a 64-word page, checking which page is
// drawn and which is shown in each state, that the swap waits for all three
// completion signals, that the old page is cleared in exactly DEPTH cycles,
// that a vggo seen during the clear is remembered, and the 1-cycle read
// latency.
module tb_frame_buffer;
  import bz_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst = 1;
  logic pix_we = 0, avg_halt = 0, lrq_empty = 1, rast_idle = 1, vggo = 0, vga_en = 1;
  logic [FB_AW-1:0] pix_addr = 0, vga_addr = 0;
  logic [PIX_W-1:0] pix_data = 0, vga_data;
  logic [1:0] state_o;
  logic accept, swap;
  int checks = 0, failures = 0;
  int nswap = 0;

  frame_buffer #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (swap) nswap++;

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d expected %0d", what, g, e); end
  endtask

  task automatic wpix(int a, int d);
    @(negedge clk); pix_we = 1; pix_addr = FB_AW'(a); pix_data = 4'(d);
    @(negedge clk); pix_we = 0;
  endtask

  function automatic int pattern(int page, int a);
    return (a * 3 + page * 5 + 1) % 16;
  endfunction

  task automatic rd(int a, output int d);
    @(negedge clk); vga_addr = FB_AW'(a);
    @(negedge clk); d = int'(vga_data);
  endtask

  task automatic check_shown(string tag, int page);
    int d;
    for (int a = 0; a < D; a++) begin
      rd(a, d);
      chk($sformatf("%s shown[%0d]", tag, a), d, pattern(page, a));
    end
  endtask


  task automatic frame_done();
    // swap needs halt, empty queue and idle rasterizer together
    @(negedge clk); avg_halt = 1; lrq_empty = 0;
    repeat (3) @(negedge clk);
    chk("no swap while queue busy", nswap, nswap_exp);
    lrq_empty = 1; rast_idle = 0;
    repeat (3) @(negedge clk);
    chk("no swap while rasterizer busy", nswap, nswap_exp);
    rast_idle = 1;
    @(negedge clk); @(negedge clk);
    nswap_exp++;
    chk("swap", nswap, nswap_exp);
  endtask
  int nswap_exp = 0;

  int t0, d;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk("WRITE_A after reset", state_o, 0); chk("accept in WRITE_A", accept, 1);
    for (int a = 0; a < D; a++) wpix(a, pattern(0, a));
    frame_done();
    chk("CLEAR_B", state_o, 1); chk("no accept in CLEAR", accept, 0);
    // page A is shown now
    t0 = $time;
    check_shown("A after swap", 0);
    // clear of B took D cycles; it is done by now (2*D cycles of reads)
    chk("still CLEAR_B without vggo", state_o, 1);
    @(negedge clk); vggo = 1; avg_halt = 0; @(negedge clk); vggo = 0;
    chk("WRITE_B after vggo", state_o, 2); chk("accept in WRITE_B", accept, 1);
    // B was cleared: draw only half of it, A still shown
    for (int a = 0; a < D / 2; a++) wpix(a, pattern(1, a));
    check_shown("A while drawing B", 0);
    // writes into B must not touch A: check the shown page again after more writes
    frame_done();
    chk("CLEAR_A", state_o, 3);
    for (int a = 0; a < D; a++) begin
      rd(a, d);
      chk($sformatf("B shown[%0d]", a), d, (a < D / 2) ? pattern(1, a) : 0);
    end
    // A is being cleared; vggo right away, before the clear can finish
    @(negedge clk); avg_halt = 0;
    repeat (5) @(negedge clk);
    // start a fresh clear: next frame
    vggo = 1; avg_halt = 0; @(negedge clk); vggo = 0;
    chk("clear already done: WRITE_A", state_o, 0);
    // A must read back as zero now: show it via another swap
    frame_done();
    chk("CLEAR_B again", state_o, 1);
    vggo = 1; avg_halt = 0; @(negedge clk); vggo = 0;
    chk("vggo during clear: still clearing", state_o, 1);
    for (int a = 0; a < D; a++) begin
      rd(a, d);
      chk($sformatf("cleared A shown[%0d]", a), d, 0);
    end
    chk("remembered vggo: WRITE_B after clear", state_o, 2);
    vga_en = 0; rd(3, d); chk("disabled read gives 0", d, 0);
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
