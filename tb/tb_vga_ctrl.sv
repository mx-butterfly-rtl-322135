// tb_vga_ctrl: runs the VGA controller for a full 640x480 frame plus a few
// lines against a behavioural frame buffer (one-clock read latency) and
// checks, for every pixel period, hsync, vsync and the colour outputs
// against a position counter kept here: 800x525 totals, 96-pixel hsync from
// column 656, 2-line vsync from line 490, intensity on red above row 96 and
// green below, black outside the visible area. Also checks the frame rate
// (one frame_start per 420000 pixel periods).
module tb_vga_ctrl;
  import bz_pkg::*;
  logic clk = 0, rst = 1, pix_ce;
  logic fb_en, hsync, vsync, frame_start;
  logic [FB_AW-1:0] fb_addr;
  logic [PIX_W-1:0] fb_data;
  logic [3:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0, errs = 0;
  int div = 0, k = 0, nframes = 0;

  vga_ctrl dut (.*);
  always #5 clk = ~clk;

  function automatic logic [3:0] f(int a);
    return 4'((a * 7 + (a >> 5)) % 16);
  endfunction

  always @(posedge clk) begin
    fb_data <= fb_en ? f(int'(fb_addr)) : 4'd0;
    div <= (div == 3) ? 0 : div + 1;
  end
  assign pix_ce = !rst && (div == 0);

  // output check: after the k-th pix_ce, outputs belong to position k-1
  always @(negedge clk) begin
    if (!rst && pix_ce) k <= k + 1;
    if (!rst && div == 1 && k >= 2) begin
      int pos, h, v;
      logic vis, ehs, evs;
      logic [3:0] er, eg;
      pos = (k - 1) % (800 * 525);
      h = pos % 800; v = pos / 800;
      vis = (h < 640) && (v < 480);
      ehs = !((h >= 656) && (h < 752));
      evs = !((v >= 490) && (v < 492));
      er = (vis && v < 96)  ? f(v * 640 + h) : 4'd0;
      eg = (vis && v >= 96) ? f(v * 640 + h) : 4'd0;
      checks++;
      if (hsync !== ehs || vsync !== evs || vga_r !== er || vga_g !== eg || vga_b !== 4'd0) begin
        failures++;
        if (errs++ < 10)
          $display("FAIL at h=%0d v=%0d: hs %b/%b vs %b/%b r %0d/%0d g %0d/%0d",
                   h, v, hsync, ehs, vsync, evs, vga_r, er, vga_g, eg);
      end
    end
  end
  always @(posedge clk) if (frame_start) nframes++;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (k == 800 * 525 + 3200);
    checks++;
    if (nframes != 1) begin failures++; $display("FAIL frames %0d", nframes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
