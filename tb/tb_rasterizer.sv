// tb_rasterizer: feeds line segments to the rasterizer and checks the pixel
// writes against properties of a correct Bresenham line, computed here
// independently: max(|dx|,|dy|)+1 pixels, both end points lit, each pixel
// one major-axis step from the previous one, every pixel within half a pixel
// of the ideal line along the minor axis, intensity passed through, pixels
// off the 640x480 screen not written, and 2 cycles per pixel.
module tb_rasterizer;
  import bz_pkg::*;
  logic clk = 0, rst = 1;
  line_t in_line;
  logic in_valid = 0, in_rd, pix_we, idle, done;
  logic [FB_AW-1:0] pix_addr;
  logic [PIX_W-1:0] pix_data;
  int checks = 0, failures = 0;
  int px [$], py [$];
  int cyc, t0, t1;

  rasterizer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d expected %0d", what, g, e); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && pix_we) begin
      px.push_back(int'(pix_addr) % 640);
      py.push_back(int'(pix_addr) / 640);
      if (pix_data != in_line.intensity) begin failures++; $display("FAIL intensity"); end
    end
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic draw(int x0, int y0, int x1, int y1, int inten);
    int adx, ady, n, onscr, expn;
    @(negedge clk);
    px.delete(); py.delete();
    in_line = '{x0: coord_t'(x0), y0: coord_t'(y0), x1: coord_t'(x1), y1: coord_t'(y1),
                intensity: 4'(inten)};
    in_valid = 1; t0 = cyc;
    @(negedge clk);
    chk("pop pulse seen", in_rd, 0);
    in_valid = 0;
    wait (done); t1 = cyc;
    @(negedge clk); @(negedge clk);
    chk("idle after line", idle, 1);
    adx = iabs(x1 - x0); ady = iabs(y1 - y0);
    n = (adx > ady ? adx : ady) + 1;
    onscr = (x0 >= 0 && x0 < 640 && y0 >= 0 && y0 < 480 && x1 >= 0 && x1 < 640 && y1 >= 0 && y1 < 480);
    chk($sformatf("cycles %0d,%0d-%0d,%0d", x0, y0, x1, y1), t1 - t0, 2 * n);
    if (onscr) begin
      chk("pixel count", px.size(), n);
      chk("first x", px[0], x0); chk("first y", py[0], y0);
      chk("last x", px[px.size()-1], x1); chk("last y", py[py.size()-1], y1);
    end
    expn = 0;
    for (int i = 0; i < n; i++) begin
      // expected count of on-screen pixels: walk the ideal line
      int ex, ey;
      if (adx >= ady) begin
        ex = x0 + (x1 > x0 ? i : -i);
        ey = y0;
      end else begin
        ey = y0 + (y1 > y0 ? i : -i);
        ex = x0;
      end
      if (ex >= 0 && ex < 640 && ey >= 0 && ey < 480) expn++;
    end
    for (int i = 0; i < px.size(); i++) begin
      // distance from the ideal line along the minor axis, times 2*major
      int xprod = (px[i] - x0) * (y1 - y0) - (py[i] - y0) * (x1 - x0);
      checks++;
      if (2 * iabs(xprod) > (adx > ady ? adx : ady)) begin
        failures++; $display("FAIL pixel %0d,%0d off line", px[i], py[i]);
      end
      if (i > 0) begin
        checks++;
        if (iabs(px[i] - px[i-1]) > 1 || iabs(py[i] - py[i-1]) > 1 ||
            (adx >= ady ? iabs(px[i] - px[i-1]) != 1 : iabs(py[i] - py[i-1]) != 1)) begin
          failures++; $display("FAIL step %0d,%0d -> %0d,%0d", px[i-1], py[i-1], px[i], py[i]);
        end
      end
    end
    // horizontal/vertical clipped lines: exact on-screen count
    if (!onscr && (x0 == x1 || y0 == y1)) chk("clipped count", px.size(), expn);
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk("idle after reset", idle, 1);
    draw(10, 10, 20, 14, 7);     // shallow, +x +y
    draw(100, 50, 97, 70, 3);    // steep, -x +y
    draw(300, 200, 250, 190, 15); // shallow, -x -y
    draw(5, 5, 5, 5, 1);         // single point
    draw(0, 0, 639, 479, 9);     // full diagonal
    draw(639, 0, 0, 0, 2);       // full row, right to left
    draw(320, 100, 320, 0, 4);   // vertical up
    draw(-20, 30, 10, 30, 5);    // clipped on the left
    draw(600, 470, 600, 500, 6); // clipped at the bottom
    draw(12, 400, 31, 387, 8);
    for (int k = 0; k < 20; k++)
      draw($urandom_range(639), $urandom_range(479), $urandom_range(639), $urandom_range(479),
           $urandom_range(15, 1));
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
