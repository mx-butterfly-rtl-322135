// vga_ctrl: 640x480 at 60 Hz VGA timing generator and pixel colouring.
//
// Runs on the system clock with a 25 MHz pixel enable (pix_ce). Two counters
// walk 800 columns by 525 lines: visible 640x480, horizontal front porch 16,
// sync 96, back porch 48; vertical front porch 10, sync 2, back porch 33;
// both syncs active low. For a visible position it asks the frame buffer
// for the pixel at row*640+col (fb_en high) and, one pixel clock later,
// drives the 4-bit intensity that came back onto one colour channel: red for
// rows above RED_ROWS, green below, as the original monitor overlay
// coloured the screen by position. The counters hold a position for one
// whole pixel period (4 system clocks), long enough for the frame buffer's
// one-clock read; on the next pix_ce the colour and the syncs of that
// position are registered together, so all outputs lag the counters by one
// pixel. pix_ce must come no more often than every second clock.
//
// The 640x480@60 timing, the 25 MHz enable, reading a 4-bit intensity with
// an enable, and colour chosen from the row follow the description; the
// colour boundary RED_ROWS is this design's choice.
module vga_ctrl
  import bz_pkg::*;
#(
  parameter int unsigned RED_ROWS = 96
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pix_ce,
  output logic             fb_en,
  output logic [FB_AW-1:0] fb_addr,
  input  logic [PIX_W-1:0] fb_data,
  output logic             hsync,
  output logic             vsync,
  output logic [3:0]       vga_r,
  output logic [3:0]       vga_g,
  output logic [3:0]       vga_b,
  output logic             frame_start
);

  localparam int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48;
  localparam int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33;
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;  // 800
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;  // 525

  logic [9:0] hcnt, vcnt;
  logic       vis, hs, vs;

  assign vis = (hcnt < 10'(H_VIS)) && (vcnt < 10'(V_VIS));
  assign hs  = !((hcnt >= 10'(H_VIS + H_FP)) && (hcnt < 10'(H_VIS + H_FP + H_SYNC)));
  assign vs  = !((vcnt >= 10'(V_VIS + V_FP)) && (vcnt < 10'(V_VIS + V_FP + V_SYNC)));

  assign fb_en   = vis;
  assign fb_addr = FB_AW'(vcnt) * FB_AW'(SCREEN_W) + FB_AW'(hcnt);

  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt        <= '0;
      vcnt        <= '0;
      hsync       <= 1'b1;
      vsync       <= 1'b1;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (pix_ce) begin
        // counters; the address of the new position goes to the frame buffer
        if (hcnt == 10'(H_TOT - 1)) begin
          hcnt <= '0;
          if (vcnt == 10'(V_TOT - 1)) begin
            vcnt        <= '0;
            frame_start <= 1'b1;
          end else begin
            vcnt <= vcnt + 1'b1;
          end
        end else begin
          hcnt <= hcnt + 1'b1;
        end
        // outputs for the position just finished: its data is back
        hsync <= hs;
        vsync <= vs;
        vga_r <= (vis && vcnt <  10'(RED_ROWS)) ? fb_data : 4'd0;
        vga_g <= (vis && vcnt >= 10'(RED_ROWS)) ? fb_data : 4'd0;
        vga_b <= 4'd0;
      end
    end
  end

endmodule
