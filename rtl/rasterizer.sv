// rasterizer: turns line segments into frame-buffer pixel writes.
//
// Bresenham's line algorithm in its integer error-term form: the error term
// accumulates the minor-axis delta each step and the minor coordinate
// advances when it crosses the major-axis delta, which is the "add the slope,
// step the row when the sum passes 1" procedure scaled to integers. It
// works for any octant and lights exactly one pixel per major-axis step.
//
// The step is pipelined over two states, PIXEL (emit the current pixel) and
// STEP (update the error term and position), so a line of N pixels takes
// 2N cycles plus one cycle to load it. Pixels outside the 640x480 screen are
// walked but not written. Pixel address = y*640 + x (19 bits), written with
// the segment's 4-bit intensity.
//
// Interface: a segment is taken from the queue head when in_valid is high;
// in_rd pulses for one cycle to pop it. idle is high when no segment is in
// progress; done pulses when the last pixel of a segment is written.
//
// Follows the description: Bresenham stepping, address output to BRAM,
// idle/done signal, the extra pipeline state giving a 2-cycle pixel rate.
// The error-term formulation and clipping by suppression are this design's.
module rasterizer
  import bz_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  line_t               in_line,
  input  logic                in_valid,
  output logic                in_rd,
  output logic                pix_we,
  output logic [FB_AW-1:0]    pix_addr,
  output logic [PIX_W-1:0]    pix_data,
  output logic                idle,
  output logic                done
);

  typedef enum logic [1:0] {S_IDLE, S_PIXEL, S_STEP} state_e;
  state_e state;

  coord_t            x, y, xe, ye;
  logic signed [COORD_W+1:0] dx, dy, err;
  logic              sx_neg, sy_neg;
  logic [PIX_W-1:0]  inten;

  logic signed [COORD_W+2:0] e2;
  logic on_screen;
  assign e2        = {err, 1'b0};
  assign on_screen = (x >= 0) && (x < coord_t'(SCREEN_W)) && (y >= 0) && (y < coord_t'(SCREEN_H));
  assign idle      = (state == S_IDLE);
  assign in_rd     = (state == S_IDLE) && in_valid;

  function automatic logic signed [COORD_W+1:0] absdiff(coord_t a, coord_t b);
    logic signed [COORD_W+1:0] d;
    d = (COORD_W+2)'(b) - (COORD_W+2)'(a);
    return (d < 0) ? -d : d;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      pix_we <= 1'b0;
      done   <= 1'b0;
    end else begin
      pix_we <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          x      <= in_line.x0;
          y      <= in_line.y0;
          xe     <= in_line.x1;
          ye     <= in_line.y1;
          dx     <= absdiff(in_line.x0, in_line.x1);
          dy     <= -absdiff(in_line.y0, in_line.y1);
          err    <= absdiff(in_line.x0, in_line.x1) - absdiff(in_line.y0, in_line.y1);
          sx_neg <= in_line.x1 < in_line.x0;
          sy_neg <= in_line.y1 < in_line.y0;
          inten  <= in_line.intensity;
          state  <= S_PIXEL;
        end
        S_PIXEL: begin
          pix_we   <= on_screen;
          pix_addr <= FB_AW'(y) * FB_AW'(SCREEN_W) + FB_AW'(x);
          pix_data <= inten;
          if (x == xe && y == ye) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_STEP;
          end
        end
        S_STEP: begin
          if (e2 >= (COORD_W+3)'(dy) && e2 <= (COORD_W+3)'(dx)) begin
            err <= err + dy + dx;
            x   <= sx_neg ? x - 1'b1 : x + 1'b1;
            y   <= sy_neg ? y - 1'b1 : y + 1'b1;
          end else if (e2 >= (COORD_W+3)'(dy)) begin
            err <= err + dy;
            x   <= sx_neg ? x - 1'b1 : x + 1'b1;
          end else if (e2 <= (COORD_W+3)'(dx)) begin
            err <= err + dx;
            y   <= sy_neg ? y - 1'b1 : y + 1'b1;
          end
          state <= S_PIXEL;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
