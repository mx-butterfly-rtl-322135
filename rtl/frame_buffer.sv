// frame_buffer: double-buffered 640x480x4 frame store with its controller.
//
// Two pages, A and B. At any time one page takes the rasterizer's pixel
// writes while the other is read by the VGA controller, or, after a swap,
// the page just shown is being cleared. Four states:
//   WRITE_A  draw into A, show B. When the AVG has halted, the line queue is
//            empty and the rasterizer is idle (frame complete), go to CLEAR_B.
//   CLEAR_B  show A, write zero to every word of B, one per clock (307200
//            cycles, about 3 ms at 100 MHz). When the clear has finished and
//            vggo has been seen (during or before the clear), go to WRITE_B.
//   WRITE_B  draw into B, show A; on frame complete go to CLEAR_A.
//   CLEAR_A  show B, clear A; then WRITE_A on vggo.
// accept is high in the WRITE states only; the rasterizer takes no new
// segment while it is low, so drawing waits for the clear to finish.
//
// Read timing: vga_addr is registered by the page, vga_data one clock later.
// swap pulses for one cycle on each change of displayed page.
//
// The states, the swap condition and the clear-until-vggo rule follow the
// description; remembering a vggo that comes before the clear has finished
// (rather than cutting the clear short) is this design's choice.
module frame_buffer
  import bz_pkg::*;
#(
  parameter int unsigned DEPTH = FB_DEPTH
) (
  input  logic             clk,
  input  logic             rst,
  // rasterizer side
  input  logic             pix_we,
  input  logic [FB_AW-1:0] pix_addr,
  input  logic [PIX_W-1:0] pix_data,
  // completion signals
  input  logic             avg_halt,
  input  logic             lrq_empty,
  input  logic             rast_idle,
  input  logic             vggo,
  // VGA side
  input  logic             vga_en,
  input  logic [FB_AW-1:0] vga_addr,
  output logic [PIX_W-1:0] vga_data,
  // status
  output logic [1:0]       state_o,
  output logic             accept,
  output logic             swap
);

  typedef enum logic [1:0] {WRITE_A, CLEAR_B, WRITE_B, CLEAR_A} fb_state_e;
  fb_state_e state;

  logic [FB_AW-1:0] clr_addr;
  logic             clr_done;
  logic             go_seen;
  logic             frame_done;

  assign frame_done = avg_halt && lrq_empty && rast_idle;
  assign state_o    = state;
  assign accept     = (state == WRITE_A) || (state == WRITE_B);

  // page write ports
  logic             we_a, we_b;
  logic [FB_AW-1:0] wa_a, wa_b;
  logic [PIX_W-1:0] wd_a, wd_b;
  logic [PIX_W-1:0] rd_a, rd_b;
  logic             show_a, show_a_q;

  always_comb begin
    we_a = 1'b0; wa_a = pix_addr; wd_a = pix_data;
    we_b = 1'b0; wa_b = pix_addr; wd_b = pix_data;
    show_a = 1'b0;
    unique case (state)
      WRITE_A: we_a = pix_we;
      WRITE_B: begin we_b = pix_we; show_a = 1'b1; end
      CLEAR_B: begin
        show_a = 1'b1;
        we_b   = !clr_done;
        wa_b   = clr_addr;
        wd_b   = '0;
      end
      CLEAR_A: begin
        we_a = !clr_done;
        wa_a = clr_addr;
        wd_a = '0;
      end
      default: ;
    endcase
  end

  fb_bram #(.DEPTH(DEPTH)) u_page_a (
    .clk(clk), .we(we_a), .waddr(wa_a), .wdata(wd_a), .raddr(vga_addr), .rdata(rd_a));
  fb_bram #(.DEPTH(DEPTH)) u_page_b (
    .clk(clk), .we(we_b), .waddr(wa_b), .wdata(wd_b), .raddr(vga_addr), .rdata(rd_b));

  logic vga_en_q;
  always_ff @(posedge clk) begin
    show_a_q <= show_a;
    vga_en_q <= vga_en;
  end
  assign vga_data = !vga_en_q ? '0 : (show_a_q ? rd_a : rd_b);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= WRITE_A;
      clr_addr <= '0;
      clr_done <= 1'b0;
      go_seen  <= 1'b0;
      swap     <= 1'b0;
    end else begin
      swap <= 1'b0;
      unique case (state)
        WRITE_A, WRITE_B: begin
          if (frame_done) begin
            state    <= (state == WRITE_A) ? CLEAR_B : CLEAR_A;
            clr_addr <= '0;
            clr_done <= 1'b0;
            go_seen  <= 1'b0;
            swap     <= 1'b1;
          end
        end
        CLEAR_A, CLEAR_B: begin
          if (!clr_done) begin
            if (clr_addr == FB_AW'(DEPTH - 1))
              clr_done <= 1'b1;
            else
              clr_addr <= clr_addr + 1'b1;
          end
          if (vggo) go_seen <= 1'b1;
          if (clr_done && (go_seen || vggo))
            state <= (state == CLEAR_B) ? WRITE_B : WRITE_A;
        end
        default: state <= WRITE_A;
      endcase
    end
  end

endmodule
