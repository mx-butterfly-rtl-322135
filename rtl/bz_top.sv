// bz_top: the Battlezone arcade board rebuilt for an FPGA with a VGA
// display, around an external 6502 CPU and an external Math Box.
//
// The CPU (not part of this RTL) runs the game program and talks to
// everything through addr_decoder: program RAM and ROM, the vector memory it
// shares with the graphics processor, the POKEY (controls, random numbers,
// sound), the Math Box ports, switches, the coin-counter and sound latches,
// and the vector go/reset strobes. The CPU bus, its clock enable and its
// NMI are ports of this module, as are the Math Box's operation strobe and
// result registers.
//
// Graphics path: the CPU writes a vector program into vector RAM and
// strobes vector-go. The AVG executes it, reading 16-bit words through the
// second port of vector_mem, and sends each visible vector as a line segment
// to the line register queue. The rasterizer pops segments and writes their
// pixels into the frame buffer's drawing page; once the AVG has halted and
// the queue and rasterizer are empty the frame buffer swaps pages, clears
// the old one and waits for the next vector-go. The VGA controller reads
// the displayed page continuously at 640x480, 60 Hz.
//
// Clocks: one 100 MHz clock; the CPU/POKEY (1.79 MHz), AVG (6.25 MHz), VGA
// pixel (25 MHz) and 3 kHz rates are clock enables from clk_enables. All
// memories read one clock after the address. Reset is synchronous and
// active high.
//
// Parameters: PROM_FILE names a hex image of the 12 KB program ROM;
// VROM_EVEN and VROM_ODD name the even and odd byte images of the 8 KB
// vector memory (ROM at 0x3000-0x3FFF, optional initial RAM below it). All
// are empty by default, leaving the ROM as NOPs and the vector ROM unset.
//
// Some block outputs are status for test and debug and stay unconnected
// here: queue overflow (cannot happen, the AVG waits on full), rasterizer
// done, page swap, frame-buffer state, VGA frame start, and the AVG COLOR
// register, which has no use because the screen colour comes from the row.
//
// The block structure and connections follow the board's architecture; the
// single-clock scheme and the AVG waiting on a full queue are this design's.
module bz_top
  import bz_pkg::*;
#(
  parameter string PROM_FILE  = "",
  parameter string VROM_EVEN  = "",
  parameter string VROM_ODD   = ""
) (
  input  logic        clk,
  input  logic        rst,
  // external 6502 CPU
  output logic        cpu_ce,
  output logic        cpu_nmi,
  input  logic [15:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  // external Math Box
  output logic        mb_we,
  output logic [4:0]  mb_op,
  output logic [7:0]  mb_wdata,
  input  logic        mb_done,
  input  logic [7:0]  mb_lo,
  input  logic [7:0]  mb_hi,
  // switches and controls
  input  logic [5:0]  in0,
  input  logic [7:0]  opt_a,
  input  logic [7:0]  opt_b,
  input  logic [7:0]  pot_in,
  // VGA
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  // sound and cabinet
  output logic        audio_out,
  output logic [7:0]  sound_latch,
  output logic [7:0]  coin_ctr,
  output logic        watchdog_clr
);

  // clock enables
  logic avg_ce, pix_ce, clk3k, tick3k;
  clk_enables u_clk (
    .clk(clk), .rst(rst), .cpu_ce(cpu_ce), .avg_ce(avg_ce), .pix_ce(pix_ce),
    .clk3k(clk3k), .tick3k(tick3k));

  nmi_counter u_nmi (.clk(clk), .rst(rst), .tick3k(tick3k), .nmi(cpu_nmi));

  // address decoder and memories
  logic        pram_we, vmem_we, pokey_we, vggo, vgrst, avg_halt;
  logic [9:0]  pram_addr;
  logic [13:0] prom_addr;
  logic [12:0] vmem_addr;
  logic [3:0]  pokey_addr;
  logic [7:0]  pram_rdata, prom_rdata, vmem_rdata, pokey_rdata, wdata;

  addr_decoder u_dec (
    .clk(clk), .rst(rst), .ce(cpu_ce),
    .cpu_addr(cpu_addr), .cpu_we(cpu_we), .cpu_wdata(cpu_wdata), .cpu_rdata(cpu_rdata),
    .pram_we(pram_we), .pram_addr(pram_addr), .pram_rdata(pram_rdata),
    .prom_addr(prom_addr), .prom_rdata(prom_rdata),
    .vmem_we(vmem_we), .vmem_addr(vmem_addr), .vmem_rdata(vmem_rdata),
    .pokey_we(pokey_we), .pokey_addr(pokey_addr), .pokey_rdata(pokey_rdata),
    .mb_we(mb_we), .mb_op(mb_op), .mb_done(mb_done), .mb_lo(mb_lo), .mb_hi(mb_hi),
    .in0(in0), .clk3k(clk3k), .avg_halt(avg_halt), .opt_a(opt_a), .opt_b(opt_b),
    .vggo(vggo), .vgrst(vgrst), .wdclr(watchdog_clr), .coin_ctr(coin_ctr),
    .sound_latch(sound_latch), .wdata(wdata));
  assign mb_wdata = wdata;

  prog_ram u_pram (.clk(clk), .we(pram_we), .addr(pram_addr), .wdata(wdata), .rdata(pram_rdata));
  prog_rom #(.INIT_FILE(PROM_FILE)) u_prom (.clk(clk), .addr(prom_addr), .rdata(prom_rdata));

  logic [11:0] avg_maddr;
  logic [15:0] avg_mdata;
  vector_mem #(.EVEN_FILE(VROM_EVEN), .ODD_FILE(VROM_ODD)) u_vmem (
    .clk(clk), .a_we(vmem_we), .a_addr(vmem_addr), .a_wdata(wdata), .a_rdata(vmem_rdata),
    .b_addr(avg_maddr), .b_rdata(avg_mdata));

  // graphics pipeline
  line_t avg_line, lrq_line;
  logic  avg_wr, lrq_full, lrq_empty, lrq_overflow, rast_rd, rast_idle, rast_done;
  logic  fb_accept, fb_swap, pix_we, vga_en;
  logic [FB_AW-1:0] pix_addr, vga_addr;
  logic [PIX_W-1:0] pix_data, vga_data;
  logic [3:0]  avg_color;
  logic [1:0]  fb_state;

  avg u_avg (
    .clk(clk), .rst(rst), .ce(avg_ce), .vggo(vggo), .vgrst(vgrst),
    .mem_addr(avg_maddr), .mem_rdata(avg_mdata),
    .line(avg_line), .line_wr(avg_wr), .line_full(lrq_full),
    .halt(avg_halt), .color(avg_color));

  line_queue u_lrq (
    .clk(clk), .rst(rst), .wr(avg_wr), .wr_line(avg_line), .rd(rast_rd),
    .rd_line(lrq_line), .empty(lrq_empty), .full(lrq_full), .overflow(lrq_overflow));

  rasterizer u_rast (
    .clk(clk), .rst(rst), .in_line(lrq_line), .in_valid(!lrq_empty && fb_accept),
    .in_rd(rast_rd), .pix_we(pix_we), .pix_addr(pix_addr), .pix_data(pix_data),
    .idle(rast_idle), .done(rast_done));

  frame_buffer u_fb (
    .clk(clk), .rst(rst), .pix_we(pix_we), .pix_addr(pix_addr), .pix_data(pix_data),
    .avg_halt(avg_halt), .lrq_empty(lrq_empty), .rast_idle(rast_idle), .vggo(vggo),
    .vga_en(vga_en), .vga_addr(vga_addr), .vga_data(vga_data),
    .state_o(fb_state), .accept(fb_accept), .swap(fb_swap));

  logic vga_frame;
  vga_ctrl u_vga (
    .clk(clk), .rst(rst), .pix_ce(pix_ce), .fb_en(vga_en), .fb_addr(vga_addr),
    .fb_data(vga_data), .hsync(vga_hsync), .vsync(vga_vsync),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .frame_start(vga_frame));

  // sound
  logic [7:0] pokey_wdata;
  logic [5:0] audio_level;
  assign pokey_wdata = wdata;
  pokey u_pokey (
    .clk(clk), .rst(rst), .ce(cpu_ce), .addr(pokey_addr), .we(pokey_we),
    .wdata(pokey_wdata), .rdata(pokey_rdata), .pot_in(pot_in), .audio_level(audio_level));
  audio_pwm u_pwm (.clk(clk), .rst(rst), .level(audio_level), .pwm(audio_out));

endmodule
