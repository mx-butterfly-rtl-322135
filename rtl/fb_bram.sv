// fb_bram: one 640x480 page of the frame buffer, a simple dual-port block
// RAM of 307200 words of 4 bits. Write port: we/waddr/wdata, written at the
// clock edge. Read port: raddr is registered, rdata follows one cycle later
// (block-RAM timing). Depth and width follow the description.
module fb_bram
  import bz_pkg::*;
#(
  parameter int unsigned DEPTH = FB_DEPTH
) (
  input  logic             clk,
  input  logic             we,
  input  logic [FB_AW-1:0] waddr,
  input  logic [PIX_W-1:0] wdata,
  input  logic [FB_AW-1:0] raddr,
  output logic [PIX_W-1:0] rdata
);

  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < FB_AW'(DEPTH))
      mem[waddr] <= wdata;
    rdata <= (raddr < FB_AW'(DEPTH)) ? mem[raddr] : '0;
  end

endmodule
