// prog_ram: the CPU's 1 KB program RAM at 0x0000-0x03FF (zero page, stack
// and game variables). Single port, 8 bits wide, synchronous: a write
// happens at the clock edge when we is high, and rdata shows the byte at
// the address of the previous clock. Size and width follow the memory map;
// the synchronous block-RAM timing is this design's.
module prog_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
