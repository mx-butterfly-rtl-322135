// prog_rom: the CPU's 12 KB program ROM at 0x5000-0x7FFF (4 KB at
// 0x5000-0x5FFF and 8 KB at 0x6000-0x7FFF, which also holds the reset and
// interrupt vectors). addr is the offset from 0x5000. Synchronous read: rdata
// shows the byte at the address of the previous clock. The contents are the
// game program, loaded at elaboration from the hex file named by INIT_FILE
// (one byte per line, $readmemh format); with INIT_FILE empty the ROM reads
// as 0xEA (the 6502 NOP). Size follows the memory map; the file loading and
// the fill value are this design's.
module prog_rom #(
  parameter int unsigned DEPTH     = 12288,
  parameter int unsigned AW        = $clog2(DEPTH),
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = 8'hEA;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk)
    rdata <= (addr < AW'(DEPTH)) ? mem[addr] : 8'hEA;

endmodule
