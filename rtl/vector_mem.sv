// vector_mem: vector RAM/ROM shared by the CPU and the AVG.
//
// 8 KB, 0x2000-0x3FFF on the CPU bus. Port A is the CPU's: 8 bits wide, byte
// address 0..0x1FFF, read and write. Port B is the AVG's: 16 bits wide, word
// address 0..0x0FFF, read only; word w is byte 2w (low half) and byte 2w+1
// (high half), little endian as the CPU writes it. Both ports read
// synchronously (data one clock after the address). Internally the memory
// is two byte-wide banks, even and odd bytes, so a 16-bit word is one read
// of each bank. CPU writes at and above WRITABLE (0x1000, i.e. 0x3000) are
// ignored: that part is ROM. The ROM (and any initial RAM image) comes from
// the two hex files EVEN_FILE and ODD_FILE when they are given.
//
// One dual-ported memory with an 8-bit and a 16-bit port, and its place in
// the map, follow the description. Treating 0x2800-0x2FFF as writable, the
// banked layout and the file loading are this design's choices.
module vector_mem #(
  parameter int unsigned BYTES     = 8192,
  parameter int unsigned WRITABLE  = 4096,
  parameter string       EVEN_FILE = "",
  parameter string       ODD_FILE  = ""
) (
  input  logic                       clk,
  // CPU port
  input  logic                       a_we,
  input  logic [$clog2(BYTES)-1:0]   a_addr,
  input  logic [7:0]                 a_wdata,
  output logic [7:0]                 a_rdata,
  // AVG port
  input  logic [$clog2(BYTES)-2:0]   b_addr,
  output logic [15:0]                b_rdata
);

  localparam int unsigned WORDS = BYTES / 2;
  localparam int unsigned AW    = $clog2(BYTES);

  logic [7:0] even_mem [WORDS];
  logic [7:0] odd_mem  [WORDS];
  logic       a_odd_q;
  logic [7:0] a_even_q, a_oddb_q;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) begin
      even_mem[i] = 8'h00;
      odd_mem[i]  = 8'h00;
    end
    if (EVEN_FILE != "") $readmemh(EVEN_FILE, even_mem);
    if (ODD_FILE  != "") $readmemh(ODD_FILE,  odd_mem);
  end

  logic a_wr_ok;
  assign a_wr_ok = a_we && (a_addr < AW'(WRITABLE));

  always_ff @(posedge clk) begin
    if (a_wr_ok && !a_addr[0]) even_mem[a_addr[AW-1:1]] <= a_wdata;
    if (a_wr_ok &&  a_addr[0]) odd_mem[a_addr[AW-1:1]]  <= a_wdata;
    a_even_q <= even_mem[a_addr[AW-1:1]];
    a_oddb_q <= odd_mem[a_addr[AW-1:1]];
    a_odd_q  <= a_addr[0];
    b_rdata  <= {odd_mem[b_addr], even_mem[b_addr]};
  end

  assign a_rdata = a_odd_q ? a_oddb_q : a_even_q;

endmodule
