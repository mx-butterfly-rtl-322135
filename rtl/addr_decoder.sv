// addr_decoder: the CPU's memory map.
//
// Routes every CPU access to the block that owns the address (only the low
// 15 address bits are decoded) and returns read data one clock after the
// address, the timing of a synchronous block RAM, for memories and for
// memory-mapped inputs alike. Writes act on clocks where ce (the CPU clock
// enable) and cpu_we are both high; each register write or strobe happens
// once per CPU write.
//
//   0000-03FF  program RAM (1 KB)
//   0800       read: bit 7 = 3 kHz clock, bit 6 = AVG halt, bits 5:0 = in0
//              (coin, slam, self-test and diagnostic switches)
//   0A00       read: option switches A     0C00  read: option switches B
//   1000       write: coin counter latch
//   1200/1400/1600  write strobes: vector go / watchdog clear / vector reset
//   1800       read: Math Box status        1810/1818  read: result low/high
//   1820-182F  POKEY registers (read and write)
//   1840       write: sound latch for the discrete sound circuits
//   1860-187F  write: Math Box operation, op = address bits 4:0
//   2000-3FFF  vector RAM/ROM, byte address 0..1FFF
//   5000-7FFF  program ROM, offset from 0x5000
// Unmapped reads return 0.
//
// The map and the bit positions of the 3 kHz clock and halt follow the
// document's memory map; how far each I/O address is decoded (0800-09FF etc.
// are mirrors here) and the one-clock read latency are this design's.
module addr_decoder (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  // CPU bus
  input  logic [15:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  // program RAM
  output logic        pram_we,
  output logic [9:0]  pram_addr,
  input  logic [7:0]  pram_rdata,
  // program ROM
  output logic [13:0] prom_addr,
  input  logic [7:0]  prom_rdata,
  // vector memory, CPU port
  output logic        vmem_we,
  output logic [12:0] vmem_addr,
  input  logic [7:0]  vmem_rdata,
  // POKEY
  output logic        pokey_we,
  output logic [3:0]  pokey_addr,
  input  logic [7:0]  pokey_rdata,
  // Math Box
  output logic        mb_we,
  output logic [4:0]  mb_op,
  input  logic        mb_done,
  input  logic [7:0]  mb_lo,
  input  logic [7:0]  mb_hi,
  // inputs
  input  logic [5:0]  in0,
  input  logic        clk3k,
  input  logic        avg_halt,
  input  logic [7:0]  opt_a,
  input  logic [7:0]  opt_b,
  // outputs
  output logic        vggo,
  output logic        vgrst,
  output logic        wdclr,
  output logic [7:0]  coin_ctr,
  output logic [7:0]  sound_latch,
  // common write data for the blocks above
  output logic [7:0]  wdata
);

  typedef enum logic [1:0] {SEL_IO, SEL_RAM, SEL_ROM, SEL_VMEM} sel_e;

  logic [14:0] a;
  logic        wr;
  logic        is_ram, is_vmem, is_rom, is_18xx;
  sel_e        sel, sel_q;
  logic [7:0]  io_val, io_q;

  assign a       = cpu_addr[14:0];
  assign wr      = ce && cpu_we;
  assign wdata   = cpu_wdata;
  assign is_ram  = (a[14:10] == 5'b00000);
  assign is_vmem = (a[14:13] == 2'b01);
  assign is_rom  = (a >= 15'h5000);
  assign is_18xx = (a[14:9] == 6'h0C);

  assign pram_addr  = a[9:0];
  assign pram_we    = wr && is_ram;
  assign vmem_addr  = a[12:0];
  assign vmem_we    = wr && is_vmem;
  assign prom_addr  = 14'(a - 15'h5000);
  assign pokey_addr = a[3:0];
  assign pokey_we   = wr && is_18xx && (a[7:4] == 4'h2);
  assign mb_op      = a[4:0];
  assign mb_we      = wr && is_18xx && (a[7:5] == 3'b011);
  assign vggo       = wr && (a[14:9] == 6'h09);
  assign wdclr      = wr && (a[14:9] == 6'h0A);
  assign vgrst      = wr && (a[14:9] == 6'h0B);

  always_comb begin
    sel    = SEL_IO;
    io_val = 8'h00;
    if (is_ram)       sel = SEL_RAM;
    else if (is_vmem) sel = SEL_VMEM;
    else if (is_rom)  sel = SEL_ROM;
    unique case (a[14:9])
      6'h04: io_val = {clk3k, avg_halt, in0};
      6'h05: io_val = opt_a;
      6'h06: io_val = opt_b;
      6'h0C: begin
        if (a[7:0] == 8'h00)      io_val = {mb_done, 7'd0};
        else if (a[7:0] == 8'h10) io_val = mb_lo;
        else if (a[7:0] == 8'h18) io_val = mb_hi;
        else if (a[7:4] == 4'h2)  io_val = pokey_rdata;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    sel_q <= sel;
    io_q  <= io_val;
    if (rst) begin
      coin_ctr    <= '0;
      sound_latch <= '0;
    end else if (wr) begin
      if (a[14:9] == 6'h08)                   coin_ctr    <= cpu_wdata;
      if (is_18xx && a[7:0] == 8'h40)         sound_latch <= cpu_wdata;
    end
  end

  always_comb begin
    unique case (sel_q)
      SEL_RAM:  cpu_rdata = pram_rdata;
      SEL_ROM:  cpu_rdata = prom_rdata;
      SEL_VMEM: cpu_rdata = vmem_rdata;
      default:  cpu_rdata = io_q;
    endcase
  end

endmodule
