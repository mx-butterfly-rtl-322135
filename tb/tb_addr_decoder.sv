// tb_addr_decoder: drives CPU accesses across the memory map and checks the
// routing. Memories are modelled here as one-clock-latency reads returning a
// pattern tagged by region; checks cover every read source, the 0x0800 bit
// layout (3 kHz clock in bit 7, halt in bit 6), write enables reaching only
// the addressed block, one strobe per CPU write for vector go / watchdog /
// vector reset and the Math Box, the latches, and address bit 15 ignored.
module tb_addr_decoder;
  logic clk = 0, rst = 1, ce;
  logic [15:0] cpu_addr = 0;
  logic cpu_we = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata;
  logic pram_we, vmem_we, pokey_we, mb_we, vggo, vgrst, wdclr;
  logic [9:0] pram_addr;
  logic [13:0] prom_addr;
  logic [12:0] vmem_addr;
  logic [3:0] pokey_addr;
  logic [4:0] mb_op;
  logic [7:0] pram_rdata, prom_rdata, vmem_rdata, pokey_rdata, coin_ctr, sound_latch, wdata;
  logic mb_done = 1;
  logic [7:0] mb_lo = 8'h5A, mb_hi = 8'hC3, opt_a = 8'h81, opt_b = 8'h42;
  logic [5:0] in0 = 6'h15;
  logic clk3k = 1, avg_halt = 0;
  int checks = 0, failures = 0;
  int n_vggo = 0, n_vgrst = 0, n_wd = 0, n_mb = 0, n_pram = 0, n_vmem = 0, n_pokey = 0;
  int div = 0;
  logic [4:0] last_op;
  logic [3:0] last_pokey;

  addr_decoder dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    div <= (div == 3) ? 0 : div + 1;
    pram_rdata <= 8'h10 ^ 8'(pram_addr);
    prom_rdata <= 8'h20 ^ 8'(prom_addr);
    vmem_rdata <= 8'h30 ^ 8'(vmem_addr);
    if (vggo) n_vggo++;
    if (vgrst) n_vgrst++;
    if (wdclr) n_wd++;
    if (mb_we) begin n_mb++; last_op <= mb_op; end
    if (pram_we) n_pram++;
    if (vmem_we) n_vmem++;
    if (pokey_we) begin n_pokey++; last_pokey <= pokey_addr; end
  end
  assign ce = (div == 0);
  assign pokey_rdata = 8'h40 | 8'(pokey_addr);

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0h expected %0h", what, g, e); end
  endtask

  // one CPU cycle: hold the access until a clock with ce
  task automatic cyc_wr(int a, int d);
    @(negedge clk); cpu_addr = 16'(a); cpu_we = 1; cpu_wdata = 8'(d);
    while (!ce) @(negedge clk);
    @(negedge clk); cpu_we = 0;
    while (!ce) @(negedge clk);
  endtask
  task automatic cyc_rd(int a, output logic [7:0] d);
    @(negedge clk); cpu_addr = 16'(a); cpu_we = 0;
    @(negedge clk); @(negedge clk);
    d = cpu_rdata;
  endtask

  logic [7:0] d;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    cyc_rd(16'h0123, d); chk("RAM read", d, 8'h10 ^ 8'h23);
    cyc_rd(16'h03FF, d); chk("RAM top", d, 8'h10 ^ 8'hFF);
    cyc_rd(16'h5000, d); chk("ROM base", d, 8'h20);
    cyc_rd(16'h7FFC, d); chk("ROM vector", d, 8'h20 ^ 8'hFC);
    cyc_rd(16'hFFFC, d); chk("ROM vector via A15", d, 8'h20 ^ 8'hFC);
    cyc_rd(16'h2042, d); chk("vector RAM", d, 8'h30 ^ 8'h42);
    cyc_rd(16'h3F01, d); chk("vector ROM", d, 8'h30 ^ 8'h01);
    cyc_rd(16'h0800, d); chk("IN0 halt=0 clk=1", d, 8'h95);
    clk3k = 0; avg_halt = 1;
    cyc_rd(16'h0800, d); chk("IN0 halt=1 clk=0", d, 8'h55);
    cyc_rd(16'h0A00, d); chk("options A", d, 8'h81);
    cyc_rd(16'h0C00, d); chk("options B", d, 8'h42);
    cyc_rd(16'h1800, d); chk("mathbox status", d, 8'h80);
    cyc_rd(16'h1810, d); chk("mathbox low", d, 8'h5A);
    cyc_rd(16'h1818, d); chk("mathbox high", d, 8'hC3);
    cyc_rd(16'h182A, d); chk("POKEY RANDOM", d, 8'h4A);
    cyc_rd(16'h1828, d); chk("POKEY ALLPOT", d, 8'h48);
    cyc_rd(16'h4000, d); chk("unmapped", d, 8'h00);
    // writes
    cyc_wr(16'h0200, 8'h11); chk("RAM write", n_pram, 1);
    cyc_wr(16'h2100, 8'h22); chk("vmem write", n_vmem, 1);
    cyc_wr(16'h6000, 8'h33); chk("ROM write goes nowhere", n_pram + n_vmem, 2);
    cyc_wr(16'h1200, 0); chk("vggo once", n_vggo, 1);
    cyc_wr(16'h1600, 0); chk("vgrst once", n_vgrst, 1);
    cyc_wr(16'h1400, 0); chk("watchdog once", n_wd, 1);
    chk("no extra vggo", n_vggo, 1);
    cyc_wr(16'h186B, 8'h01); chk("mathbox op strobe", n_mb, 1); chk("mathbox op 6B", last_op, 5'h0B);
    cyc_wr(16'h1874, 8'h01); chk("mathbox op 74", last_op, 5'h14);
    cyc_wr(16'h1825, 8'h07); chk("pokey write", n_pokey, 1); chk("pokey reg", last_pokey, 5);
    cyc_wr(16'h1000, 8'hA5); chk("coin counters", coin_ctr, 8'hA5);
    cyc_wr(16'h1840, 8'h3C); chk("sound latch", sound_latch, 8'h3C);
    chk("coin counter kept", coin_ctr, 8'hA5);
    chk("pokey not hit by others", n_pokey, 1);
    chk("RAM not hit by others", n_pram, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
