// tb_vector_mem: writes bytes through the CPU port and reads them back as
// bytes and as little-endian 16-bit words through the AVG port; checks that
// writes to the ROM half (byte address 0x1000 and up) are ignored and the
// one-clock read latency of both ports.
module tb_vector_mem;
  logic clk = 0, a_we = 0;
  logic [12:0] a_addr = 0;
  logic [7:0]  a_wdata = 0, a_rdata;
  logic [11:0] b_addr = 0;
  logic [15:0] b_rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [8192];

  vector_mem dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0h expected %0h", what, g, e); end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); a_we = 1; a_addr = 13'(a); a_wdata = 8'(d);
    @(negedge clk); a_we = 0;
    if (a < 4096) model[a] = 8'(d);
  endtask

  initial begin
    foreach (model[i]) model[i] = 8'h00;
    for (int i = 0; i < 300; i++) begin
      int a = (i < 200) ? $urandom_range(4095) : $urandom_range(8191, 4096);
      wr(a, $urandom_range(255));
    end
    wr(0, 8'h34); wr(1, 8'h12); wr(13'h0FFE, 8'hCD); wr(13'h0FFF, 8'hAB);
    for (int i = 0; i < 400; i++) begin
      int a = $urandom_range(8191);
      @(negedge clk); a_addr = 13'(a); b_addr = 12'(a >> 1);
      @(negedge clk);
      chk($sformatf("byte %0h", a), a_rdata, model[a]);
      chk($sformatf("word %0h", a >> 1), b_rdata, {model[(a >> 1) * 2 + 1], model[(a >> 1) * 2]});
    end
    @(negedge clk); b_addr = 0; @(negedge clk); chk("word 0 little endian", b_rdata, 16'h1234);
    @(negedge clk); b_addr = 12'h7FF; @(negedge clk); chk("last RAM word", b_rdata, 16'hABCD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
