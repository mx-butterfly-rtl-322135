// tb_line_queue: checks the line register queue: one entry per rising edge
// of a long write strobe, FIFO order, full/empty flags, dropping and
// flagging a write when full, and the read-advance.
module tb_line_queue;
  import bz_pkg::*;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  line_t wr_line, rd_line;
  logic empty, full, overflow;
  int checks = 0, failures = 0;

  line_queue #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic line_t mk(int n);
    line_t l;
    l.x0 = coord_t'(n); l.y0 = coord_t'(n + 1); l.x1 = coord_t'(n + 2); l.y1 = coord_t'(-n);
    l.intensity = 4'(n);
    return l;
  endfunction

  // hold the strobe high for 'len' cycles, as the slow AVG does
  task automatic put(int n, int len);
    @(negedge clk); wr = 1; wr_line = mk(n);
    repeat (len) @(negedge clk);
    wr = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk("empty after reset", empty, 1); chk("not full", full, 0);
    put(1, 16);
    @(negedge clk);
    chk("one entry, not empty", empty, 0);
    chk("head x0", rd_line.x0, 1); chk("head y1", rd_line.y1, -1);
    put(2, 7); put(3, 1); put(4, 3);
    @(negedge clk);
    chk("full after 4", full, 1);
    // fifth write is dropped and flagged
    @(negedge clk); wr = 1; wr_line = mk(5);
    @(negedge clk); chk("overflow flagged", overflow, 1);
    repeat (3) @(negedge clk); wr = 0;
    // read out in order
    for (int n = 1; n <= 4; n++) begin
      @(negedge clk);
      chk($sformatf("order %0d", n), rd_line.intensity, n);
      chk($sformatf("order x1 %0d", n), rd_line.x1, n + 2);
      rd = 1; @(negedge clk); rd = 0;
    end
    @(negedge clk);
    chk("empty at end", empty, 1);
    // read on empty does nothing
    rd = 1; @(negedge clk); rd = 0; @(negedge clk);
    chk("still empty", empty, 1); chk("not full at end", full, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
