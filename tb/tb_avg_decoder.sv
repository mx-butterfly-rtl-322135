// tb_avg_decoder: checks the AVG decode unit on one example of every
// instruction, with expected fields worked out by hand from the encoding.
module tb_avg_decoder;
  import bz_pkg::*;
  logic [15:0] ir0, ir1;
  avg_dec_t    dec;
  int checks = 0, failures = 0;

  avg_decoder dut (.ir0(ir0), .ir1(ir1), .dec(dec));

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    // VECTOR dy=+100, dx=-50, z=3
    ir0 = 16'h0064; ir1 = 16'h7FCE; #1;
    chk("vctr op", dec.op, OP_VCTR); chk("vctr lat", dec.latency, 7);
    chk("vctr long", dec.is_long, 1); chk("vctr draw", dec.draw, 1);
    chk("vctr dy", dec.dy, 100); chk("vctr dx", dec.dx, -50); chk("vctr z", dec.z, 3);
    // VECTOR with negative dy = -4096 (0x1000)
    ir0 = 16'h1000; ir1 = 16'h0FFF; #1;
    chk("vctr dy min", dec.dy, -4096); chk("vctr dx max", dec.dx, 4095); chk("vctr z0", dec.z, 0);
    // SVEC dy=+3, z=1, dx=-2 -> doubled 6 / -4
    ir0 = 16'h433E; ir1 = 16'hFFFF; #1;
    chk("svec op", dec.op, OP_SVEC); chk("svec lat", dec.latency, 2); chk("svec long", dec.is_long, 0);
    chk("svec dy", dec.dy, 6); chk("svec dx", dec.dx, -4); chk("svec z", dec.z, 1);
    // HALT
    ir0 = 16'h2000; #1;
    chk("halt", dec.halt, 1); chk("halt draw", dec.draw, 0); chk("halt jump", dec.jump, 0);
    // STAT intensity 5, color 2
    ir0 = 16'h6052; #1;
    chk("stat wr", dec.wr_stat, 1); chk("stat nscale", dec.wr_scale, 0);
    chk("stat int", dec.stat_int, 5); chk("stat col", dec.stat_color, 2);
    // SCALE bin 1, lin 0x80
    ir0 = 16'h7180; #1;
    chk("scale wr", dec.wr_scale, 1); chk("scale nstat", dec.wr_stat, 0);
    chk("scale lin", dec.lin_scale, 128); chk("scale bin", dec.bin_scale, 1);
    // CNTR
    ir0 = 16'h8000; #1;
    chk("cntr", dec.center, 1); chk("cntr halt", dec.halt, 0);
    // JSR to word 0x123 -> byte 0x246
    ir0 = 16'hA123; #1;
    chk("jsr jump", dec.jump, 1); chk("jsr push", dec.push, 1); chk("jsr tgt", dec.target, 16'h246);
    // RET
    ir0 = 16'hC000; #1;
    chk("ret pop", dec.pop, 1); chk("ret jump", dec.jump, 0); chk("ret push", dec.push, 0);
    // JMP to word 0x010 -> byte 0x020
    ir0 = 16'hE010; #1;
    chk("jmp jump", dec.jump, 1); chk("jmp push", dec.push, 0); chk("jmp tgt", dec.target, 16'h020);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
