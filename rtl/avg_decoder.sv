// avg_decoder: decode unit of the emulated analog vector generator (AVG).
//
// Purely combinational. It takes the first instruction word (ir0) and, for
// the 32-bit VECTOR instruction, the second word (ir1), and returns the
// control flags the AVG acts on: next-PC override for JMP/JSR/RET, return
// stack push/pop, halt, center, the STAT and SCALE register values, the
// beam deltas and intensity field of VECTOR/SVEC, and the instruction
// latency that the AVG loads into its cycle counter.
//
// Encoding (Atari AVG): bits 15:13 are the opcode.
//   VECTOR  w0 = 000 dy[12:0]          w1 = z[2:0] dx[12:0]
//   HALT    001 -
//   SVEC    010 dy[4:0] z[2:0] dx[4:0] (deltas are doubled)
//   STAT    0110 xxxx int[3:0] color[3:0]
//   SCALE   0111 x bin[2:0] lin[7:0]
//   CNTR    100 -
//   JSR     101 x addr[11:0] (word address; bit 12 unused)
//   RET     110 -
//   JMP     111 x addr[11:0] (word address; bit 12 unused)
// Which flags exist and the VECTOR latency of 7 follow the design
// description; the bit layout is the Atari AVG's, and the latency of 2 for
// every other instruction is this design's choice.
module avg_decoder
  import bz_pkg::*;
(
  input  logic [15:0] ir0,
  input  logic [15:0] ir1,
  output avg_dec_t    dec
);

  always_comb begin
    dec            = '0;
    dec.op         = avg_op_e'(ir0[15:13]);
    dec.latency    = LAT_OTHER;
    dec.target     = {ir0[11:0], 1'b0};
    dec.stat_int   = ir0[7:4];
    dec.stat_color = ir0[3:0];
    dec.lin_scale  = ir0[7:0];
    dec.bin_scale  = ir0[10:8];
    unique case (avg_op_e'(ir0[15:13]))
      OP_VCTR: begin
        dec.latency = LAT_VECTOR;
        dec.is_long = 1'b1;
        dec.draw    = 1'b1;
        dec.dy      = 14'(signed'(ir0[12:0]));
        dec.dx      = 14'(signed'(ir1[12:0]));
        dec.z       = ir1[15:13];
      end
      OP_SVEC: begin
        dec.draw = 1'b1;
        dec.dy   = 14'(signed'({ir0[12:8], 1'b0}));
        dec.dx   = 14'(signed'({ir0[4:0], 1'b0}));
        dec.z    = ir0[7:5];
      end
      OP_HALT: dec.halt   = 1'b1;
      OP_CNTR: dec.center = 1'b1;
      OP_STSC: begin
        dec.wr_stat  = ~ir0[12];
        dec.wr_scale = ir0[12];
      end
      OP_JSR: begin
        dec.jump = 1'b1;
        dec.push = 1'b1;
      end
      OP_RET:  dec.pop  = 1'b1;
      OP_JMP:  dec.jump = 1'b1;
      default: ;
    endcase
  end

endmodule
