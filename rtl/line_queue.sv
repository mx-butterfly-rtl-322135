// line_queue: line register queue (LRQ) between the AVG and the rasterizer.
//
// A FIFO of line segments (two end points and an intensity). The AVG runs on
// a slow clock enable and holds its write strobe high for a whole AVG cycle,
// i.e. for many cycles of this queue's clock, so a segment is taken only on
// the rising edge of wr: the strobe has to go low before the next segment is
// accepted. The head segment is presented on rd_line with empty = 0; a
// one-cycle rd pulse from the rasterizer drops it and moves to the next one.
// A write arriving while the queue is full is dropped and counted on
// overflow (the AVG looks at full and waits, so this does not happen in the
// assembled design).
//
// The edge-triggered write and the read-advance behaviour follow the
// description; the depth of 16 and the full/overflow outputs are this
// design's choice.
module line_queue
  import bz_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  wr,
  input  line_t wr_line,
  input  logic  rd,
  output line_t rd_line,
  output logic  empty,
  output logic  full,
  output logic  overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  line_t         mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          wr_q;
  logic          push, pop;

  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign rd_line = mem[rptr[AW-1:0]];
  assign push    = wr && !wr_q && !full;
  assign pop     = rd && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      wr_q     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wr_q     <= wr;
      overflow <= wr && !wr_q && full;
      if (push) begin
        mem[wptr[AW-1:0]] <= wr_line;
        wptr              <= wptr + 1'b1;
      end
      if (pop)
        rptr <= rptr + 1'b1;
    end
  end

endmodule
