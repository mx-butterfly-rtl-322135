// avg: emulated Atari analog vector generator.
//
// A small processor that runs the vector program held in vector memory and
// turns VECTOR/SVEC instructions into line segments for the raster pipeline.
// Registers: PC (byte address), LINSCALE, BINSCALE, INTENSITY, COLOR, beam
// position X/Y (signed, 0 = screen centre), a 4-deep return stack, and a
// cycle counter that gives every instruction a fixed latency.
//
// Timing (all on cycles where ce = 1). With counter 0 the instruction word
// read at PC is on mem_rdata: it is latched and the counter loads the
// decoded latency L. The counter then counts L, L-1, ..., 1; on count 1 the
// instruction executes and the next PC is presented to the memory, so the
// next instruction is on mem_rdata at the following count 0. An instruction
// therefore takes L+1 cycles. VECTOR (L = 7) is 32 bits: from count 7 the
// memory is addressed at PC+2 and the second word is latched at the end of
// count 6 (the address is held through count 6 so this also works when ce
// is not high on every clock).
// Memory is a synchronous 16-bit read port addressed by word.
//
// vggo (start at address 0, clear halt) and vgrst (stop, PC = 0) act on the
// first clock they are seen, independent of ce, so halt drops in the same
// cycle the frame buffer sees vggo. While either is high the memory is
// addressed at 0, so the first instruction word is ready on the next clock.
//
// Output: when a visible vector executes, line_wr goes high for one ce
// period with both end points in screen pixels. Intensity field 0 means
// blank (no segment), 1 means use the INTENSITY register, other values v
// give intensity 2*v. If the line queue is full the AVG waits on count 1.
//
// Follows the description: register set, return stack depth, counter
// scheme, VECTOR second-word fetch, halt/vggo behaviour, scaling by both
// scale registers. This design's own choices: the scale formula
// d*(256-LINSCALE)/256 >> BINSCALE, the beam-to-pixel mapping
// (320 + X>>POS_SHIFT, 240 - Y>>POS_SHIFT), stack wrap-around, and waiting
// on a full queue.
module avg
  import bz_pkg::*;
#(
  parameter int unsigned POS_SHIFT = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic                vggo,
  input  logic                vgrst,
  // vector memory, 16-bit port
  output logic [AVG_PC_W-2:0] mem_addr,   // word address
  input  logic [15:0]         mem_rdata,
  // line register queue
  output line_t               line,
  output logic                line_wr,
  input  logic                line_full,
  // status
  output logic                halt,
  output logic [3:0]          color
);

  logic [AVG_PC_W-1:0]  pc;
  logic [AVG_CNT_W-1:0] cnt;
  logic [15:0]          ir0, ir1;
  logic [7:0]           linscale;
  logic [2:0]           binscale;
  logic [3:0]           intensity;
  logic signed [15:0]   xpos, ypos;
  logic [AVG_PC_W-1:0]  stack [4];
  logic [1:0]           sp;

  avg_dec_t dec;
  avg_decoder u_dec (
    .ir0 ((cnt == '0) ? mem_rdata : ir0),
    .ir1 (ir1),
    .dec (dec)
  );

  // scaled deltas
  logic signed [23:0] sdx_full, sdy_full;
  logic signed [15:0] sdx, sdy;
  logic signed [15:0] nx, ny;
  always_comb begin
    sdx_full = (24'(dec.dx) * 24'(signed'({1'b0, 9'd256 - {1'b0, linscale}}))) >>> 8;
    sdy_full = (24'(dec.dy) * 24'(signed'({1'b0, 9'd256 - {1'b0, linscale}}))) >>> 8;
    sdx      = 16'(sdx_full >>> binscale);
    sdy      = 16'(sdy_full >>> binscale);
    nx       = xpos + sdx;
    ny       = ypos + sdy;
  end

  function automatic coord_t to_sx(logic signed [15:0] v);
    return coord_t'(16'sd320 + (v >>> POS_SHIFT));
  endfunction
  function automatic coord_t to_sy(logic signed [15:0] v);
    return coord_t'(16'sd240 - (v >>> POS_SHIFT));
  endfunction

  logic visible, exec, stall;
  logic [AVG_PC_W-1:0] pc_next;
  always_comb begin
    visible = dec.draw && (dec.z != 3'd0);
    stall   = visible && line_full;
    exec    = ce && !halt && (cnt == 3'd1) && !stall;
    pc_next = pc + (dec.is_long ? AVG_PC_W'(4) : AVG_PC_W'(2));
    if (dec.jump) pc_next = dec.target;
    if (dec.pop)  pc_next = stack[sp - 2'd1];
  end

  // memory address: next PC on the executing count, second word on counts 7-6
  always_comb begin
    mem_addr = pc[AVG_PC_W-1:1];
    if (vggo || vgrst)
      mem_addr = '0;
    else if (!halt && cnt == 3'd1)
      mem_addr = pc_next[AVG_PC_W-1:1];
    else if (!halt && (cnt == LAT_VECTOR || cnt == LAT_VECTOR - 3'd1) && dec.is_long)
      mem_addr = pc[AVG_PC_W-1:1] + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || vgrst) begin
      halt      <= 1'b1;
      pc        <= '0;
      cnt       <= '0;
      sp        <= '0;
      xpos      <= '0;
      ypos      <= '0;
      line_wr   <= 1'b0;
      ir0       <= '0;
      ir1       <= '0;
      if (rst) begin
        linscale  <= '0;
        binscale  <= '0;
        intensity <= '0;
        color     <= '0;
      end
    end else if (vggo) begin
      halt    <= 1'b0;
      pc      <= '0;
      cnt     <= '0;
      sp      <= '0;
      line_wr <= 1'b0;
    end else if (ce) begin
      line_wr <= 1'b0;
      if (!halt) begin
        if (cnt == '0) begin
          ir0 <= mem_rdata;
          cnt <= dec.latency;
        end else begin
          if (cnt == LAT_VECTOR - 3'd1 && dec.is_long)
            ir1 <= mem_rdata;
          if (!(stall && cnt == 3'd1))
            cnt <= cnt - 1'b1;
        end
        if (exec) begin
          pc <= pc_next;
          if (dec.push) begin
            stack[sp] <= pc + AVG_PC_W'(2);
            sp        <= sp + 1'b1;
          end
          if (dec.pop)  sp <= sp - 1'b1;
          if (dec.halt) halt <= 1'b1;
          if (dec.center) begin
            xpos <= '0;
            ypos <= '0;
          end
          if (dec.wr_stat) begin
            intensity <= dec.stat_int;
            color     <= dec.stat_color;
          end
          if (dec.wr_scale) begin
            linscale <= dec.lin_scale;
            binscale <= dec.bin_scale;
          end
          if (dec.draw) begin
            xpos <= nx;
            ypos <= ny;
            if (visible) begin
              line_wr        <= 1'b1;
              line.x0        <= to_sx(xpos);
              line.y0        <= to_sy(ypos);
              line.x1        <= to_sx(nx);
              line.y1        <= to_sy(ny);
              line.intensity <= (dec.z == 3'd1) ? intensity : {dec.z, 1'b0};
            end
          end
        end
      end
    end
  end

endmodule
