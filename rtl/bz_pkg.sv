// bz_pkg: types and constants shared by the Battlezone board emulation.
//
// Holds the AVG instruction encoding (3-bit opcode in bits 15:13 of the first
// instruction word), the decoded-instruction record that the AVG decode unit
// hands back to the AVG, the line-segment record that travels from the AVG
// through the line register queue to the rasterizer, and the screen geometry
// of the 640x480 frame buffer. The nine instruction names, the 32-bit VECTOR,
// the 4-deep return stack and the screen size follow the design description;
// the bit encoding is the one of the Atari AVG and the latencies other than
// VECTOR's are this design's choice.
package bz_pkg;

  // Screen / frame buffer geometry
  localparam int unsigned SCREEN_W = 640;
  localparam int unsigned SCREEN_H = 480;
  localparam int unsigned FB_DEPTH = SCREEN_W * SCREEN_H;  // 307200
  localparam int unsigned FB_AW    = 19;
  localparam int unsigned PIX_W    = 4;                    // intensity bits

  // Signed pixel coordinate as carried by a line segment (may be off screen)
  localparam int unsigned COORD_W = 12;
  typedef logic signed [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t           x0;
    coord_t           y0;
    coord_t           x1;
    coord_t           y1;
    logic [PIX_W-1:0] intensity;
  } line_t;

  // AVG opcodes, bits 15:13 of the first instruction word
  typedef enum logic [2:0] {
    OP_VCTR = 3'b000,   // 32-bit long vector
    OP_HALT = 3'b001,
    OP_SVEC = 3'b010,   // 16-bit short vector
    OP_STSC = 3'b011,   // STAT (bit 12 = 0) or SCALE (bit 12 = 1)
    OP_CNTR = 3'b100,
    OP_JSR  = 3'b101,
    OP_RET  = 3'b110,
    OP_JMP  = 3'b111
  } avg_op_e;

  localparam int unsigned AVG_PC_W  = 13;  // byte address inside vector memory
  localparam int unsigned AVG_CNT_W = 3;
  localparam logic [AVG_CNT_W-1:0] LAT_VECTOR = 3'd7;
  localparam logic [AVG_CNT_W-1:0] LAT_OTHER  = 3'd2;

  // What the decode unit hands back to the AVG
  typedef struct packed {
    avg_op_e                op;
    logic [AVG_CNT_W-1:0]   latency;
    logic                   is_long;    // VECTOR: fetch a second word
    logic                   draw;       // VECTOR or SVEC: move the beam
    logic signed [13:0]     dx;         // unscaled, SVEC already doubled
    logic signed [13:0]     dy;
    logic [2:0]             z;          // vector intensity field
    logic                   jump;       // JMP, JSR: next PC = target
    logic                   push;       // JSR
    logic                   pop;        // RET
    logic                   halt;
    logic                   center;
    logic                   wr_stat;
    logic                   wr_scale;
    logic [3:0]             stat_int;
    logic [3:0]             stat_color;
    logic [7:0]             lin_scale;
    logic [2:0]             bin_scale;
    logic [AVG_PC_W-1:0]    target;     // byte address
  } avg_dec_t;

endpackage
