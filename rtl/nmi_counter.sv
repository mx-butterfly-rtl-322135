// nmi_counter: periodic non-maskable interrupt for the CPU.
//
// A 4-bit counter advanced by the 3 kHz clock (tick3k, one pulse per
// period). It starts from 2 after reset, counts up to 15, asserts nmi while
// it holds 15 (one 3 kHz period, so the CPU sees one edge), and then
// reloads 2: one NMI every 14 ticks of the 3 kHz clock.
// The reload value 2, the end value 15 and the 3 kHz clock follow the
// description; holding nmi for one 3 kHz period is this design's choice.
module nmi_counter #(
  parameter logic [3:0] START = 4'd2,
  parameter logic [3:0] LAST  = 4'd15
) (
  input  logic clk,
  input  logic rst,
  input  logic tick3k,
  output logic nmi
);

  logic [3:0] cnt;
  assign nmi = (cnt == LAST);

  always_ff @(posedge clk) begin
    if (rst)
      cnt <= START;
    else if (tick3k)
      cnt <= (cnt == LAST) ? START : cnt + 1'b1;
  end

endmodule
