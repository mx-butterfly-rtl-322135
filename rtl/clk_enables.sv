// clk_enables: the board's slower clocks, made as clock enables of the
// 100 MHz system clock so the whole design stays in one clock domain.
//   cpu_ce  one pulse every CPU_DIV clocks (56: 1.786 MHz CPU/POKEY clock)
//   avg_ce  one pulse every AVG_DIV clocks (16: 6.25 MHz AVG clock)
//   pix_ce  one pulse every PIX_DIV clocks (4: 25 MHz VGA pixel clock)
//   clk3k   square wave of period 2*HALF_3K clocks (16667: 3.0 kHz)
//   tick3k  one-clock pulse on each rising edge of clk3k
// The frequencies follow the description (CPU about 1.79 MHz, AVG about
// 6 MHz, 25 MHz pixel clock, 3 kHz clock); deriving them as enables of the
// 100 MHz clock instead of separate clocks is this design's choice.
module clk_enables #(
  parameter int unsigned CPU_DIV = 56,
  parameter int unsigned AVG_DIV = 16,
  parameter int unsigned PIX_DIV = 4,
  parameter int unsigned HALF_3K = 16667
) (
  input  logic clk,
  input  logic rst,
  output logic cpu_ce,
  output logic avg_ce,
  output logic pix_ce,
  output logic clk3k,
  output logic tick3k
);

  logic [$clog2(CPU_DIV)-1:0] cpu_cnt;
  logic [$clog2(AVG_DIV)-1:0] avg_cnt;
  logic [$clog2(PIX_DIV)-1:0] pix_cnt;
  logic [$clog2(HALF_3K)-1:0] k3_cnt;

  assign cpu_ce = (cpu_cnt == '0);
  assign avg_ce = (avg_cnt == '0);
  assign pix_ce = (pix_cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cpu_cnt <= '0;
      avg_cnt <= '0;
      pix_cnt <= '0;
      k3_cnt  <= '0;
      clk3k   <= 1'b0;
      tick3k  <= 1'b0;
    end else begin
      cpu_cnt <= (cpu_cnt == ($bits(cpu_cnt))'(CPU_DIV - 1)) ? '0 : cpu_cnt + 1'b1;
      avg_cnt <= (avg_cnt == ($bits(avg_cnt))'(AVG_DIV - 1)) ? '0 : avg_cnt + 1'b1;
      pix_cnt <= (pix_cnt == ($bits(pix_cnt))'(PIX_DIV - 1)) ? '0 : pix_cnt + 1'b1;
      tick3k  <= 1'b0;
      if (k3_cnt == ($bits(k3_cnt))'(HALF_3K - 1)) begin
        k3_cnt <= '0;
        clk3k  <= ~clk3k;
        tick3k <= ~clk3k;
      end else begin
        k3_cnt <= k3_cnt + 1'b1;
      end
    end
  end

endmodule
