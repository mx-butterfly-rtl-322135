// pokey: the subset of the Atari POKEY sound and input chip that the game
// uses: fast potentiometer scan, the random number generator and the four
// audio channels. Keyboard scan, serial port and interrupts are left out.
//
// Clocking: everything advances on ce, the 1.79 MHz chip clock given as an
// enable of the system clock. Base clocks for the channels are ce/28
// (64 kHz) or ce/114 (15 kHz, AUDCTL bit 0).
//
// Registers (addr = CPU address bits 3:0). Writes: 0/2/4/6 AUDF1-4
// (frequency divider), 1/3/5/7 AUDC1-4 (bits 7:5 noise select, bit 4
// volume only, bits 3:0 volume), 8 AUDCTL, 9 STIMER (reload all dividers),
// B POTGO (scan the pot pins). Reads: 8 ALLPOT (the pot pins as latched by
// the last POTGO), A RANDOM (top 8 bits of the 17- or 9-bit polynomial
// counter); other addresses read 0. rdata is combinational.
//
// Fast pot scan: the game wires its digital controls to the pot pins, so a
// write to POTGO copies all eight pins into one register in one clock.
//
// Polynomial counters: XNOR-feedback shift registers of 4, 5, 9 and 17 bits
// (x^4+x^3+1, x^5+x^3+1, x^9+x^5+1, x^17+x^14+1), all stepping every ce.
// AUDCTL bit 7 selects the 9-bit counter in place of the 17-bit one, for
// RANDOM and for channel noise alike.
//
// Channels: each divider counts down on its clock and, on reaching 0,
// reloads AUDF and emits a pulse, dividing by AUDF+1. AUDCTL bit 6 / bit 5
// clock channel 1 / 3 from ce instead of the base clock. AUDCTL bit 4 / bit 3
// join channels 1+2 / 3+4 into one 16-bit divider ({AUDF2,AUDF1} /
// {AUDF4,AUDF3}) whose pulses drive the upper channel. On a pulse the output
// flip-flop: is left alone if AUDC bit 7 is 0 and the 5-bit poly output is
// 0; otherwise toggles if AUDC bit 5 is 1, else takes the 4-bit poly output
// (AUDC bit 6 = 1) or the 17/9-bit poly output. High-pass (AUDCTL bit 2 /
// bit 1): channel 1 / 2 output is XORed with a flip-flop that samples it on
// each channel 3 / channel 4 pulse. A channel contributes its volume while
// its output is 1 (always, with volume-only set); the four are summed into
// a 6-bit level for the PWM output.
//
// What follows the description: the three features kept, the one-clock fast
// scan, a 17/9-bit counter read from its top 8 bits built from shift
// registers, XNOR gates and a mode multiplexer, four channels with 8-bit
// dividers, volume, noise from three polynomial counters, 16-bit joining,
// high-pass filters, one mixed output. The register map and bit meanings
// are the POKEY datasheet's; the feedback taps, the divide-by-AUDF+1 rule
// (the chip adds a few clocks in some modes) and the exact noise gating are
// this design's simplifications.
module pokey #(
  parameter int unsigned DIV64K = 28,
  parameter int unsigned DIV15K = 114
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic [3:0] addr,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [7:0] pot_in,
  output logic [5:0] audio_level
);

  logic [7:0]  audf [4];
  logic [7:0]  audc [4];
  logic [7:0]  audctl;
  logic [7:0]  allpot;
  logic [7:0]  cnt [4];

  logic [3:0]  p4;
  logic [4:0]  p5;
  logic [8:0]  p9;
  logic [16:0] p17;
  logic [6:0]  base_cnt;
  logic        base_tick;

  logic [3:0]  chclk, pulse, outq, eff;
  logic [1:0]  hp;
  logic        n4, n5, n17;

  assign n4  = p4[3];
  assign n5  = p5[4];
  assign n17 = audctl[7] ? p9[8] : p17[16];

  // register reads
  always_comb begin
    unique case (addr)
      4'h8:    rdata = allpot;
      4'hA:    rdata = audctl[7] ? p9[8:1] : p17[16:9];
      default: rdata = 8'h00;
    endcase
  end

  // channel clocks and divider pulses
  logic [15:0] cnt12, cnt34;
  assign cnt12 = {cnt[1], cnt[0]};
  assign cnt34 = {cnt[3], cnt[2]};
  always_comb begin
    chclk[0] = audctl[6] ? ce : base_tick;
    chclk[1] = base_tick;
    chclk[2] = audctl[5] ? ce : base_tick;
    chclk[3] = base_tick;
    pulse    = '0;
    if (audctl[4]) pulse[1] = chclk[0] && (cnt12 == 16'd0);
    else begin
      pulse[0] = chclk[0] && (cnt[0] == 8'd0);
      pulse[1] = chclk[1] && (cnt[1] == 8'd0);
    end
    if (audctl[3]) pulse[3] = chclk[2] && (cnt34 == 16'd0);
    else begin
      pulse[2] = chclk[2] && (cnt[2] == 8'd0);
      pulse[3] = chclk[3] && (cnt[3] == 8'd0);
    end
  end

  // high-pass filtered outputs and the mix
  always_comb begin
    eff    = outq;
    eff[0] = audctl[2] ? (outq[0] ^ hp[0]) : outq[0];
    eff[1] = audctl[1] ? (outq[1] ^ hp[1]) : outq[1];
    audio_level = '0;
    for (int i = 0; i < 4; i++)
      if (audc[i][4] || eff[i])
        audio_level = audio_level + 6'(audc[i][3:0]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin
        audf[i] <= '0;
        audc[i] <= '0;
        cnt[i]  <= '0;
      end
      audctl    <= '0;
      allpot    <= '0;
      p4        <= '0;
      p5        <= '0;
      p9        <= '0;
      p17       <= '0;
      base_cnt  <= '0;
      base_tick <= 1'b0;
      outq      <= '0;
      hp        <= '0;
    end else begin
      // base clock
      base_tick <= 1'b0;
      if (ce) begin
        if (base_cnt == 7'((audctl[0] ? DIV15K : DIV64K) - 1)) begin
          base_cnt  <= '0;
          base_tick <= 1'b1;
        end else begin
          base_cnt <= base_cnt + 1'b1;
        end
        // polynomial counters
        p4  <= {p4[2:0],  ~(p4[3]  ^ p4[2])};
        p5  <= {p5[3:0],  ~(p5[4]  ^ p5[2])};
        p9  <= {p9[7:0],  ~(p9[8]  ^ p9[4])};
        p17 <= {p17[15:0], ~(p17[16] ^ p17[13])};
      end

      // dividers
      if (audctl[4]) begin
        if (chclk[0]) {cnt[1], cnt[0]} <= pulse[1] ? {audf[1], audf[0]} : cnt12 - 1'b1;
      end else begin
        if (chclk[0]) cnt[0] <= pulse[0] ? audf[0] : cnt[0] - 1'b1;
        if (chclk[1]) cnt[1] <= pulse[1] ? audf[1] : cnt[1] - 1'b1;
      end
      if (audctl[3]) begin
        if (chclk[2]) {cnt[3], cnt[2]} <= pulse[3] ? {audf[3], audf[2]} : cnt34 - 1'b1;
      end else begin
        if (chclk[2]) cnt[2] <= pulse[2] ? audf[2] : cnt[2] - 1'b1;
        if (chclk[3]) cnt[3] <= pulse[3] ? audf[3] : cnt[3] - 1'b1;
      end

      // output flip-flops
      for (int i = 0; i < 4; i++) begin
        if (pulse[i] && (audc[i][7] || n5)) begin
          if (audc[i][5])      outq[i] <= ~outq[i];
          else if (audc[i][6]) outq[i] <= n4;
          else                 outq[i] <= n17;
        end
      end
      if (pulse[2]) hp[0] <= outq[0];
      if (pulse[3]) hp[1] <= outq[1];

      // register writes (after the divider updates, so STIMER wins)
      if (we) begin
        unique case (addr)
          4'h0: audf[0] <= wdata;
          4'h1: audc[0] <= wdata;
          4'h2: audf[1] <= wdata;
          4'h3: audc[1] <= wdata;
          4'h4: audf[2] <= wdata;
          4'h5: audc[2] <= wdata;
          4'h6: audf[3] <= wdata;
          4'h7: audc[3] <= wdata;
          4'h8: audctl  <= wdata;
          4'h9: for (int i = 0; i < 4; i++) cnt[i] <= audf[i];
          4'hB: allpot  <= pot_in;
          default: ;
        endcase
      end
    end
  end

endmodule
