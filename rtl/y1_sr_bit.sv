// y1_sr_bit: state-redundant bit with the Y1 state-value allocation.
//
// Flip-flop Y1 holds the bit (Q = Y1). Flip-flop Y2 is a fallback flag: with
// Y2 = 0 the pair is in a normal state, with Y2 = 1 in a fallback state that
// exists only while an upset is being repaired. Three positive-edge
// detectors (PED) watch Y1 rising, Y1 falling (a PED on NOT Y1) and Y2
// rising. While CLK is low:
//   * an upset on Y1 makes an edge on Y1; the edge is passed through a 2:1
//     multiplexer and clocks both flip-flops, which then toggle: Y1 returns
//     to its old value and Y2 rises (00 -> 01 -> 10, or 01 -> 00 -> 11);
//   * a rising Y2 clocks Y2 once more and clears it (10 -> 00, 11 -> 01),
//     which also repairs an upset that hits Y2 directly.
// The multiplexer selects the rising-edge pulse of Y1 when XOR(Y1, Y2) is 1
// and the falling-edge pulse otherwise. Right after an upset on Y1 the select
// therefore picks the edge the upset made; once Y2 has risen it picks the
// other polarity, so the edge Y1 makes while it is being restored is not
// taken for a new upset.
// While CLK is high the OR gates in front of the flip-flop clocks hold both
// clocks high, so correction is off: the rising CLK edge writes D into Y1
// and clears Y2, and an upset during the high phase stays until the next
// write. An upset on Y1 while the pair is in a fallback state, or a double
// upset, is not repaired.
//
// Timing model: the asynchronous schematic is evaluated on a fast sampling
// clock `clk`; each flip-flop adds one sample of delay, and a flip-flop loads
// in a sample in which CLK rises or, with CLK low, one of its correction
// pulses is present (the OR of the pulses is treated as an OR of clock
// events). The upset pins act as preset/clear and win over clocking; an
// upset should be one sample long. The gate network (D mux on CLK, NOT Y1 on
// the hold path, AND(NOT CLK, NOT Y2) into Y2, the edge-pulse mux selected
// by XOR(Y1, Y2), OR gates with CLK on the clocks) follows the schematic; the
// sampling clock, the synchronous reset to 00 and the preset-over-clear
// priority are this design's own.
//
// Ports: clk/rst_n sampling clock and synchronous active-low reset;
// in = {CLK, D, EN1, EN2, PR, CLR}; q = stored bit; y = {Y2, Y1}.
module y1_sr_bit (
  input  logic            clk,
  input  logic            rst_n,
  input  sr_pkg::bit_in_t in,
  output logic            q,
  output logic [1:0]      y
);

  logic y1, y2;
  logic clk_prev;
  logic y1_pos, y1_neg, y2_pos;   // PED pulses
  logic sel, corr;
  logic clk_rise;
  logic ev1, ev2;                 // clock events of Y1 and Y2
  logic y1_d, y2_d;

  ped u_ped_y1_pos (.clk, .rst_n, .d(y1),  .pe(y1_pos));
  ped u_ped_y1_neg (.clk, .rst_n, .d(~y1), .pe(y1_neg));
  ped u_ped_y2_pos (.clk, .rst_n, .d(y2),  .pe(y2_pos));

  assign sel      = y1 ^ y2;
  // 2:1 multiplexer: Data1 = rising-edge pulse, Data0 = falling-edge pulse.
  assign corr     = sel ? y1_pos : y1_neg;

  assign clk_rise = in.bit_clk & ~clk_prev;
  assign ev1      = clk_rise | (~in.bit_clk & corr);
  assign ev2      = clk_rise | (~in.bit_clk & (corr | y2_pos));

  // 2:1 multiplexer, select = CLK: Data1 = D, Data0 = NOT Y1.
  assign y1_d     = in.bit_clk ? in.d : ~y1;
  assign y2_d     = ~in.bit_clk & ~y2;

  assign q        = y1;
  assign y        = {y2, y1};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1       <= 1'b0;
      y2       <= 1'b0;
      clk_prev <= 1'b1;
    end else begin
      clk_prev <= in.bit_clk;

      if (in.en1 && in.pr)        y1 <= 1'b1;
      else if (in.en1 && in.clr)  y1 <= 1'b0;
      else if (ev1)               y1 <= y1_d;

      if (in.en2 && in.pr)        y2 <= 1'b1;
      else if (in.en2 && in.clr)  y2 <= 1'b0;
      else if (ev2)               y2 <= y2_d;
    end
  end

endmodule
