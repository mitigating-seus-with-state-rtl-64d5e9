// dyn_sr_bit: bistable with dynamic state redundancy.
//
// Two flip-flops Y1 and Y2 normally hold the same value: 00 is state '0' and
// 11 is state '1'. The values 01 and 10 are error values that only a single
// upset can produce. The output Q is a latch: while the pair agrees
// (XOR(Y1,Y2) = 0) Q follows Y1; while they differ Q keeps the value it had
// before the upset. Each flip-flop compares itself with the latched Q
// (XOR gate) and, gated by the error signal (AND gate), turns that into a
// correction signal c. The flip-flop is clocked by XOR(CLK, c) and, with CLK
// low, loads its own complement, so the one flip-flop that no longer matches
// Q flips back. With CLK high the D input is written instead; a rising CLK
// with no correction pending writes D into both flip-flops. An upset during
// the high phase is repaired when CLK falls (XOR(CLK, c) then rises). A
// double upset (00 <-> 11) is a valid state change and is not detected.
//
// Timing model: the asynchronous schematic is evaluated on a fast sampling
// clock `clk`; each derived clock XOR(CLK, c) is compared with its value one
// sample earlier and a flip-flop loads on its rising edge, so each flip-flop
// adds one sample of delay. The output latch is a mux whose hold input is Q
// registered on `clk`. The upset pins act as preset/clear and win over
// clocking; an upset should be one sample long. The gates and the latched
// output follow the schematic; the sampling clock, the synchronous reset to
// 00 and the preset-over-clear priority are this design's own.
//
// Ports: clk/rst_n sampling clock and synchronous active-low reset;
// in = {CLK, D, EN1, EN2, PR, CLR}; q = stored bit (latched);
// y = {Y2, Y1}; err = the pair holds an error value.
module dyn_sr_bit (
  input  logic            clk,
  input  logic            rst_n,
  input  sr_pkg::bit_in_t in,
  output logic            q,
  output logic [1:0]      y,
  output logic            err
);

  logic y1, y2;
  logic q_hold;
  logic c1, c2;
  logic y1_clk, y2_clk, y1_clk_prev, y2_clk_prev;
  logic y1_d, y2_d;

  assign err    = y1 ^ y2;
  // Output latch: Data1 = held Q, Data0 = Y1, select = error.
  assign q      = err ? q_hold : y1;
  assign y      = {y2, y1};

  assign c1     = err & (y1 ^ q);
  assign c2     = err & (y2 ^ q);
  assign y1_clk = in.bit_clk ^ c1;
  assign y2_clk = in.bit_clk ^ c2;

  // 2:1 multiplexers, select = CLK: Data1 = D, Data0 = own complement.
  assign y1_d   = in.bit_clk ? in.d : ~y1;
  assign y2_d   = in.bit_clk ? in.d : ~y2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1          <= 1'b0;
      y2          <= 1'b0;
      q_hold      <= 1'b0;
      y1_clk_prev <= 1'b1;
      y2_clk_prev <= 1'b1;
    end else begin
      q_hold      <= q;
      y1_clk_prev <= y1_clk;
      y2_clk_prev <= y2_clk;

      if (in.en1 && in.pr)              y1 <= 1'b1;
      else if (in.en1 && in.clr)        y1 <= 1'b0;
      else if (y1_clk && !y1_clk_prev)  y1 <= y1_d;

      if (in.en2 && in.pr)              y2 <= 1'b1;
      else if (in.en2 && in.clr)        y2 <= 1'b0;
      else if (y2_clk && !y2_clk_prev)  y2 <= y2_d;
    end
  end

endmodule
