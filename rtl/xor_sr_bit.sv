// xor_sr_bit: state-redundant bit with the XOR state-value allocation.
//
// Two flip-flops Y1 and Y2 hold the bit as Q = Y1 ^ Y2: values 00 and 11 mean
// '0', 01 and 10 mean '1'. A double upset (both bits flipped) therefore leaves
// Q unchanged. A single upset flips Q, and the circuit tries to undo it from
// the edge this makes on Q or on QN = XNOR(Y1, Y2):
//   * Y1 is clocked by XOR(CLK, Q). With CLK high its D input is D ^ Y2
//     (the write path, which makes Q = D); with CLK low it is Y2, so a
//     rising Q copies Y2 into Y1 and clears Q again.
//   * Y2 is clocked by XOR(CLK, QN) and always loads NOT Y1, so a rising QN
//     makes the pair differ again and sets Q.
// Because a correction itself makes an edge on Q or QN, the circuit cannot
// tell a repair from an upset and keeps correcting: after one upset with CLK
// low, Q toggles every sample for as long as CLK stays low. This
// over-correction is the known weakness of this allocation, and the model
// reproduces it on purpose. Because XOR(CLK,Q) and XOR(CLK,QN) are
// complements, every CLK edge clocks one of the two flip-flops, and a falling
// CLK starts the same oscillation whatever Q holds; the circuit is steady
// with CLK low only when it left reset with CLK low and has not been upset.
// The gate wiring is followed here even though the reference timing run
// seems to show Q holding 0 across a falling CLK.
//
// Timing model: the asynchronous schematic is evaluated on a fast sampling
// clock `clk`. Each derived clock (XOR(CLK,Q), XOR(CLK,QN)) is compared with
// its value one sample earlier, and a flip-flop loads on a rising edge of its
// derived clock, so every flip-flop adds one sample of delay. The upset pins
// act as the flip-flops' preset/clear and win over clocking. An upset should
// be a one-sample pulse: like a real preset, a longer one swallows the edge
// it causes. The sampling clock, the synchronous reset to 00 and the
// preset-over-clear priority are this design's own; the gate network follows
// the schematic of the XOR-allocation bistable.
//
// Ports: clk/rst_n sampling clock and synchronous active-low reset;
// in = {CLK, D, EN1, EN2, PR, CLR}; q = stored bit; y = {Y2, Y1}.
module xor_sr_bit (
  input  logic            clk,
  input  logic            rst_n,
  input  sr_pkg::bit_in_t in,
  output logic            q,
  output logic [1:0]      y
);

  logic y1, y2;
  logic qn;
  logic y1_clk, y2_clk;          // derived flip-flop clocks
  logic y1_clk_prev, y2_clk_prev;
  logic y1_d, y2_d;

  assign q      = y1 ^ y2;
  assign qn     = ~q;
  assign y      = {y2, y1};

  assign y1_clk = in.bit_clk ^ q;
  assign y2_clk = in.bit_clk ^ qn;

  // 2:1 multiplexer, select = CLK: Data1 = D ^ Y2, Data0 = Y2.
  assign y1_d   = in.bit_clk ? (in.d ^ y2) : y2;
  assign y2_d   = ~y1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1          <= 1'b0;
      y2          <= 1'b0;
      y1_clk_prev <= 1'b1;
      y2_clk_prev <= 1'b1;
    end else begin
      y1_clk_prev <= y1_clk;
      y2_clk_prev <= y2_clk;

      if (in.en1 && in.pr)                y1 <= 1'b1;
      else if (in.en1 && in.clr)          y1 <= 1'b0;
      else if (y1_clk && !y1_clk_prev)    y1 <= y1_d;

      if (in.en2 && in.pr)                y2 <= 1'b1;
      else if (in.en2 && in.clr)          y2 <= 1'b0;
      else if (y2_clk && !y2_clk_prev)    y2 <= y2_d;
    end
  end

endmodule
