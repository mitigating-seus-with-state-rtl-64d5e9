// ped: positive-edge detector.
//
// Emits a '1' pulse one sample wide on `pe` whenever input `d` has risen
// since the previous rising edge of the sampling clock `clk`: pe = d & ~d_prev.
// The pulse is combinational from `d`, so it appears in the same sample in
// which the rise is seen.
//
// The pulse-emitting edge detector is the one named in the Y1-allocation
// bistable; how it is built inside is this design's own choice (a history
// flip-flop and an AND gate). Synchronous active-low reset loads the history
// with 1, so no pulse can follow reset whatever `d` is.
module ped (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic pe
);

  logic d_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) d_prev <= 1'b1;
    else        d_prev <= d;
  end

  assign pe = d & ~d_prev;

endmodule
