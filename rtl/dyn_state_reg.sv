// dyn_state_reg: five-state register with dynamic state redundancy.
//
// Holds one of the states A..E as a three-bit value. Writes store a state's
// non-overlapping value (A=000, B=001, C=010, D=011, E=100). Two values are
// shared by two states each and are treated as error values: 101 (A or B)
// and 111 (D or E); C also owns the static redundant value 110. When an
// error value appears, the register switches back to the previous value,
// and it finds out which of the two sharing states that was from the edge
// that led into the error value:
//   101: a rising edge on bit 0 means the register held A (000), otherwise B;
//   111: a rising edge on bit 2 means the register held D (011), otherwise E.
// The restore takes one clock. While the error value is held, `state`
// already reports the state being restored and `corrected` is high.
//
// Interface: `we`/`next` write a state on a rising `clk` edge (a write wins
// over a pending restore); `upset` flips the stored bits it marks in that
// cycle, instead of any other update, to inject faults. Synchronous
// active-low reset to state A. The value assignment and the edge rule for
// 101 are taken from the original design; the matching rule for 111, the
// write port, the upset port and the priorities are this design's own. Upsets that turn one valid value into another (for
// example A -> B) are not detectable by this encoding.
module dyn_state_reg (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           we,
  input  sr_pkg::state_t next,
  input  logic [2:0]     upset,
  output logic [2:0]     value,
  output sr_pkg::state_t state,
  output logic           corrected
);

  import sr_pkg::*;

  logic       prev_b0, prev_b2;   // bits 0 and 2 one clock earlier
  logic [2:0] restore;
  logic       is_err;

  assign is_err = (value == 3'b101) || (value == 3'b111);

  always_comb begin
    restore = value;
    if (value == 3'b101)
      restore = (value[0] && !prev_b0) ? 3'b000 : 3'b001;
    else if (value == 3'b111)
      restore = (value[2] && !prev_b2) ? 3'b011 : 3'b100;
  end

  assign corrected = is_err;

  static_state_decoder #(.VALUE_BITS(3)) u_dec (
    .value (restore),
    .state (state)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      value      <= 3'b000;
      prev_b0    <= 1'b0;
      prev_b2    <= 1'b0;
    end else begin
      prev_b0    <= value[0];
      prev_b2    <= value[2];
      if (|upset)      value <= value ^ upset;
      else if (we)     value <= 3'(next);
      else if (is_err) value <= restore;
    end
  end

endmodule
