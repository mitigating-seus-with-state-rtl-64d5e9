// sr_top: the state-redundant storage elements side by side.
//
// State redundancy gives a stored state more than one value, so that an
// upset that changes the value can either leave the state unchanged or be
// recognised and undone. This top places the original designs next to
// each other, each with its own pins:
//   * xor_*  : bistable with the XOR allocation (Q = Y1 ^ Y2), which
//              tolerates double upsets but over-corrects single ones;
//   * y1_*   : bistable with the Y1 allocation, which repairs a single upset
//              while CLK is low;
//   * dyn_*  : bistable with dynamic state redundancy (00 / 11 states,
//              01 / 10 error values) and a latched output;
//   * dec_*  : statically redundant five-state decoder (four-bit values);
//   * fsm_*  : five-state register with dynamic redundancy (error values
//              101 and 111 are switched back to the previous value).
// All sequential parts run on one sampling clock `clk` with a synchronous
// active-low reset `rst_n`; each bistable's own CLK, D and upset pins are in
// its sr_pkg::bit_in_t input. See each module for its timing.
module sr_top (
  input  logic            clk,
  input  logic            rst_n,
  // XOR-allocation bistable
  input  sr_pkg::bit_in_t xor_in,
  output logic            xor_q,
  output logic [1:0]      xor_y,
  // Y1-allocation bistable
  input  sr_pkg::bit_in_t y1_in,
  output logic            y1_q,
  output logic [1:0]      y1_y,
  // dynamic-redundancy bistable
  input  sr_pkg::bit_in_t dyn_in,
  output logic            dyn_q,
  output logic [1:0]      dyn_y,
  output logic            dyn_err,
  // static five-state decoder
  input  logic [3:0]      dec_value,
  output sr_pkg::state_t  dec_state,
  // dynamic five-state register
  input  logic            fsm_we,
  input  sr_pkg::state_t  fsm_next,
  input  logic [2:0]      fsm_upset,
  output logic [2:0]      fsm_value,
  output sr_pkg::state_t  fsm_state,
  output logic            fsm_corrected
);

  xor_sr_bit u_xor (.clk, .rst_n, .in(xor_in), .q(xor_q), .y(xor_y));
  y1_sr_bit  u_y1  (.clk, .rst_n, .in(y1_in),  .q(y1_q),  .y(y1_y));
  dyn_sr_bit u_dyn (.clk, .rst_n, .in(dyn_in), .q(dyn_q), .y(dyn_y), .err(dyn_err));

  static_state_decoder #(.VALUE_BITS(4)) u_dec (.value(dec_value), .state(dec_state));

  dyn_state_reg u_fsm (
    .clk, .rst_n,
    .we        (fsm_we),
    .next      (fsm_next),
    .upset     (fsm_upset),
    .value     (fsm_value),
    .state     (fsm_state),
    .corrected (fsm_corrected)
  );

endmodule
