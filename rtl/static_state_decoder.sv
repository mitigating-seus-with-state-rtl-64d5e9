// static_state_decoder: present-state decode for static state redundancy.
//
// The five states A..E of the example state machine are stored value-wise.
// Their primary values are A=000, B=001, C=010, D=011, E=100. Static state
// redundancy gives some states extra, non-overlapping values, so the present
// state is a fixed combinational function of the stored bits:
//   VALUE_BITS = 3: A=000, B=x01, C=x10, D=x11, E=100 (B, C and D redundant)
//   VALUE_BITS = 4: an extra top bit that is ignored, so every state has at
//                   least two values: A=x000, B=xx01, C=xx10, D=xx11, E=x100.
// Both tables are the original ones; the default is the four-bit one, in which
// every state is redundant. Purely combinational, no clock.
//
// Ports: value = stored state value; state = decoded present state.
module static_state_decoder #(
  parameter int unsigned VALUE_BITS = 4
) (
  input  logic [VALUE_BITS-1:0] value,
  output sr_pkg::state_t        state
);

  import sr_pkg::*;

  always_comb begin
    unique case (value[1:0])
      2'b01:   state = ST_B;
      2'b10:   state = ST_C;
      2'b11:   state = ST_D;
      default: state = value[2] ? ST_E : ST_A;
    endcase
  end

  initial begin
    assert (VALUE_BITS inside {3, 4})
      else $error("static_state_decoder: VALUE_BITS must be 3 or 4");
  end

endmodule
