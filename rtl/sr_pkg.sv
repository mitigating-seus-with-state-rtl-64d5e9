// sr_pkg: types shared by the state-redundant storage elements.
//
// bit_in_t bundles the pins every state-redundant bit has: the write clock
// CLK (bit_clk), the data input D, and the four upset-injection pins. An
// upset is injected into flip-flop Y1 by raising PR (set) or CLR (clear)
// together with EN1, and into Y2 likewise together with EN2; this follows
// the schematics, where each flip-flop's PRN/CLRN pin is NAND(ENx, PR/CLR).
//
// state_t names the five states A..E of the example state machine used to
// illustrate value-wise state redundancy, in the order of their primary
// (non-redundant) values 000..100.
package sr_pkg;

  typedef struct packed {
    logic bit_clk;  // CLK: high level writes D, rising edge captures it
    logic d;        // D: data to store
    logic en1;      // EN1: arms PR/CLR for flip-flop Y1
    logic en2;      // EN2: arms PR/CLR for flip-flop Y2
    logic pr;       // PR: upset that sets the armed flip-flop
    logic clr;      // CLR: upset that clears the armed flip-flop
  } bit_in_t;

  typedef enum logic [2:0] {
    ST_A = 3'b000,
    ST_B = 3'b001,
    ST_C = 3'b010,
    ST_D = 3'b011,
    ST_E = 3'b100
  } state_t;

endpackage
