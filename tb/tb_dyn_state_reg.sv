// tb_dyn_state_reg: self-checking testbench for the five-state register with
// dynamic state redundancy. Writes every state and checks its value; then
// drives each sharing state into its error value and checks the switch back:
//   B=001 --bit 2--> 101 -> 001     A=000 --bits 0,2--> 101 -> 000
//   D=011 --bit 2--> 111 -> 011     E=100 --bits 0,1--> 111 -> 100
// and that C=010 --bit 2--> 110 stays C without a correction.
module tb_dyn_state_reg;
  import sr_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic we = 1'b0;
  state_t next = ST_A;
  logic [2:0] upset = '0;
  logic [2:0] value;
  state_t state;
  logic corrected;
  int checks = 0, failures = 0;

  dyn_state_reg dut (.clk, .rst_n, .we, .next, .upset, .value, .state, .corrected);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (value=%b state=%s corr=%b)", $time, what, value, state.name(), corrected);
    end
  endtask

  task automatic write(input state_t s, input logic [2:0] v);
    @(negedge clk);
    we = 1'b1; next = s;
    @(negedge clk);
    we = 1'b0;
    check(value == v && state == s && !corrected, $sformatf("write %s", s.name()));
  endtask

  task automatic hit(input state_t s, input logic [2:0] v, input logic [2:0] mask,
                     input logic [2:0] errv, input logic expect_corr);
    write(s, v);
    @(negedge clk);
    upset = mask;
    @(negedge clk);
    upset = '0;
    check(value == errv, $sformatf("upset %s gives %b", s.name(), errv));
    check(corrected == expect_corr, "error value flagged");
    check(state == s, "state reported through the error value");
    @(negedge clk);
    check(state == s && !corrected, $sformatf("%s restored", s.name()));
    check(expect_corr ? (value == v) : (value == errv), "value after one clock");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(value == 3'b000 && state == ST_A, "reset to A");
    write(ST_B, 3'b001);
    write(ST_C, 3'b010);
    write(ST_D, 3'b011);
    write(ST_E, 3'b100);
    write(ST_A, 3'b000);
    hit(ST_B, 3'b001, 3'b100, 3'b101, 1'b1);
    hit(ST_A, 3'b000, 3'b101, 3'b101, 1'b1);
    hit(ST_D, 3'b011, 3'b100, 3'b111, 1'b1);
    hit(ST_E, 3'b100, 3'b011, 3'b111, 1'b1);
    hit(ST_C, 3'b010, 3'b100, 3'b110, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
