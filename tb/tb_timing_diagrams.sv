// tb_timing_diagrams: replays the upset experiments of the three bistables.
//
// Each experiment is a sequence of writes and one-sample upsets, taken in the
// order of events of the reference timing runs (only the order and the
// polarities, not the exact times):
//   XOR bistable:     CLK low, D = 0, then Y1 is set -> Q oscillates.
//   Y1 bistable:      clear both; write 1; clear Y1; set Y2; write 0;
//                     set Y1; set Y2. Q returns after every upset and Y2
//                     pulses high exactly once per upset.
//   dynamic bistable: set both; write 0; write 1; clear Y1; clear Y2;
//                     write 0; set Y1; set Y2. Q changes only on writes.
module tb_timing_diagrams;
  import sr_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit_in_t xor_in, y1_in, dyn_in;
  logic xor_q, y1_q, dyn_q, dyn_err;
  logic [1:0] xor_y, y1_y, dyn_y;
  logic [3:0] dec_value = '0;
  state_t dec_state;
  logic fsm_we = 1'b0;
  state_t fsm_next = ST_A;
  logic [2:0] fsm_upset = '0, fsm_value;
  state_t fsm_state;
  logic fsm_corrected;
  int checks = 0, failures = 0;

  sr_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Counts of Q changes and rising Y2 edges, per bistable.
  int y1_q_changes, y1_y2_rises, dyn_q_changes;
  logic y1_q_l, y1_y2_l, dyn_q_l;
  always @(negedge clk) begin
    if (rst_n) begin
      if (y1_q != y1_q_l) y1_q_changes++;
      if (y1_y[1] && !y1_y2_l) y1_y2_rises++;
      if (dyn_q != dyn_q_l) dyn_q_changes++;
    end
    y1_q_l = y1_q; y1_y2_l = y1_y[1]; dyn_q_l = dyn_q;
  end

  // One-sample upset on a bistable's pins: which 1 = Y1, 2 = Y2, 3 = both.
  task automatic hit(ref bit_in_t p, input int which, input logic set);
    @(negedge clk);
    p.en1 = which[0]; p.en2 = which[1]; p.pr = set; p.clr = ~set;
    @(negedge clk);
    p.en1 = 0; p.en2 = 0; p.pr = 0; p.clr = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic wr(ref bit_in_t p, input logic v);
    @(negedge clk);
    p.d = v; p.bit_clk = 1;
    repeat (3) @(negedge clk);
    p.bit_clk = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int base;
    xor_in = '0; y1_in = '0; dyn_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // XOR bistable: one upset with CLK low and D = 0, from the reset state.
    // CLK is kept low from reset: in this gate network a falling CLK would
    // itself start the over-correction.
    repeat (3) @(negedge clk);
    check(xor_q == 1'b0, "XOR bistable holds 0 before the upset");
    begin
      int toggles;
      logic last;
      toggles = 0;
      hit(xor_in, 1, 1'b1);
      last = xor_q;
      repeat (30) begin @(negedge clk); if (xor_q != last) toggles++; last = xor_q; end
      check(toggles == 30, $sformatf("XOR bistable oscillates after one upset (%0d toggles)", toggles));
    end

    // Y1 bistable.
    hit(y1_in, 3, 1'b0);
    check(y1_q == 1'b0 && y1_y == 2'b00, "Y1 bistable cleared");
    wr(y1_in, 1'b1);
    check(y1_q == 1'b1, "Y1 bistable written 1");
    base = y1_y2_rises;
    hit(y1_in, 1, 1'b0);
    check(y1_q == 1'b1 && y1_y == 2'b01, "Y1 cleared, repaired");
    hit(y1_in, 2, 1'b1);
    check(y1_q == 1'b1 && y1_y == 2'b01, "Y2 set, repaired");
    wr(y1_in, 1'b0);
    check(y1_q == 1'b0, "Y1 bistable written 0");
    hit(y1_in, 1, 1'b1);
    check(y1_q == 1'b0 && y1_y == 2'b00, "Y1 set, repaired");
    hit(y1_in, 2, 1'b1);
    check(y1_q == 1'b0 && y1_y == 2'b00, "Y2 set, repaired");
    check(y1_y2_rises - base == 4, $sformatf("Y2 pulses once per upset (%0d)", y1_y2_rises - base));

    // Dynamic bistable.
    hit(dyn_in, 3, 1'b1);
    check(dyn_q == 1'b1 && dyn_y == 2'b11, "dynamic bistable set to 11");
    wr(dyn_in, 1'b0);
    wr(dyn_in, 1'b1);
    base = dyn_q_changes;
    hit(dyn_in, 1, 1'b0);
    hit(dyn_in, 2, 1'b0);
    check(dyn_q == 1'b1 && dyn_y == 2'b11 && dyn_q_changes == base, "Q unmoved by upsets on a 1");
    wr(dyn_in, 1'b0);
    base = dyn_q_changes;
    hit(dyn_in, 1, 1'b1);
    hit(dyn_in, 2, 1'b1);
    check(dyn_q == 1'b0 && dyn_y == 2'b00 && dyn_q_changes == base, "Q unmoved by upsets on a 0");
    check(dyn_q_changes == 4, $sformatf("dynamic Q changed only on the initial set and the three writes (%0d)", dyn_q_changes));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
