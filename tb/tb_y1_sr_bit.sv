// tb_y1_sr_bit: self-checking testbench for the Y1-allocation bistable.
// Expected behaviour, from the allocation (Q = Y1, Y2 = fallback flag):
//   * a CLK pulse writes D; afterwards the pair is in the normal state {0,D};
//   * with CLK low, an upset on Y1 is repaired through a fallback state
//     (Y2 seen high) and the pair is back in {0,D} 2 samples after the
//     upset shows;
//   * with CLK low, an upset on Y2 is cleared 1 sample after it shows;
//   * an upset while CLK is high stays until the next write;
//   * a double upset is not repaired.
module tb_y1_sr_bit;
  import sr_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit_in_t in;
  logic q;
  logic [1:0] y;
  int checks = 0, failures = 0;

  y1_sr_bit dut (.clk, .rst_n, .in, .q, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (q=%b y=%b)", $time, what, q, y);
    end
  endtask

  task automatic write(input logic v);
    @(negedge clk);
    in.bit_clk = 1'b1; in.d = v;
    repeat (2) @(negedge clk);
    in.bit_clk = 1'b0;
    @(negedge clk);
    in.d = ~v;  // D changing while CLK is low must not matter
    repeat (3) @(negedge clk);
    check(q == v && y == {1'b0, v}, "write stores D in a normal state");
  endtask

  // One-sample upset; which = 1 for Y1, 2 for Y2, 3 for both.
  task automatic upset(input int which, input logic set);
    @(negedge clk);
    in.en1 = which[0]; in.en2 = which[1];
    in.pr = set; in.clr = ~set;
    @(negedge clk);
    in.en1 = 1'b0; in.en2 = 1'b0; in.pr = 1'b0; in.clr = 1'b0;
  endtask

  // Upset with CLK low, then watch the repair.
  task automatic upset_and_repair(input int which, input logic stored, input int max_lat);
    int lat = -1;
    bit fallback = 0;
    upset(which, (which == 2) ? 1'b1 : ~stored);  // flip the chosen bit
    check(y != {1'b0, stored}, "upset changed the pair");
    for (int i = 1; i <= 8; i++) begin
      if (y[1]) fallback = 1;
      @(negedge clk);
      if (lat < 0 && y == {1'b0, stored}) lat = i;
    end
    check(lat == max_lat, $sformatf("repaired in %0d samples (took %0d)", max_lat, lat));
    if (which == 1) check(fallback, "repair passes through a fallback state");
    check(q == stored && y == {1'b0, stored}, "back in the normal state");
  endtask

  initial begin
    in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 1'b0 && y == 2'b00, "reset to 00");

    for (int v = 0; v < 2; v++) begin
      write(v[0]);
      upset_and_repair(1, v[0], 2);
      upset_and_repair(2, v[0], 1);
      repeat (5) begin @(negedge clk); check(q == v[0] && y == {1'b0, v[0]}, "stable after repair"); end
    end

    // Upset during the CLK high level: no repair until the next write.
    write(1'b0);
    @(negedge clk);
    in.bit_clk = 1'b1; in.d = 1'b0;
    repeat (2) @(negedge clk);
    upset(1, 1'b1);
    repeat (3) begin @(negedge clk); check(q == 1'b1, "upset while CLK high is not repaired"); end
    in.bit_clk = 1'b0;
    repeat (4) begin @(negedge clk); check(q == 1'b1, "still wrong after CLK falls"); end
    write(1'b0);

    // Double upset from 00: the bit is not restored.
    upset(3, 1'b1);
    repeat (6) @(negedge clk);
    check(q == 1'b1, "double upset is not repaired");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
