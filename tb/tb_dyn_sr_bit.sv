// tb_dyn_sr_bit: self-checking testbench for the dynamic-redundancy bistable.
// Expected behaviour, from the allocation (00 = '0', 11 = '1', 01/10 error):
//   * a CLK pulse writes D into both flip-flops;
//   * with CLK low, an upset on either flip-flop is flipped back within
//     1 sample after it shows and Q never shows the upset;
//   * with CLK high, an upset is held as an error value, Q still shows the
//     stored bit, and the repair happens once CLK falls;
//   * a double upset moves to the other state and is not flagged.
module tb_dyn_sr_bit;
  import sr_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit_in_t in;
  logic q, err;
  logic [1:0] y;
  int checks = 0, failures = 0;

  dyn_sr_bit dut (.clk, .rst_n, .in, .q, .y, .err);

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
      $display("FAIL @%0t: %s (q=%b y=%b err=%b)", $time, what, q, y, err);
    end
  endtask

  task automatic write(input logic v);
    @(negedge clk);
    in.bit_clk = 1'b1; in.d = v;
    repeat (2) @(negedge clk);
    in.bit_clk = 1'b0;
    @(negedge clk);
    in.d = ~v;
    repeat (3) @(negedge clk);
    check(q == v && y == {v, v} && !err, "write stores D in both flip-flops");
  endtask

  task automatic upset(input int which, input logic set);
    @(negedge clk);
    in.en1 = which[0]; in.en2 = which[1];
    in.pr = set; in.clr = ~set;
    @(negedge clk);
    in.en1 = 1'b0; in.en2 = 1'b0; in.pr = 1'b0; in.clr = 1'b0;
  endtask

  initial begin
    in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 1'b0 && y == 2'b00, "reset to 00");

    for (int v = 0; v < 2; v++) begin
      write(v[0]);
      for (int w = 1; w <= 2; w++) begin
        int lat;
        lat = -1;
        upset(w, ~v[0]);
        check(err && q == v[0], "upset gives an error value, Q keeps the bit");
        for (int i = 1; i <= 6; i++) begin
          @(negedge clk);
          check(q == v[0], "Q never shows the upset");
          if (lat < 0 && y == {v[0], v[0]}) lat = i;
        end
        check(lat == 1, $sformatf("repaired 1 sample after the upset (took %0d)", lat));
      end
    end

    // Upset during the CLK high level: held until CLK falls, Q unaffected.
    write(1'b1);
    @(negedge clk);
    in.bit_clk = 1'b1; in.d = 1'b1;
    repeat (2) @(negedge clk);
    upset(2, 1'b0);
    repeat (3) begin @(negedge clk); check(err && q == 1'b1, "error held while CLK high, Q latched"); end
    in.bit_clk = 1'b0;
    repeat (3) @(negedge clk);
    check(!err && y == 2'b11 && q == 1'b1, "repaired after CLK falls");

    // Double upset 11 -> 00: a valid state change, not flagged.
    upset(3, 1'b0);
    check(!err && y == 2'b00 && q == 1'b0, "double upset changes the state unflagged");
    repeat (4) begin @(negedge clk); check(!err && q == 1'b0, "double upset stays"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
