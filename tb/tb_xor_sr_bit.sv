// tb_xor_sr_bit: self-checking testbench for the XOR-allocation bistable.
// Checks, against values worked out by hand from the allocation table
// (00/11 = '0', 01/10 = '1'):
//   * a write with CLK high makes Q = D and Q stays there while CLK is high;
//   * a double upset (both flip-flops set) leaves Q = 0 and the pair at 11;
//   * a single upset on either flip-flop with CLK low starts the
//     over-correction: Q toggles every sample from then on.
module tb_xor_sr_bit;
  import sr_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit_in_t in;
  logic q;
  logic [1:0] y;
  int checks = 0, failures = 0;

  xor_sr_bit dut (.clk, .rst_n, .in, .q, .y);

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

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // One-sample upset pulse; which = 1 for Y1, 2 for Y2, 3 for both.
  task automatic upset(input int which, input logic set);
    @(negedge clk);
    in.en1 = which[0];
    in.en2 = which[1];
    in.pr  = set;
    in.clr = ~set;
    @(negedge clk);
    in.en1 = 1'b0; in.en2 = 1'b0; in.pr = 1'b0; in.clr = 1'b0;
  endtask

  initial begin
    in = '0;
    do_reset();
    repeat (5) begin @(negedge clk); check(q == 1'b0 && y == 2'b00, "reset state holds"); end

    // Write 1 with CLK high.
    @(negedge clk);
    in.bit_clk = 1'b1; in.d = 1'b1;
    repeat (3) @(negedge clk);
    check(q == 1'b1, "write 1 makes Q = 1 within 3 samples");
    repeat (10) begin @(negedge clk); check(q == 1'b1, "Q = 1 holds while CLK high"); end

    // Write 0 from reset with CLK high.
    do_reset();
    @(negedge clk);
    in.bit_clk = 1'b1; in.d = 1'b0;
    repeat (10) begin @(negedge clk); check(q == 1'b0, "write 0 keeps Q = 0"); end

    // Double upset: 00 -> 11 keeps state '0'.
    do_reset();
    upset(3, 1'b1);
    repeat (10) begin @(negedge clk); check(q == 1'b0 && y == 2'b11, "double upset leaves Q = 0"); end

    // Single upset on Y1, then on Y2: over-correction.
    for (int w = 1; w <= 2; w++) begin
      logic last;
      do_reset();
      @(negedge clk);
      in.en1 = (w == 1); in.en2 = (w == 2); in.pr = 1'b1;
      @(negedge clk);
      in.en1 = 1'b0; in.en2 = 1'b0; in.pr = 1'b0;
      check(q == 1'b1, "single upset flips Q");
      last = q;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        check(q != last, "over-correction toggles Q every sample");
        last = q;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
