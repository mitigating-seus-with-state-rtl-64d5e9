// tb_ped: self-checking testbench for the positive-edge detector.
// Drives a random bit stream and compares the pulse with a reference that
// remembers the previous sample; also checks that no pulse follows reset.
module tb_ped;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d = 1'b1;
  logic pe;
  int checks = 0, failures = 0;
  logic ref_prev;

  ped dut (.clk, .rst_n, .d, .pe);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npulse = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (pe !== 1'b0) begin failures++; $display("FAIL: pulse right after reset"); end
    ref_prev = d;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (pe !== (d & ~ref_prev)) begin
        failures++;
        $display("FAIL: step %0d d=%b prev=%b pe=%b", i, d, ref_prev, pe);
      end
      if (pe) npulse++;
      @(posedge clk);
      ref_prev = d;
    end
    checks++;
    if (npulse == 0) begin failures++; $display("FAIL: no pulse seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
