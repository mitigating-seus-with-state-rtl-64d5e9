// tb_static_state_decoder: exhaustive check of the redundant state decode.
// The expected states are written out from the state-value tables (three-bit
// table with B, C, D redundant; four-bit table with every state redundant),
// not derived from the decoder's logic.
module tb_static_state_decoder;
  import sr_pkg::*;
  logic [3:0] v4;
  logic [2:0] v3;
  state_t     s4, s3;
  int checks = 0, failures = 0;

  static_state_decoder #(.VALUE_BITS(4)) dut4 (.value(v4), .state(s4));
  static_state_decoder #(.VALUE_BITS(3)) dut3 (.value(v3), .state(s3));

  // Expected state per value, listed value by value.
  state_t exp3 [8] = '{ST_A, ST_B, ST_C, ST_D, ST_E, ST_B, ST_C, ST_D};
  state_t exp4 [16] = '{ST_A, ST_B, ST_C, ST_D, ST_E, ST_B, ST_C, ST_D,
                        ST_A, ST_B, ST_C, ST_D, ST_E, ST_B, ST_C, ST_D};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [5];
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 16; i++) begin
      v4 = 4'(i);
      v3 = 3'(i);
      #1;
      checks++;
      if (s4 !== exp4[i]) begin failures++; $display("FAIL: 4-bit %b -> %s", v4, s4.name()); end
      if (i < 8) begin
        checks++;
        if (s3 !== exp3[i]) begin failures++; $display("FAIL: 3-bit %b -> %s", v3, s3.name()); end
      end
      seen[int'(s4)]++;
    end
    // In the four-bit table every state owns at least two values.
    foreach (seen[i]) begin
      checks++;
      if (seen[i] < 2) begin failures++; $display("FAIL: state %0d has %0d values", i, seen[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
