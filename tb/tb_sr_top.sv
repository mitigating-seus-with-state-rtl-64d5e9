// tb_sr_top: end-to-end testbench of sr_top at its default configuration.
//
// Runs a random sequence of writes and single upsets (CLK low) on the
// Y1-allocation and dynamic-redundancy bistables and checks that each bit
// ends up holding what was last written; adds upsets during the CLK high
// level and double upsets; drives the XOR-allocation bistable through a
// write, a tolerated double upset and an over-corrected single upset; checks
// the static decoder on random values against the four-bit state table; and
// drives the five-state register through random writes and through both
// error values. Each mechanism is counted, and one that never happened is a
// failure.
module tb_sr_top;
  import sr_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit_in_t xor_in, y1_in, dyn_in;
  logic xor_q, y1_q, dyn_q, dyn_err;
  logic [1:0] xor_y, y1_y, dyn_y;
  logic [3:0] dec_value;
  state_t dec_state;
  logic fsm_we;
  state_t fsm_next;
  logic [2:0] fsm_upset, fsm_value;
  state_t fsm_state;
  logic fsm_corrected;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_write, n_y1_repair_y1, n_y1_repair_y2, n_y1_fallback, n_y1_high_hold;
  int n_dyn_repair, n_dyn_latch_hold, n_dyn_high_repair, n_dyn_mbu;
  int n_xor_mbu, n_xor_overcorrect, n_dec, n_fsm_restore_101, n_fsm_restore_111;

  sr_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Write v into the Y1 and dynamic bistables together.
  task automatic write_both(input logic v);
    @(negedge clk);
    y1_in.bit_clk = 1'b1; y1_in.d = v;
    dyn_in.bit_clk = 1'b1; dyn_in.d = v;
    repeat (2) @(negedge clk);
    y1_in.bit_clk = 1'b0; dyn_in.bit_clk = 1'b0;
    repeat (3) @(negedge clk);
    check(y1_q == v && y1_y == {1'b0, v}, "Y1 bistable stores the write");
    check(dyn_q == v && dyn_y == {v, v}, "dynamic bistable stores the write");
    n_write++;
  endtask

  // Single upset on both bistables' flip-flop `w` (1 = Y1, 2 = Y2), CLK low.
  task automatic upset_both(input int w, input logic stored);
    bit fb = 0, qok = 1;
    @(negedge clk);
    y1_in.en1 = (w == 1); y1_in.en2 = (w == 2);
    y1_in.pr  = (w == 2) ? 1'b1 : ~stored; y1_in.clr = ~y1_in.pr;
    dyn_in.en1 = (w == 1); dyn_in.en2 = (w == 2);
    dyn_in.pr = ~stored; dyn_in.clr = stored;
    @(negedge clk);
    y1_in.en1 = 0; y1_in.en2 = 0; y1_in.pr = 0; y1_in.clr = 0;
    dyn_in.en1 = 0; dyn_in.en2 = 0; dyn_in.pr = 0; dyn_in.clr = 0;
    check(dyn_err, "dynamic bistable flags the error value");
    for (int i = 0; i < 4; i++) begin
      if (y1_y[1]) fb = 1;
      if (dyn_q != stored) qok = 0;
      @(negedge clk);
    end
    check(y1_q == stored && y1_y == {1'b0, stored}, "Y1 bistable repaired");
    check(dyn_q == stored && dyn_y == {stored, stored} && !dyn_err, "dynamic bistable repaired");
    check(qok, "dynamic bistable Q never showed the upset");
    if (w == 1) n_y1_repair_y1++; else n_y1_repair_y2++;
    if (fb) n_y1_fallback++;
    n_dyn_repair++;
    if (qok) n_dyn_latch_hold++;
  endtask

  function automatic state_t dec_ref(input logic [3:0] v);
    // Four-bit table: A=x000, B=xx01, C=xx10, D=xx11, E=x100.
    if (v[1:0] == 2'b01) return ST_B;
    if (v[1:0] == 2'b10) return ST_C;
    if (v[1:0] == 2'b11) return ST_D;
    return v[2] ? ST_E : ST_A;
  endfunction

  function automatic logic [2:0] enc(input state_t s);
    case (s)
      ST_A: return 3'b000;
      ST_B: return 3'b001;
      ST_C: return 3'b010;
      ST_D: return 3'b011;
      default: return 3'b100;
    endcase
  endfunction

  initial begin
    logic stored;
    state_t fsm_ref;
    xor_in = '0; y1_in = '0; dyn_in = '0;
    dec_value = '0; fsm_we = 0; fsm_next = ST_A; fsm_upset = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Y1 and dynamic bistables: random writes and single upsets.
    stored = 1'b0;
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(0, 2) == 0) begin
        stored = 1'($urandom_range(0, 1));
        write_both(stored);
      end else begin
        upset_both($urandom_range(1, 2), stored);
      end
    end

    // Upset during CLK high on both (Y1 flip-flop flipped).
    write_both(1'b0);
    @(negedge clk);
    y1_in.bit_clk = 1; y1_in.d = 0; dyn_in.bit_clk = 1; dyn_in.d = 0;
    @(negedge clk);
    y1_in.en1 = 1; y1_in.pr = 1; dyn_in.en1 = 1; dyn_in.pr = 1;
    @(negedge clk);
    y1_in.en1 = 0; y1_in.pr = 0; dyn_in.en1 = 0; dyn_in.pr = 0;
    repeat (3) @(negedge clk);
    check(y1_q == 1'b1, "Y1 bistable keeps an upset during CLK high");
    check(dyn_q == 1'b0 && dyn_err, "dynamic bistable holds Q during CLK high");
    if (y1_q) n_y1_high_hold++;
    y1_in.bit_clk = 0; dyn_in.bit_clk = 0;
    repeat (3) @(negedge clk);
    check(dyn_q == 1'b0 && dyn_y == 2'b00, "dynamic bistable repaired when CLK falls");
    if (dyn_y == 2'b00) n_dyn_high_repair++;
    write_both(1'b0);

    // Double upset on the dynamic bistable: 00 -> 11, unflagged.
    @(negedge clk);
    dyn_in.en1 = 1; dyn_in.en2 = 1; dyn_in.pr = 1;
    @(negedge clk);
    dyn_in.en1 = 0; dyn_in.en2 = 0; dyn_in.pr = 0;
    check(!dyn_err && dyn_q == 1'b1, "double upset on dynamic bistable is a state change");
    if (!dyn_err) n_dyn_mbu++;

    // XOR bistable: write 1 with CLK high, then back to reset.
    @(negedge clk);
    xor_in.bit_clk = 1; xor_in.d = 1;
    repeat (4) @(negedge clk);
    check(xor_q == 1'b1, "XOR bistable stores a 1 while CLK high");
    xor_in = '0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    // Double upset keeps '0'.
    @(negedge clk);
    xor_in.en1 = 1; xor_in.en2 = 1; xor_in.pr = 1;
    @(negedge clk);
    xor_in = '0;
    repeat (5) @(negedge clk);
    check(xor_q == 1'b0 && xor_y == 2'b11, "XOR bistable tolerates a double upset");
    if (xor_y == 2'b11 && !xor_q) n_xor_mbu++;
    // Single upset (clear Y2 out of 11): over-correction.
    @(negedge clk);
    xor_in.en2 = 1; xor_in.clr = 1;
    @(negedge clk);
    xor_in = '0;
    begin
      int toggles;
      logic last;
      toggles = 0;
      last = xor_q;
      repeat (20) begin @(negedge clk); if (xor_q != last) toggles++; last = xor_q; end
      check(toggles == 20, $sformatf("XOR bistable over-corrects: Q toggles every sample (%0d of 20)", toggles));
      if (toggles > 0) n_xor_overcorrect++;
    end
    // The reset above also returned the other two bistables to 00.
    check(y1_y == 2'b00 && dyn_y == 2'b00, "other bistables come out of reset at 00");

    // Static decoder on random values.
    for (int i = 0; i < 64; i++) begin
      dec_value = 4'($urandom);
      #1;
      check(dec_state == dec_ref(dec_value), "static decoder");
      n_dec++;
    end

    // Five-state register: random writes, random error-value hits.
    fsm_ref = ST_A;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 2))
        0: begin
          fsm_ref = state_t'(3'($urandom_range(0, 4)));
          fsm_we = 1; fsm_next = fsm_ref;
          @(negedge clk);
          fsm_we = 0;
        end
        1: begin  // single upset of bit 2 from B or D
          fsm_ref = ($urandom_range(0, 1) != 0) ? ST_B : ST_D;
          fsm_we = 1; fsm_next = fsm_ref;
          @(negedge clk);
          fsm_we = 0; fsm_upset = 3'b100;
          @(negedge clk);
          fsm_upset = '0;
          check(fsm_corrected, "register flags the error value");
          if (fsm_value == 3'b101) n_fsm_restore_101++;
          if (fsm_value == 3'b111) n_fsm_restore_111++;
        end
        default: begin  // double upset into an error value from A or E
          fsm_ref = ($urandom_range(0, 1) != 0) ? ST_A : ST_E;
          fsm_we = 1; fsm_next = fsm_ref;
          @(negedge clk);
          fsm_we = 0; fsm_upset = (fsm_ref == ST_A) ? 3'b101 : 3'b011;
          @(negedge clk);
          fsm_upset = '0;
          check(fsm_corrected, "register flags the error value");
          if (fsm_value == 3'b101) n_fsm_restore_101++;
          if (fsm_value == 3'b111) n_fsm_restore_111++;
        end
      endcase
      @(negedge clk);
      check(fsm_state == fsm_ref && fsm_value == enc(fsm_ref) && !fsm_corrected,
            $sformatf("register holds %s", fsm_ref.name()));
    end

    $display("mechanisms: write=%0d y1_repair_y1=%0d y1_repair_y2=%0d y1_fallback=%0d y1_high_hold=%0d",
             n_write, n_y1_repair_y1, n_y1_repair_y2, n_y1_fallback, n_y1_high_hold);
    $display("mechanisms: dyn_repair=%0d dyn_latch_hold=%0d dyn_high_repair=%0d dyn_mbu=%0d",
             n_dyn_repair, n_dyn_latch_hold, n_dyn_high_repair, n_dyn_mbu);
    $display("mechanisms: xor_mbu=%0d xor_overcorrect=%0d dec=%0d fsm_101=%0d fsm_111=%0d",
             n_xor_mbu, n_xor_overcorrect, n_dec, n_fsm_restore_101, n_fsm_restore_111);
    check(n_write > 0, "mechanism: write");
    check(n_y1_repair_y1 > 0 && n_y1_repair_y2 > 0, "mechanism: Y1 bistable repairs");
    check(n_y1_fallback > 0, "mechanism: Y1 bistable fallback state");
    check(n_y1_high_hold > 0, "mechanism: Y1 bistable correction off while CLK high");
    check(n_dyn_repair > 0 && n_dyn_latch_hold > 0, "mechanism: dynamic repair with latched Q");
    check(n_dyn_high_repair > 0, "mechanism: dynamic repair when CLK falls");
    check(n_dyn_mbu > 0 && n_xor_mbu > 0, "mechanism: double upsets");
    check(n_xor_overcorrect > 0, "mechanism: XOR over-correction");
    check(n_dec > 0, "mechanism: static decode");
    check(n_fsm_restore_101 > 0 && n_fsm_restore_111 > 0, "mechanism: both error values restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
