// End-to-end testbench for skew_test_top at its default size (4 stages,
// 8-bit memories, 255-word traces).
//
// The clocks are made here the way a PLL with shifted outputs would make
// them: clk_fast at 238 MHz (4.2 ns), clk_fast_wr a copy delayed by a phase
// that the test can change, clk_fast_rd equal to clk_fast, clk_slow at
// 50 MHz for the reference. Gate-level delays are not modelled, so the
// pipeline logic switches in zero time.
//
// Phase 1 runs three complete test loops with no skew: every loop must
// compare 255 words with no error, the DUT trace must take 255 issue cycles
// (busy for 258 fast cycles including the pipeline drain), and the bypass
// must be used and addresses forced in every trace. Phase 2 delays
// clk_fast_wr by 2 ns while the logic still has no delay, i.e. the short
// paths are not padded; the fast pipeline then writes wrong words and the
// test circuit must detect it (error flag set, error_count > 0).
// Counted mechanisms: loops, compared words, bypass uses, forced addresses,
// detected errors; each must occur at least once.
module tb_skew_test_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime TF = 4.2;
  localparam realtime TS = 20.0;

  logic clk_fast = 1'b0, clk_fast_wr = 1'b0, clk_slow = 1'b0;
  logic rst_n;
  realtime dwr = 0.0;

  logic        error;
  logic [31:0] error_count, compared_count, loops, dut_hit_count, dut_forced_count;
  logic [31:0] ref_hit_count, ref_forced_count;

  int checks = 0, failures = 0;
  longint total_hits = 0, total_forced = 0;
  int busy_len = 0, busy_len_last = 0;

  skew_test_top dut (
    .clk_fast(clk_fast), .clk_fast_wr(clk_fast_wr), .clk_fast_rd(clk_fast),
    .clk_slow(clk_slow), .rst_n(rst_n),
    .error(error), .error_count(error_count), .compared_count(compared_count),
    .loops(loops), .dut_hit_count(dut_hit_count), .dut_forced_count(dut_forced_count),
    .ref_hit_count(ref_hit_count), .ref_forced_count(ref_forced_count));

  // Behavioural clock source.
  always begin
    clk_fast = 1'b1;
    if (dwr == 0.0) clk_fast_wr = 1'b1;
    else fork #(dwr) clk_fast_wr = 1'b1; join_none
    #(TF / 2);
    clk_fast = 1'b0;
    if (dwr == 0.0) clk_fast_wr = 1'b0;
    else fork #(dwr) clk_fast_wr = 1'b0; join_none
    #(TF / 2);
  end
  always #(TS / 2) clk_slow = ~clk_slow;

  // Length of each DUT trace in fast cycles.
  logic busy_q = 1'b0;
  always @(posedge clk_fast) begin
    busy_q <= dut.dut_busy;
    if (dut.dut_busy) busy_len <= busy_len + 1;
    else if (busy_q) begin busy_len_last <= busy_len; busy_len <= 0; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0;
    #200 rst_n = 1'b1;
    // Phase 1: three loops at 238 MHz, no skew.
    for (int l = 1; l <= 3; l++) begin
      wait (loops == 32'(l));
      #1;
      chk(compared_count == 32'(255 * l), $sformatf("loop %0d: %0d words compared", l, compared_count));
      chk(error_count == 0 && !error, $sformatf("loop %0d: %0d errors", l, error_count));
      chk(busy_len_last == 258, $sformatf("DUT trace busy %0d fast cycles, expected 258", busy_len_last));
      chk(dut_hit_count > 0, "no bypass use in a trace");
      chk(dut_forced_count > 0, "no forced address in a trace");
      chk(ref_hit_count == dut_hit_count && ref_forced_count == dut_forced_count,
          "reference and DUT traces used the bypass differently");
      total_hits   += dut_hit_count;
      total_forced += dut_forced_count;
      $display("loop %0d: compared %0d, errors %0d, bypass uses %0d, forced %0d",
               l, compared_count, error_count, dut_hit_count, dut_forced_count);
    end
    // Phase 2: 2 ns write-clock skew with unpadded (zero-delay) paths.
    @(negedge clk_slow);
    dwr = 2.0;
    wait (loops == 32'd5);
    #1;
    chk(error && error_count > 0, "skewed write clock with short paths went undetected");
    $display("with unpadded 2 ns write skew: errors %0d in %0d words", error_count, compared_count - 765);
    $display("mechanisms: loops %0d, compared %0d, bypass uses %0d, forced %0d, detected errors %0d",
             loops, compared_count, total_hits, total_forced, error_count);
    chk(loops > 0 && compared_count > 0 && total_hits > 0 && total_forced > 0 && error_count > 0,
        "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
