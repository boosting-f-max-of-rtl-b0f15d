// Self-checking testbench for test_ctrl. The DUT and reference wrappers are
// replaced by busy counters that stay busy for a fixed number of their own
// clock cycles after a start pulse. With a fast clock of 4.2 ns and a slow
// clock of 17 ns (unrelated), the test checks that the start pulses are one
// cycle long, that DUT and reference traces alternate and never overlap,
// that each loop is counted exactly once after its reference trace, and that
// reset brings everything back to the first step.
module tb_test_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_fast = 1'b0, clk_slow = 1'b0;
  always #2.1 clk_fast = ~clk_fast;
  always #8.5 clk_slow = ~clk_slow;

  logic rst_n, dut_start, ref_start;
  logic dut_busy, ref_busy;
  logic [31:0] loops;
  int dut_cnt = 0, ref_cnt = 0;
  int checks = 0, failures = 0;
  int n_dut = 0, n_ref = 0;

  test_ctrl dut (.clk_fast(clk_fast), .clk_slow(clk_slow), .rst_n(rst_n),
                 .dut_start(dut_start), .dut_busy(dut_busy),
                 .ref_start(ref_start), .ref_busy(ref_busy), .loops(loops));

  assign dut_busy = dut_cnt != 0;
  assign ref_busy = ref_cnt != 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  logic dut_start_q = 1'b0, ref_start_q = 1'b0;

  always @(posedge clk_fast) begin
    dut_start_q <= dut_start;
    if (dut_start && rst_n) begin
      dut_cnt <= 40;
      n_dut++;
      chk(!ref_busy, "DUT trace started while reference busy");
      chk(n_dut == n_ref + 1, $sformatf("DUT traces and reference traces do not alternate %0d %0d", n_dut, n_ref));
      chk(!dut_start_q, "dut_start longer than one cycle");
    end else if (dut_cnt != 0) dut_cnt <= dut_cnt - 1;
  end

  always @(posedge clk_slow) begin
    ref_start_q <= ref_start;
    if (ref_start && rst_n) begin
      ref_cnt <= 12;
      n_ref++;
      chk(!dut_busy, "reference trace started while DUT busy");
      chk(n_ref == n_dut, "reference trace without a DUT trace");
      chk(!ref_start_q, "ref_start longer than one cycle");
      chk(loops == 32'(n_ref - 1), "loop counted before its reference trace");
    end else if (ref_cnt != 0) ref_cnt <= ref_cnt - 1;
  end

  initial begin
    rst_n = 0;
    #100 rst_n = 1;
    wait (loops == 5);
    chk(n_dut == 5 && n_ref == 5, $sformatf("5 loops with %0d DUT and %0d reference traces", n_dut, n_ref));
    // reset in the middle of a loop
    #333 rst_n = 0;
    #100;
    chk(loops == 0, "loops not cleared by reset");
    n_dut = 0; n_ref = 0;
    @(negedge clk_fast); dut_cnt = 0;
    @(negedge clk_slow); ref_cnt = 0;
    rst_n = 1;
    wait (loops == 2);
    chk(n_dut == 2 && n_ref == 2, "loops after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
