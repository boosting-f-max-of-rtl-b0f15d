// Self-checking testbench for lfsr: loads a seed and checks that the 8-bit
// counter visits every one of the 255 non-zero states exactly once before it
// returns to the seed (one pass), that each step matches a Fibonacci shift
// computed here from the polynomial x^8+x^6+x^5+x^4+1, that step=0 holds the
// state, and that a 16-bit instance has period 65535.
module tb_lfsr;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       load, step;
  logic [7:0] seed, state;
  logic        load16;
  logic [15:0] state16;
  int checks = 0, failures = 0;

  lfsr #(.W(8), .TAPS(8'hB8)) dut (.clk(clk), .load(load), .seed(seed), .step(step), .state(state));
  lfsr #(.W(16), .TAPS(16'hB400)) dut16 (.clk(clk), .load(load16), .seed(16'h0001), .step(1'b1), .state(state16));

  function automatic logic [7:0] nxt(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  bit seen [256];
  logic [7:0] prev;
  int period16;

  initial begin
    load = 1; step = 0; seed = 8'h5C; load16 = 1;
    @(posedge clk); #1;
    load = 0; load16 = 0;
    checks++; if (state !== 8'h5C) begin failures++; $display("FAIL load"); end
    // hold
    @(posedge clk); #1;
    checks++; if (state !== 8'h5C) begin failures++; $display("FAIL hold"); end
    step = 1;
    for (int i = 0; i < 255; i++) begin
      prev = state;
      checks++;
      if (state == 8'h00 || seen[state]) begin failures++; $display("FAIL repeat/zero %h at %0d", state, i); end
      seen[state] = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (state !== nxt(prev)) begin failures++; $display("FAIL step %h -> %h", prev, state); end
    end
    checks++; if (state !== 8'h5C) begin failures++; $display("FAIL period, state %h", state); end
    // 16-bit period
    while (state16 != 16'h0001) begin @(posedge clk); #1; end
    period16 = 0;
    do begin @(posedge clk); #1; period16++; end while (state16 != 16'h0001 && period16 < 70000);
    checks++;
    if (period16 != 65535) begin failures++; $display("FAIL period16 %0d", period16); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
