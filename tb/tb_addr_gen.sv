// Self-checking testbench for addr_gen. A model kept here steps two 16-bit
// Fibonacci LFSRs (x^16+x^15+x^13+x^4+1 for addresses, x^16+x^14+x^13+x^11+1
// for seeds), reloads the address LFSR from the seed LFSR every 16 cycles,
// and derives the write address, the read address and the forced flag (bits
// 10:8 equal to 101 force the read address to the write address). The
// registered outputs are compared every cycle for two restarts, the second
// in the middle of a sequence; the test also checks that forced cycles occur
// and make the two addresses equal, and that the restart repeats the stream.
module tb_addr_gen;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       restart;
  logic [7:0] wa, ra;
  logic       forced;
  int checks = 0, failures = 0, n_forced = 0;

  localparam logic [15:0] SEED = 16'h3C5A;

  addr_gen #(.ADDR_W(8), .SEED(SEED), .RESEED_LOG2(4)) dut (
    .clk(clk), .restart(restart), .wr_addr(wa), .rd_addr(ra), .forced(forced));

  function automatic logic [15:0] step(input logic [15:0] x, input logic [15:0] taps);
    return {x[14:0], ^(x & taps)};
  endfunction

  logic [15:0] a, s;
  int cnt;
  logic [7:0] first_wa [20];

  task automatic run(input int cycles, input bit record, input bit compare_first);
    // restart edge
    @(negedge clk); restart = 1;
    @(posedge clk); #1; restart = 0;
    a = SEED; s = SEED ^ 16'h5A5A; cnt = 0;
    for (int n = 0; n < cycles; n++) begin
      logic [7:0] ewa, era; logic ef;
      ewa = a[7:0];
      ef  = (a[10:8] == 3'b101);
      era = ef ? a[7:0] : a[15:8];
      // advance model to the state after this edge
      if (cnt == 15) begin a = s; s = step(s, 16'hB400); end
      else a = step(a, 16'hD008);
      cnt = (cnt + 1) % 16;
      @(posedge clk); #1;
      checks++;
      if (wa !== ewa || ra !== era || forced !== ef) begin
        failures++;
        if (failures < 6) $display("FAIL cyc %0d wa=%h ra=%h f=%b exp %h %h %b", n, wa, ra, forced, ewa, era, ef);
      end
      if (forced) begin
        n_forced++;
        checks++;
        if (wa !== ra) begin failures++; $display("FAIL forced but addresses differ"); end
      end
      if (n < 20) begin
        if (record) first_wa[n] = wa;
        if (compare_first) begin
          checks++;
          if (first_wa[n] !== wa) begin failures++; $display("FAIL restart did not repeat the stream"); end
        end
      end
    end
  endtask

  initial begin
    restart = 0;
    run(700, 1'b1, 1'b0);
    run(300, 1'b0, 1'b1);
    checks++;
    if (n_forced < 50 || n_forced > 250) begin
      failures++;
      $display("FAIL forced %0d of 1000 cycles, expected about one in eight", n_forced);
    end
    $display("forced cycles %0d", n_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
