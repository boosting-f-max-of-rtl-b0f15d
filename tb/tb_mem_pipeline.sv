// Self-checking testbench for mem_pipeline (small instance: 3 stages, 5-bit
// addresses so that addresses repeat often). All three clocks are the same
// clock here; the skewed ports are exercised in the memory's own testbench.
// Every cycle each memory is written and read at random addresses, with the
// read address often equal to the write address of the same cycle. A model
// kept here (write-first memories, product of the two bytes per stage, power-up
// contents from the same hash) predicts the word read from the last memory
// one cycle after each request; every such word is compared. It also counts
// bypass uses and checks that both bypass and plain RAM reads occurred.
module tb_mem_pipeline;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int S  = 3;
  localparam int AW = 5;
  localparam logic [31:0] SEED = 32'h1234_5678;
  localparam int N = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [S:0]         we;
  logic [S:0][AW-1:0] wa, ra;
  logic [15:0]        in_data, out_data;
  logic [S:0]         hit;

  int checks = 0, failures = 0, hits = 0, plain = 0;

  mem_pipeline #(.STAGES(S), .DATA_W(16), .ADDR_W(AW), .INIT_SEED(SEED)) dut (
    .clk(clk), .clk_wr(clk), .clk_rd(clk), .we(we), .wr_addr(wa), .rd_addr(ra),
    .in_data(in_data), .out_data(out_data), .bypass_hit(hit));

  function automatic logic [15:0] hash(input logic [31:0] seed, input logic [31:0] a);
    logic [31:0] h;
    if (seed == 0) return '0;
    h = seed ^ (a * 32'h9E37_79B9);
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return h[15:0];
  endfunction

  logic [15:0] m [S+1][1<<AW];
  logic [15:0] rdv [S+1];      // word each memory returns this cycle
  logic [15:0] exp_out;

  initial begin
    for (int k = 0; k <= S; k++)
      for (int a = 0; a < (1 << AW); a++) m[k][a] = hash(SEED + k, a);
    we = '0; wa = '0; ra = '0; in_data = '0;
    // one idle edge so the bypass registers hold we = 0
    @(negedge clk);
    @(negedge clk);
    for (int k = 0; k <= S; k++) rdv[k] = m[k][0];
    for (int n = 0; n < N; n++) begin
      // drive cycle n requests (between edges)
      for (int k = 0; k <= S; k++) begin
        we[k] = ($urandom % 8) != 0;
        wa[k] = AW'($urandom);
        ra[k] = ($urandom % 3 == 0) ? wa[k] : AW'($urandom);
      end
      in_data = 16'($urandom);
      // model: write data of memory k is the product of what memory k-1
      // returns in this cycle (from the read of cycle n-1)
      for (int k = S; k >= 0; k--) begin
        logic [15:0] wdat;
        wdat = (k == 0) ? in_data : 16'(rdv[k-1][15:8] * rdv[k-1][7:0]);
        if (we[k]) m[k][wa[k]] = wdat;
      end
      @(posedge clk);
      #1;
      for (int k = 0; k <= S; k++) rdv[k] = m[k][ra[k]];
      exp_out = rdv[S];
      checks++;
      if (out_data !== exp_out) begin
        failures++;
        if (failures < 6) $display("FAIL cyc %0d out=%h exp=%h", n, out_data, exp_out);
      end
      hits  += $countones(hit);
      plain += (S + 1) - $countones(hit);
      @(negedge clk);
    end
    checks++;
    if (hits == 0 || plain == 0) begin
      failures++;
      $display("FAIL bypass uses %0d, plain reads %0d", hits, plain);
    end
    $display("bypass uses %0d, plain reads %0d", hits, plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
