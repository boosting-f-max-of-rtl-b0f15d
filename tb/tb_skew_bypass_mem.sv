// Self-checking testbench for skew_bypass_mem with really skewed clocks.
//
// The clocks are generated here with explicit phase offsets: clk_wr lags clk
// by DWR, clk_rd leads it by DRD. The logic that would drive the memory is
// modelled by delays after the main clock edge: write address/enable settle
// D_ADDR after the edge, write data D_DATA after it (D_DATA may exceed the
// clock period: that is the time borrowed from the write port), the read
// address D_RD after it. Each scenario applies random requests, a quarter of
// them reading the address written in the same cycle, and compares every read
// word and bypass flag, one cycle after the request, with a write-first
// shadow memory kept here. Two instances run side by side: write-address
// register on the main clock and on the early read clock.
//
// Scenarios: unskewed baseline at 100 MHz; 238 MHz with DWR = 2.0 ns and
// DRD = 0 and a 5.5 ns write-data path (longer than the 4.2 ns period); 238 MHz
// with DWR = 1.5 ns and DRD = 0.8 ns. A last scenario makes the write paths
// shorter than DWR (an unpadded short path) and checks that this does
// corrupt the memory, i.e. that the write port really runs on the late clock.
module tb_skew_bypass_mem;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 600;
  localparam logic [31:0] SEED = 32'h0BAD_F00D;

  logic clk = 1'b0, clk_wr = 1'b0, clk_rd = 1'b0;
  logic        we = 1'b0;
  logic [7:0]  wa = '0, ra = '0;
  logic [15:0] wd = '0;
  logic [15:0] rd0, rd1;
  logic        hit0, hit1;

  int checks = 0, failures = 0;
  int hits_seen = 0, misses_seen = 0;

  skew_bypass_mem #(.DATA_W(16), .ADDR_W(8), .WA_ON_RD_CLK(1'b0), .INIT_SEED(SEED)) u0 (
    .clk(clk), .clk_wr(clk_wr), .clk_rd(clk_rd), .we(we), .wr_addr(wa), .wr_data(wd),
    .rd_addr(ra), .rd_data(rd0), .bypass_hit(hit0));
  skew_bypass_mem #(.DATA_W(16), .ADDR_W(8), .WA_ON_RD_CLK(1'b1), .INIT_SEED(SEED)) u1 (
    .clk(clk), .clk_wr(clk_wr), .clk_rd(clk_rd), .we(we), .wr_addr(wa), .wr_data(wd),
    .rd_addr(ra), .rd_data(rd1), .bypass_hit(hit1));

  logic [15:0] shadow [256];
  logic        r_we  [N];
  logic [7:0]  r_wa  [N], r_ra [N];
  logic [15:0] r_wd  [N], r_exp [N];
  logic        r_hit [N];

  function automatic logic [15:0] hash(input logic [31:0] seed, input logic [31:0] a);
    logic [31:0] h;
    h = seed ^ (a * 32'h9E37_79B9);
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return h[15:0];
  endfunction

  // Prepare N requests and their write-first expected results.
  task automatic make_requests();
    for (int n = 0; n < N; n++) begin
      r_we[n] = ($urandom % 4) != 0;
      r_wa[n] = 8'($urandom % 64);   // small range: many repeated addresses
      r_wd[n] = 16'($urandom);
      r_ra[n] = ($urandom % 4 == 0) ? r_wa[n] : 8'($urandom % 64);
      if (r_we[n]) shadow[r_wa[n]] = r_wd[n];
      r_exp[n] = shadow[r_ra[n]];
      r_hit[n] = r_we[n] && (r_wa[n] == r_ra[n]);
    end
  endtask

  // Run one scenario; returns the number of mismatching reads.
  task automatic run(input realtime T, input realtime DWR, input realtime DRD,
                     input realtime D_ADDR, input realtime D_DATA, input realtime D_RD,
                     input bit count_as_checks, output int bad);
    int bad_l;
    bad_l = 0;
    make_requests();
    fork
      begin : g_clk
        repeat (N + 3) begin clk = 1; #(T / 2); clk = 0; #(T / 2); end
      end
      begin : g_clk_wr
        #(DWR);
        repeat (N + 3) begin clk_wr = 1; #(T / 2); clk_wr = 0; #(T / 2); end
      end
      begin : g_clk_rd
        #(T - DRD);
        repeat (N + 2) begin clk_rd = 1; #(T / 2); clk_rd = 0; #(T / 2); end
      end
      begin : g_wa
        #(D_ADDR);
        for (int n = 0; n < N; n++) begin we = r_we[n]; wa = r_wa[n]; #(T); end
        we = 1'b0;
      end
      begin : g_wd
        #(D_DATA);
        for (int n = 0; n < N; n++) begin wd = r_wd[n]; #(T); end
      end
      begin : g_ra
        #(D_RD);
        for (int n = 0; n < N; n++) begin ra = r_ra[n]; #(T); end
      end
      begin : g_check
        #(T + DWR + 0.1);
        for (int n = 0; n < N; n++) begin
          if (rd0 !== r_exp[n] || rd1 !== r_exp[n] || hit0 !== r_hit[n] || hit1 !== r_hit[n]) begin
            bad_l++;
            if (count_as_checks && bad_l < 5)
              $display("FAIL T=%0.2f cyc %0d: rd0=%h rd1=%h hit=%b%b exp=%h/%b",
                       T, n, rd0, rd1, hit0, hit1, r_exp[n], r_hit[n]);
          end
          if (count_as_checks) begin
            checks++;
            if (r_hit[n]) hits_seen++; else misses_seen++;
          end
          #(T);
        end
      end
    join
    #(T);
    bad = bad_l;
  endtask

  int bad;

  initial begin
    for (int i = 0; i < 256; i++) shadow[i] = hash(SEED, i);

    // Baseline: no skew, 100 MHz.
    run(10.0, 0.0, 0.0, 1.0, 1.0, 1.0, 1'b1, bad);
    failures += bad;
    // Time-borrowing write port: 238 MHz, 2.0 ns write skew, 5.5 ns data path.
    run(4.2, 2.0, 0.0, 3.0, 5.5, 1.0, 1'b1, bad);
    failures += bad;
    // Late write and early read ports.
    run(4.2, 1.5, 0.8, 2.5, 5.0, 1.0, 1'b1, bad);
    failures += bad;

    checks++;
    if (hits_seen == 0 || misses_seen == 0) begin
      failures++;
      $display("FAIL bypass hits %0d, RAM reads %0d: both must occur", hits_seen, misses_seen);
    end

    // Unpadded short path: write inputs change before the late write edge.
    run(4.2, 2.0, 0.0, 0.5, 0.5, 1.0, 1'b0, bad);
    checks++;
    if (bad == 0) begin
      failures++;
      $display("FAIL short write paths did not disturb the late-clocked write port");
    end
    $display("bypass hits %0d, RAM reads %0d, short-path mismatches %0d",
             hits_seen, misses_seen, bad);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
