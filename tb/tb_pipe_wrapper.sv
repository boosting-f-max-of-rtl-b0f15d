// Self-checking testbench for pipe_wrapper (2 stages, 6-bit trace index, so a
// trace is 63 cycles). A complete model of the wrapper is kept here: the
// one-pass index LFSR, the 16-bit data LFSR, one two-level address generator
// per memory, write-first memories with the hashed power-up contents, and the
// byte-product stages. Three traces are run with different idle gaps between
// them; for each the test checks that out_valid rises exactly three edges
// after the start edge and stays high for 63 cycles, that the indices and
// words match the model in order, that the 63 indices are all different,
// that busy falls once the trace is out, and that the hit and forced counters
// match the model.
module tb_pipe_wrapper;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int S = 2;
  localparam int IW = 6;
  localparam int L = (1 << IW) - 1;
  localparam logic [31:0] ISEED = 32'h1234_5678;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, out_valid;
  logic [IW-1:0] out_idx;
  logic [15:0] out_data;
  logic [31:0] hit_count, forced_count;
  int checks = 0, failures = 0;

  pipe_wrapper #(.STAGES(S), .IDX_W(IW), .DATA_W(16), .ADDR_W(8), .INIT_SEED(ISEED)) dut (
    .clk(clk), .clk_wr(clk), .clk_rd(clk), .rst_n(rst_n), .start(start), .busy(busy),
    .out_valid(out_valid), .out_idx(out_idx), .out_data(out_data),
    .hit_count(hit_count), .forced_count(forced_count));

  function automatic logic [15:0] hash(input logic [31:0] seed, input logic [31:0] a);
    logic [31:0] h;
    h = seed ^ (a * 32'h9E37_79B9);
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return h[15:0];
  endfunction

  function automatic logic [15:0] st16(input logic [15:0] x, input logic [15:0] taps);
    return {x[14:0], ^(x & taps)};
  endfunction

  logic [15:0] m [S+1][256];
  logic [IW-1:0] e_idx [L];
  logic [15:0]   e_dat [L];
  int            e_hits, e_forced;

  // Model of one trace, from the current memory contents.
  task automatic model_trace();
    logic [15:0] a [S+1], s [S+1];
    int          cnt;
    logic [15:0] dl;
    logic [IW-1:0] idx;
    logic [15:0] rdv [S+1];
    logic [7:0]  wa, ra;
    logic        f;
    e_hits = 0; e_forced = 0;
    for (int k = 0; k <= S; k++) begin
      a[k] = 16'hACE1 + 16'(k) * 16'h3B71;
      s[k] = a[k] ^ 16'h5A5A;
    end
    cnt = 0; dl = 16'h1D0F; idx = IW'(1);
    for (int j = 0; j < L; j++) begin
      logic [15:0] nrd [S+1];
      for (int k = 0; k <= S; k++) begin
        wa = a[k][7:0];
        f  = (a[k][10:8] == 3'b101);
        ra = f ? wa : a[k][15:8];
        if (f) e_forced++;
        if (k == 0) m[0][wa] = dl;
        else if (j > 0) m[k][wa] = 16'(rdv[k-1][15:8] * rdv[k-1][7:0]);
        if ((k == 0 || j > 0) && wa == ra) e_hits++;
        nrd[k] = m[k][ra];
      end
      for (int k = 0; k <= S; k++) rdv[k] = nrd[k];
      e_idx[j] = idx;
      e_dat[j] = rdv[S];
      // advance generators
      for (int k = 0; k <= S; k++) begin
        if (cnt == 15) begin a[k] = s[k]; s[k] = st16(s[k], 16'hB400); end
        else a[k] = st16(a[k], 16'hD008);
      end
      cnt = (cnt + 1) % 16;
      dl = st16(dl, 16'hB400);
      idx = {idx[IW-2:0], idx[5] ^ idx[4]};   // x^6 + x^5 + 1
    end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k <= S; k++)
      for (int a = 0; a < 256; a++) m[k][a] = hash(ISEED + k, a);
    rst_n = 0; start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      bit seen [1 << IW];
      int lat, bad;
      repeat (5 + 17 * t) @(posedge clk);
      model_trace();
      foreach (seen[i]) seen[i] = 1'b0;
      #1 start = 1;
      @(posedge clk); #1 start = 0;
      lat = 0;
      while (!out_valid && lat < 20) begin @(posedge clk); #1; lat++; end
      chk(lat == 3, $sformatf("first output %0d edges after start, expected 3", lat));
      bad = 0;
      for (int j = 0; j < L; j++) begin
        checks++;
        if (!out_valid || out_idx !== e_idx[j] || out_data !== e_dat[j] || seen[out_idx]) begin
          failures++;
          if (bad++ < 4) $display("FAIL trace %0d item %0d: v=%b idx=%h data=%h exp %h %h",
                                  t, j, out_valid, out_idx, out_data, e_idx[j], e_dat[j]);
        end
        seen[out_idx] = 1'b1;
        @(posedge clk); #1;
      end
      chk(!out_valid && !busy, "trace longer than one pass or busy stuck");
      chk(hit_count == 32'(e_hits), $sformatf("hit_count %0d expected %0d", hit_count, e_hits));
      chk(forced_count == 32'(e_forced), $sformatf("forced_count %0d expected %0d", forced_count, e_forced));
      $display("trace %0d: bypass hits %0d, forced %0d", t, hit_count, forced_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
