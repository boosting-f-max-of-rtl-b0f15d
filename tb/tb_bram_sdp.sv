// Self-checking testbench for bram_sdp. Checks the power-up contents against
// the xorshift hash recomputed here, random writes and reads against a
// shadow array, a read on the same edge as a write to the same address
// (must return the old word), one-edge read latency, and operation with
// unrelated write and read clocks.
module tb_bram_sdp;
  logic clk_wr = 1'b0, clk_rd = 1'b0;
  logic        we;
  logic [7:0]  wa, ra;
  logic [15:0] wd, rd;
  int checks = 0, failures = 0;
  logic [15:0] shadow [256];
  bit          two_clocks = 1'b0;

  always #5 clk_wr = ~clk_wr;
  always begin
    if (two_clocks) #7 clk_rd = ~clk_rd;
    else begin @(clk_wr); clk_rd = clk_wr; end
  end

  bram_sdp #(.DATA_W(16), .ADDR_W(8), .INIT_SEED(32'hCAFE)) dut (
    .clk_wr(clk_wr), .we(we), .wr_addr(wa), .wr_data(wd),
    .clk_rd(clk_rd), .rd_addr(ra), .rd_data(rd));

  function automatic logic [15:0] hash(input logic [31:0] seed, input logic [31:0] a);
    logic [31:0] h;
    h = seed ^ (a * 32'h9E37_79B9);
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return h[15:0];
  endfunction

  task automatic chk(input logic [15:0] got, input logic [15:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0;
    for (int i = 0; i < 256; i++) shadow[i] = hash(32'hCAFE, i);
    // power-up contents
    for (int i = 0; i < 256; i++) begin
      ra = 8'(i);
      @(posedge clk_wr); #1;
      chk(rd, shadow[i], "init");
    end
    // random traffic, same clock; includes same-address collisions
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] expect_rd;
      we = 1'($urandom);
      wa = 8'($urandom);
      wd = 16'($urandom);
      ra = ($urandom % 4 == 0) ? wa : 8'($urandom);
      expect_rd = shadow[ra];              // old word on collision
      @(posedge clk_wr); #1;
      if (we) shadow[wa] = wd;
      chk(rd, expect_rd, "read");
    end
    // separate clocks: write a block, then read it back on the other clock
    two_clocks = 1'b1;
    we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_wr); we = 1; wa = 8'(i); wd = 16'(i * 977 + 3);
      @(posedge clk_wr); #1; shadow[i] = 16'(i * 977 + 3);
    end
    @(negedge clk_wr); we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_rd); ra = 8'(i);
      @(posedge clk_rd); #1;
      chk(rd, shadow[i], "2clk");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
