// Feed-forward multistage pipeline communicating through skewed bypass memories.
//
// STAGES+1 memories (index 0..STAGES) are chained by STAGES multiplier stages:
// stage s reads memory s-1 through its bypass mux, multiplies the two bytes of
// the word, and writes the product into memory s. Memory 0 is written from
// in_data; the read port of memory STAGES is out_data. Every memory gets its
// own write enable, write address and read address each cycle; they come from
// registers outside (in the test circuit, from LFSR address generators).
//
// Timing: a read address presented in cycle n is answered in cycle n+1; the
// product of that word is written (at the address presented in cycle n+1)
// at the end of cycle n+1. Reading an address in the cycle it is written
// returns the new word through the bypass, so one stage can hand data to the
// next with no extra cycle. All memories share the three clocks: clk (main),
// clk_wr (late by delta_wr) and clk_rd (early by delta_rd). The stage count is
// this design's choice.
module mem_pipeline #(
  parameter int unsigned STAGES       = 4,
  parameter int unsigned DATA_W       = skew_mem_pkg::DATA_W,
  parameter int unsigned ADDR_W       = skew_mem_pkg::ADDR_W,
  parameter bit          WA_ON_RD_CLK = 1'b0,
  parameter int unsigned INIT_SEED    = 32'h1234_5678
) (
  input  logic                           clk,
  input  logic                           clk_wr,
  input  logic                           clk_rd,
  input  logic [STAGES:0]                we,
  input  logic [STAGES:0][ADDR_W-1:0]    wr_addr,
  input  logic [STAGES:0][ADDR_W-1:0]    rd_addr,
  input  logic [DATA_W-1:0]              in_data,
  output logic [DATA_W-1:0]              out_data,
  output logic [STAGES:0]                bypass_hit
);

  logic [STAGES:0][DATA_W-1:0] wdata;  // write data of memory k
  logic [STAGES:0][DATA_W-1:0] rdata;  // bypassed read data of memory k

  assign wdata[0] = in_data;

  for (genvar k = 0; k <= STAGES; k++) begin : g_mem
    skew_bypass_mem #(
      .DATA_W      (DATA_W),
      .ADDR_W      (ADDR_W),
      .WA_ON_RD_CLK(WA_ON_RD_CLK),
      .INIT_SEED   (INIT_SEED + k)
    ) u_mem (
      .clk       (clk),
      .clk_wr    (clk_wr),
      .clk_rd    (clk_rd),
      .we        (we[k]),
      .wr_addr   (wr_addr[k]),
      .wr_data   (wdata[k]),
      .rd_addr   (rd_addr[k]),
      .rd_data   (rdata[k]),
      .bypass_hit(bypass_hit[k])
    );
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    mul_stage #(.DATA_W(DATA_W)) u_mul (
      .din (rdata[s-1]),
      .dout(wdata[s])
    );
  end

  assign out_data = rdata[STAGES];

endmodule
