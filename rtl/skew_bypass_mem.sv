// Pipeline memory with a single-stage bypass and intentionally skewed ports.
//
// A pipeline stage writes a word into this memory and the next stage may read
// the same address in the very next cycle. The block RAM cannot return a word
// on the edge that writes it, so the last write is also kept in registers:
// the write-data register (wd_q) and the write-address/enable register
// (wa_q, we_q). The read address is latched on the read clock (ra_q). If the
// read latched on an edge asks for the address written on that same edge,
// the bypass mux returns wd_q instead of the RAM output.
//
// Three clocks: clk is the main clock. clk_wr lags it by delta_wr; the RAM
// write port and the write-data register run on it, so the logic producing
// the write data may take up to T + delta_wr. clk_rd leads clk by delta_rd;
// the RAM read port and ra_q run on it, so the read word is ready delta_rd
// earlier. The write-address register runs on clk, or on clk_rd when
// WA_ON_RD_CLK = 1. Because the comparison uses registered values only,
// skewing the ports does not change the function. With all three clocks tied
// together the block is the plain bypassed memory (baseline).
//
// Timing constraints on the user (hold): logic driving wr_data/wr_addr/we
// from the main clock must take longer than delta_wr; logic reading rd_data
// sees it change at the clk_rd and clk_wr edges. These skews and the hold
// padding are this design's own modelling of the scheme as described; the
// clocks themselves come from a PLL outside this block.
//
// Interface: write request (we, wr_addr, wr_data) and read address presented
// in cycle n; rd_data for that read is valid in cycle n+1 after the later of
// the clk_rd and clk_wr edges, and reflects the write of cycle n
// (write-first). bypass_hit is high while the bypass is selected.
module skew_bypass_mem #(
  parameter int unsigned DATA_W       = skew_mem_pkg::DATA_W,
  parameter int unsigned ADDR_W       = skew_mem_pkg::ADDR_W,
  parameter bit          WA_ON_RD_CLK = 1'b0,
  parameter int unsigned INIT_SEED    = 0
) (
  input  logic              clk,
  input  logic              clk_wr,
  input  logic              clk_rd,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  output logic              bypass_hit
);

  logic [DATA_W-1:0] ram_q;
  logic [DATA_W-1:0] wd_q;
  logic [ADDR_W-1:0] wa_q;
  logic [ADDR_W-1:0] ra_q;
  logic              we_q;
  logic              clk_wa;

  bram_sdp #(
    .DATA_W   (DATA_W),
    .ADDR_W   (ADDR_W),
    .INIT_SEED(INIT_SEED)
  ) u_ram (
    .clk_wr (clk_wr),
    .we     (we),
    .wr_addr(wr_addr),
    .wr_data(wr_data),
    .clk_rd (clk_rd),
    .rd_addr(rd_addr),
    .rd_data(ram_q)
  );

  // Write-data register: late clock, same as the RAM write port.
  always_ff @(posedge clk_wr) wd_q <= wr_data;

  // Write-address and write-enable register: main or early clock.
  assign clk_wa = WA_ON_RD_CLK ? clk_rd : clk;

  always_ff @(posedge clk_wa) begin
    wa_q <= wr_addr;
    we_q <= we;
  end

  // Copy of the RAM's read-address register for the comparator.
  always_ff @(posedge clk_rd) ra_q <= rd_addr;

  assign bypass_hit = we_q && (wa_q == ra_q);
  assign rd_data    = bypass_hit ? wd_q : ram_q;

endmodule
