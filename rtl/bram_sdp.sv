// Simple dual-port block RAM with independent write and read clocks.
//
// The write port latches write enable, address and data on the rising edge of
// clk_wr. The read port latches the address on the rising edge of clk_rd and
// the word read appears on rd_data after that edge. A read on the same edge as
// a write to the same address returns the old word, which is how block RAMs
// of the targeted FPGA family behave and why the pipeline memory needs a
// bypass. The two clocks may be skewed copies of one clock (pipeline memory)
// or unrelated clocks (the trace RAM of the test circuit).
//
// Power-up contents are pseudo-random (skew_mem_pkg::init_word with
// INIT_SEED); INIT_SEED = 0 gives zeros. There is no reset and no read enable.
// Read latency: one read-clock edge. Write takes effect at the clk_wr edge.
module bram_sdp #(
  parameter int unsigned DATA_W    = skew_mem_pkg::DATA_W,
  parameter int unsigned ADDR_W    = skew_mem_pkg::ADDR_W,
  parameter int unsigned INIT_SEED = 0
) (
  input  logic              clk_wr,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              clk_rd,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = skew_mem_pkg::init_word(INIT_SEED, i);
  end

  always_ff @(posedge clk_wr) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk_rd) begin
    rd_data <= mem[rd_addr];
  end

endmodule
