// Test circuit for the skewed-clock pipeline memory: a fast DUT checked by a
// slow reference through a dual-clocked trace RAM.
//
// The DUT wrapper runs the memory pipeline on clk_fast with its write ports on
// clk_fast_wr (late by delta_wr) and read ports on clk_fast_rd (early by
// delta_rd). Each traced word is written into the trace RAM at its one-pass
// LFSR index. The reference wrapper is an identical pipeline on clk_slow with
// no skew, slow enough to meet timing by a wide margin; it reruns the same
// trace and, one slow cycle after presenting each index to the trace RAM's
// read port, compares its own word with the word the DUT stored. Every
// difference increments error_count and sets the sticky error flag. A loop
// (DUT trace, then reference trace) repeats for as long as rst_n is high.
// There are no clock enables on the fast side.
//
// Clocks come from outside (a PLL with phase-shifted outputs, or delay
// cells); the clk_fast_* inputs must be copies of clk_fast. If the DUT fails
// timing (too fast a clock, too much skew, or short paths shorter than the
// write skew) its trace differs from the reference and errors are counted.
// dut_hit_count and dut_forced_count report, for the last DUT trace, how often
// the bypass was used and how often addresses were forced equal; the ref_*
// counts are the same for the last reference trace (clk_slow domain). The pairing
// of index and word and the counters are this design's choices.
module skew_test_top #(
  parameter int unsigned STAGES = 4,
  parameter int unsigned IDX_W  = 8
) (
  input  logic        clk_fast,
  input  logic        clk_fast_wr,
  input  logic        clk_fast_rd,
  input  logic        clk_slow,
  input  logic        rst_n,
  output logic        error,
  output logic [31:0] error_count,
  output logic [31:0] compared_count,
  output logic [31:0] loops,
  output logic [31:0] dut_hit_count,
  output logic [31:0] dut_forced_count,
  output logic [31:0] ref_hit_count,
  output logic [31:0] ref_forced_count
);

  localparam int unsigned DATA_W = skew_mem_pkg::DATA_W;

  logic              dut_start, dut_busy, ref_start, ref_busy;
  logic              dut_valid, ref_valid, ref_valid_q;
  logic [IDX_W-1:0]  dut_idx, ref_idx;
  logic [DATA_W-1:0] dut_data, ref_data, ref_data_q, trace_q;

  test_ctrl u_ctrl (
    .clk_fast (clk_fast),
    .clk_slow (clk_slow),
    .rst_n    (rst_n),
    .dut_start(dut_start),
    .dut_busy (dut_busy),
    .ref_start(ref_start),
    .ref_busy (ref_busy),
    .loops    (loops)
  );

  pipe_wrapper #(.STAGES(STAGES), .IDX_W(IDX_W)) u_dut (
    .clk         (clk_fast),
    .clk_wr      (clk_fast_wr),
    .clk_rd      (clk_fast_rd),
    .rst_n       (rst_n),
    .start       (dut_start),
    .busy        (dut_busy),
    .out_valid   (dut_valid),
    .out_idx     (dut_idx),
    .out_data    (dut_data),
    .hit_count   (dut_hit_count),
    .forced_count(dut_forced_count)
  );

  bram_sdp #(.DATA_W(DATA_W), .ADDR_W(IDX_W), .INIT_SEED(0)) u_trace (
    .clk_wr (clk_fast),
    .we     (dut_valid),
    .wr_addr(dut_idx),
    .wr_data(dut_data),
    .clk_rd (clk_slow),
    .rd_addr(ref_idx),
    .rd_data(trace_q)
  );

  pipe_wrapper #(.STAGES(STAGES), .IDX_W(IDX_W)) u_ref (
    .clk         (clk_slow),
    .clk_wr      (clk_slow),
    .clk_rd      (clk_slow),
    .rst_n       (rst_n),
    .start       (ref_start),
    .busy        (ref_busy),
    .out_valid   (ref_valid),
    .out_idx     (ref_idx),
    .out_data    (ref_data),
    .hit_count   (ref_hit_count),
    .forced_count(ref_forced_count)
  );

  // Compare one slow cycle later, when the trace word for ref_idx is out.
  always_ff @(posedge clk_slow or negedge rst_n) begin
    if (!rst_n) begin
      ref_valid_q    <= 1'b0;
      ref_data_q     <= '0;
      error          <= 1'b0;
      error_count    <= '0;
      compared_count <= '0;
    end else begin
      ref_valid_q <= ref_valid;
      ref_data_q  <= ref_data;
      if (ref_valid_q) begin
        compared_count <= compared_count + 1'b1;
        if (ref_data_q != trace_q) begin
          error       <= 1'b1;
          error_count <= error_count + 1'b1;
        end
      end
    end
  end

endmodule
