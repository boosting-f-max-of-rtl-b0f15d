// Test wrapper around the skewed-memory pipeline (used as DUT and reference).
//
// A pulse on start begins one trace. The wrapper reloads its LFSRs and then
// issues 2^IDX_W-1 consecutive cycles in which every memory of the pipeline
// is written and read at addresses from its own two-level address generator,
// memory 0 is fed words from a 16-bit data LFSR, and each cycle is tagged by
// a one-pass index LFSR that visits every non-zero IDX_W-bit value once. The
// word read from the last memory in issue cycle n is presented two edges
// later on out_data with the tag of cycle n on out_idx and out_valid high.
// busy stays high from the start edge until the last output has been
// presented. Memory k > 0 is not written in the first trace cycle, whose
// stage input is a read from before the trace. Outside a trace nothing is
// written, so two wrappers with the
// same seeds that run the same traces keep identical memory contents; this
// is what lets a slow reference copy check a fast copy word by word.
//
// rst_n (asynchronous, active low) clears only the trace control flags; the
// LFSRs are loaded by start and the memories keep their contents.
// hit_count and forced_count count, per trace, bypass selections in all
// memories and forced equal-address cycles; they clear at start. All logic is
// on clk except the memory ports, which use clk_wr and clk_rd. The seeds and
// the tagging scheme are this design's choices; the generator structure
// (random addresses from a two-level LFSR, forced equal addresses, a one-pass
// LFSR index) follows the described test circuit.
module pipe_wrapper #(
  parameter int unsigned STAGES    = 4,
  parameter int unsigned IDX_W     = 8,
  parameter int unsigned DATA_W    = skew_mem_pkg::DATA_W,
  parameter int unsigned ADDR_W    = skew_mem_pkg::ADDR_W,
  parameter int unsigned INIT_SEED = 32'h1234_5678
) (
  input  logic              clk,
  input  logic              clk_wr,
  input  logic              clk_rd,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              out_valid,
  output logic [IDX_W-1:0]  out_idx,
  output logic [DATA_W-1:0] out_data,
  output logic [31:0]       hit_count,
  output logic [31:0]       forced_count
);

  localparam logic [IDX_W-1:0] IDX_SEED  = IDX_W'(1);
  localparam logic [15:0]      DATA_SEED = 16'h1D0F;
  localparam logic [IDX_W-1:0] IDX_TAPS  = (IDX_W == 8) ? IDX_W'(skew_mem_pkg::TAPS8)
                                         : (IDX_W == 4) ? IDX_W'(4'hC)
                                         : (IDX_W == 5) ? IDX_W'(5'h14)
                                         : (IDX_W == 6) ? IDX_W'(6'h30)
                                         : (IDX_W == 7) ? IDX_W'(7'h60)
                                         : (IDX_W == 9) ? IDX_W'(9'h110)
                                         : IDX_W'(10'h240);

  logic [IDX_W-1:0]  idx_state, idx_next, idx_q, idx_d1;
  logic [15:0]       data_state;
  logic [DATA_W-1:0] data_q;
  logic              run_d, run_q, run_d1;

  logic [STAGES:0]             we;
  logic [STAGES:0][ADDR_W-1:0] wr_addr, rd_addr;
  logic [STAGES:0]             forced;
  logic [STAGES:0]             bypass_hit;
  logic [DATA_W-1:0]           pipe_out;

  // One-pass index counter and data source.
  lfsr #(.W(IDX_W), .TAPS(IDX_TAPS)) u_idx (
    .clk  (clk),
    .load (start),
    .seed (IDX_SEED),
    .step (run_d),
    .state(idx_state)
  );

  lfsr #(.W(16), .TAPS(skew_mem_pkg::TAPS16)) u_data (
    .clk  (clk),
    .load (start),
    .seed (DATA_SEED),
    .step (1'b1),
    .state(data_state)
  );

  assign idx_next = {idx_state[IDX_W-2:0], ^(idx_state & IDX_TAPS)};

  // Trace control flags: the only state that needs a reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_d     <= 1'b0;
      run_q     <= 1'b0;
      run_d1    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (start)                              run_d <= 1'b1;
      else if (run_d && idx_next == IDX_SEED) run_d <= 1'b0;
      run_q     <= run_d;
      run_d1    <= run_q;
      out_valid <= run_d1;
    end
  end

  always_ff @(posedge clk) begin
    idx_q    <= idx_state;
    data_q   <= DATA_W'(data_state);
    idx_d1   <= idx_q;
    out_idx  <= idx_d1;
    out_data <= pipe_out;
  end

  assign busy = run_d | run_q | run_d1 | out_valid;

  // A new trace may only be started once the previous one is out.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("pipe_wrapper: start while a trace is running");

  // One address generator per memory, each with its own seed.
  for (genvar k = 0; k <= STAGES; k++) begin : g_agen
    addr_gen #(
      .ADDR_W(ADDR_W),
      .SEED  (16'hACE1 + 16'(k) * 16'h3B71)
    ) u_agen (
      .clk    (clk),
      .restart(start),
      .wr_addr(wr_addr[k]),
      .rd_addr(rd_addr[k]),
      .forced (forced[k])
    );
    // Memory 0 is written in every trace cycle; memory k > 0 from the second
    // trace cycle on, when its stage has read a word of this trace.
    if (k == 0) begin : g_we0
      assign we[k] = run_q;
    end else begin : g_wek
      assign we[k] = run_q & run_d1;
    end
  end

  mem_pipeline #(
    .STAGES   (STAGES),
    .DATA_W   (DATA_W),
    .ADDR_W   (ADDR_W),
    .INIT_SEED(INIT_SEED)
  ) u_pipe (
    .clk       (clk),
    .clk_wr    (clk_wr),
    .clk_rd    (clk_rd),
    .we        (we),
    .wr_addr   (wr_addr),
    .rd_addr   (rd_addr),
    .in_data   (data_q),
    .out_data  (pipe_out),
    .bypass_hit(bypass_hit)
  );

  always_ff @(posedge clk) begin
    if (start) begin
      hit_count    <= '0;
      forced_count <= '0;
    end else begin
      hit_count    <= hit_count + 32'($countones(bypass_hit));
      if (run_q) forced_count <= forced_count + 32'($countones(forced));
    end
  end

endmodule
