// Two-level LFSR address generator for one pipeline memory.
//
// A 16-bit address LFSR steps every cycle and is reloaded every
// 2^RESEED_LOG2 cycles from a second 16-bit LFSR with a different
// polynomial, which steps once per reload; the second level keeps the
// address stream from repeating with the short period of one LFSR. Its low
// byte is the write address and its high byte the read address. Random
// addresses rarely collide, so when three bits of the address LFSR read
// 3'b101 (one cycle in eight) the read address is forced to the write
// address, which exercises the read-during-write bypass.
//
// Both addresses and the forced flag are registered: they change only at the
// clk edge. restart reloads both LFSRs with their seeds; the first addresses
// of the new sequence appear one edge after the restart edge. The generator
// runs on every clock (no clock enable). Seeds, polynomials, reload period and
// force pattern are this design's choices.
module addr_gen #(
  parameter int unsigned  ADDR_W      = skew_mem_pkg::ADDR_W,
  parameter logic [15:0]  SEED        = 16'hACE1,
  parameter int unsigned  RESEED_LOG2 = 4
) (
  input  logic              clk,
  input  logic              restart,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              forced
);

  localparam logic [15:0] SEED2      = SEED ^ 16'h5A5A;
  localparam logic [15:0] TAPS_ADDR  = 16'hD008;  // x^16 + x^15 + x^13 + x^4 + 1
  localparam logic [2:0]  FORCE_PAT  = 3'b101;

  logic [15:0]            a_state, s_state;
  logic [RESEED_LOG2-1:0] cnt;
  logic                   reseed;
  logic [ADDR_W-1:0]      wa_next, ra_next;
  logic                   force_now;

  always_ff @(posedge clk) begin
    if (restart) cnt <= '0;
    else         cnt <= cnt + 1'b1;
  end

  assign reseed = (cnt == '1);

  // Second level: the seed LFSR.
  lfsr #(.W(16), .TAPS(skew_mem_pkg::TAPS16)) u_seed (
    .clk  (clk),
    .load (restart),
    .seed ((SEED2 == 16'd0) ? 16'd1 : SEED2),
    .step (reseed),
    .state(s_state)
  );

  // First level: the address LFSR, reloaded from the seed LFSR.
  lfsr #(.W(16), .TAPS(TAPS_ADDR)) u_addr (
    .clk  (clk),
    .load (restart || reseed),
    .seed (restart ? ((SEED == 16'd0) ? 16'd1 : SEED) : s_state),
    .step (1'b1),
    .state(a_state)
  );

  always_comb begin
    wa_next   = a_state[ADDR_W-1:0];
    force_now = (a_state[10:8] == FORCE_PAT);
    ra_next   = force_now ? wa_next : ADDR_W'(a_state[15:8]);
  end

  always_ff @(posedge clk) begin
    wr_addr <= wa_next;
    rd_addr <= ra_next;
    forced  <= force_now;
  end

endmodule
