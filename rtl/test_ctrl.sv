// Loop sequencer of the test circuit, spanning the fast and slow clocks.
//
// One loop: the slow side asks the fast side to run a DUT trace, the fast
// side pulses dut_start and waits for dut_busy to fall, then reports back;
// the slow side pulses ref_start, waits for ref_busy to fall, counts the loop
// and begins the next one. Requests and replies cross the clock domains as
// level toggles through two-flop synchronizers, so the two clocks may have
// any ratio. rst_n is an asynchronous, active-low reset for both domains and
// must be held for a few cycles of the slow clock. dut_start and ref_start
// are one-cycle pulses in their own domains; loops counts finished loops in
// the slow domain. The handshake is this design's choice; the loop itself
// (fast trace, slow check, restart) follows the described test circuit.
module test_ctrl (
  input  logic        clk_fast,
  input  logic        clk_slow,
  input  logic        rst_n,
  output logic        dut_start,
  input  logic        dut_busy,
  output logic        ref_start,
  input  logic        ref_busy,
  output logic [31:0] loops
);

  typedef enum logic [1:0] {F_IDLE, F_START, F_WAIT} fast_state_e;
  typedef enum logic [1:0] {S_REQ, S_WAIT_DUT, S_START_REF, S_WAIT_REF} slow_state_e;

  fast_state_e f_state;
  slow_state_e s_state;

  logic       req_t, ack_t;           // toggles: request (slow), reply (fast)
  logic [1:0] req_sync, ack_sync;     // two-flop synchronizers
  logic       req_seen, ack_seen;

  // ---------------- fast domain ----------------
  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      req_sync <= '0;
      req_seen <= 1'b0;
      ack_t    <= 1'b0;
      f_state  <= F_IDLE;
    end else begin
      req_sync <= {req_sync[0], req_t};
      unique case (f_state)
        F_IDLE: if (req_sync[1] != req_seen) begin
          req_seen <= req_sync[1];
          f_state  <= F_START;
        end
        F_START: f_state <= F_WAIT;
        F_WAIT: if (!dut_busy) begin
          ack_t   <= ~ack_t;
          f_state <= F_IDLE;
        end
        default: f_state <= F_IDLE;
      endcase
    end
  end

  assign dut_start = (f_state == F_START);

  // ---------------- slow domain ----------------
  always_ff @(posedge clk_slow or negedge rst_n) begin
    if (!rst_n) begin
      ack_sync <= '0;
      ack_seen <= 1'b0;
      req_t    <= 1'b0;
      loops    <= '0;
      s_state  <= S_REQ;
    end else begin
      ack_sync <= {ack_sync[0], ack_t};
      unique case (s_state)
        S_REQ: begin
          req_t   <= ~req_t;
          s_state <= S_WAIT_DUT;
        end
        S_WAIT_DUT: if (ack_sync[1] != ack_seen) begin
          ack_seen <= ack_sync[1];
          s_state  <= S_START_REF;
        end
        S_START_REF: s_state <= S_WAIT_REF;
        S_WAIT_REF: if (!ref_busy) begin
          loops   <= loops + 1'b1;
          s_state <= S_REQ;
        end
        default: s_state <= S_REQ;
      endcase
    end
  end

  assign ref_start = (s_state == S_START_REF);

endmodule
