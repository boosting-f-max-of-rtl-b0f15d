// Compute element of one pipeline stage: an 8x8-bit unsigned multiplier.
//
// The 16-bit word read from the upstream memory is split into its upper and
// lower byte, and their 16-bit product is the word written to the downstream
// memory. Purely combinational; its delay is the t_d(mul) term of every
// stage-to-stage timing path. The operand split is this design's choice; the
// multiplier size and word width follow the characterised pipeline.
module mul_stage #(
  parameter int unsigned DATA_W = skew_mem_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned OP_W = DATA_W / 2;

  logic [OP_W-1:0] op_a, op_b;

  always_comb begin
    op_a = din[DATA_W-1:OP_W];
    op_b = din[OP_W-1:0];
    dout = DATA_W'(op_a * op_b);
  end

endmodule
