// Self-checking testbench for mul_stage: the 8x8 product of the two bytes.
// Drives corner words and random words and compares with a product computed
// here from the bytes; the stage is combinational, so each result is checked
// one time step after the input changes.
module tb_mul_stage;
  logic [15:0] din, dout;
  int checks = 0, failures = 0;

  mul_stage dut (.din(din), .dout(dout));

  task automatic check(input logic [15:0] w);
    int unsigned a, b, expct;
    din = w;
    #1;
    a = int'(w >> 8);
    b = int'(w & 16'hFF);
    expct = (a * b) & 32'hFFFF;
    checks++;
    if (dout !== 16'(expct)) begin
      failures++;
      $display("FAIL din=%h dout=%h expected=%h", w, dout, 16'(expct));
    end
  endtask

  initial begin
    check(16'h0000); check(16'hFFFF); check(16'hFF01); check(16'h01FF);
    check(16'h8080); check(16'h0F0F); check(16'h1234);
    for (int i = 0; i < 2000; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
