// tb_cfu_adder: self-checking test of the adder/subtracter primitive.
// Drives directed corner cases and random operands in both modes and compares
// with a reference computed in 32-bit integer arithmetic, masked to 16 bits.
module tb_cfu_adder;
  localparam int W = 16;
  logic         clk = 0;
  logic [W-1:0] a, b, y;
  logic         sub;
  int checks = 0, failures = 0;

  cfu_adder #(.W(W)) dut (.src1(a), .src2(b), .sub(sub), .dest(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] z, input logic s);
    int unsigned ref_v;
    a = x; b = z; sub = s;
    @(posedge clk);
    ref_v = s ? (32'(x) - 32'(z)) : (32'(x) + 32'(z));
    checks++;
    if (y !== ref_v[W-1:0]) begin
      failures++;
      $display("FAIL %h %s %h = %h, expected %h", x, s ? "-" : "+", z, y, ref_v[W-1:0]);
    end
  endtask

  initial begin
    check(16'h7fff, 16'h0001, 0);
    check(16'hffff, 16'h0001, 0);
    check(16'h0000, 16'h0001, 1);
    check(16'h8000, 16'h0001, 1);
    check(16'h1234, 16'h1234, 1);
    for (int i = 0; i < 500; i++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
