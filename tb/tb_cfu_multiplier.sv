// tb_cfu_multiplier: self-checking test of the multiplier primitive.
// The reference is the signed 32-bit product of the two operands, low 16 bits.
module tb_cfu_multiplier;
  localparam int W = 16;
  logic         clk = 0;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  cfu_multiplier #(.W(W)) dut (.src1(a), .src2(b), .dest(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] z);
    int ref_v;
    a = x; b = z;
    @(posedge clk);
    ref_v = int'($signed(x)) * int'($signed(z));
    checks++;
    if (y !== ref_v[W-1:0]) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, z, y, ref_v[W-1:0]);
    end
  endtask

  initial begin
    check(16'd3, 16'd5);
    check(16'hffff, 16'd7);       // -1 * 7
    check(16'h8000, 16'hffff);    // -32768 * -1 wraps
    check(16'd300, 16'd300);      // overflow wraps
    check(16'h0001, 16'h8000);
    for (int i = 0; i < 500; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
