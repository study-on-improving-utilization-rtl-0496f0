// tb_cfu_shifter: self-checking test of the shifter primitive.
// Every shift amount from -8 (left 8) to 7 (arithmetic right 7) is applied to
// corner values and random data; the reference is computed with integer
// multiplication/division by powers of two (floor division for right shifts).
module tb_cfu_shifter;
  localparam int W = 16;
  logic              clk = 0;
  logic [W-1:0]      a, y;
  logic signed [3:0] sh;
  int checks = 0, failures = 0;

  cfu_shifter #(.W(W)) dut (.src1(a), .shamt(sh), .dest(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(logic [W-1:0] x, int s);
    longint v;
    longint p;
    v = longint'($signed(x));
    if (s < 0) begin
      p = longint'(1) << (-s);
      return W'(v * p);
    end
    p = longint'(1) << s;
    // floor division
    if (v >= 0) return W'(v / p);
    return W'(-((-v + p - 1) / p));
  endfunction

  task automatic check(input logic [W-1:0] x, input int s);
    logic [W-1:0] e;
    a = x; sh = 4'(s);
    @(posedge clk);
    e = model(x, s);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %h shamt %0d = %h, expected %h", x, s, y, e);
    end
  endtask

  initial begin
    for (int s = -8; s <= 7; s++) begin
      check(16'h0001, s);
      check(16'h8000, s);
      check(16'hffff, s);
      check(16'h7fff, s);
      for (int i = 0; i < 40; i++) check(W'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
