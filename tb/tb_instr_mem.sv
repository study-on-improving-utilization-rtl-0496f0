// tb_instr_mem: self-checking test of the instruction memory.
// Fills every word with random data, then reads all words back in random
// order and checks the combinational read, including rewrites of some words.
module tb_instr_mem;
  localparam int D = 256, IW = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          we;
  logic [7:0]    waddr, raddr;
  logic [IW-1:0] wdata, rdata;
  logic [IW-1:0] m [D];

  instr_mem #(.DEPTH(D), .IW(IW)) dut (.*);

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < D; a++) begin
        if (pass == 1 && a % 3 != 0) continue;
        @(negedge clk);
        we = 1; waddr = 8'(a); wdata = {$urandom, $urandom};
        m[a] = wdata;
      end
      @(negedge clk) we = 0;
      for (int n = 0; n < 512; n++) begin
        raddr = 8'($urandom);
        #1;
        checks++;
        if (rdata !== m[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
