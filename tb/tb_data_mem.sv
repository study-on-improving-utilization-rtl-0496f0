// tb_data_mem: self-checking test of the data memory.
// Random host and load/store writes (host has priority when both write) and
// random reads on both read ports are compared with an array model.
module tb_data_mem;
  localparam int D = 4096, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] a_raddr, b_raddr, ls_waddr, host_waddr;
  logic [W-1:0] a_rdata, b_rdata, ls_wdata, host_wdata;
  logic ls_we, host_we;
  logic [W-1:0] m [D];
  int both = 0;

  data_mem #(.DEPTH(D), .W(W)) dut (.*);

  initial begin
    ls_we = 0; host_we = 0; a_raddr = '0; b_raddr = '0; ls_waddr = '0; host_waddr = '0;
    ls_wdata = '0; host_wdata = '0;
    // initialise through the host port
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      host_we = 1; host_waddr = 12'(a); host_wdata = W'($urandom); m[a] = host_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      host_we = ($urandom_range(0, 3) == 0); host_waddr = 12'($urandom_range(0, 255));
      host_wdata = W'($urandom);
      ls_we = 1'($urandom); ls_waddr = 12'($urandom_range(0, 255)); ls_wdata = W'($urandom);
      if (n % 9 == 0) ls_waddr = host_waddr;
      a_raddr = 12'($urandom_range(0, 255)); b_raddr = 12'($urandom_range(0, 255));
      #1;
      checks++;
      if (a_rdata !== m[a_raddr] || b_rdata !== m[b_raddr]) begin
        failures++; $display("FAIL read %0d/%0d", a_raddr, b_raddr);
      end
      @(posedge clk);
      if (host_we) m[host_waddr] = host_wdata;
      else if (ls_we) m[ls_waddr] = ls_wdata;
      if (host_we && ls_we) both++;
    end
    checks++;
    if (both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
