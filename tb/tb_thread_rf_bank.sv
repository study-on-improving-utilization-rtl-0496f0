// tb_thread_rf_bank: self-checking test of the per-thread register files.
//
// Three thread contexts. Every cycle the FU write-back and the load/store unit
// write random registers of two different threads (the pipeline never lets them
// target the same thread in one cycle), while the read side reads a random
// thread. Per-thread array models check that each thread's file sees only its own
// writes and that both write sources reach the files.
module tb_thread_rf_bank;
  localparam int T = 3, N = 16, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0]        rd_tid, fu_tid, ls_tid;
  logic [2:0][3:0]   rd_addr;
  logic [2:0][W-1:0] rd_data;
  logic              fu_we, ls_we;
  logic [3:0]        fu_waddr, ls_waddr;
  logic [W-1:0]      fu_wdata, ls_wdata;

  thread_rf_bank #(.NTHREADS(T), .NREG(N), .W(W), .NRD(3)) dut (
    .clk, .rst_n, .rd_tid, .rd_addr, .rd_data,
    .fu_we, .fu_tid, .fu_waddr, .fu_wdata,
    .ls_we, .ls_tid, .ls_waddr, .ls_wdata);

  logic [W-1:0] m [T][N];
  int n_fu = 0, n_ls = 0, n_both = 0;

  initial begin
    rd_tid = '0; fu_tid = '0; ls_tid = '0; rd_addr = '0; fu_we = 0; ls_we = 0;
    fu_waddr = '0; ls_waddr = '0; fu_wdata = '0; ls_wdata = '0;
    for (int t = 0; t < T; t++) for (int r = 0; r < N; r++) m[t][r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      fu_we = 1'($urandom); ls_we = 1'($urandom);
      fu_tid = 2'($urandom_range(0, T-1));
      ls_tid = 2'((int'(fu_tid) + $urandom_range(1, T-1)) % T);
      fu_waddr = 4'($urandom); ls_waddr = 4'($urandom);
      fu_wdata = W'($urandom); ls_wdata = W'($urandom);
      rd_tid = 2'($urandom_range(0, T-1));
      for (int p = 0; p < 3; p++) rd_addr[p] = 4'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_data[p] !== m[rd_tid][rd_addr[p]]) begin
          failures++;
          $display("FAIL t%0d r%0d = %h exp %h", rd_tid, rd_addr[p], rd_data[p], m[rd_tid][rd_addr[p]]);
        end
      end
      @(posedge clk);
      if (fu_we) begin m[fu_tid][fu_waddr] = fu_wdata; n_fu++; end
      if (ls_we) begin m[ls_tid][ls_waddr] = ls_wdata; n_ls++; end
      if (fu_we && ls_we) n_both++;
    end
    checks++;
    if (n_fu == 0 || n_ls == 0 || n_both == 0) begin failures++; $display("FAIL write sources not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
