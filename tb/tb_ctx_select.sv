// tb_ctx_select: self-checking test of interleaved context selection.
//
// Four contexts. Checks that the issuing thread rotates 0,1,2,3,0,... every
// cycle, that a started thread issues consecutive PCs from its start PC exactly
// once every four cycles with its base address, that a halt stops it after the
// halting instruction, that halted threads give idle slots and that a restart
// works. The halt input is driven from a per-thread model program length.
module tb_ctx_select;
  localparam int T = 4, IAW = 8, AW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [T-1:0]          start;
  logic [T-1:0][IAW-1:0] start_pc;
  logic [T-1:0][AW-1:0]  start_base;
  logic                  halt_in;
  logic                  issue_valid;
  logic [1:0]            issue_tid;
  logic [IAW-1:0]        issue_pc;
  logic [AW-1:0]         issue_base;
  logic [T-1:0]          running;

  ctx_select #(.NTHREADS(T), .IAW(IAW), .AW(AW)) dut (.*);

  // model
  int  m_pc [T], m_left [T], m_base [T];
  bit  m_run [T];
  int  exp_tid = 0;
  int  issued [T];

  always_comb begin
    halt_in = 1'b0;
    if (issue_valid && m_left[issue_tid] == 1) halt_in = 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(issue_tid) != exp_tid) begin failures++; $display("FAIL tid %0d exp %0d", issue_tid, exp_tid); end
    checks++;
    if (issue_valid !== m_run[exp_tid]) begin failures++; $display("FAIL valid t%0d", exp_tid); end
    if (issue_valid && m_run[exp_tid]) begin
      checks++;
      if (int'(issue_pc) != m_pc[exp_tid] || int'(issue_base) != m_base[exp_tid]) begin
        failures++; $display("FAIL t%0d pc %0d exp %0d", exp_tid, issue_pc, m_pc[exp_tid]);
      end
      issued[exp_tid]++;
    end
    // model update (start has priority)
    for (int t = 0; t < T; t++) begin
      if (start[t]) begin
        m_pc[t] = int'(start_pc[t]); m_base[t] = int'(start_base[t]); m_run[t] = 1;
        m_left[t] = 3 + 2 * t;
      end else if (t == exp_tid && m_run[t]) begin
        m_pc[t] = (m_pc[t] + 1) % (1 << IAW);
        m_left[t]--;
        if (m_left[t] == 0) m_run[t] = 0;
      end
    end
    exp_tid = (exp_tid + 1) % T;
  end

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < T; t++) begin
      #1;
      checks++;
      if (running[t] !== m_run[t]) begin failures++; $display("FAIL running[%0d]", t); end
    end
  end

  initial begin
    start = '0; start_pc = '0; start_base = '0;
    for (int t = 0; t < T; t++) begin m_run[t] = 0; m_pc[t] = 0; m_left[t] = 0; m_base[t] = 0; issued[t] = 0; end
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    repeat (3) @(negedge clk);
    for (int t = 0; t < T; t++) begin
      start_pc[t] = IAW'(10 * t + 5); start_base[t] = AW'(100 * t + 1);
    end
    start = 4'b1111;
    @(negedge clk) start = '0;
    repeat (60) @(negedge clk);
    // restart thread 2 alone
    start_pc[2] = 8'd200; start_base[2] = 12'd77;
    start[2] = 1'b1;
    @(negedge clk) start = '0;
    repeat (40) @(negedge clk);
    for (int t = 0; t < T; t++) begin
      checks++;
      if (issued[t] != 3 + 2 * t + (t == 2 ? 7 : 0)) begin
        failures++; $display("FAIL thread %0d issued %0d", t, issued[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
