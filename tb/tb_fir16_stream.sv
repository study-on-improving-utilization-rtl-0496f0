// tb_fir16_stream: streaming 16-tap FIR workload on the default datapath.
//
// The filter is a 16-tap linear-phase (symmetric) low-pass, so only 8 distinct
// coefficients exist; each thread loads them once into r8..r15. 1,024 input
// samples (approximately Gaussian, from a sum of four uniform draws) are split
// between the two threads: thread 0 computes outputs 0..511 and thread 1 outputs
// 512..1023, the two halves running interleaved. Each output sample is one run of
// a 16-instruction program, restarted with the data base advanced by one.
// Instruction k performs tap k as one MSA operation on the sample already in r1
// (multiply by the coefficient, shift right by 4, accumulate into r0) while its
// load brings in the sample of tap k+1; the last one loads the first sample of
// the next output and stores y. A one-instruction prologue loads the very first
// sample of each thread.
//     y[n] = sum_{k=0..15} ((h[k] * x[n-k]) >>> 4)      (x[j] = 0 for j < 0)
// The same samples then go through the filter written in its linear-phase form,
// 8 taps on pre-added sample pairs: one A instruction forms the pair sum and one
// MS(A) instruction multiplies, shifts and accumulates, again 16 instructions per
// output with the two loads per tap spread over the pair of instructions:
//     y[n] = sum_{k=0..7} ((h[k] * (x[n-k] + x[n-15+k])) >>> 4)
// All outputs are compared with these formulas. Cycle counts are checked: every run
// of 16 instructions on 2 threads must finish within 32 cycles, i.e. 16 cycles per
// output and 16,384 busy cycles for the 1,024 outputs of each form, the figure
// expected of the MSA composite unit for this filter. The samples lie in -124..124
// so that no 16-bit product overflows.
module tb_fir16_stream;
  import cfu_pkg::*;

  localparam int T  = cfu_pkg::FU_STAGES_DEFAULT;
  localparam int S  = T;
  localparam int N  = 1024;
  localparam int PER_THREAD = N / T;
  localparam int X0 = 16;          // x_ext[j] = x[j-15] at DM[X0 + j]
  localparam int Y0 = 2048;        // FIR y[n] at DM[Y0 + n]
  localparam int Y1 = 3072;        // linear-phase form y[n] at DM[Y1 + n]
  localparam int BODY = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic                  prog_we;
  logic [IAW-1:0]        prog_addr;
  instr_t                prog_data;
  logic                  host_we;
  logic [AW-1:0]         host_waddr, host_raddr;
  logic [W-1:0]          host_wdata, host_rdata;
  logic [T-1:0]          start;
  logic [T-1:0][IAW-1:0] start_pc;
  logic [T-1:0][AW-1:0]  start_base;
  logic [T-1:0]          running;

  cfu_imt_top dut (.*);

  localparam int PC_PRE = 0, PC_PRO = 8, PC_FIR = 16, PC_LPRO = 40, PC_LP = 48;
  int h [16];
  logic [W-1:0] x [N];

  task automatic put(int pc, instr_t i);
    @(negedge clk);
    prog_we = 1; prog_addr = IAW'(pc); prog_data = i;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic host_write(int a, logic [W-1:0] d);
    @(negedge clk);
    host_we = 1; host_waddr = AW'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic run_all(int pc, int base [T], output int cycles);
    longint c0;
    @(negedge clk);
    for (int t = 0; t < T; t++) begin start_pc[t] = IAW'(pc); start_base[t] = AW'(base[t]); end
    start = '1;
    @(negedge clk);
    start = '0;
    c0 = cycle;
    while (running != '0) @(negedge clk);
    cycles = int'(cycle - c0);
    repeat (S) @(negedge clk);
  endtask

  // Run the output program once per output sample, thread t on outputs
  // t*PER_THREAD.., and check the cycle counts
  task automatic stream(int pc, string name);
    int base [T];
    int cyc, total_cycles, worst;
    longint c_start;
    total_cycles = 0; worst = 0;
    c_start = cycle;
    for (int n = 0; n < PER_THREAD; n++) begin
      for (int t = 0; t < T; t++) base[t] = t * PER_THREAD + n;
      run_all(pc, base, cyc);
      total_cycles += cyc;
      if (cyc > worst) worst = cyc;
    end
    checks++;
    if (worst > BODY * T) begin failures++; $display("FAIL %s: a run took %0d cycles, limit %0d", name, worst, BODY * T); end
    checks++;
    if (total_cycles != N * BODY) begin
      failures++;
      $display("FAIL %s: %0d busy cycles, expected %0d", name, total_cycles, N * BODY);
    end
    $display("%s, %0d outputs: %0d instructions issued in %0d busy cycles (%0d cycles including restarts)",
             name, N, N * BODY, total_cycles, int'(cycle - c_start));
  endtask

  task automatic compare(int y0, string name, logic [W-1:0] expect_y [N]);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      host_raddr = AW'(y0 + n);
      #1;
      checks++;
      if (host_rdata !== expect_y[n]) begin
        failures++;
        if (failures < 10) $display("FAIL %s y[%0d] = %h, expected %h", name, n, host_rdata, expect_y[n]);
      end
    end
  endtask

  function automatic logic [W-1:0] sra4(int v);
    return W'(v >>> 4);
  endfunction

  initial begin
    instr_t i;
    int base [T];
    int cyc;
    logic [W-1:0] ey [N];
    static int hu [8] = '{-3, -6, 0, 20, 48, 80, 106, 118};

    prog_we = 0; prog_addr = '0; prog_data = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    start = '0; start_pc = '0; start_base = '0;
    for (int k = 0; k < 8; k++) begin h[k] = hu[k]; h[15 - k] = hu[k]; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // preamble: r8+k <- coefficient k (k = 0..7), base = 0
    for (int k = 0; k < 8; k++) begin
      i = '0;
      i.ld_en = 1; i.ld_rd = RW'(8 + k); i.ld_off = AW'(k); i.halt = (k == 7);
      put(PC_PRE + k, i);
    end
    // prologue: r1 <- x[base]
    i = '0;
    i.ld_en = 1; i.ld_rd = 4'd1; i.ld_off = AW'(X0 + 15); i.halt = 1;
    put(PC_PRO, i);
    // body: instruction k performs tap k on r1 and loads the sample of tap k+1
    for (int k = 0; k < BODY; k++) begin
      i = '0;
      i.ld_en = 1; i.ld_rd = 4'd1;
      i.ld_off = (k < 15) ? AW'(X0 + 15 - (k + 1)) : AW'(X0 + 15 + 1);
      i.rs[0] = 4'd1;
      i.rs[1] = RW'(8 + ((k < 8) ? k : 15 - k));
      i.rs[2] = 4'd0;
      i.fu[0].en = 1;
      i.fu[1].en = 1; i.fu[1].shamt = 4'sd4;
      i.fu[2].en = (k > 0);
      i.wb_en = 1; i.rd = 4'd0;
      if (k == BODY - 1) begin i.st_en = 1; i.st_off = AW'(Y0); i.halt = 1; end
      put(PC_FIR + k, i);
    end

    // linear-phase form. Prologue: r1 <- x[base], r3 <- x[base-15]
    i = '0;
    i.ld_en = 1; i.ld_rd = 4'd1; i.ld_off = AW'(X0 + 15);
    put(PC_LPRO, i);
    i.ld_rd = 4'd3; i.ld_off = AW'(X0); i.halt = 1;
    put(PC_LPRO + 1, i);
    // tap k: instruction 2k forms r2 = r1 + r3 and loads the next r1,
    // instruction 2k+1 accumulates (r2 * h[k]) >>> 4 into r0 and loads the next r3
    for (int k = 0; k < 8; k++) begin
      i = '0;
      i.ld_en = 1; i.ld_rd = 4'd1;
      i.ld_off = (k < 7) ? AW'(X0 + 15 - (k + 1)) : AW'(X0 + 15 + 1);
      i.rs[0] = 4'd1; i.rs[2] = 4'd3;
      i.fu[2].en = 1;
      i.wb_en = 1; i.rd = 4'd2;
      put(PC_LP + 2 * k, i);
      i = '0;
      i.ld_en = 1; i.ld_rd = 4'd3;
      i.ld_off = (k < 7) ? AW'(X0 + k + 1) : AW'(X0 + 1);
      i.rs[0] = 4'd2; i.rs[1] = RW'(8 + k); i.rs[2] = 4'd0;
      i.fu[0].en = 1;
      i.fu[1].en = 1; i.fu[1].shamt = 4'sd4;
      i.fu[2].en = (k > 0);
      i.wb_en = 1; i.rd = 4'd0;
      if (k == 7) begin i.st_en = 1; i.st_off = AW'(Y1); i.halt = 1; end
      put(PC_LP + 2 * k + 1, i);
    end

    // data
    for (int k = 0; k < 8; k++) host_write(k, W'(hu[k]));
    for (int j = 0; j < 15; j++) host_write(X0 + j, '0);
    for (int n = 0; n < N; n++) begin
      int g;
      g = 0;
      for (int u = 0; u < 4; u++) g += $urandom_range(0, 62);
      x[n] = W'(g - 124);
      host_write(X0 + 15 + n, x[n]);
    end
    host_write(X0 + 15 + N, '0);   // read (and unused) by the last run

    // coefficients into every thread
    for (int t = 0; t < T; t++) base[t] = 0;
    run_all(PC_PRE, base, cyc);
    for (int t = 0; t < T; t++) base[t] = t * PER_THREAD;
    run_all(PC_PRO, base, cyc);

    // direct form
    stream(PC_FIR, "FIR");
    for (int n = 0; n < N; n++) begin
      ey[n] = '0;
      for (int k = 0; k < 16; k++)
        if (n - k >= 0) ey[n] = ey[n] + sra4(int'($signed(x[n - k])) * h[k]);
    end
    compare(Y0, "FIR", ey);

    // linear-phase form
    for (int t = 0; t < T; t++) base[t] = t * PER_THREAD;
    run_all(PC_LPRO, base, cyc);
    stream(PC_LP, "linear-phase FIR");
    for (int n = 0; n < N; n++) begin
      ey[n] = '0;
      for (int k = 0; k < 8; k++) begin
        int a, b;
        a = (n - k >= 0) ? int'($signed(x[n - k])) : 0;
        b = (n - 15 + k >= 0) ? int'($signed(x[n - 15 + k])) : 0;
        ey[n] = ey[n] + sra4((a + b) * h[k]);
      end
    end
    compare(Y1, "linear-phase FIR", ey);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
