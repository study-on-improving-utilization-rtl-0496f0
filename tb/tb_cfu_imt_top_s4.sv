// tb_cfu_imt_top_s4: end-to-end test of the composite-FU IMT datapath with a
// 4-stage MSA unit and 4 interleaved threads, one thread per stage with no
// slack. Otherwise identical to tb_cfu_imt_top.
//
// Phase A runs an 8-tap FIR filter on every thread at once, each on its own
// data: a preamble loads the 8 coefficients into r8..r15, then a 9-instruction
// body, restarted once per output sample with the data base advanced by one,
// computes y[n] = sum_k ((c_k * x[n+7-k]) >>> 2) with one MSA operation per tap
// while the load/store unit fetches the next sample into the register the same
// instruction is reading. The outputs are checked against the formula.
// Phase B runs a random program on every thread (random sub-functions, shift
// amounts, add/subtract, registers, loads and stores), ending with a store of
// all 16 registers, and checks the data memory against an instruction-level
// model of each thread.
// Timing checks: while all threads run, an instruction issues every cycle, and
// an N-instruction program finishes within N*T cycles of its start (T threads),
// i.e. the pipeline never stalls. The mechanisms of the design are counted and
// each must have occurred.
module tb_cfu_imt_top_s4;
  import cfu_pkg::*;

  localparam int S  = 4;
  localparam int T  = 4;
  localparam int TW = (T > 1) ? $clog2(T) : 1;
  localparam int NS = 32;          // FIR output samples per thread
  localparam int RLEN = 24;        // random instructions per program

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DUT
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

  cfu_imt_top #(.FU_STAGES(S), .NTHREADS(T)) dut (.*);

  // ---------------- reference state
  logic [W-1:0] dm_m [DM_DEPTH];
  logic [W-1:0] rf_m [T][NREG];
  instr_t       im_m [IM_DEPTH];

  function automatic int region(int t);
    return 1024 * t;
  endfunction

  function automatic logic [W-1:0] shf(logic [W-1:0] x, logic signed [3:0] s);
    int v;
    v = int'($signed(x));
    if (s < 0) return W'(v * (1 << (-int'(s))));
    return W'(v >>> int'(s));
  endfunction

  // One instruction of thread t, in program order
  function automatic void model_exec(int t, int base, instr_t i);
    logic [W-1:0] x, ldv;
    int la, sa;
    x = rf_m[t][i.rs[0]];
    if (i.fu[0].en) x = W'(int'($signed(x)) * int'($signed(rf_m[t][i.rs[1]])));
    if (i.fu[1].en) x = shf(x, i.fu[1].shamt);
    if (i.fu[2].en) x = i.fu[2].sub ? x - rf_m[t][i.rs[2]] : x + rf_m[t][i.rs[2]];
    la = (base + int'(i.ld_off)) % DM_DEPTH;
    sa = (base + int'(i.st_off)) % DM_DEPTH;
    ldv = dm_m[la];
    if (i.st_en) dm_m[sa] = x;
    if (i.ld_en) rf_m[t][i.ld_rd] = ldv;
    if (i.wb_en) rf_m[t][i.rd] = x;
  endfunction

  function automatic void model_run(int t, int pc, int base);
    for (int n = 0; n < IM_DEPTH; n++) begin
      model_exec(t, base, im_m[pc]);
      if (im_m[pc].halt) return;
      pc = (pc + 1) % IM_DEPTH;
    end
  endfunction

  // ---------------- program construction
  function automatic instr_t nop();
    instr_t i;
    i = '0;
    return i;
  endfunction

  localparam int PC_PRE = 0, PC_FIR = 16, PC_RND = 64;

  task automatic put(int pc, instr_t i);
    im_m[pc] = i;
    @(negedge clk);
    prog_we = 1; prog_addr = IAW'(pc); prog_data = i;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic build_programs();
    instr_t i;
    // preamble: r8..r15 <- coefficients at base+0..7
    for (int k = 0; k < 8; k++) begin
      i = nop();
      i.ld_en = 1; i.ld_rd = RW'(8 + k); i.ld_off = AW'(k);
      i.halt = (k == 7);
      put(PC_PRE + k, i);
    end
    // FIR body: instruction k loads x[n+7-k] into r1 and does the MAC of tap k-1
    for (int k = 0; k <= 8; k++) begin
      i = nop();
      if (k < 8) begin
        i.ld_en = 1; i.ld_rd = 4'd1; i.ld_off = AW'(16 + 7 - k);
      end
      if (k > 0) begin
        i.rs[0] = 4'd1; i.rs[1] = RW'(8 + k - 1); i.rs[2] = 4'd0;
        i.fu[0].en = 1;                          // M
        i.fu[1].en = 1; i.fu[1].shamt = 4'sd2;   // S: >>> 2
        i.fu[2].en = (k > 1);                    // A (first tap: MS only)
        i.wb_en = 1; i.rd = 4'd0;
      end
      if (k == 8) begin
        i.st_en = 1; i.st_off = AW'(64); i.halt = 1;
      end
      put(PC_FIR + k, i);
    end
    // random programs, one per thread, ending with a store of all registers
    for (int t = 0; t < T; t++) begin
      int pc;
      pc = PC_RND + 48 * t;
      for (int n = 0; n < RLEN; n++) begin
        i = instr_t'({$urandom, $urandom, $urandom});
        i.halt = 0;
        i.ld_off = AW'($urandom_range(0, 63));
        i.st_off = AW'($urandom_range(32, 63));
        i.wb_en = ($urandom_range(0, 4) != 0);
        put(pc + n, i);
      end
      for (int r = 0; r < NREG; r++) begin
        i = nop();
        i.rs[0] = RW'(r);
        i.st_en = 1; i.st_off = AW'(64 + r);
        i.halt = (r == NREG - 1);
        put(pc + RLEN + r, i);
      end
    end
  endtask

  // ---------------- mechanism monitor
  int n_issue [T];
  int n_idle = 0, n_load = 0, n_store = 0, n_sub = 0, n_shl = 0, n_shr = 0, n_move = 0;
  int n_subfn [8];
  int n_port_share = 0, n_raw_next = 0, n_ld_same_reg = 0, n_halt = 0, n_restart = 0;
  int last_rd [T];
  bit last_wb [T];
  bit ever_ran [T];

  always @(posedge clk) if (rst_n) begin
    if (dut.issue_valid) begin
      int t;
      instr_t i;
      t = int'(dut.issue_tid);
      i = dut.instr;
      n_issue[t]++;
      if (i.ld_en) n_load++;
      if (i.st_en) n_store++;
      if (i.halt) n_halt++;
      if (i.wb_en || i.st_en) begin
        n_subfn[{i.fu[0].en, i.fu[1].en, i.fu[2].en}]++;
        if (i.fu[2].en && i.fu[2].sub) n_sub++;
        if (i.fu[1].en && i.fu[1].shamt < 0) n_shl++;
        if (i.fu[1].en && i.fu[1].shamt > 0) n_shr++;
        if (!i.fu[0].en && !i.fu[1].en && !i.fu[2].en) n_move++;
        // the previous instruction of this thread wrote an operand register
        if (last_wb[t] && (i.rs[0] == RW'(last_rd[t]) ||
            (i.fu[0].en && i.rs[1] == RW'(last_rd[t])) ||
            (i.fu[2].en && i.rs[2] == RW'(last_rd[t])))) n_raw_next++;
        if (i.ld_en && i.ld_rd == i.rs[0]) n_ld_same_reg++;
      end
      last_wb[t] = i.wb_en;
      last_rd[t] = int'(i.rd);
    end else begin
      n_idle++;
    end
    if (dut.u_rfs.fu_we && dut.u_rfs.ls_we) n_port_share++;
    for (int t = 0; t < T; t++) begin
      if (start[t] && ever_ran[t]) n_restart++;
      if (start[t]) ever_ran[t] = 1;
    end
  end

  // ---------------- run helpers
  // Starts every thread at pc[t]/base[t]; returns cycles until all have halted
  task automatic run_all(int pc [T], int base [T], output int cycles, output int busy);
    longint c0;
    @(negedge clk);
    for (int t = 0; t < T; t++) begin
      start_pc[t] = IAW'(pc[t]); start_base[t] = AW'(base[t]);
    end
    start = '1;
    @(negedge clk);
    start = '0;
    c0 = cycle;
    busy = 0;
    while (running != '0) begin
      if (running == '1) busy++;
      @(negedge clk);
    end
    cycles = int'(cycle - c0);
    repeat (S + 1) @(negedge clk);   // let the last write-backs land
  endtask

  task automatic check_mem(int a, logic [W-1:0] e, string what);
    @(negedge clk);
    host_raddr = AW'(a);
    #1;
    checks++;
    if (host_rdata !== e) begin
      failures++;
      $display("FAIL %s: DM[%0d] = %h, expected %h", what, a, host_rdata, e);
    end
  endtask

  task automatic host_write(int a, logic [W-1:0] d);
    @(negedge clk);
    host_we = 1; host_waddr = AW'(a); host_wdata = d;
    dm_m[a] = d;
    @(negedge clk);
    host_we = 0;
  endtask

  // ---------------- main
  initial begin
    int pcs [T], bases [T];
    int cyc, busy, prog_len;
    logic [W-1:0] coef [T][8];
    logic [W-1:0] xs [T][NS + 8];

    prog_we = 0; prog_addr = '0; prog_data = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    start = '0; start_pc = '0; start_base = '0;
    for (int t = 0; t < T; t++) begin
      n_issue[t] = 0; last_rd[t] = 0; last_wb[t] = 0; ever_ran[t] = 0;
      for (int r = 0; r < NREG; r++) rf_m[t][r] = '0;
    end
    for (int s = 0; s < 8; s++) n_subfn[s] = 0;
    for (int a = 0; a < DM_DEPTH; a++) dm_m[a] = '0;
    for (int a = 0; a < IM_DEPTH; a++) im_m[a] = '0;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // clear every data word used and all instruction words
    for (int a = 0; a < IM_DEPTH; a++) put(a, nop());
    for (int t = 0; t < T; t++)
      for (int a = 0; a < 1024; a++) host_write(region(t) + a, '0);
    build_programs();

    // ---------------- phase A: FIR on every thread
    for (int t = 0; t < T; t++) begin
      for (int k = 0; k < 8; k++) begin
        coef[t][k] = W'($urandom_range(0, 200)) - W'(100);
        host_write(region(t) + k, coef[t][k]);
      end
      for (int j = 0; j < NS + 7; j++) begin
        xs[t][j] = W'($urandom_range(0, 2000)) - W'(1000);
        host_write(region(t) + 16 + j, xs[t][j]);
      end
    end
    for (int t = 0; t < T; t++) begin pcs[t] = PC_PRE; bases[t] = region(t); end
    run_all(pcs, bases, cyc, busy);
    for (int t = 0; t < T; t++) model_run(t, PC_PRE, region(t));
    for (int n = 0; n < NS; n++) begin
      for (int t = 0; t < T; t++) begin pcs[t] = PC_FIR; bases[t] = region(t) + n; end
      run_all(pcs, bases, cyc, busy);
      for (int t = 0; t < T; t++) model_run(t, PC_FIR, region(t) + n);
      // 9 instructions per thread, one issue every T cycles, no stalls
      checks++;
      if (cyc > 9 * T) begin failures++; $display("FAIL FIR run took %0d cycles, limit %0d", cyc, 9 * T); end
      checks++;
      if (busy < 8 * T) begin failures++; $display("FAIL FIR issue slots busy %0d", busy); end
    end
    // check outputs against the filter formula (independent of the model)
    for (int t = 0; t < T; t++)
      for (int n = 0; n < NS; n++) begin
        logic [W-1:0] acc;
        acc = '0;
        for (int k = 0; k < 8; k++)
          acc = acc + shf(W'(int'($signed(coef[t][k])) * int'($signed(xs[t][n + 7 - k]))), 4'sd2);
        check_mem(region(t) + 64 + n, acc, "FIR output");
      end

    // ---------------- phase B: random programs
    for (int t = 0; t < T; t++)
      for (int a = 0; a < 64; a++) host_write(region(t) + 512 + a, W'($urandom));
    for (int t = 0; t < T; t++) begin pcs[t] = PC_RND + 48 * t; bases[t] = region(t) + 512; end
    run_all(pcs, bases, cyc, busy);
    prog_len = RLEN + NREG;
    checks++;
    if (cyc > prog_len * T) begin failures++; $display("FAIL random run took %0d cycles", cyc); end
    checks++;
    if (busy < (prog_len - 1) * T) begin failures++; $display("FAIL random run busy %0d", busy); end
    for (int t = 0; t < T; t++) model_run(t, PC_RND + 48 * t, region(t) + 512);
    for (int t = 0; t < T; t++)
      for (int a = 0; a < 96; a++) check_mem(region(t) + 512 + a, dm_m[region(t) + 512 + a], "random program");

    // ---------------- mechanisms
    for (int t = 0; t < T; t++) begin
      checks++;
      if (n_issue[t] == 0) begin failures++; $display("FAIL thread %0d never issued", t); end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (n_subfn[s] == 0) begin failures++; $display("FAIL sub-function %b never issued", s[2:0]); end
    end
    checks++; if (n_load == 0)        begin failures++; $display("FAIL no load");  end
    checks++; if (n_store == 0)       begin failures++; $display("FAIL no store"); end
    checks++; if (n_sub == 0)         begin failures++; $display("FAIL no subtract"); end
    checks++; if (n_shl == 0)         begin failures++; $display("FAIL no left shift"); end
    checks++; if (n_shr == 0)         begin failures++; $display("FAIL no right shift"); end
    checks++; if (n_move == 0)        begin failures++; $display("FAIL no move"); end
    checks++; if (n_port_share == 0)  begin failures++; $display("FAIL write port never shared"); end
    checks++; if (n_raw_next == 0)    begin failures++; $display("FAIL no back-to-back dependency"); end
    checks++; if (n_ld_same_reg == 0) begin failures++; $display("FAIL no load into an operand register"); end
    checks++; if (n_halt == 0)        begin failures++; $display("FAIL no halt"); end
    checks++; if (n_restart == 0)     begin failures++; $display("FAIL no restart"); end
    checks++; if (n_idle == 0)        begin failures++; $display("FAIL no idle slot"); end
    $display("issues/thread %0d, loads %0d, stores %0d, sub %0d, shl %0d, shr %0d, move %0d",
             n_issue[0], n_load, n_store, n_sub, n_shl, n_shr, n_move);
    $display("write-port sharing %0d, dependent back-to-back %0d, load-into-operand %0d, halts %0d, restarts %0d, idle slots %0d",
             n_port_share, n_raw_next, n_ld_same_reg, n_halt, n_restart, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
