// tb_kernels: three block kernels of the benchmark suite on the default datapath.
//
// 1. Matrix: (8 x 8) * (8 x 1) matrix-vector product, y = A x. Each thread
//    computes four rows. It first loads x into r8..r15 and then streams the
//    matrix elements through r1: the instruction that multiplies A[r][k] by x[k]
//    and accumulates into r0 (the MA sub-function) loads A[r][k+1]. The last
//    instruction of a row stores the FU result directly. 8 + 1 + 32 = 41
//    instructions per thread carry the 60 operations (32 multiplications, 28
//    additions) of its four rows.
// 2. IT: the 8-point forward integer transform of H.264 (32 additions or
//    subtractions, 10 shifts), one 8-sample vector per run. Every shift is fused
//    with an addition into one SA instruction, (a >>> s) +/- b; the one term of
//    the form b - (a >>> s) needs a separate S and A instruction. The 8 loads
//    overlap the first butterflies, so a vector takes 35 instructions.
// 3. CFIR: one output of a 16-tap complex FIR, yr = sum hr*xr - hi*xi,
//    yi = sum hr*xi + hi*xr (64 multiplications, 62 additions), per run and
//    thread. Every product is one MA instruction. The adder forms only
//    product - accumulator, so the real accumulator changes sign at each step:
//    it holds -(partial sum) after the hi*xi step and +(partial sum) after the
//    hr*xr step, and is positive after the last one. Two register sets alternate
//    between taps, so the four loads of tap k+1 ride along with the four
//    instructions of tap k: 4 load-only instructions, then 64.
// Results are compared with the same arithmetic done in the testbench (16-bit
// wrap-around for the matrix products). For every run the cycle count is checked:
// with the two threads interleaved, a run of n instructions per thread takes at
// most 2n cycles. The operation and instruction totals are printed.
module tb_kernels;
  import cfu_pkg::*;

  localparam int T = cfu_pkg::FU_STAGES_DEFAULT;
  localparam int S = T;

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

  localparam int PC_MAT = 0, MAT_LEN = 41;
  localparam int PC_IT  = 64, IT_LEN = 35;
  localparam int PC_CF  = 128, CF_LEN = 68;
  localparam int MAT_RUNS = 16, IT_RUNS = 64, CF_RUNS = 16;

  // ---------------- helpers
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

  task automatic host_read(int a, output logic [W-1:0] d);
    @(negedge clk);
    host_raddr = AW'(a);
    #1 d = host_rdata;
  endtask

  task automatic run_all(int pc, int base [T], int len, string name, output int cycles);
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
    checks++;
    if (cycles > len * T) begin
      failures++;
      $display("FAIL %s run took %0d cycles, limit %0d", name, cycles, len * T);
    end
  endtask

  task automatic expect_eq(string what, int idx, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s[%0d] = %0d, expected %0d", what, idx, $signed(got), $signed(exp));
    end
  endtask

  // Instruction builders. A: rd = a +/- b.  SA: rd = (a >>> sh) +/- b.
  // S: rd = a >>> sh.  with_store stores the result instead of writing rd.
  function automatic instr_t op_a(int rd, int a, int b, bit sub);
    instr_t i;
    i = '0;
    i.rs[0] = RW'(a); i.rs[2] = RW'(b);
    i.fu[2].en = 1; i.fu[2].sub = sub;
    i.wb_en = 1; i.rd = RW'(rd);
    return i;
  endfunction

  function automatic instr_t op_sa(int rd, int a, int sh, int b, bit sub);
    instr_t i;
    i = op_a(rd, a, b, sub);
    i.fu[1].en = 1; i.fu[1].shamt = 4'(sh);
    return i;
  endfunction

  function automatic instr_t op_s(int rd, int a, int sh);
    instr_t i;
    i = '0;
    i.rs[0] = RW'(a);
    i.fu[1].en = 1; i.fu[1].shamt = 4'(sh);
    i.wb_en = 1; i.rd = RW'(rd);
    return i;
  endfunction

  function automatic instr_t with_store(instr_t i, int off);
    i.wb_en = 0; i.st_en = 1; i.st_off = AW'(off);
    return i;
  endfunction

  // H.264 8-point forward integer transform, reference
  function automatic void it_ref(input int p [8], output int o [8]);
    int a [8], b [8];
    a[0] = p[0] + p[7]; a[1] = p[1] + p[6]; a[2] = p[2] + p[5]; a[3] = p[3] + p[4];
    a[4] = p[0] - p[7]; a[5] = p[1] - p[6]; a[6] = p[2] - p[5]; a[7] = p[3] - p[4];
    b[0] = a[0] + a[3]; b[1] = a[1] + a[2]; b[2] = a[0] - a[3]; b[3] = a[1] - a[2];
    b[4] = a[5] + a[6] + ((a[4] >>> 1) + a[4]);
    b[5] = a[4] - a[7] - ((a[6] >>> 1) + a[6]);
    b[6] = a[4] + a[7] - ((a[5] >>> 1) + a[5]);
    b[7] = a[5] - a[6] + ((a[7] >>> 1) + a[7]);
    o[0] = b[0] + b[1];          o[4] = b[0] - b[1];
    o[2] = b[2] + (b[3] >>> 1);  o[6] = (b[2] >>> 1) - b[3];
    o[1] = b[4] + (b[7] >>> 2);  o[7] = (b[4] >>> 2) - b[7];
    o[3] = b[5] + (b[6] >>> 2);  o[5] = b[6] - (b[5] >>> 2);
  endfunction

  // ---------------- programs
  // Matrix, per thread (base b): x[k] at b+k, A[r][k] (its 4 rows) at
  // b+8+8r+k, y[r] at b+48+r.
  task automatic load_matrix_program();
    instr_t i;
    int pc;
    pc = PC_MAT;
    for (int k = 0; k < 8; k++) begin
      i = '0;
      i.ld_en = 1; i.ld_rd = RW'(8 + k); i.ld_off = AW'(k);
      put(pc++, i);
    end
    i = '0;
    i.ld_en = 1; i.ld_rd = 4'd1; i.ld_off = AW'(8);
    put(pc++, i);
    for (int m = 0; m < 32; m++) begin
      int r, k;
      r = m / 8; k = m % 8;
      i = '0;
      i.rs[0] = 4'd1; i.rs[1] = RW'(8 + k); i.rs[2] = 4'd0;
      i.fu[0].en = 1;
      i.fu[2].en = (k > 0);
      i.wb_en = 1; i.rd = 4'd0;
      if (m < 31) begin i.ld_en = 1; i.ld_rd = 4'd1; i.ld_off = AW'(8 + m + 1); end
      if (k == 7) begin i.st_en = 1; i.st_off = AW'(48 + r); end
      if (m == 31) i.halt = 1;
      put(pc++, i);
    end
  endtask

  // IT, per run (base b): p[k] at b+k, output o[k] at b+8+k.
  // Samples are loaded in the order p0 p7 p1 p6 p2 p5 p3 p4 into r0 r7 r1 r6 ...
  // so that butterfly j can run as instruction j+2.
  task automatic load_it_program();
    instr_t c [33];
    instr_t i;
    int ld_order [8] = '{0, 7, 1, 6, 2, 5, 3, 4};
    int n;
    n = 0;
    // a0..a3 -> r8..r11, a4..a7 -> r0..r3
    c[n++] = op_a(8, 0, 7, 0);  c[n++] = op_a(0, 0, 7, 1);
    c[n++] = op_a(9, 1, 6, 0);  c[n++] = op_a(1, 1, 6, 1);
    c[n++] = op_a(10, 2, 5, 0); c[n++] = op_a(2, 2, 5, 1);
    c[n++] = op_a(11, 3, 4, 0); c[n++] = op_a(3, 3, 4, 1);
    // b0 r12, b2 r13, b1 r14, b3 r15
    c[n++] = op_a(12, 8, 11, 0); c[n++] = op_a(13, 8, 11, 1);
    c[n++] = op_a(14, 9, 10, 0); c[n++] = op_a(15, 9, 10, 1);
    // o0, o4, o2, o6
    c[n++] = with_store(op_a(0, 12, 14, 0), 8 + 0);
    c[n++] = with_store(op_a(0, 12, 14, 1), 8 + 4);
    c[n++] = with_store(op_sa(0, 15, 1, 13, 0), 8 + 2);
    c[n++] = with_store(op_sa(0, 13, 1, 15, 1), 8 + 6);
    // b4 r8, b5 r9, b6 r10, b7 r11 (r4, r5 temporaries)
    c[n++] = op_sa(4, 0, 1, 0, 0);  c[n++] = op_a(5, 1, 2, 0);  c[n++] = op_a(8, 5, 4, 0);
    c[n++] = op_sa(4, 2, 1, 2, 0);  c[n++] = op_a(5, 0, 3, 1);  c[n++] = op_a(9, 5, 4, 1);
    c[n++] = op_sa(4, 1, 1, 1, 0);  c[n++] = op_a(5, 0, 3, 0);  c[n++] = op_a(10, 5, 4, 1);
    c[n++] = op_sa(4, 3, 1, 3, 0);  c[n++] = op_a(5, 1, 2, 1);  c[n++] = op_a(11, 5, 4, 0);
    // o1, o7, o3, o5
    c[n++] = with_store(op_sa(0, 11, 2, 8, 0), 8 + 1);
    c[n++] = with_store(op_sa(0, 8, 2, 11, 1), 8 + 7);
    c[n++] = with_store(op_sa(0, 10, 2, 9, 0), 8 + 3);
    c[n++] = op_s(4, 9, 2);
    c[n++] = with_store(op_a(0, 10, 4, 1), 8 + 5);
    for (int pc = 0; pc < IT_LEN; pc++) begin
      i = (pc >= 2) ? c[pc - 2] : '0;
      if (pc < 8) begin
        i.ld_en = 1; i.ld_rd = RW'(ld_order[pc]); i.ld_off = AW'(ld_order[pc]);
      end
      i.halt = (pc == IT_LEN - 1);
      put(PC_IT + pc, i);
    end
  endtask

  // CFIR, per run (base b): hr[k] at b+k, hi[k] at b+16+k, xr[k] = Re x[n-k] at
  // b+32+k, xi[k] at b+48+k; yr at b+64, yi at b+65. Register set j (tap parity)
  // is r4+4j: hr, hi, xr, xi. r0 real and r1 imaginary accumulator.
  task automatic load_cfir_program();
    instr_t i;
    int pc;
    pc = PC_CF;
    for (int f = 0; f < 4; f++) begin
      i = '0;
      i.ld_en = 1; i.ld_rd = RW'(4 + f); i.ld_off = AW'(16 * f);
      put(pc++, i);
    end
    for (int k = 0; k < 16; k++) begin
      int cur, nxt;
      cur = 4 + 4 * (k % 2);
      nxt = 4 + 4 * ((k + 1) % 2);
      for (int j = 0; j < 4; j++) begin
        i = '0;
        i.fu[0].en = 1;
        i.fu[2].en = (k > 0) || (j == 1) || (j == 3);
        i.fu[2].sub = (j < 2);
        i.wb_en = 1;
        i.rd = (j < 2) ? 4'd0 : 4'd1;
        i.rs[2] = i.rd;
        case (j)
          0: begin i.rs[0] = RW'(cur + 1); i.rs[1] = RW'(cur + 3); end  // hi * xi
          1: begin i.rs[0] = RW'(cur + 0); i.rs[1] = RW'(cur + 2); end  // hr * xr
          2: begin i.rs[0] = RW'(cur + 0); i.rs[1] = RW'(cur + 3); end  // hr * xi
          default: begin i.rs[0] = RW'(cur + 1); i.rs[1] = RW'(cur + 2); end  // hi * xr
        endcase
        if (k < 15) begin i.ld_en = 1; i.ld_rd = RW'(nxt + j); i.ld_off = AW'(16 * j + k + 1); end
        if (k == 15 && j == 1) begin i.st_en = 1; i.st_off = AW'(64); end
        if (k == 15 && j == 3) begin i.st_en = 1; i.st_off = AW'(65); i.halt = 1; end
        put(pc++, i);
      end
    end
  endtask

  // ---------------- test
  initial begin
    int base [T];
    logic [W-1:0] d;
    int cyc, mat_busy, it_busy, cf_busy;

    prog_we = 0; prog_addr = '0; prog_data = '0;
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    start = '0; start_pc = '0; start_base = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    load_matrix_program();
    load_it_program();
    load_cfir_program();

    // Matrix
    mat_busy = 0;
    for (int run = 0; run < MAT_RUNS; run++) begin
      int x [8], a [8][8];
      for (int k = 0; k < 8; k++) x[k] = $urandom_range(0, 255) - 128;
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) a[r][k] = $urandom_range(0, 255) - 128;
      for (int t = 0; t < T; t++) begin
        base[t] = 64 * t;
        for (int k = 0; k < 8; k++) host_write(base[t] + k, W'(x[k]));
        for (int r = 0; r < 8 / T; r++)
          for (int k = 0; k < 8; k++) host_write(base[t] + 8 + 8 * r + k, W'(a[(8 / T) * t + r][k]));
      end
      run_all(PC_MAT, base, MAT_LEN, "matrix", cyc);
      mat_busy += cyc;
      for (int t = 0; t < T; t++)
        for (int r = 0; r < 8 / T; r++) begin
          int acc;
          acc = 0;
          for (int k = 0; k < 8; k++) acc += a[(8 / T) * t + r][k] * x[k];
          host_read(base[t] + 48 + r, d);
          expect_eq("matrix y", (8 / T) * t + r, d, W'(acc));
        end
    end
    $display("matrix: %0d products, %0d operations in %0d instructions (%0d busy cycles)",
             MAT_RUNS, MAT_RUNS * 120, MAT_RUNS * T * MAT_LEN, mat_busy);

    // IT
    it_busy = 0;
    for (int run = 0; run < IT_RUNS / T; run++) begin
      int p [T][8], o [8];
      for (int t = 0; t < T; t++) begin
        base[t] = 16 * (run * T + t) + 1024;
        for (int k = 0; k < 8; k++) begin
          p[t][k] = $urandom_range(0, 510) - 255;
          host_write(base[t] + k, W'(p[t][k]));
        end
      end
      run_all(PC_IT, base, IT_LEN, "IT", cyc);
      it_busy += cyc;
      for (int t = 0; t < T; t++) begin
        it_ref(p[t], o);
        for (int k = 0; k < 8; k++) begin
          host_read(base[t] + 8 + k, d);
          expect_eq("IT o", k, d, W'(o[k]));
        end
      end
    end
    $display("IT: %0d vectors, %0d operations in %0d instructions (%0d busy cycles)",
             IT_RUNS, IT_RUNS * 42, IT_RUNS * IT_LEN, it_busy);

    // CFIR
    cf_busy = 0;
    for (int run = 0; run < CF_RUNS; run++) begin
      int v [T][4][16];
      for (int t = 0; t < T; t++) begin
        base[t] = 2048 + 128 * t;
        for (int f = 0; f < 4; f++)
          for (int k = 0; k < 16; k++) begin
            v[t][f][k] = $urandom_range(0, 255) - 128;
            host_write(base[t] + 16 * f + k, W'(v[t][f][k]));
          end
      end
      run_all(PC_CF, base, CF_LEN, "CFIR", cyc);
      cf_busy += cyc;
      for (int t = 0; t < T; t++) begin
        int yr, yi;
        yr = 0; yi = 0;
        for (int k = 0; k < 16; k++) begin
          yr += v[t][0][k] * v[t][2][k] - v[t][1][k] * v[t][3][k];
          yi += v[t][0][k] * v[t][3][k] + v[t][1][k] * v[t][2][k];
        end
        host_read(base[t] + 64, d);
        expect_eq("CFIR yr", run * T + t, d, W'(yr));
        host_read(base[t] + 65, d);
        expect_eq("CFIR yi", run * T + t, d, W'(yi));
      end
    end
    $display("CFIR: %0d outputs, %0d operations in %0d instructions (%0d busy cycles)",
             CF_RUNS * T, CF_RUNS * T * 126, CF_RUNS * T * CF_LEN, cf_busy);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
