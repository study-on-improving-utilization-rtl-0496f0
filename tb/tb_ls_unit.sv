// tb_ls_unit: self-checking test of the load/store unit.
// Two instances share random inputs: one with a store latency of 1 cycle (the
// default 2-stage FU) and one with 3 cycles. Every cycle an instruction with a
// random load and a random store is issued. Checks: the load address (base +
// offset, wrapping at the memory size), the routing of loaded data to the
// issuing thread's register, and for each store that it reaches the data memory
// exactly LAT cycles after issue, at the address formed at issue, carrying the FU
// result of that cycle. The FU result valid is driven high whenever a store is
// due (as the pipeline guarantees) and randomly otherwise.
module tb_ls_unit;
  localparam int W = 16, AW = 12, RW = 4, TW = 2;
  localparam int LA = 1, LB = 3;
  localparam int N = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          ld_valid, st_valid, res_valid;
  logic [TW-1:0] ld_tid;
  logic [AW-1:0] base, ld_off, st_off;
  logic [RW-1:0] ld_rd;
  logic [W-1:0]  dm_rdata, st_data;

  logic          rf_we_a, dm_we_a, rf_we_b, dm_we_b;
  logic [TW-1:0] rf_tid_a, rf_tid_b;
  logic [AW-1:0] dm_raddr_a, dm_waddr_a, dm_raddr_b, dm_waddr_b;
  logic [RW-1:0] rf_waddr_a, rf_waddr_b;
  logic [W-1:0]  rf_wdata_a, dm_wdata_a, rf_wdata_b, dm_wdata_b;

  ls_unit #(.W(W), .AW(AW), .RW(RW), .TW(TW), .LAT(LA)) dut_a (
    .clk, .rst_n, .ld_valid, .ld_tid, .base, .ld_off, .ld_rd, .st_valid, .st_off,
    .dm_raddr(dm_raddr_a), .dm_rdata,
    .rf_we(rf_we_a), .rf_tid(rf_tid_a), .rf_waddr(rf_waddr_a), .rf_wdata(rf_wdata_a),
    .res_valid, .st_data,
    .dm_we(dm_we_a), .dm_waddr(dm_waddr_a), .dm_wdata(dm_wdata_a));

  ls_unit #(.W(W), .AW(AW), .RW(RW), .TW(TW), .LAT(LB)) dut_b (
    .clk, .rst_n, .ld_valid, .ld_tid, .base, .ld_off, .ld_rd, .st_valid, .st_off,
    .dm_raddr(dm_raddr_b), .dm_rdata,
    .rf_we(rf_we_b), .rf_tid(rf_tid_b), .rf_waddr(rf_waddr_b), .rf_wdata(rf_wdata_b),
    .res_valid, .st_data,
    .dm_we(dm_we_b), .dm_waddr(dm_waddr_b), .dm_wdata(dm_wdata_b));

  bit            exp_v [N];
  logic [AW-1:0] exp_a [N];

  function automatic bit due(int n, int lat);
    return (n >= lat) && exp_v[n - lat];
  endfunction

  task automatic check_store(string name, int n, int lat, logic we, logic [AW-1:0] a, logic [W-1:0] d);
    checks++;
    if (we !== due(n, lat) || (we && (a !== exp_a[n - lat] || d !== st_data))) begin
      failures++;
      if (failures < 10) $display("FAIL %s store in cycle %0d: we %b addr %0d data %h", name, n, we, a, d);
    end
  endtask

  int n_stores = 0;

  initial begin
    ld_valid = 0; st_valid = 0; res_valid = 0; ld_tid = '0; base = '0; ld_off = '0;
    ld_rd = '0; st_off = '0; dm_rdata = '0; st_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      ld_valid = 1'($urandom); ld_tid = TW'($urandom); base = AW'($urandom);
      ld_off = AW'($urandom); ld_rd = RW'($urandom); st_off = AW'($urandom);
      dm_rdata = W'($urandom); st_valid = 1'($urandom); st_data = W'($urandom);
      exp_v[n] = st_valid;
      exp_a[n] = AW'((int'(base) + int'(st_off)) % 4096);
      res_valid = due(n, LA) || due(n, LB) || 1'($urandom);
      #1;
      checks++;
      if (dm_raddr_a !== AW'((int'(base) + int'(ld_off)) % 4096) || dm_raddr_b !== dm_raddr_a) begin
        failures++; $display("FAIL load address base %0d off %0d", base, ld_off);
      end
      checks++;
      if (rf_we_a !== ld_valid || (ld_valid && (rf_tid_a !== ld_tid || rf_waddr_a !== ld_rd || rf_wdata_a !== dm_rdata))) begin
        failures++; $display("FAIL load routing");
      end
      check_store("LAT=1", n, LA, dm_we_a, dm_waddr_a, dm_wdata_a);
      check_store("LAT=3", n, LB, dm_we_b, dm_waddr_b, dm_wdata_b);
      if (dm_we_b) n_stores++;
    end
    checks++;
    if (n_stores < N / 4) begin failures++; $display("FAIL too few stores: %0d", n_stores); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
