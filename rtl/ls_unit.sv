// ls_unit: load/store unit, decoupled from the composite FU.
//
// Loads: in the issue cycle of an instruction with a load, the unit forms the
// address base + ld_off (modulo the data-memory size), reads the data memory
// combinationally and writes the word into register ld_rd of the issuing
// thread's register file at the end of that cycle. The FU operation of the same
// instruction still reads the register's old value; the thread's next
// instruction sees the loaded value.
// Stores: a store writes the FU result of its own instruction. The unit forms
// the address base + st_off at issue and keeps it, with a valid bit, in its own
// queue of in-flight stores: a delay line of LAT stages, LAT being the FU
// latency. When a store leaves the queue, the instruction's result is leaving
// the FU in the same cycle (res_valid, st_data), and the unit writes it to the
// data memory. So the FU carries no memory addresses, and the queue holds at
// most one store per pipeline stage. An assertion checks that every store meets
// a valid FU result.
// Because a thread's FU write-back happens LAT cycles after issue and its load
// write at issue, the two share the register file's single write port without
// conflict for any LAT >= 1, as in the design's ping-pong scheme.
// The addressing mode (per-thread base plus offset) is this design's choice.
module ls_unit #(
  parameter int unsigned W   = 16,
  parameter int unsigned AW  = 12,
  parameter int unsigned RW  = 4,
  parameter int unsigned TW  = 1,
  parameter int unsigned LAT = 1    // FU latency in cycles (FU stages - 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // issue stage
  input  logic          ld_valid,   // issued instruction has a load
  input  logic [TW-1:0] ld_tid,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] ld_off,
  input  logic [RW-1:0] ld_rd,
  input  logic          st_valid,   // issued instruction stores its result
  input  logic [AW-1:0] st_off,
  // data memory read port and register-file write
  output logic [AW-1:0] dm_raddr,
  input  logic [W-1:0]  dm_rdata,
  output logic          rf_we,
  output logic [TW-1:0] rf_tid,
  output logic [RW-1:0] rf_waddr,
  output logic [W-1:0]  rf_wdata,
  // FU result, LAT cycles after issue
  input  logic          res_valid,
  input  logic [W-1:0]  st_data,
  // data memory write port
  output logic          dm_we,
  output logic [AW-1:0] dm_waddr,
  output logic [W-1:0]  dm_wdata
);

  // ---------------- loads
  always_comb begin
    dm_raddr = base + ld_off;
    rf_we    = ld_valid;
    rf_tid   = ld_tid;
    rf_waddr = ld_rd;
    rf_wdata = dm_rdata;
  end

  // ---------------- in-flight stores
  logic [AW-1:0] st_addr_issue;
  assign st_addr_issue = base + st_off;

  if (LAT == 0) begin : g_direct
    assign dm_we    = st_valid;
    assign dm_waddr = st_addr_issue;
  end else begin : g_queue
    logic          v_q [LAT];
    logic [AW-1:0] a_q [LAT];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < LAT; s++) begin
          v_q[s] <= 1'b0;
          a_q[s] <= '0;
        end
      end else begin
        v_q[0] <= st_valid;
        a_q[0] <= st_addr_issue;
        for (int s = 1; s < LAT; s++) begin
          v_q[s] <= v_q[s-1];
          a_q[s] <= a_q[s-1];
        end
      end
    end

    assign dm_we    = v_q[LAT-1];
    assign dm_waddr = a_q[LAT-1];
  end

  assign dm_wdata = st_data;

  a_store_has_result: assert property (@(posedge clk) disable iff (!rst_n) dm_we |-> res_valid)
    else $error("ls_unit: store leaves the queue without an FU result");

endmodule
