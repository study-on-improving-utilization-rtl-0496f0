// cfu_imt_top: interleaved-multithreaded datapath built around one composite FU.
//
// A single-issue processor whose only arithmetic unit is the MSA composite FU
// (multiplier -> shifter -> adder, 16 bits). The FU is pipelined into FU_STAGES
// stages and NTHREADS hardware contexts issue round robin, one per cycle, so a
// thread's next instruction always finds the previous result written back: the
// pipeline latency is hidden without forwarding or stalls. Each context has its
// own 16 x 16-bit register file with 3 read ports and a single write port; that
// write port is shared between the FU write-back and the load/store unit in
// different cycles, the design's ping-pong register-file idea (NTHREADS = 2 is
// exactly the ping/pong pair).
//
// Pipeline of one instruction issued in cycle c by thread t:
//   cycle c              : instruction read (combinational IM), register read of
//                          thread t, first part of the FU cascade; a load writes
//                          its register at the end of this cycle
//   cycles c .. c+S-1    : composite FU (S = FU_STAGES, S-1 pipeline registers)
//   end of cycle c+S-1   : FU result written to rd of thread t and/or stored
// Thread t issues again in cycle c+NTHREADS >= c+S, so its data are ready.
//
// Host interface: programs are written through prog_*; data memory is written
// through host_we/host_waddr/host_wdata and read through host_raddr/host_rdata.
// A start pulse for thread t starts it at start_pc[t] with data base start_base[t];
// running[t] drops after the thread's halt instruction has issued (its last
// results are written FU_STAGES-1 cycles later).
//
// Follows the source: composite FU order and widths, register-file size and
// ports, one thread per pipeline stage, write port interleaved between FU and
// load/store. This design's own: the instruction encoding (cfu_pkg::instr_t), the
// base-plus-offset addressing, start/halt control, memory sizes and the
// requirement FU_STAGES >= 2 (with one stage the load and FU writes of a thread
// would fall into the same cycle).
module cfu_imt_top
  import cfu_pkg::*;
#(
  parameter int unsigned FU_STAGES = cfu_pkg::FU_STAGES_DEFAULT,
  parameter int unsigned NTHREADS  = FU_STAGES,
  parameter int unsigned TW        = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // program load
  input  logic                         prog_we,
  input  logic [IAW-1:0]               prog_addr,
  input  instr_t                       prog_data,
  // host access to data memory
  input  logic                         host_we,
  input  logic [AW-1:0]                host_waddr,
  input  logic [W-1:0]                 host_wdata,
  input  logic [AW-1:0]                host_raddr,
  output logic [W-1:0]                 host_rdata,
  // thread control
  input  logic [NTHREADS-1:0]          start,
  input  logic [NTHREADS-1:0][IAW-1:0] start_pc,
  input  logic [NTHREADS-1:0][AW-1:0]  start_base,
  output logic [NTHREADS-1:0]          running
);

  if (FU_STAGES < 2 || NTHREADS < FU_STAGES) begin : g_bad_cfg
    $error("cfu_imt_top needs FU_STAGES >= 2 and NTHREADS >= FU_STAGES");
  end

  // Information that travels with an operation through the FU pipeline (store
  // addresses travel in the load/store unit's own queue)
  typedef struct packed {
    logic [TW-1:0] tid;
    logic          wb_en;
    logic [RW-1:0] rd;
  } wb_tag_t;

  localparam int unsigned TAGW = $bits(wb_tag_t);

  // ---------------- context selection and instruction fetch
  logic            issue_valid;
  logic [TW-1:0]   issue_tid;
  logic [IAW-1:0]  issue_pc;
  logic [AW-1:0]   issue_base;
  instr_t          instr;
  logic [IW-1:0]   instr_bits;

  ctx_select #(.NTHREADS(NTHREADS), .IAW(IAW), .AW(AW), .TW(TW)) u_ctx (
    .clk(clk), .rst_n(rst_n),
    .start(start), .start_pc(start_pc), .start_base(start_base),
    .halt_in(instr.halt),
    .issue_valid(issue_valid), .issue_tid(issue_tid),
    .issue_pc(issue_pc), .issue_base(issue_base),
    .running(running));

  instr_mem #(.DEPTH(IM_DEPTH), .IW(IW), .AW(IAW)) u_im (
    .clk(clk), .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .raddr(issue_pc), .rdata(instr_bits));

  assign instr = instr_t'(instr_bits);

  // ---------------- register files, load/store unit, data memory
  logic [NRD-1:0][W-1:0] opnd;
  logic                  fu_out_valid;
  logic [W-1:0]          fu_result;
  logic [TAGW-1:0]       tag_out_bits;
  wb_tag_t               tag_in, tag_out;

  logic          ls_rf_we;
  logic [TW-1:0] ls_rf_tid;
  logic [RW-1:0] ls_rf_waddr;
  logic [W-1:0]  ls_rf_wdata;
  logic [AW-1:0] dm_raddr, dm_waddr;
  logic [W-1:0]  dm_rdata, dm_wdata;
  logic          dm_we;

  assign tag_out = wb_tag_t'(tag_out_bits);

  thread_rf_bank #(.NTHREADS(NTHREADS), .NREG(NREG), .W(W), .NRD(NRD), .RW(RW), .TW(TW)) u_rfs (
    .clk(clk), .rst_n(rst_n),
    .rd_tid(issue_tid), .rd_addr(instr.rs), .rd_data(opnd),
    .fu_we(fu_out_valid && tag_out.wb_en), .fu_tid(tag_out.tid),
    .fu_waddr(tag_out.rd), .fu_wdata(fu_result),
    .ls_we(ls_rf_we), .ls_tid(ls_rf_tid),
    .ls_waddr(ls_rf_waddr), .ls_wdata(ls_rf_wdata));

  ls_unit #(.W(W), .AW(AW), .RW(RW), .TW(TW), .LAT(FU_STAGES - 1)) u_ls (
    .clk(clk), .rst_n(rst_n),
    .ld_valid(issue_valid && instr.ld_en), .ld_tid(issue_tid), .base(issue_base),
    .ld_off(instr.ld_off), .ld_rd(instr.ld_rd),
    .st_valid(issue_valid && instr.st_en), .st_off(instr.st_off),
    .dm_raddr(dm_raddr), .dm_rdata(dm_rdata),
    .rf_we(ls_rf_we), .rf_tid(ls_rf_tid), .rf_waddr(ls_rf_waddr), .rf_wdata(ls_rf_wdata),
    .res_valid(fu_out_valid), .st_data(fu_result),
    .dm_we(dm_we), .dm_waddr(dm_waddr), .dm_wdata(dm_wdata));

  data_mem #(.DEPTH(DM_DEPTH), .W(W), .AW(AW)) u_dm (
    .clk(clk),
    .a_raddr(dm_raddr), .a_rdata(dm_rdata),
    .b_raddr(host_raddr), .b_rdata(host_rdata),
    .ls_we(dm_we), .ls_waddr(dm_waddr), .ls_wdata(dm_wdata),
    .host_we(host_we), .host_waddr(host_waddr), .host_wdata(host_wdata));

  // ---------------- composite FU
  always_comb begin
    tag_in.tid     = issue_tid;
    tag_in.wb_en   = instr.wb_en;
    tag_in.rd      = instr.rd;
  end

  composite_fu #(.W(W), .NFU(NFU), .ORDER(ARRANGEMENT), .NRD(NRD),
                 .STAGES(FU_STAGES), .TAGW(TAGW)) u_fu (
    .clk(clk), .rst_n(rst_n),
    .in_valid(issue_valid && (instr.wb_en || instr.st_en)),
    .ctrl(instr.fu), .opnd(opnd), .tag_in(tag_in),
    .out_valid(fu_out_valid), .result(fu_result), .tag_out(tag_out_bits));

endmodule
