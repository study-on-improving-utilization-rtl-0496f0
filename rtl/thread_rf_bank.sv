// thread_rf_bank: the thread contexts' register files with their access muxes.
//
// Interleaved multithreading gives every thread its own register file, so this
// block holds NTHREADS copies of thread_rf. The read side selects the issuing
// thread's file (rd_tid) and presents its NRD operands to the composite FU. Each
// file has a single write port that is time-shared, as in the design's ping-pong
// register file: it is given to the FU write-back when fu_tid names the thread,
// and otherwise to the load/store unit. With NTHREADS = 2 the two files are the
// "ping" and "pong" files of that scheme.
//
// The pipeline schedules the FU write-back and the load write of one thread into
// different cycles, so they never meet at one file; an assertion checks this. If
// they did, the FU write would win. Reads are combinational, writes at the clock
// edge.
module thread_rf_bank #(
  parameter int unsigned NTHREADS = cfu_pkg::FU_STAGES_DEFAULT,
  parameter int unsigned NREG     = cfu_pkg::NREG,
  parameter int unsigned W        = cfu_pkg::W,
  parameter int unsigned NRD      = cfu_pkg::NRD,
  parameter int unsigned RW       = $clog2(NREG),
  parameter int unsigned TW       = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // read side (issuing thread)
  input  logic [TW-1:0]          rd_tid,
  input  logic [NRD-1:0][RW-1:0] rd_addr,
  output logic [NRD-1:0][W-1:0]  rd_data,
  // FU write-back
  input  logic                   fu_we,
  input  logic [TW-1:0]          fu_tid,
  input  logic [RW-1:0]          fu_waddr,
  input  logic [W-1:0]           fu_wdata,
  // load/store unit write
  input  logic                   ls_we,
  input  logic [TW-1:0]          ls_tid,
  input  logic [RW-1:0]          ls_waddr,
  input  logic [W-1:0]           ls_wdata
);
  logic [NRD-1:0][W-1:0] t_rdata [NTHREADS];

  for (genvar t = 0; t < NTHREADS; t++) begin : g_ctx
    logic          we;
    logic [RW-1:0] wa;
    logic [W-1:0]  wd;
    logic          fu_sel;

    always_comb begin
      fu_sel = fu_we && (fu_tid == TW'(t));
      we     = fu_sel || (ls_we && (ls_tid == TW'(t)));
      wa     = fu_sel ? fu_waddr : ls_waddr;
      wd     = fu_sel ? fu_wdata : ls_wdata;
    end

    thread_rf #(.NREG(NREG), .W(W), .NRD(NRD), .NWR(1), .RW(RW)) u_rf (
      .clk(clk), .rst_n(rst_n),
      .rd_addr(rd_addr), .rd_data(t_rdata[t]),
      .wr_en(we), .wr_addr(wa), .wr_data(wd));
  end

  always_comb begin
    rd_data = t_rdata[0];
    for (int t = 1; t < NTHREADS; t++)
      if (rd_tid == TW'(t)) rd_data = t_rdata[t];
  end

  a_port_shared: assert property (@(posedge clk) disable iff (!rst_n)
    !(fu_we && ls_we && fu_tid == ls_tid))
    else $error("FU and load/store write the same thread register file in one cycle");
endmodule
