// ctx_select: hardware thread contexts and interleaved context selection.
//
// Each of the NTHREADS hardware contexts holds a program counter, a base address
// for its data (so several threads can run one program on different data) and a
// status bit (running or halted). Fine-grained interleaved multithreading issues
// from a different context every cycle: the selected thread id advances round
// robin 0, 1, ..., NTHREADS-1, 0, ... unconditionally, so a thread issues exactly
// once every NTHREADS cycles. With NTHREADS equal to the pipeline depth, an
// instruction's result is written back before the same thread issues again and
// no dependency stall is ever needed.
//
// Interface: issue_tid/issue_pc/issue_base describe the slot of the current
// cycle; issue_valid is low when that thread is halted (the slot is then idle).
// halt_in, sampled with a valid issue, stops the thread after that instruction;
// otherwise its PC advances by one. A start pulse (re)starts thread t at
// start_pc[t] with start_base[t] and takes precedence over the thread's issue in
// the same cycle. The start/halt control and the base register are this
// design's own; the source only names PC, registers and status word as a context.
module ctx_select #(
  parameter int unsigned NTHREADS = 2,
  parameter int unsigned IAW      = 8,
  parameter int unsigned AW       = 12,
  parameter int unsigned TW       = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NTHREADS-1:0]          start,
  input  logic [NTHREADS-1:0][IAW-1:0] start_pc,
  input  logic [NTHREADS-1:0][AW-1:0]  start_base,
  input  logic                         halt_in,
  output logic                         issue_valid,
  output logic [TW-1:0]                issue_tid,
  output logic [IAW-1:0]               issue_pc,
  output logic [AW-1:0]                issue_base,
  output logic [NTHREADS-1:0]          running
);
  logic [TW-1:0]  tid_q;
  logic [IAW-1:0] pc_q   [NTHREADS];
  logic [AW-1:0]  base_q [NTHREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tid_q <= '0;
    else        tid_q <= (tid_q == TW'(NTHREADS-1)) ? '0 : tid_q + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) begin
        pc_q[t]    <= '0;
        base_q[t]  <= '0;
        running[t] <= 1'b0;
      end
    end else begin
      for (int t = 0; t < NTHREADS; t++) begin
        if (start[t]) begin
          pc_q[t]    <= start_pc[t];
          base_q[t]  <= start_base[t];
          running[t] <= 1'b1;
        end else if (running[t] && tid_q == TW'(t)) begin
          pc_q[t] <= pc_q[t] + 1'b1;
          if (halt_in) running[t] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    issue_tid   = tid_q;
    issue_pc    = pc_q[0];
    issue_base  = base_q[0];
    issue_valid = running[0];
    for (int t = 1; t < NTHREADS; t++)
      if (tid_q == TW'(t)) begin
        issue_pc    = pc_q[t];
        issue_base  = base_q[t];
        issue_valid = running[t];
      end
  end
endmodule
