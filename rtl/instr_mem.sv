// instr_mem: instruction memory shared by all thread contexts.
//
// DEPTH words of IW bits. The read port is combinational, so the issuing
// thread's instruction, its register read and the first part of the composite
// FU fit in the first pipeline stage. The write port (synchronous, one word per
// cycle) loads programs. The memory contents are not reset; programs must be
// written before a thread is started. Size and timing are this design's choices;
// the source only names an instruction memory feeding the FU and the L/S unit.
module instr_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned IW    = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
