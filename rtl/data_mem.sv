// data_mem: data memory of the simulated architecture.
//
// DEPTH words of W bits with two combinational read ports (port a for the
// load/store unit, port b for a host reading results) and one synchronous write
// port. The load/store unit and the host share the write port; the host has
// priority and is expected to write only while no thread runs. Contents are not
// reset. Size, port count and timing are this design's choices; the source only
// names a data memory beside the load/store unit.
module data_mem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_raddr,
  output logic [W-1:0]  a_rdata,
  input  logic [AW-1:0] b_raddr,
  output logic [W-1:0]  b_rdata,
  input  logic          ls_we,
  input  logic [AW-1:0] ls_waddr,
  input  logic [W-1:0]  ls_wdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_waddr,
  input  logic [W-1:0]  host_wdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we)    mem[host_waddr] <= host_wdata;
    else if (ls_we) mem[ls_waddr]   <= ls_wdata;
  end

  assign a_rdata = mem[a_raddr];
  assign b_rdata = mem[b_raddr];
endmodule
