// thread_rf: cell-based centralized register file (one thread context).
//
// NREG registers of W bits built from flip-flops and two switch networks, as in
// the design's register-file model: every register has a write-port multiplexer
// choosing among the NWR write ports, and every one of the NRD read ports has an
// NREG-to-1 read multiplexer. Reads are combinational (data of rd_addr[p] appears
// on rd_data[p] in the same cycle); writes take effect at the rising clock edge.
// A read in the cycle of a write to the same register returns the old value.
//
// If two write ports address the same register in one cycle the higher-numbered
// port wins; the source does not define this case. Reset clears all registers.
// Defaults are the composite FU's 3 read / 1 write ports over 16 x 16 bits.
module thread_rf #(
  parameter int unsigned NREG = 16,
  parameter int unsigned W    = 16,
  parameter int unsigned NRD  = 3,
  parameter int unsigned NWR  = 1,
  parameter int unsigned RW   = $clog2(NREG)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NRD-1:0][RW-1:0] rd_addr,
  output logic [NRD-1:0][W-1:0]  rd_data,
  input  logic [NWR-1:0]         wr_en,
  input  logic [NWR-1:0][RW-1:0] wr_addr,
  input  logic [NWR-1:0][W-1:0]  wr_data
);
  logic [W-1:0] regs [NREG];

  // Write access network: per-register port select
  logic [NREG-1:0]     reg_we;
  logic [W-1:0]        reg_wd [NREG];

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      reg_we[r] = 1'b0;
      reg_wd[r] = regs[r];
      for (int p = 0; p < NWR; p++) begin
        if (wr_en[p] && (wr_addr[p] == RW'(r))) begin
          reg_we[r] = 1'b1;
          reg_wd[r] = wr_data[p];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else begin
      for (int r = 0; r < NREG; r++)
        if (reg_we[r]) regs[r] <= reg_wd[r];
    end
  end

  // Read access network: one NREG-to-1 multiplexer per read port
  always_comb begin
    for (int p = 0; p < NRD; p++) rd_data[p] = regs[rd_addr[p]];
  end
endmodule
