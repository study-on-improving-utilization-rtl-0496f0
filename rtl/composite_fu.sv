// composite_fu: cascade of primitive functional units (composite FU).
//
// The units named by ORDER are chained: the first unit takes operand 0 (and
// operand 1 if it is an adder or multiplier); every later adder or multiplier
// takes the previous unit's result and the next operand; a shifter takes only the
// previous result. With the default ORDER = {M, S, A} one instruction computes
//     result = ((opnd[0] * opnd[1]) shifted by shamt) +/- opnd[2]
// using 3 register read ports and 1 write port. Any unit can be bypassed with its
// enable low (the design's "multiply by one, shift by zero, add zero"), so the
// same hardware also executes the sub-functions MS, MA, SA, M, S and A. A bypassed
// first unit passes operand 0 on. With every unit bypassed the instruction is a
// register move of operand 0.
//
// Pipelining follows the design's flow: the cascade is written as one
// combinational block and STAGES-1 register stages are placed behind it, to be
// distributed into the logic by register retiming during synthesis. Latency is
// therefore STAGES-1 clock cycles from in_valid to out_valid (STAGES = 1 gives a
// combinational unit); one operation can enter every cycle. A TAGW-bit tag travels
// with each operation so the caller can route the result (thread, destination).
//
// Arrangements other than MSA (for instance the four-unit AMSA) are obtained by
// overriding NFU and ORDER; NRD follows from them.
module composite_fu #(
  parameter int unsigned W      = cfu_pkg::W,
  parameter int unsigned NFU    = cfu_pkg::NFU,
  parameter cfu_pkg::fu_kind_e ORDER [NFU] = cfu_pkg::ARRANGEMENT,
  parameter int unsigned NRD    = cfu_pkg::NRD,
  parameter int unsigned STAGES = cfu_pkg::FU_STAGES_DEFAULT,
  parameter int unsigned TAGW   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  cfu_pkg::fu_ctrl_t [NFU-1:0]      ctrl,
  input  logic [NRD-1:0][W-1:0]   opnd,
  input  logic [TAGW-1:0]         tag_in,
  output logic                    out_valid,
  output logic [W-1:0]            result,
  output logic [TAGW-1:0]         tag_out
);

  // Operand index feeding the second input of the unit at position pos
  function automatic int unsigned src2_index(int unsigned pos);
    int unsigned n;
    n = (ORDER[0] == cfu_pkg::FU_SHF) ? 1 : 2;
    for (int unsigned k = 1; k < pos; k++)
      if (ORDER[k] != cfu_pkg::FU_SHF) n++;
    return (pos == 0) ? 1 : n;
  endfunction

  // chain[i] is the input of unit i; chain[NFU] is the cascade output
  logic [W-1:0] chain [NFU+1];
  assign chain[0] = opnd[0];

  for (genvar i = 0; i < NFU; i++) begin : g_unit
    localparam int unsigned S2 = src2_index(i);
    logic [W-1:0] unit_out;

    if (ORDER[i] == cfu_pkg::FU_SHF) begin : g_shf
      cfu_shifter #(.W(W)) u_shf (
        .src1(chain[i]), .shamt(ctrl[i].shamt), .dest(unit_out));
    end else if (ORDER[i] == cfu_pkg::FU_MUL) begin : g_mul
      cfu_multiplier #(.W(W)) u_mul (
        .src1(chain[i]), .src2(opnd[S2]), .dest(unit_out));
    end else begin : g_add
      cfu_adder #(.W(W)) u_add (
        .src1(chain[i]), .src2(opnd[S2]), .sub(ctrl[i].sub), .dest(unit_out));
    end

    assign chain[i+1] = ctrl[i].en ? unit_out : chain[i];
  end

  // STAGES-1 output register stages (retimed into the cascade by synthesis)
  if (STAGES <= 1) begin : g_comb
    assign out_valid = in_valid;
    assign result    = chain[NFU];
    assign tag_out   = tag_in;
  end else begin : g_pipe
    logic            v_q   [STAGES-1];
    logic [W-1:0]    r_q   [STAGES-1];
    logic [TAGW-1:0] t_q   [STAGES-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < STAGES-1; s++) begin
          v_q[s] <= 1'b0;
          r_q[s] <= '0;
          t_q[s] <= '0;
        end
      end else begin
        v_q[0] <= in_valid;
        r_q[0] <= chain[NFU];
        t_q[0] <= tag_in;
        for (int s = 1; s < STAGES-1; s++) begin
          v_q[s] <= v_q[s-1];
          r_q[s] <= r_q[s-1];
          t_q[s] <= t_q[s-1];
        end
      end
    end

    assign out_valid = v_q[STAGES-2];
    assign result    = r_q[STAGES-2];
    assign tag_out   = t_q[STAGES-2];
  end

endmodule
