// cfu_pkg: shared types and constants of the composite-FU IMT datapath.
//
// The datapath is 16 bits wide and every thread context owns a register file of
// 16 registers, as in the design's register-file and ping-pong experiments. The
// composite functional unit cascades one multiplier, one shifter and one adder in
// the order M -> S -> A (the "MSA" arrangement with the best operations per cycle
// among the three-unit arrangements). It needs 3 read ports and 1 write port.
//
// The instruction word is this design's own encoding: the source only names the
// sub-functions of the composite unit (MSA, MS, MA, SA, M, S, A) and says the
// load/store work is decoupled from the arithmetic. Each instruction therefore
// carries one composite-FU operation, at most one load, at most one store of the
// FU result and a halt flag.
package cfu_pkg;

  // Datapath and storage sizes
  parameter int unsigned W        = 16;   // word width of FUs and register files
  parameter int unsigned NREG     = 16;   // registers per thread register file
  parameter int unsigned RW       = $clog2(NREG);
  parameter int unsigned DM_DEPTH = 4096; // data memory words
  parameter int unsigned AW       = $clog2(DM_DEPTH);
  parameter int unsigned IM_DEPTH = 256;  // instruction memory words
  parameter int unsigned IAW      = $clog2(IM_DEPTH);

  // Primitive functional unit kinds
  typedef enum logic [1:0] {
    FU_ADD = 2'd0,
    FU_MUL = 2'd1,
    FU_SHF = 2'd2
  } fu_kind_e;

  // Composite FU arrangement: position 0 is the first unit of the cascade
  parameter int unsigned NFU = 3;
  parameter fu_kind_e ARRANGEMENT [NFU] = '{FU_MUL, FU_SHF, FU_ADD};

  // Number of operands (register read ports) an arrangement needs: the first
  // unit takes one (shifter) or two (adder, multiplier) operands; every later
  // adder or multiplier takes one more, the shifter none.
  function automatic int unsigned num_operands(fu_kind_e arr [NFU]);
    int unsigned n;
    n = (arr[0] == FU_SHF) ? 1 : 2;
    for (int i = 1; i < NFU; i++)
      if (arr[i] != FU_SHF) n++;
    return n;
  endfunction

  parameter int unsigned NRD = num_operands(ARRANGEMENT);

  // Pipeline depth of the composite FU; interleaved multithreading uses one
  // thread per stage so that no instruction waits on its predecessor.
  parameter int unsigned FU_STAGES_DEFAULT = 2;

  // Per-unit control of the cascade. A unit whose enable is low is bypassed
  // (multiply by one, add zero, shift by zero).
  typedef struct packed {
    logic             en;     // unit performs its operation
    logic             sub;    // adder: 1 = src1 - src2, 0 = src1 + src2
    logic signed [3:0] shamt; // shifter: -8..-1 left by |shamt|, 0..7 right
  } fu_ctrl_t;

  typedef struct packed {
    logic                   halt;    // thread stops after this instruction
    logic                   ld_en;   // load DM[base + ld_off] into ld_rd
    logic [RW-1:0]          ld_rd;
    logic [AW-1:0]          ld_off;
    logic                   st_en;   // store FU result to DM[base + st_off]
    logic [AW-1:0]          st_off;
    logic                   wb_en;   // write FU result to rd
    logic [RW-1:0]          rd;
    logic [NRD-1:0][RW-1:0] rs;      // operand registers, rs[0] feeds the first unit
    fu_ctrl_t [NFU-1:0]     fu;      // fu[i] controls ARRANGEMENT[i]
  } instr_t;

  parameter int unsigned IW = $bits(instr_t);

endpackage
