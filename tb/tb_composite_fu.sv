// tb_composite_fu: self-checking test of the composite FU cascade.
//
// Three instances: the default MSA unit (multiplier -> shifter -> adder, 2 stages),
// the same unit un-pipelined (1 stage, checked combinationally on the same inputs)
// and a four-unit AMSA unit (adder -> multiplier -> shifter -> adder, 3 stages).
// A new random operation enters each unit every cycle, with random unit enables
// so that all sub-functions (e.g. MSA, MS, MA, SA, M, S, A and the all-bypass
// move) occur. The reference model evaluates the cascade step by step in integer
// arithmetic. The tag carries the issue cycle, so the latency of STAGES-1 cycles
// is checked for every result. Coverage of the seven MSA sub-functions is counted.
module tb_composite_fu;
  import cfu_pkg::*;
  localparam int W = 16;
  localparam int S1 = 2, S2 = 3;
  localparam fu_kind_e ORD2 [4] = '{FU_ADD, FU_MUL, FU_SHF, FU_ADD};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- MSA instance
  logic                v1_in, v1_out;
  fu_ctrl_t [2:0]      c1;
  logic [2:0][W-1:0]   o1;
  logic [15:0]         t1_in, t1_out;
  logic [W-1:0]        r1;
  composite_fu #(.W(W), .STAGES(S1), .TAGW(16)) dut1 (
    .clk, .rst_n, .in_valid(v1_in), .ctrl(c1), .opnd(o1), .tag_in(t1_in),
    .out_valid(v1_out), .result(r1), .tag_out(t1_out));

  // ---- un-pipelined MSA instance, same inputs as dut1
  logic                v0_out;
  logic [15:0]         t0_out;
  logic [W-1:0]        r0;
  composite_fu #(.W(W), .STAGES(1), .TAGW(16)) dut0 (
    .clk, .rst_n, .in_valid(v1_in), .ctrl(c1), .opnd(o1), .tag_in(t1_in),
    .out_valid(v0_out), .result(r0), .tag_out(t0_out));

  // ---- AMSA instance
  logic                v2_in, v2_out;
  fu_ctrl_t [3:0]      c2;
  logic [3:0][W-1:0]   o2;
  logic [15:0]         t2_in, t2_out;
  logic [W-1:0]        r2;
  composite_fu #(.W(W), .NFU(4), .ORDER(ORD2), .NRD(4), .STAGES(S2), .TAGW(16)) dut2 (
    .clk, .rst_n, .in_valid(v2_in), .ctrl(c2), .opnd(o2), .tag_in(t2_in),
    .out_valid(v2_out), .result(r2), .tag_out(t2_out));

  function automatic logic [W-1:0] shf(logic [W-1:0] x, logic signed [3:0] s);
    int v;
    v = int'($signed(x));
    if (s < 0) return W'(v * (1 << (-int'(s))));
    return W'(v >>> int'(s));
  endfunction

  // Reference for an arbitrary arrangement, written independently of the RTL
  function automatic logic [W-1:0] model(fu_kind_e ord [], fu_ctrl_t c [], logic [W-1:0] op []);
    logic [W-1:0] x;
    int k;
    x = op[0];
    k = 1;
    for (int i = 0; i < ord.size(); i++) begin
      logic [W-1:0] b;
      b = '0;
      if (ord[i] != FU_SHF) begin
        b = op[k];
        k++;
      end
      if (c[i].en) begin
        case (ord[i])
          FU_ADD: x = c[i].sub ? x - b : x + b;
          FU_MUL: x = W'(int'($signed(x)) * int'($signed(b)));
          default: x = shf(x, c[i].shamt);
        endcase
      end
    end
    return x;
  endfunction

  logic [W-1:0] exp1 [int], exp2 [int];
  int subfn_seen [8];
  int n_out1 = 0, n_out2 = 0;

  always @(posedge clk) if (rst_n) begin
    if (v1_out) begin
      checks++;
      n_out1++;
      if (!exp1.exists(int'(t1_out)) || r1 !== exp1[int'(t1_out)]) begin
        failures++; $display("FAIL MSA tag %0d result %h", t1_out, r1);
      end
      if (int'(t1_out) != cycle - (S1 - 1)) begin
        failures++; $display("FAIL MSA latency: issued %0d now %0d", t1_out, cycle);
      end
    end
    if (v2_out) begin
      checks++;
      n_out2++;
      if (!exp2.exists(int'(t2_out)) || r2 !== exp2[int'(t2_out)]) begin
        failures++; $display("FAIL AMSA tag %0d result %h", t2_out, r2);
      end
      if (int'(t2_out) != cycle - (S2 - 1)) begin
        failures++; $display("FAIL AMSA latency: issued %0d now %0d", t2_out, cycle);
      end
    end
  end

  initial begin
    static fu_kind_e ord1 [] = '{FU_MUL, FU_SHF, FU_ADD};
    static fu_kind_e ord2 [] = '{FU_ADD, FU_MUL, FU_SHF, FU_ADD};
    fu_ctrl_t  cc [];
    logic [W-1:0] oo [];
    v1_in = 0; v2_in = 0; c1 = '0; c2 = '0; o1 = '0; o2 = '0; t1_in = '0; t2_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      v1_in = ($urandom_range(0, 9) != 0);
      v2_in = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < 3; i++) c1[i] = fu_ctrl_t'($urandom);
      for (int i = 0; i < 4; i++) c2[i] = fu_ctrl_t'($urandom);
      for (int i = 0; i < 3; i++) o1[i] = W'($urandom);
      for (int i = 0; i < 4; i++) o2[i] = W'($urandom);
      if (n % 7 == 0) o1[1] = W'($urandom_range(0, 7));   // small factors too
      t1_in = 16'(cycle);
      t2_in = 16'(cycle);
      cc = new[3]; oo = new[3];
      for (int i = 0; i < 3; i++) begin cc[i] = c1[i]; oo[i] = o1[i]; end
      #1;
      checks++;
      if (v0_out !== v1_in || t0_out !== t1_in || r0 !== model(ord1, cc, oo)) begin
        failures++; $display("FAIL un-pipelined MSA result %h", r0);
      end
      if (v1_in) begin
        exp1[cycle] = model(ord1, cc, oo);
        subfn_seen[{c1[0].en, c1[1].en, c1[2].en}]++;
      end
      cc = new[4]; oo = new[4];
      for (int i = 0; i < 4; i++) begin cc[i] = c2[i]; oo[i] = o2[i]; end
      if (v2_in) exp2[cycle] = model(ord2, cc, oo);
    end
    @(negedge clk);
    v1_in = 0; v2_in = 0;
    repeat (5) @(posedge clk);
    // every sub-function of MSA (and the move) must have been exercised
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (subfn_seen[s] == 0) begin failures++; $display("FAIL sub-function %b never issued", s[2:0]); end
    end
    checks++;
    if (n_out1 != exp1.size() || n_out2 != exp2.size()) begin
      failures++; $display("FAIL result count %0d/%0d vs %0d/%0d", n_out1, n_out2, exp1.size(), exp2.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
