// tb_thread_rf: self-checking test of the centralized register file.
//
// Instance A has the default 16 x 16-bit, 3-read/1-write configuration;
// instance B has 2 write ports to exercise the write access network, including
// two ports writing one register (higher port wins). Random reads and writes are
// compared every cycle with an array model; reads are combinational and return
// the pre-write value in a write cycle. Reset must clear every register.
module tb_thread_rf;
  localparam int N = 16, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0][3:0]  ra_a, ra_b;
  logic [2:0][W-1:0] rd_a, rd_b;
  logic [0:0]        we_a;
  logic [0:0][3:0]   wa_a;
  logic [0:0][W-1:0] wd_a;
  logic [1:0]        we_b;
  logic [1:0][3:0]   wa_b;
  logic [1:0][W-1:0] wd_b;

  thread_rf dut_a (.clk, .rst_n, .rd_addr(ra_a), .rd_data(rd_a),
                   .wr_en(we_a), .wr_addr(wa_a), .wr_data(wd_a));
  thread_rf #(.NWR(2)) dut_b (.clk, .rst_n, .rd_addr(ra_b), .rd_data(rd_b),
                   .wr_en(we_b), .wr_addr(wa_b), .wr_data(wd_b));

  logic [W-1:0] ma [N], mb [N];
  int same_reg_writes = 0;

  initial begin
    we_a = '0; we_b = '0; wa_a = '0; wa_b = '0; wd_a = '0; wd_b = '0; ra_a = '0; ra_b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < N; r++) begin ma[r] = '0; mb[r] = '0; end
    // reset check
    for (int r = 0; r < N; r++) begin
      ra_a[0] = 4'(r); ra_b[1] = 4'(r);
      #1;
      checks++;
      if (rd_a[0] !== '0 || rd_b[1] !== '0) begin failures++; $display("FAIL reset r%0d", r); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we_a = 1'($urandom); wa_a = 4'($urandom); wd_a = W'($urandom);
      we_b = 2'($urandom); wa_b = {4'($urandom), 4'($urandom)}; wd_b = {W'($urandom), W'($urandom)};
      if (n % 5 == 0) wa_b[1] = wa_b[0];
      for (int p = 0; p < 3; p++) begin ra_a[p] = 4'($urandom); ra_b[p] = 4'($urandom); end
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_a[p] !== ma[ra_a[p]] || rd_b[p] !== mb[ra_b[p]]) begin
          failures++;
          $display("FAIL read port %0d: a r%0d=%h exp %h, b r%0d=%h exp %h", p,
                   ra_a[p], rd_a[p], ma[ra_a[p]], ra_b[p], rd_b[p], mb[ra_b[p]]);
        end
      end
      @(posedge clk);
      if (we_a[0]) ma[wa_a[0]] = wd_a[0];
      if (we_b[0]) mb[wa_b[0]] = wd_b[0];
      if (we_b[1]) mb[wa_b[1]] = wd_b[1];
      if (we_b == 2'b11 && wa_b[0] == wa_b[1]) same_reg_writes++;
    end
    checks++;
    if (same_reg_writes == 0) begin failures++; $display("FAIL same-register write never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
