// tb_issue_scoreboard: checks the interlock timing rule of the issue
// scoreboard cycle by cycle against a reference model of "cycle from which
// the register is readable": allocation makes a register not ready, a timed
// producer of latency n issued in cycle t makes it ready for an issue in
// cycle t+n, and a completion in cycle t makes it ready from t+1.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_issue_scoreboard;
  import seed_pkg::*;
  localparam int NI = 2, NR = 6, NP = 16;
  localparam int INF = 1 << 30;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [0:0]        clr_v, cmp_v;
  logic [PREG_W-1:0] clr_reg [1], cmp_reg [1];
  logic [NI-1:0]     iss_v;
  logic [PREG_W-1:0] iss_reg [NI];
  logic [LAT_W-1:0]  iss_lat [NI];
  logic [PREG_W-1:0] rd_reg [NR];
  logic [NR-1:0]     rd_rdy;
  int ready_at [NP];
  int checks = 0, failures = 0, cyc = 0;

  issue_scoreboard #(.N_ISS(NI), .N_CMP(1), .N_CLR(1), .N_RD(NR)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_v = '0; cmp_v = '0; iss_v = '0;
    clr_reg[0] = '0; cmp_reg[0] = '0;
    foreach (iss_reg[i]) begin iss_reg[i] = '0; iss_lat[i] = '0; end
    foreach (rd_reg[i]) rd_reg[i] = '0;
    for (int p = 0; p < NP; p++) ready_at[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int used [NP];
      @(negedge clk);
      cyc++;
      for (int i = 0; i < NR; i++) rd_reg[i] = PREG_W'($urandom_range(NP-1));
      #1;
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (rd_rdy[i] != (cyc >= ready_at[rd_reg[i]])) begin
          failures++;
          $display("cycle %0d reg %0d: rdy %0d, ready from %0d", cyc, rd_reg[i], rd_rdy[i], ready_at[rd_reg[i]]);
        end
      end
      // distinct registers per cycle for the different update kinds
      for (int p = 0; p < NP; p++) used[p] = 0;
      clr_v[0] = ($urandom_range(3) == 0); clr_reg[0] = PREG_W'($urandom_range(NP-1));
      if (clr_v[0]) used[clr_reg[0]] = 1;
      for (int i = 0; i < NI; i++) begin
        iss_reg[i] = PREG_W'($urandom_range(NP-1));
        iss_lat[i] = LAT_W'(1 + $urandom_range(5));
        iss_v[i]   = ($urandom_range(1) == 1) && !used[iss_reg[i]];
        if (iss_v[i]) used[iss_reg[i]] = 1;
      end
      cmp_reg[0] = PREG_W'($urandom_range(NP-1));
      cmp_v[0]   = ($urandom_range(3) == 0) && !used[cmp_reg[0]];
      @(posedge clk); #1;
      if (clr_v[0]) ready_at[clr_reg[0]] = INF;
      for (int i = 0; i < NI; i++) if (iss_v[i]) ready_at[iss_reg[i]] = cyc + int'(iss_lat[i]);
      if (cmp_v[0]) ready_at[cmp_reg[0]] = cyc + 1;
      clr_v = '0; iss_v = '0; cmp_v = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
