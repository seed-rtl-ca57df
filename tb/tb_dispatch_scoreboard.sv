// tb_dispatch_scoreboard: random clears (register allocation) and sets
// (producer woke) on the full 640-register scoreboard against a reference bit
// array; clear must win over a set of the same register in one cycle, all
// registers start ready and flush makes them ready again.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_dispatch_scoreboard;
  import seed_pkg::*;
  localparam int NS = 3, NR = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [0:0]        clr_v;
  logic [PREG_W-1:0] clr_reg [1];
  logic [NS-1:0]     set_v;
  logic [PREG_W-1:0] set_reg [NS];
  logic [PREG_W-1:0] rd_reg [NR];
  logic [NR-1:0]     rd_rdy;
  bit ref_sb [NUM_PREGS];
  int checks = 0, failures = 0;

  dispatch_scoreboard #(.N_SET(NS), .N_CLR(1), .N_RD(NR)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PREG_W-1:0] rr();
    return PREG_W'($urandom_range(NUM_PREGS - 1) % 24);   // small set: many collisions
  endfunction

  initial begin
    clr_v = '0; set_v = '0;
    clr_reg[0] = '0;
    foreach (set_reg[i]) set_reg[i] = '0;
    foreach (rd_reg[i]) rd_reg[i] = '0;
    for (int p = 0; p < NUM_PREGS; p++) ref_sb[p] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NR; i++) rd_reg[i] = (c % 7 == 0) ? PREG_W'($urandom_range(NUM_PREGS-1)) : rr();
      #1;
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (rd_rdy[i] != ref_sb[rd_reg[i]]) begin
          failures++; $display("cycle %0d reg %0d: %0d expected %0d", c, rd_reg[i], rd_rdy[i], ref_sb[rd_reg[i]]);
        end
      end
      clr_v[0] = $urandom_range(1); clr_reg[0] = rr();
      for (int i = 0; i < NS; i++) begin set_v[i] = $urandom_range(1); set_reg[i] = rr(); end
      if (c % 5 == 0 && clr_v[0]) begin set_v[0] = 1; set_reg[0] = clr_reg[0]; end
      flush = (c == 2000);
      @(posedge clk); #1;
      if (flush) for (int p = 0; p < NUM_PREGS; p++) ref_sb[p] = 1;
      else begin
        for (int i = 0; i < NS; i++) if (set_v[i]) ref_sb[set_reg[i]] = 1;
        if (clr_v[0]) ref_sb[clr_reg[0]] = 0;
      end
      clr_v = '0; set_v = '0; flush = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
