// tb_load_hit_predictor: after the 8192-cycle table clear, trains random
// PCs with hits and misses and compares every prediction with a reference
// array of 3-bit counters (hit increments and saturates, miss clears,
// predict hit only at 7). Also checks that nothing is predicted to hit while
// the table is being cleared and that the clear takes 8192 cycles.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_load_hit_predictor;
  import seed_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] lk_pc, upd_pc;
  logic        lk_hit, init_busy, upd_v, upd_hit;
  int ctr [LHP_ENTRIES];
  int checks = 0, failures = 0, init_cycles = 0, hits = 0;

  load_hit_predictor dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ix(logic [31:0] pc);
    return int'(pc[14:2]);
  endfunction

  initial begin
    lk_pc = '0; upd_pc = '0; upd_v = 0; upd_hit = 0;
    for (int i = 0; i < LHP_ENTRIES; i++) ctr[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (init_busy) begin
      @(negedge clk);
      lk_pc = $urandom;
      checks++;
      if (lk_hit) begin failures++; $display("hit predicted during clear"); end
      init_cycles++;
      @(posedge clk); #1;
    end
    checks++;
    if (init_cycles != LHP_ENTRIES) begin
      failures++; $display("clear took %0d cycles", init_cycles);
    end
    for (int c = 0; c < 8000; c++) begin
      logic [31:0] pc;
      @(negedge clk);
      pc = 32'h4000_0000 | (32'($urandom_range(31)) << 2) | (32'($urandom_range(3)) << 15);
      lk_pc = pc;
      #1;
      checks++;
      if (lk_hit != (ctr[ix(pc)] == 7)) begin
        failures++; $display("pc %h: predicted %0d counter %0d", pc, lk_hit, ctr[ix(pc)]);
      end
      hits += int'(lk_hit);
      upd_v = 1; upd_pc = pc; upd_hit = ($urandom_range(9) != 0);
      @(posedge clk); #1;
      if (!upd_hit) ctr[ix(upd_pc)] = 0;
      else if (ctr[ix(upd_pc)] < 7) ctr[ix(upd_pc)]++;
      upd_v = 0;
    end
    checks++;
    if (hits == 0) begin failures++; $display("no hit was ever predicted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
