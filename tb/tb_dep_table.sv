// tb_dep_table: random insertions, wakeup reads and entry resets on the full
// 128-entry, 8-bank, 4-sub-entry table, obeying the one-access-per-bank rule,
// against reference lists of dependents per entry. Checks for every read that
// the fill count and the dependents come out in insertion order, that the
// entry is empty afterwards, and every fill-count lookup.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_dep_table;
  import seed_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [1:0]         ins_v, rd_v;
  logic [TOKEN_W-1:0] ins_tok [2], rd_tok [2], lk_tok [4];
  inst_t              ins_inst [2];
  logic [CNT_W-1:0]   rd_cnt [2], lk_cnt [4];
  inst_t              rd_sub [2][SUB_ENTRIES];
  logic               rst_v;
  logic [TOKEN_W-1:0] rst_tok;

  dep_table dut (.*);

  inst_t ref_e [DT_ENTRIES][$];
  int checks = 0, failures = 0, n_full_reads = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic inst_t rnd_inst();
    inst_t d;
    d = '0;
    d.rob = ROB_W'($urandom); d.dst = PREG_W'($urandom_range(NUM_PREGS-1));
    d.src1 = PREG_W'($urandom_range(NUM_PREGS-1)); d.dst_tok = TOKEN_W'($urandom);
    d.bbid = BBID_W'($urandom); d.spec = $urandom_range(1);
    return d;
  endfunction

  initial begin
    ins_v = '0; rd_v = '0; rst_v = 0; rst_tok = '0;
    foreach (ins_tok[i]) begin ins_tok[i] = '0; rd_tok[i] = '0; ins_inst[i] = '0; end
    foreach (lk_tok[i]) lk_tok[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 15000; c++) begin
      bit used [DT_BANKS];
      bit tok_used [DT_ENTRIES];
      @(negedge clk);
      foreach (used[b]) used[b] = 0;
      foreach (tok_used[t]) tok_used[t] = 0;
      // hot set of 24 tokens so that entries fill up
      for (int i = 0; i < 2; i++) begin
        logic [TOKEN_W-1:0] t;
        t = TOKEN_W'($urandom_range(23) * 5);
        rd_tok[i] = t;
        rd_v[i] = ($urandom_range(99) < 30) && !used[bank_of(t)] && !tok_used[t];
        if (rd_v[i]) begin used[bank_of(t)] = 1; tok_used[t] = 1; end
      end
      for (int i = 0; i < 2; i++) begin
        logic [TOKEN_W-1:0] t;
        t = TOKEN_W'($urandom_range(23) * 5);
        ins_tok[i] = t;
        ins_inst[i] = rnd_inst();
        ins_v[i] = ($urandom_range(99) < 70) && !used[bank_of(t)] && !tok_used[t] &&
                   ref_e[t].size() < SUB_ENTRIES;
        if (ins_v[i]) begin used[bank_of(t)] = 1; tok_used[t] = 1; end
      end
      rst_tok = TOKEN_W'($urandom_range(DT_ENTRIES-1));
      rst_v = ($urandom_range(99) < 3) && !tok_used[rst_tok];
      for (int i = 0; i < 4; i++) lk_tok[i] = TOKEN_W'($urandom_range(23) * 5);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(lk_cnt[i]) != ref_e[lk_tok[i]].size()) begin
          failures++; $display("lookup %0d: %0d expected %0d", lk_tok[i], lk_cnt[i], ref_e[lk_tok[i]].size());
        end
      end
      for (int i = 0; i < 2; i++) if (rd_v[i]) begin
        checks++;
        if (int'(rd_cnt[i]) != ref_e[rd_tok[i]].size()) begin
          failures++; $display("read %0d: count %0d expected %0d", rd_tok[i], rd_cnt[i], ref_e[rd_tok[i]].size());
        end
        if (ref_e[rd_tok[i]].size() == SUB_ENTRIES) n_full_reads++;
        foreach (ref_e[rd_tok[i]][s]) begin
          checks++;
          if (rd_sub[i][s] != ref_e[rd_tok[i]][s]) begin
            failures++; $display("read %0d sub %0d differs", rd_tok[i], s);
          end
        end
      end
      @(posedge clk); #1;
      for (int i = 0; i < 2; i++) if (rd_v[i]) ref_e[rd_tok[i]].delete();
      for (int i = 0; i < 2; i++) if (ins_v[i]) ref_e[ins_tok[i]].push_back(ins_inst[i]);
      if (rst_v) ref_e[rst_tok].delete();
      ins_v = '0; rd_v = '0; rst_v = 0;
    end
    checks++;
    if (n_full_reads == 0) begin failures++; $display("no full entry was read"); end
    $display("full entries read: %0d", n_full_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
