// tb_token_alloc: random renaming traffic against a reference model of the
// token alias table, the free list (lowest free token first) and the branch
// checkpoints. Each cycle it may allocate, release up to two allocated
// tokens, take a checkpoint, release one, or restore one; it checks the
// looked-up source tokens, the offered token and checkpoint, the free count,
// and after a restore that the table is back and every token handed out
// after the checkpoint is free again (including tokens already released).
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_token_alloc;
  import seed_pkg::*;
  localparam int NT = DT_ENTRIES, NLR = 8, NC = NUM_CKPT;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [LREG_W-1:0]  rd_lreg [2];
  logic [TOKEN_W-1:0] rd_tok [2];
  logic               alloc_v, alloc_ok, ckpt_v, ckpt_ok, restore_v, release_v;
  logic [LREG_W-1:0]  alloc_lreg;
  logic [TOKEN_W-1:0] alloc_tok;
  logic [1:0]         dealloc_v;
  logic [TOKEN_W-1:0] dealloc_tok [2];
  logic [CKPT_W-1:0]  ckpt_id, restore_id, release_id;
  logic [$clog2(NT+1)-1:0] free_count;

  token_alloc dut (.*);

  bit free_r [NT];
  int tab_r [64];
  bit ck_live_r [NC];
  int ck_tab_r [NC][64];
  bit ck_after_r [NC][NT];
  int ck_seq_r [NC];
  int seq = 0;
  int checks = 0, failures = 0, n_restore = 0, n_full = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int lowest, nfree, lowc;
    alloc_v = 0; ckpt_v = 0; restore_v = 0; release_v = 0; dealloc_v = '0;
    alloc_lreg = '0; restore_id = '0; release_id = '0;
    rd_lreg[0] = '0; rd_lreg[1] = '0; dealloc_tok[0] = '0; dealloc_tok[1] = '0;
    for (int t = 0; t < NT; t++) free_r[t] = 1;
    for (int l = 0; l < 64; l++) tab_r[l] = 0;
    for (int c = 0; c < NC; c++) ck_live_r[c] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 15000; cyc++) begin
      int r, allocated [$], live [$];
      allocated.delete(); live.delete();
      @(negedge clk);
      rd_lreg[0] = LREG_W'($urandom_range(NLR-1));
      rd_lreg[1] = LREG_W'($urandom_range(NLR-1));
      #1;
      lowest = -1; nfree = 0;
      for (int t = NT - 1; t >= 0; t--) if (free_r[t]) begin lowest = t; nfree++; end
      lowc = -1;
      for (int c = NC - 1; c >= 0; c--) if (!ck_live_r[c]) lowc = c;
      chk(int'(rd_tok[0]) == tab_r[rd_lreg[0]] && int'(rd_tok[1]) == tab_r[rd_lreg[1]], "source token lookup");
      chk(alloc_ok == (nfree > 0) && (nfree == 0 || int'(alloc_tok) == lowest),
          $sformatf("alloc %0d/%0d expected %0d/%0d", alloc_ok, alloc_tok, nfree > 0, lowest));
      chk(int'(free_count) == nfree, $sformatf("free count %0d expected %0d", free_count, nfree));
      chk(ckpt_ok == (lowc >= 0) && (lowc < 0 || int'(ckpt_id) == lowc), "checkpoint offer");
      if (nfree == 0) n_full++;
      for (int t = 0; t < NT; t++) if (!free_r[t]) allocated.push_back(t);
      for (int c = 0; c < NC; c++) if (ck_live_r[c]) live.push_back(c);
      // drive
      r = int'($urandom_range(99));
      restore_v = (live.size() > 0) && (r < ((cyc / 1000) % 2 ? 1 : 4));
      alloc_v   = !restore_v && ($urandom_range(99) < ((cyc / 1000) % 2 ? 95 : 45));
      alloc_lreg = LREG_W'($urandom_range(NLR-1));
      ckpt_v    = !restore_v && ($urandom_range(99) < 12);
      release_v = !restore_v && (live.size() > 0) && ($urandom_range(99) < 8);
      if (restore_v) restore_id = CKPT_W'(live[$urandom_range(live.size()-1)]);
      if (release_v) release_id = CKPT_W'(live[$urandom_range(live.size()-1)]);
      dealloc_v = '0;
      if (allocated.size() > 1 && $urandom_range(99) < ((cyc / 1000) % 2 ? 8 : 60)) begin
        int a, b;
        a = $urandom_range(allocated.size()-1);
        b = $urandom_range(allocated.size()-1);
        dealloc_v[0] = 1; dealloc_tok[0] = TOKEN_W'(allocated[a]);
        if (b != a) begin dealloc_v[1] = 1; dealloc_tok[1] = TOKEN_W'(allocated[b]); end
      end
      @(posedge clk); #1;
      // reference update, same order of effects as the description
      for (int i = 0; i < 2; i++) if (dealloc_v[i]) free_r[dealloc_tok[i]] = 1;
      if (restore_v) begin
        int rs;
        n_restore++;
        rs = ck_seq_r[restore_id];
        for (int l = 0; l < 64; l++) tab_r[l] = ck_tab_r[restore_id][l];
        for (int t = 0; t < NT; t++) if (ck_after_r[restore_id][t]) free_r[t] = 1;
        for (int c = 0; c < NC; c++) if (ck_live_r[c] && ck_seq_r[c] >= rs) ck_live_r[c] = 0;
      end else begin
        if (alloc_v && nfree > 0) begin
          free_r[lowest] = 0;
          tab_r[alloc_lreg] = lowest;
          for (int c = 0; c < NC; c++) if (ck_live_r[c]) ck_after_r[c][lowest] = 1;
        end
        if (release_v) ck_live_r[release_id] = 0;
        if (ckpt_v && lowc >= 0) begin
          ck_live_r[lowc] = 1;
          ck_seq_r[lowc] = seq++;
          for (int l = 0; l < 64; l++) ck_tab_r[lowc][l] = tab_r[l];
          for (int t = 0; t < NT; t++) ck_after_r[lowc][t] = 0;
        end
      end
      alloc_v = 0; ckpt_v = 0; restore_v = 0; release_v = 0; dealloc_v = '0;
    end
    chk(n_restore > 0 && n_full > 0, "restore and exhaustion exercised");
    $display("restores=%0d cycles_with_no_free_token=%0d", n_restore, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
