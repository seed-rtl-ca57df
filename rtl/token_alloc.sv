// token_alloc: allocation of depTable entries ("tokens") by renaming. Every
// instruction that writes a register takes a free token at rename; a token
// alias table indexed by logical register remembers the token of the latest
// producer of each register, so that a consumer learns under which entry it
// has to wait. An instruction gives its token back when it performs its
// wakeup (the entry is then empty and can be reused at once, long before the
// physical register would be recycled).
//
// Branch recovery: a branch takes a checkpoint of the alias table. The free
// list is a bit vector (1 = free) with a lowest-index-first allocator; each
// live checkpoint also records which tokens were handed out after it. A
// misprediction restores the alias table and ORs that record back into the
// free list, which reclaims all wrong-path entries in one step, the same
// effect as restoring the read pointer of a circular free list. The OR form
// stays correct when a wrong-path instruction has already returned its token
// before the branch resolved. Checkpoints younger than the restored one are
// dropped with it.
//
// Interface and timing: rd_tok, alloc_tok/alloc_ok and ckpt_id/ckpt_ok are
// combinational; all state changes happen at the clock edge. A checkpoint
// taken in the same cycle as an allocation includes that allocation's table
// update. alloc_v, ckpt_v must not coincide with restore_v.
//
// From the SEED paper: an alias table indexed by logical register, a free
// list, checkpoints for misprediction recovery, release after wakeup. Own
// choices: a bit-vector free list with per-checkpoint 'allocated since' masks
// (same effect as restoring the free-list read pointer), lowest-free
// allocation, 64 logical registers, 8 checkpoints.
module token_alloc
  import seed_pkg::*;
#(
  parameter int unsigned NTOK   = DT_ENTRIES,
  parameter int unsigned NLREG  = NUM_LREGS,
  parameter int unsigned NCKPT  = NUM_CKPT,
  parameter int unsigned N_FREE = WAKE_TOKENS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flush,        // every token free again
  // alias table lookup for the two sources
  input  logic [LREG_W-1:0]           rd_lreg [2],
  output logic [TOKEN_W-1:0]          rd_tok  [2],
  // allocation for the destination
  input  logic                        alloc_v,
  input  logic [LREG_W-1:0]           alloc_lreg,
  output logic [TOKEN_W-1:0]          alloc_tok,
  output logic                        alloc_ok,
  // release after wakeup
  input  logic [N_FREE-1:0]           dealloc_v,
  input  logic [TOKEN_W-1:0]          dealloc_tok [N_FREE],
  // checkpoints
  input  logic                        ckpt_v,
  output logic [CKPT_W-1:0]           ckpt_id,
  output logic                        ckpt_ok,
  input  logic                        restore_v,
  input  logic [CKPT_W-1:0]           restore_id,
  input  logic                        release_v,
  input  logic [CKPT_W-1:0]           release_id,
  output logic [$clog2(NTOK+1)-1:0]   free_count
);
  logic [TOKEN_W-1:0] tab      [NLREG];
  logic [TOKEN_W-1:0] ck_tab   [NCKPT][NLREG];
  logic [NTOK-1:0]    ck_after [NCKPT];
  logic [NCKPT-1:0]   ck_live;
  logic [NCKPT-1:0]   ck_younger [NCKPT];
  logic [NTOK-1:0]    free_v;

  assign rd_tok[0] = tab[rd_lreg[0]];
  assign rd_tok[1] = tab[rd_lreg[1]];

  always_comb begin
    alloc_ok  = |free_v;
    alloc_tok = '0;
    for (int t = NTOK - 1; t >= 0; t--)
      if (free_v[t]) alloc_tok = TOKEN_W'(t);
    ckpt_ok = !(&ck_live);
    ckpt_id = '0;
    for (int c = NCKPT - 1; c >= 0; c--)
      if (!ck_live[c]) ckpt_id = CKPT_W'(c);
    free_count = '0;
    for (int t = 0; t < NTOK; t++) free_count += ($clog2(NTOK+1))'(free_v[t]);
  end

  logic do_alloc, do_ckpt;
  assign do_alloc = alloc_v && alloc_ok && !restore_v;
  assign do_ckpt  = ckpt_v && ckpt_ok && !restore_v;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      free_v  <= '1;
      ck_live <= '0;
      for (int l = 0; l < NLREG; l++) tab[l] <= '0;
      for (int c = 0; c < NCKPT; c++) begin
        ck_after[c]   <= '0;
        ck_younger[c] <= '0;
      end
    end else begin
      for (int i = 0; i < N_FREE; i++)
        if (dealloc_v[i]) free_v[dealloc_tok[i]] <= 1'b1;

      if (restore_v) begin
        for (int l = 0; l < NLREG; l++) tab[l] <= ck_tab[restore_id][l];
        for (int t = 0; t < NTOK; t++)
          if (ck_after[restore_id][t]) free_v[t] <= 1'b1;
        for (int c = 0; c < NCKPT; c++)
          if (c == int'(restore_id) || ck_younger[restore_id][c]) ck_live[c] <= 1'b0;
      end else begin
        if (do_alloc) begin
          free_v[alloc_tok]  <= 1'b0;
          tab[alloc_lreg]    <= alloc_tok;
          for (int c = 0; c < NCKPT; c++)
            if (ck_live[c]) ck_after[c][alloc_tok] <= 1'b1;
        end
        if (release_v) begin
          ck_live[release_id] <= 1'b0;
          for (int c = 0; c < NCKPT; c++) ck_younger[c][release_id] <= 1'b0;
        end
        if (do_ckpt) begin
          ck_live[ckpt_id]    <= 1'b1;
          ck_after[ckpt_id]   <= '0;
          ck_younger[ckpt_id] <= '0;
          for (int c = 0; c < NCKPT; c++)
            if (ck_live[c]) ck_younger[c][ckpt_id] <= 1'b1;
          for (int l = 0; l < NLREG; l++)
            ck_tab[ckpt_id][l] <= (do_alloc && l == int'(alloc_lreg)) ? alloc_tok : tab[l];
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n && !flush) begin
      assert (!(restore_v && !ck_live[restore_id]))
        else $error("token_alloc: restore of a checkpoint that is not live");
      for (int i = 0; i < N_FREE; i++)
        assert (!(dealloc_v[i] && free_v[dealloc_tok[i]] && !restore_v))
          else $error("token_alloc: token %0d released twice", dealloc_tok[i]);
    end
endmodule
