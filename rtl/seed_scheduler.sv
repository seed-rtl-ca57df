// seed_scheduler: the SEED instruction scheduler (Scalable, Efficient
// Enforcement of Dependences) of an out-of-order core, from the output of the
// register renamer to the issue ports of the functional units.
//
// Instead of a broadcast-based issue queue, unready instructions wait in an
// index-addressed, banked dependence table (dep_table). Each value-producing
// instruction owns one entry of it (its token); a consumer is appended to the
// entry of a producer it waits for. When an instruction is woken, its token
// goes into a FIFO token queue; the next cycle the token indexes the table
// and every dependent stored there is woken in turn. Woken instructions enter
// a small in-order issue buffer, which issues them when their operands are
// available. Wakeup is therefore driven by wakeup, not by select, and needs
// neither tag broadcast nor associative search.
//
// Pipeline, one instruction per cycle from rename:
//   rename  : token_alloc gives the instruction a token and tells it the
//             tokens of its source producers; both scoreboards mark its
//             destination register not ready; load_hit_predictor predicts
//             loads; the instruction enters the dispatch FIFO.
//   dispatch: seed_dispatch sends it to the issue buffer if both sources'
//             producers have woken up (dispatch_scoreboard), else appends it
//             to a producer's entry; failed speculative wakeups come back
//             through the 4-entry re-dispatch queue.
//   wakeup  : seed_wakeup reads up to WAKE_TOKENS entries per cycle.
//   issue   : issue_stage issues in order from the 8-entry issue buffer.
// Squashed instructions are filtered by basic-block ID (bbid_manager) and
// their tokens are reclaimed by restoring a token_alloc checkpoint.
//
// External handshakes:
//   ren_v/ren_rdy   rename hand-off; ren_rdy is combinational and also falls
//                   when no token, checkpoint or dispatch FIFO slot is free.
//   bb_alloc_*      basic-block ID for the front end (decode stalls when
//                   bb_alloc_ok is low); bb_commit_* recycles IDs.
//   mp_*            branch misprediction: the checkpoint taken by the branch
//                   and the branch's basic block. br_ok_* frees a checkpoint.
//   cmp_*           result return of a predicted-miss load or a variable-
//                   latency operation; wakes its dependents.
//   exec_stall      a load predicted to hit missed: hold issue.
//   sx_v/sx_rob     dropped re-dispatch (queue full: lanes 0..NL-1 from wakeup;
//                   entry full: lane NL from dispatch): mark the ROB entry for a soft
//                   exception (refetch from it when it reaches the ROB head).
//   flush           pipeline restart from the ROB head: empties everything.
//   lhp_upd_*       L1 hit/miss outcome of a load, trains the predictor.
//
// From the SEED paper: the structures and the SEED(128) sizes (128 entries
// x 4 sub-entries in 8 single-ported banks, 8-entry issue buffer, 6-wide
// issue with 3/2/5/4 units, 4-entry re-dispatch queue, 8K x 3-bit hit
// predictor, 640 physical registers). Own choices: one instruction per cycle
// from rename, 2 tokens read per cycle, dispatch FIFO of 8, token queue of
// 128, 8 checkpoints, 64 basic-block IDs, the room reservations between
// wakeup and dispatch, synchronous active-low reset.
//
// Lint: the occupancy counts of the FIFOs and the token allocator's free
// count are reported unused (the room checks use the free counts), and the
// predictor's init_busy pin is left open on purpose (the predictor already
// predicts miss while it clears).
module seed_scheduler
  import seed_pkg::*;
#(
  localparam int unsigned NL  = WAKE_TOKENS * SUB_ENTRIES,
  localparam int unsigned NTQ = 2 + NL + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  // rename
  input  logic                    ren_v,
  input  ren_t                    ren,
  output logic                    ren_rdy,
  output logic [CKPT_W-1:0]       ren_ckpt_id,
  // basic blocks
  input  logic                    bb_alloc_v,
  output logic [BBID_W-1:0]       bb_alloc_id,
  output logic                    bb_alloc_ok,
  input  logic                    bb_commit_v,
  input  logic [BBID_W-1:0]       bb_commit_id,
  // branch resolution
  input  logic                    mp_v,
  input  logic [CKPT_W-1:0]       mp_ckpt,
  input  logic [BBID_W-1:0]       mp_bbid,
  input  logic                    br_ok_v,
  input  logic [CKPT_W-1:0]       br_ok_ckpt,
  // load-hit predictor training
  input  logic                    lhp_upd_v,
  input  logic [31:0]             lhp_upd_pc,
  input  logic                    lhp_upd_hit,
  // completion of predicted-miss loads and variable-latency operations
  input  logic                    cmp_v,
  input  logic [TOKEN_W-1:0]      cmp_tok,
  input  logic [PREG_W-1:0]       cmp_dst,
  input  logic [BBID_W-1:0]       cmp_bbid,
  input  logic                    exec_stall,
  // issue
  output logic [ISSUE_WIDTH-1:0]  iss_v,
  output inst_t                   iss_inst [ISSUE_WIDTH],
  // soft exceptions
  output logic [NL:0]             sx_v,
  output logic [ROB_W-1:0]        sx_rob [NL+1],
  output seed_events_t            ev
);
  logic [NUM_BBID-1:0] bb_valid;

  // ------------------------------------------------------------ rename
  logic [TOKEN_W-1:0] src_tok [2];
  logic [TOKEN_W-1:0] alloc_tok;
  logic               alloc_ok, ckpt_ok, pred_hit, ren_fire;
  logic [$clog2(DISP_FIFO+1)-1:0] df_free, df_count;
  logic [$clog2(DT_ENTRIES+1)-1:0] tok_free_count;
  logic [WAKE_TOKENS-1:0]          dealloc_v;
  logic [TOKEN_W-1:0]              dealloc_tok [WAKE_TOKENS];
  inst_t                           ren_inst;

  assign ren_rdy  = (df_free != '0) && (!ren.dst_v || alloc_ok) &&
                    (!ren.is_branch || ckpt_ok) && !mp_v && !flush;
  assign ren_fire = ren_v && ren_rdy;

  token_alloc u_tok (
    .clk, .rst_n, .flush,
    .rd_lreg('{ren.src1_l, ren.src2_l}), .rd_tok(src_tok),
    .alloc_v(ren_fire && ren.dst_v), .alloc_lreg(ren.dst_l),
    .alloc_tok, .alloc_ok,
    .dealloc_v, .dealloc_tok,
    .ckpt_v(ren_fire && ren.is_branch), .ckpt_id(ren_ckpt_id), .ckpt_ok,
    .restore_v(mp_v), .restore_id(mp_ckpt),
    .release_v(br_ok_v), .release_id(br_ok_ckpt),
    .free_count(tok_free_count)
  );

  load_hit_predictor u_lhp (
    .clk, .rst_n,
    .lk_pc(ren.pc), .lk_hit(pred_hit), .init_busy(),
    .upd_v(lhp_upd_v), .upd_pc(lhp_upd_pc), .upd_hit(lhp_upd_hit)
  );

  bbid_manager u_bb (
    .clk, .rst_n, .flush,
    .alloc_v(bb_alloc_v), .alloc_id(bb_alloc_id), .alloc_ok(bb_alloc_ok),
    .commit_v(bb_commit_v), .commit_id(bb_commit_id),
    .mispred_v(mp_v), .mispred_id(mp_bbid),
    .valid(bb_valid)
  );

  always_comb begin
    ren_inst          = '0;
    ren_inst.rob      = ren.rob;
    ren_inst.bbid     = ren.bbid;
    ren_inst.fu       = ren.fu;
    ren_inst.lat      = ren.lat;
    ren_inst.is_load  = ren.is_load;
    ren_inst.pred_hit = ren.is_load && pred_hit;   // predicts miss while the table clears
    ren_inst.long_lat = ren.long_lat;
    ren_inst.src1_v   = ren.src1_v;
    ren_inst.src1     = ren.src1_p;
    ren_inst.src1_tok = src_tok[0];
    ren_inst.src2_v   = ren.src2_v;
    ren_inst.src2     = ren.src2_p;
    ren_inst.src2_tok = src_tok[1];
    ren_inst.dst_v    = ren.dst_v;
    ren_inst.dst      = ren.dst_p;
    ren_inst.dst_tok  = alloc_tok;
    ren_inst.spec     = 1'b0;
  end

  // ------------------------------------------------------------ queues
  inst_t       df_head [1];
  logic [0:0]  df_head_v;
  inst_t       rq_head [1];
  logic [0:0]  rq_head_v;
  logic [1:0]  cand_pop;
  logic [$clog2(REDISP_Q+1)-1:0] rq_free, rq_count;

  mp_fifo #(.T(inst_t), .DEPTH(DISP_FIFO), .PUSH_N(1), .POP_N(1)) u_disp_fifo (
    .clk, .rst_n, .flush,
    .push_v(ren_fire), .push_d('{ren_inst}),
    .pop_cnt(cand_pop[1]), .head_d(df_head), .head_v(df_head_v),
    .count(df_count), .free(df_free)
  );

  logic [NL-1:0] rq_push_v;
  inst_t         rq_push_d [NL];

  mp_fifo #(.T(inst_t), .DEPTH(REDISP_Q), .PUSH_N(NL), .POP_N(1)) u_redisp_q (
    .clk, .rst_n, .flush,
    .push_v(rq_push_v), .push_d(rq_push_d),
    .pop_cnt(cand_pop[0]), .head_d(rq_head), .head_v(rq_head_v),
    .count(rq_count), .free(rq_free)
  );

  // token queue: lanes 0-1 dispatch, 2..NL+1 wakeup, NL+2 completion
  logic [NTQ-1:0] tq_push_v;
  tokq_t          tq_push_d [NTQ];
  tokq_t          tq_head [WAKE_TOKENS];
  logic [WAKE_TOKENS-1:0] tq_head_v;
  logic [$clog2(WAKE_TOKENS+1)-1:0] tq_pop;
  logic [$clog2(DT_ENTRIES+1)-1:0]  tq_free, tq_count;

  mp_fifo #(.T(tokq_t), .DEPTH(DT_ENTRIES), .PUSH_N(NTQ), .POP_N(WAKE_TOKENS)) u_tokq (
    .clk, .rst_n, .flush,
    .push_v(tq_push_v), .push_d(tq_push_d),
    .pop_cnt(tq_pop), .head_d(tq_head), .head_v(tq_head_v),
    .count(tq_count), .free(tq_free)
  );

  // ------------------------------------------------------------ depTable
  logic [1:0]             ins_v;
  logic [TOKEN_W-1:0]     ins_tok  [2];
  inst_t                  ins_inst [2];
  logic [WAKE_TOKENS-1:0] rd_v;
  logic [TOKEN_W-1:0]     rd_tok [WAKE_TOKENS];
  logic [CNT_W-1:0]       rd_cnt [WAKE_TOKENS];
  inst_t                  rd_sub [WAKE_TOKENS][SUB_ENTRIES];
  logic [TOKEN_W-1:0]     lk_tok [4];
  logic [CNT_W-1:0]       lk_cnt [4];

  dep_table #(.N_INS(2), .N_RD(WAKE_TOKENS), .N_LK(4)) u_dt (
    .clk, .rst_n, .flush,
    .ins_v, .ins_tok, .ins_inst,
    .rd_v, .rd_tok, .rd_cnt, .rd_sub,
    .lk_tok, .lk_cnt,
    .rst_v(ren_fire && ren.dst_v), .rst_tok(alloc_tok)
  );

  // ------------------------------------------------------------ scoreboard
  localparam int unsigned NSBRD = 4 + 2 * NL;
  logic [PREG_W-1:0] sb_rd_reg [NSBRD];
  logic [NSBRD-1:0]  sb_rd_rdy;
  logic [PREG_W-1:0] sb_set_reg [NTQ];
  logic [PREG_W-1:0] dp_sb_reg [4];
  logic [PREG_W-1:0] wk_sb_reg [2*NL];

  always_comb begin
    for (int i = 0; i < 4; i++)    sb_rd_reg[i]     = dp_sb_reg[i];
    for (int i = 0; i < 2*NL; i++) sb_rd_reg[4 + i] = wk_sb_reg[i];
    for (int i = 0; i < NTQ; i++)  sb_set_reg[i]    = tq_push_d[i].dst;
  end

  dispatch_scoreboard #(.N_SET(NTQ), .N_CLR(1), .N_RD(NSBRD)) u_dsb (
    .clk, .rst_n, .flush,
    .clr_v(ren_fire && ren.dst_v), .clr_reg('{ren.dst_p}),
    .set_v(tq_push_v), .set_reg(sb_set_reg),
    .rd_reg(sb_rd_reg), .rd_rdy(sb_rd_rdy)
  );

  // ------------------------------------------------------------ wakeup
  logic [DT_BANKS-1:0] bank_busy;
  logic [NL-1:0]       wk_ib_v, wk_tq_v;
  inst_t               wk_ib_d [NL];
  tokq_t               wk_tq_d [NL];
  logic [4:0]          wk_ib_used, wk_ib_budget, dp_ib_budget;
  logic [7:0]          wk_tq_used, wk_tq_budget, dp_tq_budget;
  logic [$clog2(ISSUE_BUF+1)-1:0] ib_free;
  logic [3:0]          ev_wk_wp, ev_dp_wp, ev_is_wp, ev_wk_ovf;

  assign wk_ib_budget = (int'(ib_free) > 2) ? 5'(int'(ib_free) - 2) : 5'd0;
  assign wk_tq_budget = (int'(tq_free) > 3) ? 8'(int'(tq_free) - 3) : 8'd0;
  assign dp_ib_budget = 5'(int'(ib_free) - int'(wk_ib_used));
  assign dp_tq_budget = (int'(tq_free) > 1 + int'(wk_tq_used)) ?
                        8'(int'(tq_free) - 1 - int'(wk_tq_used)) : 8'd0;

  seed_wakeup u_wk (
    .tq_head, .tq_head_v, .tq_pop, .bb_valid,
    .ib_budget(wk_ib_budget), .tq_budget(wk_tq_budget), .rq_free(3'(rq_free)),
    .rd_v, .rd_tok, .rd_cnt, .rd_sub, .bank_busy,
    .sb_rd_reg(wk_sb_reg), .sb_rd_rdy(sb_rd_rdy[4 +: 2*NL]),
    .dealloc_v,
    .ib_push_v(wk_ib_v), .ib_push_d(wk_ib_d),
    .tq_push_v(wk_tq_v), .tq_push_d(wk_tq_d),
    .rq_push_v, .rq_push_d,
    .sx_v(sx_v[NL-1:0]), .sx_rob(sx_rob[0:NL-1]),
    .ib_used(wk_ib_used), .tq_used(wk_tq_used),
    .ev_tokens(ev.woken_tokens), .ev_insts(ev.woken_insts),
    .ev_redisp(ev.redispatch), .ev_overflow(ev_wk_ovf), .ev_wp(ev_wk_wp)
  );
  assign dealloc_tok = rd_tok;

  // ------------------------------------------------------------ dispatch
  logic [1:0]  dp_ib_v, dp_tq_v;
  inst_t       dp_ib_d [2];
  tokq_t       dp_tq_d [2];

  seed_dispatch u_dp (
    .clk, .rst_n,
    .cand('{rq_head[0], df_head[0]}), .cand_v({df_head_v[0], rq_head_v[0]}),
    .cand_pop, .bb_valid,
    .sb_rd_reg(dp_sb_reg), .sb_rd_rdy(sb_rd_rdy[3:0]),
    .lk_tok, .lk_cnt,
    .bank_busy,
    .ib_budget(dp_ib_budget), .tq_budget(dp_tq_budget),
    .ins_v, .ins_tok, .ins_inst,
    .ib_push_v(dp_ib_v), .ib_push_d(dp_ib_d),
    .tq_push_v(dp_tq_v), .tq_push_d(dp_tq_d),
    .ev_direct(ev.direct), .ev_inserted(ev.inserted), .ev_spec(ev.spec_queued),
    .ev_bank_conflict(ev.bank_conflict), .ev_entry_full(ev.entry_full),
    .ev_wp(ev_dp_wp),
    .sx_v(sx_v[NL]), .sx_rob(sx_rob[NL])
  );

  // token queue lanes
  always_comb begin
    tq_push_v[1:0] = dp_tq_v;
    tq_push_d[0]   = dp_tq_d[0];
    tq_push_d[1]   = dp_tq_d[1];
    for (int l = 0; l < NL; l++) begin
      tq_push_v[2 + l] = wk_tq_v[l];
      tq_push_d[2 + l] = wk_tq_d[l];
    end
    tq_push_v[NL + 2] = cmp_v && bb_valid[cmp_bbid];
    tq_push_d[NL + 2] = '{tok: cmp_tok, dst: cmp_dst, bbid: cmp_bbid};
  end

  // ------------------------------------------------------------ issue
  localparam int unsigned NIB = 2 + NL;
  logic [NIB-1:0] ib_push_v;
  inst_t          ib_push_d [NIB];

  always_comb begin
    ib_push_v[1:0] = dp_ib_v;
    ib_push_d[0]   = dp_ib_d[0];
    ib_push_d[1]   = dp_ib_d[1];
    for (int l = 0; l < NL; l++) begin
      ib_push_v[2 + l] = wk_ib_v[l];
      ib_push_d[2 + l] = wk_ib_d[l];
    end
  end

  issue_stage #(.PUSH_N(NIB)) u_iss (
    .clk, .rst_n, .flush,
    .push_v(ib_push_v), .push_d(ib_push_d), .free(ib_free),
    .bb_valid, .exec_stall,
    .alloc_v(ren_fire && ren.dst_v), .alloc_reg(ren.dst_p),
    .cmp_v, .cmp_reg(cmp_dst),
    .iss_v, .iss_inst,
    .ev_issued(ev.issued), .ev_wp(ev_is_wp), .ev_interlock(ev.interlock)
  );

  assign ev.wp_dropped = ev_wk_wp + ev_dp_wp + ev_is_wp;
  assign ev.overflow   = ev_wk_ovf + 4'(sx_v[NL]);
endmodule
