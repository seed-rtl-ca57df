// seed_wakeup: the wakeup stage of SEED. Every cycle it takes up to N_TOK
// tokens from the head of the token queue, reads the depTable entry of each
// and routes the dependents found there. Wakeup is driven by what was woken,
// not by what was selected for execution, so no select logic sits in this
// loop.
//
// Token selection (in queue order, stopping at the first that cannot go):
//  * a token whose owner belongs to a squashed basic block is dropped without
//    a table access;
//  * otherwise the token needs its bank (one access per bank per cycle) and
//    room for all its dependents in the issue buffer and the token queue.
// A read token is released to the token allocator in the same cycle.
//
// Each dependent read out is
//  * dropped if its basic block has been squashed;
//  * re-dispatched if it was queued speculatively (it had two pending sources
//    and waited under one) and the dispatch scoreboard shows the other source
//    still pending; re-dispatches beyond the room in the re-dispatch queue
//    are dropped and reported for a soft exception at commit;
//  * otherwise sent to the issue buffer, and its own token is pushed into the
//    token queue (waking its dependents next cycle) and its register marked
//    in the dispatch scoreboard. Predicted-miss loads and variable-latency
//    operations keep their token until their result returns.
// Purely combinational; the queues and tables around it hold the state.
//
// From the SEED paper: the first few tokens of the queue are read, limited
// by bank availability; speculative dependents are re-checked and
// re-dispatched; overflow leads to a soft exception; predicted-miss loads and
// long operations queue their token only on completion. Own choices: stop at
// the first token that cannot go, wakeup reads before dispatch on a bank, and
// the room checks.
module seed_wakeup
  import seed_pkg::*;
#(
  parameter int unsigned N_TOK  = WAKE_TOKENS,
  parameter int unsigned NSUB   = SUB_ENTRIES,
  parameter int unsigned NBANKS = DT_BANKS,
  parameter int unsigned NBBID  = NUM_BBID,
  localparam int unsigned NL    = N_TOK * NSUB
) (
  input  tokq_t                 tq_head   [N_TOK],
  input  logic [N_TOK-1:0]      tq_head_v,
  output logic [$clog2(N_TOK+1)-1:0] tq_pop,
  input  logic [NBBID-1:0]      bb_valid,
  input  logic [4:0]            ib_budget,
  input  logic [7:0]            tq_budget,
  input  logic [2:0]            rq_free,
  // depTable read port
  output logic [N_TOK-1:0]      rd_v,
  output logic [TOKEN_W-1:0]    rd_tok    [N_TOK],
  input  logic [CNT_W-1:0]      rd_cnt    [N_TOK],
  input  inst_t                 rd_sub    [N_TOK][NSUB],
  output logic [NBANKS-1:0]     bank_busy,
  // dispatch scoreboard checks of speculative wakeups
  output logic [PREG_W-1:0]     sb_rd_reg [2*NL],
  input  logic [2*NL-1:0]       sb_rd_rdy,
  // results
  output logic [N_TOK-1:0]      dealloc_v,
  output logic [NL-1:0]         ib_push_v,
  output inst_t                 ib_push_d [NL],
  output logic [NL-1:0]         tq_push_v,
  output tokq_t                 tq_push_d [NL],
  output logic [NL-1:0]         rq_push_v,
  output inst_t                 rq_push_d [NL],
  output logic [NL-1:0]         sx_v,
  output logic [ROB_W-1:0]      sx_rob    [NL],
  output logic [4:0]            ib_used,
  output logic [7:0]            tq_used,
  output logic [3:0]            ev_tokens,
  output logic [3:0]            ev_insts,
  output logic [3:0]            ev_redisp,
  output logic [3:0]            ev_overflow,
  output logic [3:0]            ev_wp
);
  logic [N_TOK-1:0] sel;
  logic [3:0]       wp_tok, wp_dep;

  always_comb
    for (int i = 0; i < N_TOK; i++) rd_tok[i] = tq_head[i].tok;

  always_comb
    for (int i = 0; i < N_TOK; i++)
      for (int s = 0; s < NSUB; s++) begin
        sb_rd_reg[2*(i*NSUB+s)]   = rd_sub[i][s].src1;
        sb_rd_reg[2*(i*NSUB+s)+1] = rd_sub[i][s].src2;
      end

  always_comb begin
    logic stop;
    int unsigned ibn, tqn, pops;
    stop = 1'b0;
    ibn = 0; tqn = 0; pops = 0;
    sel = '0;
    bank_busy = '0;
    wp_tok = '0;
    for (int i = 0; i < N_TOK; i++) begin
      if (!stop) begin
        if (!tq_head_v[i]) begin
          stop = 1'b1;
        end else if (!bb_valid[tq_head[i].bbid]) begin
          pops++;
          wp_tok = wp_tok + 1'b1;
        end else if (bank_busy[bank_of(tq_head[i].tok)] ||
                     ibn + int'(rd_cnt[i]) > int'(ib_budget) ||
                     tqn + int'(rd_cnt[i]) > int'(tq_budget)) begin
          stop = 1'b1;
        end else begin
          sel[i] = 1'b1;
          bank_busy[bank_of(tq_head[i].tok)] = 1'b1;
          ibn += int'(rd_cnt[i]);
          tqn += int'(rd_cnt[i]);
          pops++;
        end
      end
    end
    tq_pop    = ($clog2(N_TOK+1))'(pops);
    rd_v      = sel;
    dealloc_v = sel;
  end

  // Route each dependent of the tokens read this cycle.
  always_comb begin
    int unsigned nrq, nib, ntq;
    nrq = 0; nib = 0; ntq = 0;
    wp_dep = '0; ev_tokens = '0; ev_insts = '0; ev_redisp = '0; ev_overflow = '0;
    for (int i = 0; i < N_TOK; i++) ev_tokens += 4'(sel[i]);
    for (int i = 0; i < N_TOK; i++)
      for (int s = 0; s < NSUB; s++) begin
        int unsigned l;
        inst_t d;
        logic live, rdy;
        l = i * NSUB + s;
        d = rd_sub[i][s];
        live = sel[i] && (CNT_W'(s) < rd_cnt[i]);
        rdy  = (!d.src1_v || sb_rd_rdy[2*l]) && (!d.src2_v || sb_rd_rdy[2*l+1]);
        ib_push_v[l] = 1'b0;
        ib_push_d[l] = d;
        tq_push_v[l] = 1'b0;
        tq_push_d[l] = '{tok: d.dst_tok, dst: d.dst, bbid: d.bbid};
        rq_push_v[l] = 1'b0;
        rq_push_d[l] = d;
        sx_v[l]      = 1'b0;
        sx_rob[l]    = d.rob;
        if (live) begin
          if (!bb_valid[d.bbid]) begin
            wp_dep = wp_dep + 1'b1;
          end else if (d.spec && !rdy) begin
            ev_redisp = ev_redisp + 1'b1;
            if (nrq < int'(rq_free)) begin
              rq_push_v[l] = 1'b1;
              nrq++;
            end else begin
              sx_v[l] = 1'b1;
              ev_overflow = ev_overflow + 1'b1;
            end
          end else begin
            ib_push_v[l] = 1'b1;
            ev_insts = ev_insts + 1'b1;
            nib++;
            if (d.dst_v && !wakes_on_completion(d)) begin
              tq_push_v[l] = 1'b1;
              ntq++;
            end
          end
        end
      end
    ib_used = 5'(nib);
    tq_used = 8'(ntq);
  end

  assign ev_wp = wp_tok + wp_dep;
endmodule
