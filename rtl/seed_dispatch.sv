// seed_dispatch: the dispatch stage of SEED. It looks at two candidates each
// cycle, the head of the re-dispatch queue (lane 0, served first) and the
// head of the dispatch FIFO that decouples rename from the depTable (lane 1),
// and decides for each whether it
//  * is dropped: its basic block was squashed;
//  * goes straight to the issue buffer: the dispatch scoreboard shows both
//    source producers have already woken their dependents (its own token is
//    then pushed into the token queue, unless it is a predicted-miss load or
//    a variable-latency operation, which push it on completion);
//  * is appended to the depTable entry of its one pending source producer;
//  * with two pending sources, is appended under one of them picked by a
//    pseudo-random bit and marked speculative, so that its wakeup re-checks
//    the other source.
// An insertion needs the entry's bank to be free this cycle (the wakeup
// reads have priority; two insertions into one bank are not allowed) and the
// entry to have a free sub-entry. Otherwise the candidate stays where it is:
// a bank conflict or a full entry stalls that lane, and a full dispatch FIFO
// then stalls rename. A full entry empties when its owner wakes up, after
// which the waiting instruction finds its source ready and goes direct.
// The exception is a re-dispatch (lane 0) meeting a full entry: it is
// dropped and reported on sx_v/sx_rob for a soft exception, like a
// re-dispatch that finds no room in the re-dispatch queue. Waiting could
// deadlock: the owner of the full entry may have been dropped the same way,
// and older instructions behind it in the re-dispatch queue would then keep
// that owner from ever reaching the head of the ROB and being refetched.
//
// Interface and timing: everything but the random-bit generator is
// combinational; pops, pushes and insertions take effect at the clock edge.
// The random source is a 16-bit LFSR (x^16+x^14+x^13+x^11+1), an
// implementation choice.
//
// From the SEED paper: direct send when both producers have woken, queuing
// under one pending parent, a random choice with the speculative bit when
// both are pending, delay on a bank conflict, stall on a full entry. Own
// choices: two lanes with the re-dispatch queue first, the LFSR, and the
// soft exception for a re-dispatch that meets a full entry.
module seed_dispatch
  import seed_pkg::*;
#(
  parameter int unsigned NSUB   = SUB_ENTRIES,
  parameter int unsigned NBANKS = DT_BANKS,
  parameter int unsigned NBBID  = NUM_BBID
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  inst_t                 cand      [2],   // 0: re-dispatch, 1: dispatch FIFO
  input  logic [1:0]            cand_v,
  output logic [1:0]            cand_pop,
  input  logic [NBBID-1:0]      bb_valid,
  output logic [PREG_W-1:0]     sb_rd_reg [4],
  input  logic [3:0]            sb_rd_rdy,
  output logic [TOKEN_W-1:0]    lk_tok    [4],
  input  logic [CNT_W-1:0]      lk_cnt    [4],
  input  logic [NBANKS-1:0]     bank_busy,       // taken by wakeup reads
  input  logic [4:0]            ib_budget,
  input  logic [7:0]            tq_budget,
  output logic [1:0]            ins_v,
  output logic [TOKEN_W-1:0]    ins_tok   [2],
  output inst_t                 ins_inst  [2],
  output logic [1:0]            ib_push_v,
  output inst_t                 ib_push_d [2],
  output logic [1:0]            tq_push_v,
  output tokq_t                 tq_push_d [2],
  output logic [3:0]            ev_direct,
  output logic [3:0]            ev_inserted,
  output logic [3:0]            ev_spec,
  output logic [3:0]            ev_bank_conflict,
  output logic [3:0]            ev_entry_full,
  output logic [3:0]            ev_wp,
  // re-dispatch dropped on a full entry: soft exception for this ROB entry
  output logic                  sx_v,
  output logic [ROB_W-1:0]      sx_rob
);
  logic [15:0] lfsr;

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_comb
    for (int c = 0; c < 2; c++) begin
      sb_rd_reg[2*c]   = cand[c].src1;
      sb_rd_reg[2*c+1] = cand[c].src2;
      lk_tok[2*c]      = cand[c].src1_tok;
      lk_tok[2*c+1]    = cand[c].src2_tok;
    end

  always_comb begin
    logic [NBANKS-1:0] busy;
    int unsigned ibn, tqn;
    busy = bank_busy;
    ibn = 0; tqn = 0;
    cand_pop = '0; ins_v = '0; ib_push_v = '0; tq_push_v = '0;
    sx_v = 1'b0;
    sx_rob = cand[0].rob;
    ev_direct = '0; ev_inserted = '0; ev_spec = '0;
    ev_bank_conflict = '0; ev_entry_full = '0; ev_wp = '0;
    for (int c = 0; c < 2; c++) begin
      inst_t d;
      logic r1, r2, pick2, tq_need;
      logic [TOKEN_W-1:0] tgt;
      logic [CNT_W-1:0]   tcnt;
      d = cand[c];
      r1 = !d.src1_v || sb_rd_rdy[2*c];
      r2 = !d.src2_v || sb_rd_rdy[2*c+1];
      // with two pending sources the LFSR picks; lanes use different bits
      pick2 = r1 ? 1'b1 : (r2 ? 1'b0 : lfsr[c]);
      tgt   = pick2 ? d.src2_tok : d.src1_tok;
      tcnt  = pick2 ? lk_cnt[2*c+1] : lk_cnt[2*c];
      tq_need = d.dst_v && !wakes_on_completion(d);
      ins_tok[c]   = tgt;
      ins_inst[c]  = d;
      ins_inst[c].spec = !r1 && !r2;
      ib_push_d[c] = d;
      ib_push_d[c].spec = 1'b0;
      tq_push_d[c] = '{tok: d.dst_tok, dst: d.dst, bbid: d.bbid};
      if (cand_v[c]) begin
        if (!bb_valid[d.bbid]) begin
          cand_pop[c] = 1'b1;
          ev_wp = ev_wp + 1'b1;
        end else if (r1 && r2) begin
          if (ibn < int'(ib_budget) && (!tq_need || tqn < int'(tq_budget))) begin
            cand_pop[c]  = 1'b1;
            ib_push_v[c] = 1'b1;
            tq_push_v[c] = tq_need;
            ibn++;
            tqn += int'(tq_need);
            ev_direct = ev_direct + 1'b1;
          end
        end else if (tcnt >= CNT_W'(NSUB)) begin
          ev_entry_full = ev_entry_full + 1'b1;
          // A re-dispatch does not wait on a full entry: the entry's owner
          // may itself have been dropped for a soft exception, and an older
          // instruction queued behind this one would then never leave.
          if (c == 0) begin
            cand_pop[0] = 1'b1;
            sx_v        = 1'b1;
          end
        end else if (busy[bank_of(tgt)]) begin
          ev_bank_conflict = ev_bank_conflict + 1'b1;
        end else begin
          busy[bank_of(tgt)] = 1'b1;
          cand_pop[c] = 1'b1;
          ins_v[c]    = 1'b1;
          ev_inserted = ev_inserted + 1'b1;
          ev_spec     = ev_spec + 4'(!r1 && !r2);
        end
      end
    end
  end
endmodule
