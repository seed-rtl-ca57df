// tb_seed_wakeup: random stimulus for the combinational wakeup stage,
// checked against an independent, sequential description of the same rules:
// tokens are taken in queue order (squashed-block tokens dropped without a
// table access, stop at a busy bank or missing issue-buffer / token-queue
// room), and every dependent of a read token is dropped, re-dispatched
// (spilling to a soft exception once the re-dispatch queue is full) or sent
// to the issue buffer with its own token queued when it wakes at issue. The
// dispatch scoreboard is modelled by a random ready vector answered
// combinationally. All outputs, including the event counts, are compared.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_seed_wakeup;
  import seed_pkg::*;
  localparam int NT = WAKE_TOKENS;
  localparam int NL = NT * SUB_ENTRIES;

  tokq_t               tq_head [NT];
  logic [NT-1:0]       tq_head_v;
  logic [$clog2(NT+1)-1:0] tq_pop;
  logic [NUM_BBID-1:0] bb_valid;
  logic [4:0]          ib_budget;
  logic [7:0]          tq_budget;
  logic [2:0]          rq_free;
  logic [NT-1:0]       rd_v;
  logic [TOKEN_W-1:0]  rd_tok [NT];
  logic [CNT_W-1:0]    rd_cnt [NT];
  inst_t               rd_sub [NT][SUB_ENTRIES];
  logic [DT_BANKS-1:0] bank_busy;
  logic [PREG_W-1:0]   sb_rd_reg [2*NL];
  logic [2*NL-1:0]     sb_rd_rdy;
  logic [NT-1:0]       dealloc_v;
  logic [NL-1:0]       ib_push_v, tq_push_v, rq_push_v, sx_v;
  inst_t               ib_push_d [NL], rq_push_d [NL];
  tokq_t               tq_push_d [NL];
  logic [ROB_W-1:0]    sx_rob [NL];
  logic [4:0]          ib_used;
  logic [7:0]          tq_used;
  logic [3:0]          ev_tokens, ev_insts, ev_redisp, ev_overflow, ev_wp;

  seed_wakeup dut (.*);

  logic [NUM_PREGS-1:0] ready_vec;
  always_comb
    for (int k = 0; k < 2 * NL; k++) sb_rd_rdy[k] = ready_vec[sb_rd_reg[k]];

  int checks = 0, failures = 0;
  int n_sel = 0, n_bank = 0, n_budget = 0, n_rq = 0, n_sx = 0, n_tq = 0, n_wp = 0;

  task automatic chk(bit ok, string what, int it);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("iteration %0d: %s", it, what);
    end
  endtask

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int it = 0; it < 40000; it++) begin
      bit stop, e_sel [NT];
      bit e_busy [DT_BANKS];
      int ibn, tqn, pops, nrq, nib, ntq, ntok, nins, nred, nov, nwp;
      // stimulus
      foreach (ready_vec[p]) ready_vec[p] = $urandom_range(1);
      bb_valid = '1;
      for (int b = 0; b < 8; b++) bb_valid[b] = $urandom_range(5) != 0;
      ib_budget = 5'($urandom_range(10));
      tq_budget = 8'($urandom_range(10));
      rq_free   = 3'($urandom_range(4));
      for (int i = 0; i < NT; i++) begin
        tq_head_v[i] = $urandom_range(3) != 0;
        tq_head[i].tok  = TOKEN_W'($urandom_range(DT_ENTRIES - 1));
        if ($urandom_range(3) == 0 && i > 0)   // same bank as the previous token
          tq_head[i].tok = TOKEN_W'((tq_head[i-1].tok + DT_BANKS * $urandom_range(3)) % DT_ENTRIES);
        tq_head[i].dst  = PREG_W'($urandom_range(NUM_PREGS - 1));
        tq_head[i].bbid = BBID_W'($urandom_range(7));
        rd_cnt[i] = CNT_W'($urandom_range(SUB_ENTRIES));
        for (int s = 0; s < SUB_ENTRIES; s++) begin
          inst_t d;
          d = '0;
          d.rob = ROB_W'($urandom_range(ROB_ENTRIES - 1));
          d.bbid = BBID_W'($urandom_range(7));
          d.fu = fu_e'($urandom_range(3));
          d.lat = LAT_W'($urandom_range(1, 4));
          d.is_load = $urandom_range(1);
          d.pred_hit = $urandom_range(1);
          d.long_lat = $urandom_range(4) == 0;
          d.src1_v = $urandom_range(1);  d.src1 = PREG_W'($urandom_range(NUM_PREGS - 1));
          d.src2_v = $urandom_range(1);  d.src2 = PREG_W'($urandom_range(NUM_PREGS - 1));
          d.dst_v = $urandom_range(3) != 0; d.dst = PREG_W'($urandom_range(NUM_PREGS - 1));
          d.dst_tok = TOKEN_W'($urandom_range(DT_ENTRIES - 1));
          d.spec = $urandom_range(1);
          rd_sub[i][s] = d;
        end
      end
      #1;
      // reference: token selection
      stop = 0; ibn = 0; tqn = 0; pops = 0; nwp = 0;
      foreach (e_busy[b]) e_busy[b] = 0;
      for (int i = 0; i < NT; i++) begin
        int bk;
        e_sel[i] = 0;
        bk = int'(tq_head[i].tok) % DT_BANKS;
        if (stop) continue;
        if (!tq_head_v[i]) stop = 1;
        else if (!bb_valid[tq_head[i].bbid]) begin pops++; nwp++; end
        else if (e_busy[bk]) begin stop = 1; n_bank++; end
        else if (ibn + rd_cnt[i] > ib_budget || tqn + rd_cnt[i] > tq_budget) begin stop = 1; n_budget++; end
        else begin
          e_sel[i] = 1; e_busy[bk] = 1; ibn += rd_cnt[i]; tqn += rd_cnt[i]; pops++; n_sel++;
        end
      end
      chk(int'(tq_pop) == pops, "pop count", it);
      for (int i = 0; i < NT; i++) begin
        chk(rd_v[i] == e_sel[i] && dealloc_v[i] == e_sel[i], "token read/release", it);
        if (e_sel[i]) chk(rd_tok[i] == tq_head[i].tok, "read address", it);
      end
      for (int b = 0; b < DT_BANKS; b++) chk(bank_busy[b] == e_busy[b], "bank busy", it);
      // reference: dependents
      nrq = 0; nib = 0; ntq = 0; ntok = 0; nins = 0; nred = 0; nov = 0;
      for (int i = 0; i < NT; i++) ntok += e_sel[i];
      for (int i = 0; i < NT; i++)
        for (int s = 0; s < SUB_ENTRIES; s++) begin
          int l;
          bit e_ib, e_tq, e_rq, e_sx, rdy;
          inst_t d;
          l = i * SUB_ENTRIES + s;
          d = rd_sub[i][s];
          e_ib = 0; e_tq = 0; e_rq = 0; e_sx = 0;
          if (e_sel[i] && s < rd_cnt[i]) begin
            rdy = (!d.src1_v || ready_vec[d.src1]) && (!d.src2_v || ready_vec[d.src2]);
            if (!bb_valid[d.bbid]) nwp++;
            else if (d.spec && !rdy) begin
              nred++;
              if (nrq < rq_free) begin e_rq = 1; nrq++; n_rq++; end
              else begin e_sx = 1; nov++; n_sx++; end
            end else begin
              e_ib = 1; nib++; nins++;
              if (d.dst_v && !(d.long_lat || (d.is_load && !d.pred_hit))) begin
                e_tq = 1; ntq++; n_tq++;
              end
            end
          end
          chk(ib_push_v[l] == e_ib && tq_push_v[l] == e_tq && rq_push_v[l] == e_rq && sx_v[l] == e_sx,
              $sformatf("routing of dependent %0d", l), it);
          if (e_ib) chk(ib_push_d[l] == d, "issue-buffer data", it);
          if (e_rq) chk(rq_push_d[l] == d, "re-dispatch data", it);
          if (e_sx) chk(sx_rob[l] == d.rob, "soft-exception ROB index", it);
          if (e_tq) chk(tq_push_d[l].tok == d.dst_tok && tq_push_d[l].dst == d.dst &&
                        tq_push_d[l].bbid == d.bbid, "token-queue data", it);
        end
      chk(int'(ib_used) == nib && int'(tq_used) == ntq, "budget use", it);
      chk(int'(ev_tokens) == ntok && int'(ev_insts) == nins && int'(ev_redisp) == nred &&
          int'(ev_overflow) == nov && int'(ev_wp) == nwp, "event counts", it);
      if (nwp > 0) n_wp++;
    end
    checks++;
    if (n_sel == 0 || n_bank == 0 || n_budget == 0 || n_rq == 0 || n_sx == 0 || n_tq == 0 || n_wp == 0) failures++;
    $display("tokens read %0d, bank stops %0d, budget stops %0d, re-dispatched %0d, overflowed %0d, tokens queued %0d",
             n_sel, n_bank, n_budget, n_rq, n_sx, n_tq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
