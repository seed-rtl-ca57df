// tb_seed_dispatch: random stimulus for the dispatch stage, checked against
// an independent description of its rules. Each cycle two candidates (the
// re-dispatch head, served first, and the dispatch-FIFO head) are drawn with
// random source readiness, random target-entry fill levels, random banks
// taken by wakeup and random issue-buffer / token-queue room. The reference
// decides drop / direct issue / insert / stall for each lane (a re-dispatch
// meeting a full entry is dropped with a soft exception), tracks the
// banks used by the first lane, and keeps its own copy of the 16-bit LFSR to
// predict which source a two-pending-source instruction is queued under.
// It also checks that the random choice is roughly balanced.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_seed_dispatch;
  import seed_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  inst_t               cand [2];
  logic [1:0]          cand_v, cand_pop;
  logic [NUM_BBID-1:0] bb_valid;
  logic [PREG_W-1:0]   sb_rd_reg [4];
  logic [3:0]          sb_rd_rdy;
  logic [TOKEN_W-1:0]  lk_tok [4];
  logic [CNT_W-1:0]    lk_cnt [4];
  logic [DT_BANKS-1:0] bank_busy;
  logic [4:0]          ib_budget;
  logic [7:0]          tq_budget;
  logic [1:0]          ins_v, ib_push_v, tq_push_v;
  logic [TOKEN_W-1:0]  ins_tok [2];
  inst_t               ins_inst [2], ib_push_d [2];
  tokq_t               tq_push_d [2];
  logic [3:0]          ev_direct, ev_inserted, ev_spec, ev_bank_conflict, ev_entry_full, ev_wp;
  logic                sx_v;
  logic [ROB_W-1:0]    sx_rob;

  seed_dispatch dut (.*);

  logic [NUM_PREGS-1:0] ready_vec;
  logic [CNT_W-1:0]     fill [DT_ENTRIES];
  always_comb begin
    for (int k = 0; k < 4; k++) sb_rd_rdy[k] = ready_vec[sb_rd_reg[k]];
    for (int k = 0; k < 4; k++) lk_cnt[k] = fill[lk_tok[k]];
  end

  int checks = 0, failures = 0;
  int n_sx = 0;
  int n_dir = 0, n_ins = 0, n_spec = 0, n_pick2 = 0, n_conf = 0, n_full = 0, n_wp = 0, n_budget = 0;
  logic [15:0] lfsr;

  task automatic chk(bit ok, string what, int it);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", it, what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    cand_v = '0; bb_valid = '1; bank_busy = '0; ib_budget = '0; tq_budget = '0; ready_vec = '0;
    foreach (cand[c]) cand[c] = '0;
    foreach (fill[t]) fill[t] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    lfsr = 16'hACE1;
    for (int it = 0; it < 20000; it++) begin
      logic [DT_BANKS-1:0] busy;
      int ibn, tqn, dir, ins, spec, conf, full, wp;
      bit e_sx;
      @(negedge clk);
      foreach (ready_vec[p]) ready_vec[p] = $urandom_range(2) != 0;
      foreach (fill[t]) fill[t] = CNT_W'($urandom_range(2) == 0 ? SUB_ENTRIES : $urandom_range(SUB_ENTRIES - 1));
      for (int b = 0; b < 8; b++) bb_valid[b] = $urandom_range(7) != 0;
      bank_busy = '0;
      for (int b = 0; b < DT_BANKS; b++) bank_busy[b] = $urandom_range(3) == 0;
      ib_budget = 5'($urandom_range(2));
      tq_budget = 8'($urandom_range(2));
      for (int c = 0; c < 2; c++) begin
        inst_t d;
        d = '0;
        d.rob = ROB_W'($urandom_range(ROB_ENTRIES - 1));
        d.bbid = BBID_W'($urandom_range(7));
        d.fu = fu_e'($urandom_range(3));
        d.lat = LAT_W'($urandom_range(1, 4));
        d.is_load = $urandom_range(1);
        d.pred_hit = $urandom_range(1);
        d.long_lat = $urandom_range(4) == 0;
        d.src1_v = $urandom_range(3) != 0; d.src1 = PREG_W'($urandom_range(NUM_PREGS - 1));
        d.src2_v = $urandom_range(3) != 0; d.src2 = PREG_W'($urandom_range(NUM_PREGS - 1));
        d.src1_tok = TOKEN_W'($urandom_range(DT_ENTRIES - 1));
        d.src2_tok = TOKEN_W'($urandom_range(DT_ENTRIES - 1));
        if (c == 1 && $urandom_range(3) == 0) d.src1_tok = cand[0].src1_tok;   // same entry as lane 0
        d.dst_v = $urandom_range(3) != 0; d.dst = PREG_W'($urandom_range(NUM_PREGS - 1));
        d.dst_tok = TOKEN_W'($urandom_range(DT_ENTRIES - 1));
        d.spec = $urandom_range(1);
        cand[c] = d;
        cand_v[c] = $urandom_range(4) != 0;
      end
      #1;
      busy = bank_busy; ibn = 0; tqn = 0;
      dir = 0; ins = 0; spec = 0; conf = 0; full = 0; wp = 0;
      for (int c = 0; c < 2; c++) begin
        inst_t d, e;
        bit r1, r2, p2, tqn_need, e_pop, e_ins, e_ib, e_tq;
        int tgt;
        d = cand[c];
        r1 = !d.src1_v || ready_vec[d.src1];
        r2 = !d.src2_v || ready_vec[d.src2];
        p2 = r1 ? 1 : r2 ? 0 : lfsr[c];
        tgt = p2 ? int'(d.src2_tok) : int'(d.src1_tok);
        tqn_need = d.dst_v && !(d.long_lat || (d.is_load && !d.pred_hit));
        e_pop = 0; e_ins = 0; e_ib = 0; e_tq = 0;
        if (c == 0) e_sx = 0;
        if (cand_v[c]) begin
          if (!bb_valid[d.bbid]) begin e_pop = 1; wp++; end
          else if (r1 && r2) begin
            if (ibn < ib_budget && (!tqn_need || tqn < tq_budget)) begin
              e_pop = 1; e_ib = 1; e_tq = tqn_need; ibn++; tqn += int'(tqn_need); dir++;
            end else n_budget++;
          end else if (fill[tgt] == SUB_ENTRIES) begin
            full++;
            if (c == 0) begin e_pop = 1; e_sx = 1; n_sx++; end   // re-dispatch dropped
          end
          else if (busy[tgt % DT_BANKS]) conf++;
          else begin
            busy[tgt % DT_BANKS] = 1; e_pop = 1; e_ins = 1; ins++;
            if (!r1 && !r2) begin spec++; n_pick2 += int'(p2); end
          end
        end
        chk(cand_pop[c] == e_pop && ins_v[c] == e_ins && ib_push_v[c] == e_ib && tq_push_v[c] == e_tq,
            $sformatf("lane %0d decision", c), it);
        if (e_ins) begin
          e = d; e.spec = !r1 && !r2;
          chk(int'(ins_tok[c]) == tgt && ins_inst[c] == e, $sformatf("lane %0d insertion", c), it);
        end
        if (e_ib) begin
          e = d; e.spec = 0;
          chk(ib_push_d[c] == e, $sformatf("lane %0d direct issue data", c), it);
        end
        if (e_tq) chk(tq_push_d[c].tok == d.dst_tok && tq_push_d[c].dst == d.dst &&
                      tq_push_d[c].bbid == d.bbid, $sformatf("lane %0d token push", c), it);
      end
      chk(sx_v == e_sx && (!e_sx || sx_rob == cand[0].rob), "soft exception on a full entry", it);
      chk(int'(ev_direct) == dir && int'(ev_inserted) == ins && int'(ev_spec) == spec &&
          int'(ev_bank_conflict) == conf && int'(ev_entry_full) == full && int'(ev_wp) == wp,
          "event counts", it);
      n_dir += dir; n_ins += ins; n_spec += spec; n_conf += conf; n_full += full; n_wp += wp;
      @(posedge clk);
      lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    end
    checks++;
    if (n_dir == 0 || n_ins == 0 || n_spec == 0 || n_conf == 0 || n_full == 0 || n_wp == 0 || n_budget == 0 ||
        n_sx == 0 || n_pick2 * 10 < n_spec * 4 || n_pick2 * 10 > n_spec * 6) begin
      failures++;
      $display("coverage or balance problem");
    end
    $display("direct %0d, inserted %0d (speculative %0d, under source 2: %0d), bank conflicts %0d, full entries %0d, wrong path %0d",
             n_dir, n_ins, n_spec, n_pick2, n_conf, n_full, n_wp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
