// tb_seed_scheduler: end-to-end test of the SEED scheduler at its default
// sizes. A behavioural front end, reorder buffer and execution back end
// surround the scheduler:
//  * a program of PROG_LEN instructions is generated up front (integer and
//    FP operations, loads with per-PC hit behaviour, stores, branches of
//    which some are mispredicted, variable-latency divides) with two kinds of
//    planted sequences: wide fan-out of a long-latency producer (fills a
//    depTable entry) and two-source consumers of a slow and a slower producer
//    (speculative wakeups, re-dispatch and re-dispatch overflow);
//  * physical registers are renamed here, one instruction per cycle, and
//    recycled at commit; basic blocks get IDs from the scheduler;
//  * after a mispredicted branch the front end fetches random wrong-path
//    instructions until the branch issues, then signals the misprediction
//    and resumes on the right path;
//  * a soft exception is taken when the marked instruction reaches the ROB
//    head: the pipeline is flushed and fetch restarts from it.
// Every issued instruction is checked against the reference timing: each
// source value must be available (producer issue + latency, or completion
// + 1, or after the execution stall of a load that missed against a hit
// prediction). Each right-path instruction must issue exactly once and a
// squashed one never after its squash. All of the program must commit.
// The test also counts how often every mechanism of the design happened and
// counts a failure for any that never did. The load-hit predictor clears its
// table for 8192 cycles after reset; the front end waits for that.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_seed_scheduler;
  import seed_pkg::*;

  localparam int PROG_LEN  = 20000;
  localparam int NL        = WAKE_TOKENS * SUB_ENTRIES;
  localparam int TB_LREGS  = 16;        // logical registers the program uses
  localparam int ROBN      = 256;       // ROB slots modelled here
  localparam int INF       = 32'h7fff_ffff;
  localparam int MAX_CYC   = 200000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   flush;
  logic                   ren_v, ren_rdy;
  ren_t                   ren;
  logic [CKPT_W-1:0]      ren_ckpt_id;
  logic                   bb_alloc_v, bb_alloc_ok, bb_commit_v;
  logic [BBID_W-1:0]      bb_alloc_id, bb_commit_id;
  logic                   mp_v, br_ok_v;
  logic [CKPT_W-1:0]      mp_ckpt, br_ok_ckpt;
  logic [BBID_W-1:0]      mp_bbid;
  logic                   lhp_upd_v, lhp_upd_hit;
  logic [31:0]            lhp_upd_pc;
  logic                   cmp_v;
  logic [TOKEN_W-1:0]     cmp_tok;
  logic [PREG_W-1:0]      cmp_dst;
  logic [BBID_W-1:0]      cmp_bbid;
  logic                   exec_stall;
  logic [ISSUE_WIDTH-1:0] iss_v;
  inst_t                  iss_inst [ISSUE_WIDTH];
  logic [NL:0]            sx_v;
  logic [ROB_W-1:0]       sx_rob [NL+1];
  seed_events_t           ev;

  seed_scheduler dut (.*);

  // ---------------------------------------------------------------- program
  typedef struct {
    fu_e        fu;
    int         lat;
    bit         is_load, long_lat, is_branch, mispred;
    bit         src1_v, src2_v, dst_v;
    int         src1_l, src2_l, dst_l;
    int         pc;
    int         cmp_delay;      // long-latency completion delay
  } pinst_t;

  pinst_t prog [PROG_LEN];

  function automatic pinst_t gen_random(int idx);
    pinst_t p;
    int r;
    p = '{fu: FU_ALU, lat: 1, is_load: 0, long_lat: 0, is_branch: 0, mispred: 0,
          src1_v: 1, src2_v: 0, dst_v: 1, src1_l: 0, src2_l: 0, dst_l: 0,
          pc: 0, cmp_delay: 0};
    r = int'($urandom_range(99));
    p.src1_l = int'($urandom_range(TB_LREGS-1));
    p.src2_l = int'($urandom_range(TB_LREGS-1));
    p.dst_l  = int'($urandom_range(TB_LREGS-1));
    p.src2_v = ($urandom_range(99) < 45);
    p.pc     = 32'h1000 + 4 * idx;
    if (r < 50) begin
      p.fu = FU_ALU; p.lat = 1;
    end else if (r < 68) begin
      p.fu = FU_LDST; p.lat = 3; p.is_load = 1; p.src2_v = 0;
      p.pc = 32'h8000 + 4 * int'($urandom_range(7));
    end else if (r < 73) begin
      p.fu = FU_LDST; p.lat = 1; p.dst_v = 0;                  // store
    end else if (r < 83) begin
      p.fu = FU_FP; p.lat = 4;
    end else if (r < 86) begin
      p.fu = FU_FP; p.lat = 1; p.long_lat = 1;                 // divide
      p.cmp_delay = 12 + int'($urandom_range(20));
    end else begin
      p.fu = FU_BR; p.lat = 1; p.is_branch = 1; p.dst_v = 0;
      p.mispred = ($urandom_range(99) < 12);
    end
    return p;
  endfunction

  function automatic pinst_t mk(fu_e fu, int lat, bit ll, int cd,
                                bit s1v, int s1, bit s2v, int s2, int d, int idx);
    pinst_t p;
    p = '{fu: fu, lat: lat, is_load: 0, long_lat: ll, is_branch: 0, mispred: 0,
          src1_v: s1v, src2_v: s2v, dst_v: 1, src1_l: s1, src2_l: s2, dst_l: d,
          pc: 32'h1000 + 4 * idx, cmp_delay: cd};
    return p;
  endfunction

  task automatic build_program();
    int i;
    i = 0;
    while (i < PROG_LEN) begin
      int k;
      k = int'($urandom_range(99));
      if (k < 4 && i + 12 < PROG_LEN) begin
        // fan-out: one slow producer, seven consumers
        prog[i] = mk(FU_FP, 1, 1, 40, 1, 1, 0, 0, 12, i); i++;
        for (int j = 0; j < 7; j++) begin
          prog[i] = mk(FU_ALU, 1, 0, 0, 1, 12, 0, 0, 2 + j, i); i++;
        end
      end else if (k < 7 && i + 24 < PROG_LEN) begin
        // re-dispatch burst: P slow, A1/A2 wait on P, B slower;
        // consumers of (A1,B) and (A2,B)
        prog[i] = mk(FU_FP, 1, 1, 30, 1, 3, 0, 0, 13, i); i++;   // P  -> r13
        prog[i] = mk(FU_FP, 1, 1, 90, 1, 4, 0, 0, 14, i); i++;   // B  -> r14
        prog[i] = mk(FU_ALU, 1, 0, 0, 1, 13, 0, 0, 10, i); i++;  // A1 -> r10
        prog[i] = mk(FU_ALU, 1, 0, 0, 1, 13, 0, 0, 11, i); i++;  // A2 -> r11
        for (int j = 0; j < 8; j++) begin
          prog[i] = mk(FU_ALU, 1, 0, 0, 1, (j % 2) ? 11 : 10, 1, 14, j % 8, i); i++;
        end
      end else begin
        prog[i] = gen_random(i); i++;
      end
    end
  endtask

  // ---------------------------------------------------------------- model
  typedef struct {
    bit         live, wrong, issued, done, sx, resolved;
    int         prog_idx;          // -1 for wrong-path instructions
    pinst_t     p;
    int         bbid;
    int         dst_p, old_p;
    int         src1_p, src2_p;
    int         tok;
    int         ckpt;
    int         ready_at;          // cycle the instruction counts as done
  } rob_t;

  rob_t rob [ROBN];
  int   rob_head, rob_tail, rob_cnt;
  int   map    [TB_LREGS];
  int   preg_ready [NUM_PREGS];
  int   freeq [$];
  int   pc_idx;                    // next right-path program index
  bit   in_wrong;                  // fetching down a mispredicted path
  int   mp_slot;                   // the mispredicted branch
  bit   have_bb;                   // current block has an ID
  int   cur_bb;
  bit   block_start;
  int   stall_until;
  int   committed;
  int   cyc;

  typedef struct { int due; int slot; int tok; int dst; int bbid; } pend_t;
  pend_t pend [$];

  int checks, failures;
  int n_mispred, n_flush, n_exec_stall, n_predhit, n_predmiss, n_cmp, n_multi_issue;
  int n_direct, n_inserted, n_spec, n_bank, n_full, n_tok, n_redisp, n_ovf, n_wp, n_inter;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  function automatic int slot_of_rob(int r);
    return r % ROBN;
  endfunction

  // squash every ROB entry younger than slot s (s itself kept when keep=1)
  task automatic squash_after(int s, bit keep);
    int n;
    n = keep ? (s - rob_head + ROBN) % ROBN + 1 : (s - rob_head + ROBN) % ROBN;
    // walk youngest to oldest, undoing renames
    while (rob_cnt > n) begin
      int y;
      y = (rob_tail - 1 + ROBN) % ROBN;
      if (rob[y].p.dst_v) begin
        map[rob[y].p.dst_l] = rob[y].old_p;
        freeq.push_back(rob[y].dst_p);
      end
      rob[y].live = 0;
      rob_tail = y;
      rob_cnt--;
    end
  endtask

  // ---------------------------------------------------------------- driver
  // Inputs are driven shortly after the rising edge; outputs are sampled at
  // the falling edge, where the model also decides what the coming edge does.
  bit      drive_mp, drive_flush, drive_brok;
  int      brok_ckpt;
  pinst_t  cur_p;
  bit      cur_valid, cur_wrong;
  int      cur_prog_idx;

  initial begin
    checks = 0; failures = 0;
    n_mispred = 0; n_flush = 0; n_exec_stall = 0; n_predhit = 0; n_predmiss = 0;
    n_cmp = 0; n_multi_issue = 0;
    n_direct = 0; n_inserted = 0; n_spec = 0; n_bank = 0; n_full = 0; n_tok = 0;
    n_redisp = 0; n_ovf = 0; n_wp = 0; n_inter = 0;
    build_program();
    for (int l = 0; l < TB_LREGS; l++) map[l] = l;
    for (int p = 0; p < NUM_PREGS; p++) preg_ready[p] = 0;
    for (int p = TB_LREGS; p < NUM_PREGS; p++) freeq.push_back(p);
    for (int s = 0; s < ROBN; s++) rob[s].live = 0;
    rob_head = 0; rob_tail = 0; rob_cnt = 0;
    pc_idx = 0; in_wrong = 0; have_bb = 0; block_start = 1; stall_until = 0;
    committed = 0; cyc = 0; cur_valid = 0;
    drive_mp = 0; drive_flush = 0; drive_brok = 0;
    flush = 0; ren_v = 0; ren = '0; bb_alloc_v = 0; bb_commit_v = 0; bb_commit_id = '0;
    mp_v = 0; mp_ckpt = '0; mp_bbid = '0; br_ok_v = 0; br_ok_ckpt = '0;
    lhp_upd_v = 0; lhp_upd_pc = '0; lhp_upd_hit = 0;
    cmp_v = 0; cmp_tok = '0; cmp_dst = '0; cmp_bbid = '0; exec_stall = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // wait for the load-hit predictor to clear its table
    repeat (LHP_ENTRIES + 2) @(posedge clk);
    cyc = 0;
    forever begin
      @(posedge clk); #1;
      cyc++;
      drive_inputs();
      @(negedge clk);
      sample_outputs();
      if (committed >= PROG_LEN) break;
      if (cyc > MAX_CYC) begin
        fail($sformatf("timeout: %0d of %0d committed", committed, PROG_LEN));
        if (rob_cnt > 0)
          $display("ROB head %0d: prog %0d wrong %0d issued %0d done %0d sx %0d fu %0d src p%0d/p%0d dst p%0d bb %0d, %0d in flight, %0d completions pending",
                   rob_head, rob[rob_head].prog_idx, rob[rob_head].wrong, rob[rob_head].issued,
                   rob[rob_head].done, rob[rob_head].sx, rob[rob_head].p.fu,
                   rob[rob_head].p.src1_v ? rob[rob_head].src1_p : -1,
                   rob[rob_head].p.src2_v ? rob[rob_head].src2_p : -1,
                   rob[rob_head].dst_p, rob[rob_head].bbid, rob_cnt, pend.size());
        break;
      end
    end
    report();
  end

  initial begin : watchdog
    repeat (LHP_ENTRIES + MAX_CYC + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pick the instruction the front end offers this cycle
  task automatic fetch_next();
    if (cur_valid) return;
    if (in_wrong) begin
      cur_p = gen_random(9000 + int'($urandom_range(999)));
      cur_p.mispred = 0;
      cur_wrong = 1; cur_prog_idx = -1; cur_valid = 1;
    end else if (pc_idx < PROG_LEN) begin
      cur_p = prog[pc_idx];
      cur_wrong = 0; cur_prog_idx = pc_idx; cur_valid = 1;
    end
  endtask

  task automatic drive_inputs();
    ren_v = 0; bb_alloc_v = 0; bb_commit_v = 0; mp_v = 0; br_ok_v = 0;
    lhp_upd_v = 0; cmp_v = 0;
    flush = drive_flush;
    if (drive_mp) begin
      mp_v    = 1;
      mp_ckpt = CKPT_W'(rob[mp_slot].ckpt);
      mp_bbid = BBID_W'(rob[mp_slot].bbid);
    end
    if (drive_brok) begin
      br_ok_v = 1; br_ok_ckpt = CKPT_W'(brok_ckpt);
    end
    exec_stall = (cyc < stall_until);
    // one completion per cycle
    if (!drive_flush && pend.size() > 0) begin
      int best;
      best = -1;
      foreach (pend[i]) if (pend[i].due <= cyc && (best < 0 || pend[i].due < pend[best].due)) best = i;
      if (best >= 0) begin
        cmp_v = 1; cmp_tok = TOKEN_W'(pend[best].tok);
        cmp_dst = PREG_W'(pend[best].dst); cmp_bbid = BBID_W'(pend[best].bbid);
        if (pend[best].dst >= 0) preg_ready[pend[best].dst] = cyc + 1;
        rob[pend[best].slot].done = 1;
        rob[pend[best].slot].ready_at = cyc + 1;
        n_cmp++;
        pend.delete(best);
      end
    end
    if (drive_flush || drive_mp) return;
    fetch_next();
    if (!cur_valid) return;
    if (block_start && !have_bb) begin
      bb_alloc_v = 1;
      return;
    end
    if (rob_cnt >= ROBN - 1 || (cur_p.dst_v && freeq.size() == 0)) return;
    ren_v = 1;
    ren = '0;
    ren.rob       = ROB_W'(rob_tail);
    ren.bbid      = BBID_W'(cur_bb);
    ren.pc        = cur_p.pc;
    ren.fu        = cur_p.fu;
    ren.lat       = LAT_W'(cur_p.lat);
    ren.is_load   = cur_p.is_load;
    ren.long_lat  = cur_p.long_lat;
    ren.is_branch = cur_p.is_branch;
    ren.src1_v    = cur_p.src1_v;
    ren.src1_l    = LREG_W'(cur_p.src1_l);
    ren.src1_p    = PREG_W'(map[cur_p.src1_l]);
    ren.src2_v    = cur_p.src2_v;
    ren.src2_l    = LREG_W'(cur_p.src2_l);
    ren.src2_p    = PREG_W'(map[cur_p.src2_l]);
    ren.dst_v     = cur_p.dst_v;
    ren.dst_l     = LREG_W'(cur_p.dst_l);
    ren.dst_p     = cur_p.dst_v ? PREG_W'(freeq[0]) : '0;
  endtask

  task automatic sample_outputs();
    int n_iss;
    bit mp_now;
    mp_now = mp_v;
    // event counters
    n_direct += int'(ev.direct); n_inserted += int'(ev.inserted);
    n_spec += int'(ev.spec_queued); n_bank += int'(ev.bank_conflict);
    n_full += int'(ev.entry_full); n_tok += int'(ev.woken_tokens);
    n_redisp += int'(ev.redispatch); n_ovf += int'(ev.overflow);
    n_wp += int'(ev.wp_dropped); n_inter += int'(ev.interlock);

    if (drive_flush) begin
      // the edge empties the scheduler: nothing else happens this cycle
      drive_flush = 0;
      drive_mp = 0;
      drive_brok = 0;
      return;
    end

    // ---- issue
    n_iss = 0;
    for (int j = 0; j < ISSUE_WIDTH; j++) begin
      if (iss_v[j]) begin
        int s;
        inst_t d;
        d = iss_inst[j];
        s = slot_of_rob(int'(d.rob));
        n_iss++;
        checks++;
        if (!rob[s].live || rob[s].bbid != int'(d.bbid) || rob[s].issued ||
            (rob[s].p.dst_v && rob[s].dst_p != int'(d.dst))) begin
          fail($sformatf("unexpected issue of rob %0d (live %0d issued %0d)", d.rob, rob[s].live, rob[s].issued));
          continue;
        end
        if (d.src1_v && preg_ready[d.src1] > cyc)
          fail($sformatf("rob %0d issued at %0d before src1 p%0d ready at %0d", d.rob, cyc, d.src1, preg_ready[d.src1]));
        if (d.src2_v && preg_ready[d.src2] > cyc)
          fail($sformatf("rob %0d issued at %0d before src2 p%0d ready at %0d", d.rob, cyc, d.src2, preg_ready[d.src2]));
        rob[s].issued = 1;
        if (rob[s].p.is_load) begin
          bit hit;
          int pcn;
          pcn = (rob[s].p.pc - 32'h8000) / 4;
          hit = (pcn < 6) ? 1 : (pcn == 6 ? ($urandom_range(99) >= 30) : 0);
          lhp_upd_v = 1; lhp_upd_pc = rob[s].p.pc; lhp_upd_hit = hit;   // lands at the edge
          if (d.pred_hit) begin
            n_predhit++;
            if (hit) begin
              preg_ready[d.dst] = cyc + 3;
              rob[s].ready_at = cyc + 3;
            end else begin
              n_exec_stall++;
              if (cyc + 3 + 15 > stall_until) stall_until = cyc + 3 + 15;
              preg_ready[d.dst] = cyc + 3 + 15;
              rob[s].ready_at = cyc + 3 + 15;
            end
            rob[s].done = 1;
          end else begin
            n_predmiss++;
            pend.push_back('{due: cyc + (hit ? 3 : 20), slot: s, tok: int'(d.dst_tok),
                             dst: int'(d.dst), bbid: int'(d.bbid)});
          end
        end else if (rob[s].p.long_lat) begin
          pend.push_back('{due: cyc + rob[s].p.cmp_delay, slot: s, tok: int'(d.dst_tok),
                           dst: rob[s].p.dst_v ? int'(d.dst) : -1, bbid: int'(d.bbid)});
        end else begin
          if (d.dst_v) preg_ready[d.dst] = cyc + rob[s].p.lat;
          rob[s].ready_at = cyc + rob[s].p.lat;
          rob[s].done = 1;
        end
      end
    end
    if (n_iss >= 2) n_multi_issue++;

    // ---- a misprediction driven this cycle takes effect at the coming edge
    if (mp_now) begin
      n_mispred++;
      squash_after(mp_slot, 1);
      in_wrong = 0;
      cur_valid = 0;
      have_bb = 0; block_start = 1;
      // completions of squashed work are cancelled by the back end
      for (int i = pend.size() - 1; i >= 0; i--)
        if (!rob[pend[i].slot].live) pend.delete(i);
    end

    // ---- soft exceptions
    for (int l = 0; l <= NL; l++)
      if (sx_v[l]) begin
        int s;
        s = slot_of_rob(int'(sx_rob[l]));
        if (rob[s].live) rob[s].sx = 1;
      end

    // ---- branch resolution (one cycle after issue)
    drive_mp = 0; drive_brok = 0;
    if (!mp_now) for (int k = 0, s = rob_head; k < rob_cnt; k++, s = (s + 1) % ROBN) begin
      if (rob[s].p.is_branch && !rob[s].wrong && rob[s].issued && !rob[s].resolved &&
          rob[s].ready_at <= cyc) begin
        rob[s].resolved = 1;
        if (rob[s].p.mispred) begin
          drive_mp = 1; mp_slot = s;
        end else begin
          drive_brok = 1; brok_ckpt = rob[s].ckpt;
        end
        break;
      end
    end

    // ---- rename / bb allocation acceptance
    if (bb_alloc_v && bb_alloc_ok) begin
      have_bb = 1; cur_bb = int'(bb_alloc_id); block_start = 0;
    end
    if (ren_v && ren_rdy && !mp_now) begin
      int s;
      s = rob_tail;
      rob[s] = '{live: 1, wrong: cur_wrong, issued: 0, done: 0, sx: 0, resolved: 0,
                 prog_idx: cur_prog_idx, p: cur_p, bbid: cur_bb, dst_p: 0, old_p: 0,
                 src1_p: map[cur_p.src1_l], src2_p: map[cur_p.src2_l],
                 tok: 0, ckpt: int'(ren_ckpt_id), ready_at: INF};
      if (cur_p.dst_v) begin
        rob[s].dst_p = freeq.pop_front();
        rob[s].old_p = map[cur_p.dst_l];
        map[cur_p.dst_l] = rob[s].dst_p;
        preg_ready[rob[s].dst_p] = INF;
      end
      if (!cur_p.dst_v && !cur_p.is_branch) begin
        // stores complete at issue; nothing waits on them
      end
      rob_tail = (rob_tail + 1) % ROBN;
      rob_cnt++;
      cur_valid = 0;
      if (!cur_wrong) pc_idx++;
      if (cur_p.is_branch) begin
        have_bb = 0; block_start = 1;
        if (!cur_wrong && cur_p.mispred) in_wrong = 1;
      end
    end

    // ---- commit, in order, up to 6 per cycle, one block end per cycle
    for (int k = 0; k < 6 && rob_cnt > 0 && !mp_now && !drive_mp && !drive_flush; k++) begin
      int s;
      s = rob_head;
      if (rob[s].sx) begin
        // soft exception: restart from this instruction
        n_flush++;
        pc_idx = rob[s].prog_idx;
        squash_after(s, 0);
        in_wrong = 0; cur_valid = 0; have_bb = 0; block_start = 1;
        pend.delete();
        stall_until = 0;
        drive_flush = 1;
        drive_brok = 0;
        rob_head = 0; rob_tail = 0;
        for (int p = 0; p < NUM_PREGS; p++) preg_ready[p] = 0;
        break;
      end
      if (!rob[s].issued || !rob[s].done || rob[s].ready_at > cyc) break;
      if (rob[s].p.is_branch && !rob[s].resolved) break;
      if (rob[s].p.dst_v) freeq.push_back(rob[s].old_p);
      rob[s].live = 0;
      rob_head = (rob_head + 1) % ROBN;
      rob_cnt--;
      committed++;
      if (rob[s].p.is_branch) begin
        bb_commit_v = 1; bb_commit_id = BBID_W'(rob[s].bbid);   // at the coming edge
        break;
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
  endtask

  task automatic report();
    checks++;
    if (committed < PROG_LEN) fail("program did not finish");
    need("direct dispatch", n_direct);
    need("depTable insertion", n_inserted);
    need("speculative queuing (two pending sources)", n_spec);
    need("bank conflict at dispatch", n_bank);
    need("full depTable entry", n_full);
    need("token wakeup", n_tok);
    need("re-dispatch", n_redisp);
    need("re-dispatch overflow (soft exception)", n_ovf);
    need("flush and refetch", n_flush);
    need("wrong-path filtering", n_wp);
    need("issue interlock", n_inter);
    need("branch misprediction recovery", n_mispred);
    need("load predicted to hit", n_predhit);
    need("load predicted to miss", n_predmiss);
    need("execution stall on a mispredicted hit", n_exec_stall);
    need("completion wakeup", n_cmp);
    need("multiple issue in one cycle", n_multi_issue);
    $display("cycles=%0d committed=%0d direct=%0d inserted=%0d spec=%0d bank_conflict=%0d entry_full=%0d",
             cyc, committed, n_direct, n_inserted, n_spec, n_bank, n_full);
    $display("tokens=%0d redispatch=%0d overflow=%0d flush=%0d wp_dropped=%0d interlock=%0d",
             n_tok, n_redisp, n_ovf, n_flush, n_wp, n_inter);
    $display("mispredicts=%0d predhit=%0d predmiss=%0d exec_stall=%0d completions=%0d multi_issue=%0d",
             n_mispred, n_predhit, n_predmiss, n_exec_stall, n_cmp, n_multi_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
