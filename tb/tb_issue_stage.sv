// tb_issue_stage: pushes a random dependent instruction stream into the issue
// buffer and predicts, every cycle, exactly which instructions must issue:
// in order from the head, up to 6, stopping at the first one whose operand
// is not yet available or whose functional-unit class (3 load/store,
// 2 branch, 5 integer, 4 FP) is used up; instructions of invalid basic
// blocks are discarded; nothing issues under exec_stall. Operand timing is
// modelled independently: a producer of latency n issued in cycle t feeds a
// consumer in cycle t+n; predicted-miss loads and variable-latency
// operations feed consumers from the cycle after their completion.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_issue_stage;
  import seed_pkg::*;
  localparam int PN = 2 + WAKE_TOKENS * SUB_ENTRIES;
  localparam int INF = 1 << 30;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [PN-1:0]     push_v;
  inst_t             push_d [PN];
  logic [3:0]        free;
  logic [NUM_BBID-1:0] bb_valid;
  logic              exec_stall, alloc_v, cmp_v;
  logic [PREG_W-1:0] alloc_reg, cmp_reg;
  logic [ISSUE_WIDTH-1:0] iss_v;
  inst_t             iss_inst [ISSUE_WIDTH];
  logic [3:0]        ev_issued, ev_wp, ev_interlock;

  issue_stage dut (.*);

  int    ready_at [NUM_PREGS];
  inst_t q [$];
  inst_t prep [$];
  int    pend_due [$], pend_reg [$];
  int    next_reg = 16;
  int    n_iss = 0;
  int    checks = 0, failures = 0, cyc = 0, n_six = 0, n_fu_stop = 0, n_disc = 0, n_stall = 0;

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic inst_t make();
    inst_t d;
    int r;
    d = '0;
    r = $urandom_range(99);
    if (cyc % 1000 >= 500 && cyc % 1000 < 700) r = (r < 50) ? 50 : (r < 80) ? 90 : r;
    d.fu = (r < 45) ? FU_ALU : (r < 70) ? FU_LDST : (r < 85) ? FU_FP : FU_BR;
    d.lat = LAT_W'((d.fu == FU_FP) ? 4 : (d.fu == FU_LDST) ? 3 : 1);
    d.is_load = (d.fu == FU_LDST);
    d.pred_hit = d.is_load && ($urandom_range(3) != 0);
    d.long_lat = (d.fu == FU_FP) && ($urandom_range(5) == 0);
    d.src1_v = $urandom_range(3) != 0;
    d.src2_v = $urandom_range(1);
    // sources: recent producers or always-ready registers
    d.src1 = PREG_W'(($urandom_range(5) != 0) ? $urandom_range(7) : next_reg - 1 - $urandom_range(6));
    d.src2 = PREG_W'(($urandom_range(5) != 0) ? $urandom_range(7) : next_reg - 1 - $urandom_range(6));
    d.dst_v = (d.fu != FU_BR);
    // a register is not reused while a completion for its old value is due
    while (next_reg inside {pend_reg}) begin
      next_reg++;
      if (next_reg >= NUM_PREGS) next_reg = 16;
    end
    d.dst = PREG_W'(next_reg);
    d.bbid = BBID_W'($urandom_range(3));
    d.rob = ROB_W'(next_reg);
    if (d.bbid == 1) d.dst_v = 0;   // basic block 1 is squashed at times: keep it off dependence chains
    return d;
  endfunction

  initial begin
    push_v = '0; exec_stall = 0; alloc_v = 0; cmp_v = 0; alloc_reg = '0; cmp_reg = '0;
    foreach (push_d[i]) push_d[i] = '0;
    bb_valid = '1;
    for (int p = 0; p < NUM_PREGS; p++) ready_at[p] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 10000; c++) begin
      int n_alu, n_ls, n_br, n_fp, pops, npush, fr;
      bit stop;
      @(negedge clk);
      cyc++;
      // inputs for this cycle
      if (1) begin
        inst_t d;
        d = make();
        alloc_v = d.dst_v; alloc_reg = d.dst;
        prep.push_back(d);
        next_reg++;
        if (next_reg >= NUM_PREGS) next_reg = 16;
      end else alloc_v = 0;
      exec_stall = ($urandom_range(29) == 0) || ((c % 40) >= 26 && (c % 40) < 29);
      if (c % 500 == 100) bb_valid[1] = 0;
      if (c % 500 == 300) bb_valid[1] = 1;
      cmp_v = 0;
      if (pend_due.size() > 0 && pend_due[0] <= cyc) begin
        cmp_v = 1; cmp_reg = PREG_W'(pend_reg[0]);
      end
      // push prepared instructions (allocated in an earlier cycle)
      fr = int'(free);
      npush = 0;
      push_v = '0;
      for (int i = 0; i < 6; i++)
        if (prep.size() > 1 + i && npush == i && npush < fr && (c % 40) >= 26) begin
          push_v[i] = 1; push_d[i] = prep[i]; npush++;
        end
      #1;
      // expected issue
      stop = exec_stall; pops = 0; n_alu = 0; n_ls = 0; n_br = 0; n_fp = 0;
      if (exec_stall) n_stall++;
      for (int j = 0; j < ISSUE_WIDTH; j++) begin
        bit exp_v, rdy, fu_ok;
        inst_t d;
        exp_v = 0;
        if (!stop && j < q.size()) begin
          d = q[j];
          rdy = (!d.src1_v || ready_at[d.src1] <= cyc) && (!d.src2_v || ready_at[d.src2] <= cyc);
          case (d.fu)
            FU_ALU: fu_ok = n_alu < 5; FU_LDST: fu_ok = n_ls < 3;
            FU_BR: fu_ok = n_br < 2; default: fu_ok = n_fp < 4;
          endcase
          if (!bb_valid[d.bbid]) begin pops++; n_disc++; end
          else if (!rdy) stop = 1;
          else if (!fu_ok) begin stop = 1; n_fu_stop++; end
          else begin
            exp_v = 1; pops++; n_iss++;
            case (d.fu) FU_ALU: n_alu++; FU_LDST: n_ls++; FU_BR: n_br++; default: n_fp++; endcase
          end
        end else stop = 1;
        checks++;
        if (iss_v[j] != exp_v || (exp_v && iss_inst[j] != d)) begin
          failures++;
          if (failures < 10) $display("cycle %0d lane %0d: issued %0d (rob %0d), expected %0d (rob %0d)",
                                      cyc, j, iss_v[j], iss_inst[j].rob, exp_v, d.rob);
        end
        if (exp_v && d.dst_v) begin
          if (d.long_lat || (d.is_load && !d.pred_hit)) begin
            pend_due.push_back(cyc + 6 + $urandom_range(6)); pend_reg.push_back(int'(d.dst));
          end else ready_at[d.dst] = cyc + int'(d.lat);
        end
      end
      if (pops == 6) n_six++;
      @(posedge clk); #1;
      for (int k = 0; k < pops; k++) void'(q.pop_front());
      for (int i = 0; i < 6; i++) if (push_v[i]) q.push_back(prep.pop_front());
      if (alloc_v) ready_at[alloc_reg] = INF;
      if (cmp_v) begin
        ready_at[cmp_reg] = cyc + 1;
        void'(pend_due.pop_front()); void'(pend_reg.pop_front());
      end
      push_v = '0; alloc_v = 0; cmp_v = 0;
    end
    checks++;
    if (n_fu_stop == 0 || n_disc == 0 || n_stall == 0) begin
      failures++; $display("not exercised: fu stop %0d discards %0d stalls %0d", n_fu_stop, n_disc, n_stall);
    end
    $display("issued %0d, full-width cycles %0d, fu-limit stops %0d, discards %0d", n_iss, n_six, n_fu_stop, n_disc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
