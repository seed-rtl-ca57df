// seed_pkg: sizes, types and helper functions shared by the SEED instruction
// scheduler. SEED keeps unready instructions in a banked, index-addressed
// dependence table (depTable) instead of a broadcast issue queue: every
// value-producing instruction owns one depTable entry (its "token") whose
// sub-entries hold the instructions waiting on it. Waking a token is a plain
// indexed read of its entry; the woken instructions enter a small in-order
// issue buffer.
//
// Sizes that follow the described machine: a 128-entry depTable with 4
// sub-entries per entry and one bank per 16 entries, an 8-entry issue buffer,
// 6-wide issue onto 3 load/store, 2 branch, 5 integer and 4 floating-point
// units, 384 + 256 physical registers, a 640-entry reorder buffer, a 4-entry
// re-dispatch queue and an 8K-entry table of 3-bit load-hit counters.
// The sizes marked "own choice" below are not fixed by the description.
//
// Lint: a module linted on its own reports the constants of this package it
// does not use and the argument bits the helper functions ignore (bank_of
// uses only the low token bits, wakes_on_completion three fields); expected.
package seed_pkg;

  // ---- depTable ----
  localparam int unsigned DT_ENTRIES   = 128;               // depTable entries (tokens)
  localparam int unsigned SUB_ENTRIES  = 4;                 // dependents per entry
  localparam int unsigned DT_BANKS     = DT_ENTRIES / 16;   // one bank per 16 entries
  localparam int unsigned TOKEN_W      = $clog2(DT_ENTRIES);
  localparam int unsigned CNT_W        = $clog2(SUB_ENTRIES + 1);

  // ---- registers, ROB, basic blocks ----
  localparam int unsigned NUM_PREGS    = 640;               // 384 integer + 256 FP
  localparam int unsigned PREG_W       = $clog2(NUM_PREGS);
  localparam int unsigned NUM_LREGS    = 64;                // 32 integer + 32 FP (MIPS)
  localparam int unsigned LREG_W       = $clog2(NUM_LREGS);
  localparam int unsigned ROB_ENTRIES  = 640;
  localparam int unsigned ROB_W        = $clog2(ROB_ENTRIES);
  localparam int unsigned NUM_BBID     = 64;                // own choice
  localparam int unsigned BBID_W       = $clog2(NUM_BBID);
  localparam int unsigned NUM_CKPT     = 8;                 // own choice
  localparam int unsigned CKPT_W       = $clog2(NUM_CKPT);

  // ---- queues and widths ----
  localparam int unsigned ISSUE_BUF    = 8;                 // in-order issue buffer
  localparam int unsigned ISSUE_WIDTH  = 6;
  localparam int unsigned WAKE_TOKENS  = 2;                 // tokens read per cycle, own choice
  localparam int unsigned DISP_FIFO    = 8;                 // dispatch FIFO, own choice
  localparam int unsigned REDISP_Q     = 4;                 // re-dispatch overflow queue
  localparam int unsigned LAT_W        = 5;                 // execution latency field

  // ---- functional units ----
  localparam int unsigned NUM_LDST = 3;
  localparam int unsigned NUM_BR   = 2;
  localparam int unsigned NUM_ALU  = 5;
  localparam int unsigned NUM_FPU  = 4;

  // ---- load-hit predictor ----
  localparam int unsigned LHP_ENTRIES  = 8192;
  localparam int unsigned LHP_CTR_W    = 3;

  typedef enum logic [1:0] {FU_ALU = 2'd0, FU_LDST = 2'd1, FU_BR = 2'd2, FU_FP = 2'd3} fu_e;

  // A renamed instruction as it travels through dispatch, the depTable and
  // the issue buffer.
  typedef struct packed {
    logic [ROB_W-1:0]   rob;        // reorder-buffer slot
    logic [BBID_W-1:0]  bbid;       // basic block ID (wrong-path filter)
    fu_e                fu;         // functional-unit class
    logic [LAT_W-1:0]   lat;        // execution latency in cycles (>= 1)
    logic               is_load;
    logic               pred_hit;   // load-hit prediction (loads only)
    logic               long_lat;   // variable latency: wake dependents on completion
    logic               src1_v;
    logic [PREG_W-1:0]  src1;
    logic [TOKEN_W-1:0] src1_tok;   // token of src1's producer (valid while it waits)
    logic               src2_v;
    logic [PREG_W-1:0]  src2;
    logic [TOKEN_W-1:0] src2_tok;
    logic               dst_v;
    logic [PREG_W-1:0]  dst;
    logic [TOKEN_W-1:0] dst_tok;    // own token (dst_v implies a token)
    logic               spec;       // queued under one of two pending sources
  } inst_t;

  // Token queue element: the owner's BBID travels along so that tokens of
  // squashed instructions can be dropped.
  typedef struct packed {
    logic [TOKEN_W-1:0] tok;
    logic [PREG_W-1:0]  dst;
    logic [BBID_W-1:0]  bbid;
  } tokq_t;

  // An instruction as delivered by the register renamer (physical and
  // logical register names both known).
  typedef struct packed {
    logic [ROB_W-1:0]   rob;
    logic [BBID_W-1:0]  bbid;
    logic [31:0]        pc;
    fu_e                fu;
    logic [LAT_W-1:0]   lat;
    logic               is_load;
    logic               long_lat;
    logic               is_branch;  // takes a token-table checkpoint
    logic               src1_v;
    logic [LREG_W-1:0]  src1_l;
    logic [PREG_W-1:0]  src1_p;
    logic               src2_v;
    logic [LREG_W-1:0]  src2_l;
    logic [PREG_W-1:0]  src2_p;
    logic               dst_v;
    logic [LREG_W-1:0]  dst_l;
    logic [PREG_W-1:0]  dst_p;
  } ren_t;

  // Per-cycle event counts, brought out for performance monitoring.
  typedef struct packed {
    logic [3:0] direct;         // dispatched straight to the issue buffer
    logic [3:0] inserted;       // dispatched into a depTable entry
    logic [3:0] spec_queued;    // of those, queued under one of two pending sources
    logic [3:0] bank_conflict;  // dispatch held back by a busy bank
    logic [3:0] entry_full;     // dispatch held back by a full entry
    logic [3:0] woken_tokens;   // depTable entries read out
    logic [3:0] woken_insts;    // instructions sent from the depTable to the issue buffer
    logic [3:0] redispatch;     // speculative wakeups that failed the check
    logic [3:0] overflow;       // re-dispatches dropped with a soft exception
    logic [3:0] wp_dropped;     // wrong-path instructions or tokens filtered out
    logic [3:0] issued;
    logic [3:0] interlock;      // issue stopped by a not-ready operand
  } seed_events_t;

  // The dependents of an instruction wake up only when it reports completion
  // (predicted-miss loads and variable-latency operations).
  function automatic logic wakes_on_completion(inst_t i);
    return i.long_lat || (i.is_load && !i.pred_hit);
  endfunction

  function automatic logic [$clog2(DT_BANKS)-1:0] bank_of(logic [TOKEN_W-1:0] t);
    return t[$clog2(DT_BANKS)-1:0];
  endfunction

endpackage
