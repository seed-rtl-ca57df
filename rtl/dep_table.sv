// dep_table: the dependence-tracking table (depTable) of SEED. Entry t
// belongs to the in-flight instruction holding token t and has SUB_ENTRIES
// sub-entries, each holding one dependent instruction that is to be woken
// when token t is woken. A dependent is appended behind the ones already in
// the entry; a per-entry fill count tells where.
//
// Wakeup is a plain indexed read: the entry of a token is read out whole
// (all sub-entries plus the fill count) and emptied in the same cycle, so
// that no broadcast or tag comparison is needed anywhere.
//
// Banking: entry t lives in bank t mod NBANKS. Each bank has a single port:
// in one cycle it serves either one insertion or one wakeup read. The
// controllers in front of the table schedule around that; an assertion
// checks it. The fill counts sit in registers beside the banks so that the
// controllers can see whether an entry is full without a bank access.
//
// Timing: reads are combinational (the wakeup of a token and the delivery of
// its dependents happen in one cycle); insertions, clears and resets take
// effect at the clock edge. A reset of a freshly allocated entry (rst_tok)
// empties it.
//
// From the SEED paper: one entry per token with 4 sub-entries, S/16 banks,
// one access (insertion or wakeup read) per bank per cycle, and a wakeup
// empties the entry. Own choices: bank = low token bits, fill counts kept in
// registers, combinational read, two insertion lanes.
module dep_table
  import seed_pkg::*;
#(
  parameter int unsigned NTOK   = DT_ENTRIES,
  parameter int unsigned NSUB   = SUB_ENTRIES,
  parameter int unsigned NBANKS = DT_BANKS,
  parameter int unsigned N_INS  = 2,
  parameter int unsigned N_RD   = WAKE_TOKENS,
  parameter int unsigned N_LK   = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  // insertion of a dependent behind token ins_tok
  input  logic [N_INS-1:0]          ins_v,
  input  logic [TOKEN_W-1:0]        ins_tok  [N_INS],
  input  inst_t                     ins_inst [N_INS],
  // wakeup reads: entry contents out, entry emptied at the edge
  input  logic [N_RD-1:0]           rd_v,
  input  logic [TOKEN_W-1:0]        rd_tok   [N_RD],
  output logic [CNT_W-1:0]          rd_cnt   [N_RD],
  output inst_t                     rd_sub   [N_RD][NSUB],
  // fill-count lookups for the controllers (no bank access)
  input  logic [TOKEN_W-1:0]        lk_tok   [N_LK],
  output logic [CNT_W-1:0]          lk_cnt   [N_LK],
  // entry reset on allocation
  input  logic                      rst_v,
  input  logic [TOKEN_W-1:0]        rst_tok
);
  localparam int unsigned BANK_W = $clog2(NBANKS) > 0 ? $clog2(NBANKS) : 1;
  localparam int unsigned ROWS   = NTOK / NBANKS;
  localparam int unsigned ROW_W  = $clog2(ROWS) > 0 ? $clog2(ROWS) : 1;

  inst_t            bank_mem [NBANKS][ROWS][NSUB];
  logic [CNT_W-1:0] cnt [NTOK];

  function automatic logic [BANK_W-1:0] bk(logic [TOKEN_W-1:0] t);
    return BANK_W'(int'(t) % NBANKS);
  endfunction
  function automatic logic [ROW_W-1:0] rw(logic [TOKEN_W-1:0] t);
    return ROW_W'(int'(t) / NBANKS);
  endfunction

  always_comb begin
    for (int r = 0; r < N_RD; r++) begin
      rd_cnt[r] = cnt[rd_tok[r]];
      for (int s = 0; s < NSUB; s++) rd_sub[r][s] = bank_mem[bk(rd_tok[r])][rw(rd_tok[r])][s];
    end
    for (int l = 0; l < N_LK; l++) lk_cnt[l] = cnt[lk_tok[l]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      for (int t = 0; t < NTOK; t++) cnt[t] <= '0;
    end else begin
      for (int i = 0; i < N_INS; i++)
        if (ins_v[i]) cnt[ins_tok[i]] <= cnt[ins_tok[i]] + 1'b1;
      for (int r = 0; r < N_RD; r++)
        if (rd_v[r]) cnt[rd_tok[r]] <= '0;
      if (rst_v) cnt[rst_tok] <= '0;
    end
  end

  // Sub-entry storage: written only at the slot named by the fill count.
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_INS; i++)
      if (ins_v[i] && cnt[ins_tok[i]] < CNT_W'(NSUB))
        bank_mem[bk(ins_tok[i])][rw(ins_tok[i])][cnt[ins_tok[i]][$clog2(NSUB)-1:0]] <= ins_inst[i];
  end

  // One access per bank per cycle; no insertion into a full entry.
  always_ff @(posedge clk)
    if (rst_n && !flush) begin
      for (int a = 0; a < N_INS + N_RD; a++)
        for (int b = a + 1; b < N_INS + N_RD; b++) begin
          logic va, vb;
          logic [TOKEN_W-1:0] ta, tb;
          va = (a < N_INS) ? ins_v[a] : rd_v[a - N_INS];
          vb = (b < N_INS) ? ins_v[b] : rd_v[b - N_INS];
          ta = (a < N_INS) ? ins_tok[a] : rd_tok[a - N_INS];
          tb = (b < N_INS) ? ins_tok[b] : rd_tok[b - N_INS];
          assert (!(va && vb && bk(ta) == bk(tb)))
            else $error("dep_table: two accesses to bank %0d in one cycle", bk(ta));
        end
      for (int i = 0; i < N_INS; i++)
        assert (!(ins_v[i] && cnt[ins_tok[i]] >= CNT_W'(NSUB)))
          else $error("dep_table: insertion into full entry %0d", ins_tok[i]);
    end
endmodule
