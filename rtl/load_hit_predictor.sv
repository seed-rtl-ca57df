// load_hit_predictor: PC-indexed predictor of whether a load will hit in the
// L1 data cache. A load predicted to hit wakes its dependents as soon as it
// is woken itself (load-hit speculation); a load predicted to miss wakes them
// only when its data returns.
//
// How it works: a table of NENTRIES 3-bit saturating counters indexed by the
// low bits of the load's PC (word address, the two byte-offset bits are
// dropped). An L1 hit increments the counter, a miss clears it; a hit is
// predicted only when the counter is saturated. The table follows the
// described predictor; the index function and the reset are choices of this
// implementation. After reset the table is cleared one entry per cycle, as an
// SRAM would be (NENTRIES cycles); meanwhile every load is predicted to miss
// and updates are ignored, so all loads start as predicted misses.
//
// Timing: the lookup is combinational; an update lands at the clock edge.
//
// From the SEED paper: 8K entries of 3-bit counters; a hit increments, a
// miss clears, and only a saturated counter predicts a hit. Own choices: the
// index PC[14:2] and the entry-by-entry clear after reset.
//
// Lint: only PC bits 14:2 form the index; the unused PC bits are reported.
module load_hit_predictor
  import seed_pkg::*;
#(
  parameter int unsigned NENTRIES = LHP_ENTRIES,
  parameter int unsigned CTR_W    = LHP_CTR_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] lk_pc,
  output logic        lk_hit,
  output logic        init_busy,
  input  logic        upd_v,
  input  logic [31:0] upd_pc,
  input  logic        upd_hit
);
  localparam int unsigned IDX_W = $clog2(NENTRIES);

  logic [CTR_W-1:0] ctr [NENTRIES];

  function automatic logic [IDX_W-1:0] idx(logic [31:0] pc);
    return pc[IDX_W+1:2];
  endfunction

  logic [IDX_W:0] init_ptr;   // entries cleared so far

  assign init_busy = !init_ptr[IDX_W];
  assign lk_hit    = !init_busy && (ctr[idx(lk_pc)] == {CTR_W{1'b1}});

  always_ff @(posedge clk) begin
    if (!rst_n) init_ptr <= '0;
    else if (init_busy) init_ptr <= init_ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (init_busy) begin
      ctr[init_ptr[IDX_W-1:0]] <= '0;
    end else if (upd_v) begin
      if (!upd_hit)
        ctr[idx(upd_pc)] <= '0;
      else if (ctr[idx(upd_pc)] != {CTR_W{1'b1}})
        ctr[idx(upd_pc)] <= ctr[idx(upd_pc)] + 1'b1;
    end
  end
endmodule
