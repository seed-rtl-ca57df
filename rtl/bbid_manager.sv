// bbid_manager: basic-block IDs for filtering wrong-path instructions.
// Every decoded basic block gets the next ID of a circular space of NBBID
// IDs; the instructions of the block carry it. IDs are recycled in order
// when a block commits (committing block b also recycles every ID between
// the oldest live one and b, which covers IDs handed to wrong-path blocks).
// When no ID is free, decode has to stall (alloc_ok low).
//
// On a branch misprediction in block b, every ID handed out after b is marked
// invalid in a valid-bit vector; instructions carrying an invalid ID are
// dropped wherever they are met (dispatch, wakeup, issue). The allocation
// pointer is not rewound, so the marked IDs stay out of use until recycled.
//
// Timing: alloc_id/alloc_ok and valid are outputs of registers (alloc_id is
// combinational from the tail pointer). A misprediction and an allocation in
// the same cycle are allowed: the invalidation covers only the IDs handed
// out before that cycle and the new block is valid.
//
// From the SEED paper: IDs increase monotonically with wrap-around and are
// recycled at commit, a valid bit vector flags wrong-path blocks invalid on a
// misprediction, and decode stalls when IDs run out. Own choices: 64 IDs, the
// port list and the same-cycle ordering of updates.
module bbid_manager
  import seed_pkg::*;
#(
  parameter int unsigned NBBID = NUM_BBID
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,      // pipeline restart: nothing in flight
  input  logic               alloc_v,
  output logic [BBID_W-1:0]  alloc_id,
  output logic               alloc_ok,
  input  logic               commit_v,
  input  logic [BBID_W-1:0]  commit_id,
  input  logic               mispred_v,
  input  logic [BBID_W-1:0]  mispred_id,
  output logic [NBBID-1:0]   valid
);
  logic [BBID_W-1:0]       head, tail;   // oldest live ID, next ID to hand out
  logic [$clog2(NBBID+1)-1:0] live;

  assign alloc_id = tail;
  assign alloc_ok = (live < ($clog2(NBBID+1))'(NBBID));

  // distance from a to b going forward around the circle
  function automatic int unsigned fwd_dist(logic [BBID_W-1:0] a, logic [BBID_W-1:0] b);
    return (int'(b) - int'(a) + NBBID) % NBBID;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      head  <= '0;
      tail  <= '0;
      live  <= '0;
      valid <= '0;
    end else begin
      logic [BBID_W-1:0]          h;
      logic [$clog2(NBBID+1)-1:0] l;
      h = head;
      l = live;
      if (mispred_v)
        for (int k = 0; k < NBBID; k++)
          // live IDs younger than mispred_id, measured from the head (with
          // all IDs live the tail equals the head and cannot bound them)
          if (fwd_dist(head, BBID_W'(k)) > fwd_dist(head, mispred_id) &&
              fwd_dist(head, BBID_W'(k)) < int'(live))
            valid[k] <= 1'b0;
      if (commit_v) begin
        l = l - ($clog2(NBBID+1))'(fwd_dist(head, commit_id) + 1);
        h = BBID_W'((int'(commit_id) + 1) % NBBID);
      end
      if (alloc_v && alloc_ok) begin
        valid[tail] <= 1'b1;
        tail <= BBID_W'((int'(tail) + 1) % NBBID);
        l = l + 1'b1;
      end
      head <= h;
      live <= l;
    end
  end

  always_ff @(posedge clk)
    if (rst_n && !flush)
      assert (!(commit_v && fwd_dist(head, commit_id) >= int'(live)))
        else $error("bbid_manager: commit of block %0d that is not live", commit_id);
endmodule
