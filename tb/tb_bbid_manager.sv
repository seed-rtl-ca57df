// tb_bbid_manager: random allocation, commit and misprediction against a
// reference list of live basic-block IDs in allocation order. Checks the
// next ID, the stall when all 64 IDs are live, that commit recycles every ID
// up to the committed one, and that a misprediction invalidates exactly the
// IDs handed out after the mispredicted block, also with all 64 IDs live.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_bbid_manager;
  import seed_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic              alloc_v, alloc_ok, commit_v, mispred_v;
  logic [BBID_W-1:0] alloc_id, commit_id, mispred_id;
  logic [NUM_BBID-1:0] valid;
  int q_id [$];
  bit q_valid [$];
  int next_id = 0;
  int checks = 0, failures = 0, n_full = 0, n_inval = 0, n_full_mp = 0;

  bbid_manager dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (alloc_ok != (q_id.size() < NUM_BBID) || int'(alloc_id) != next_id) begin
      failures++; $display("alloc_ok %0d id %0d, expected %0d %0d", alloc_ok, alloc_id, q_id.size() < NUM_BBID, next_id);
    end
    foreach (q_id[i]) begin
      checks++;
      if (valid[q_id[i]] != q_valid[i]) begin
        failures++; $display("id %0d valid %0d expected %0d", q_id[i], valid[q_id[i]], q_valid[i]);
      end
    end
  endtask

  initial begin
    alloc_v = 0; commit_v = 0; mispred_v = 0; commit_id = '0; mispred_id = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      int r;
      bit ok_s;
      @(negedge clk);
      check();
      r = int'($urandom_range(99));
      // phases: fill up, then mixed traffic
      alloc_v   = ((c / 500) % 2 == 0) ? ($urandom_range(9) < 8) : ($urandom_range(9) < 4);
      commit_v  = q_id.size() > 0 && r < ((c / 500) % 2 == 0 ? 10 : 45);
      mispred_v = q_id.size() > 0 && r >= 90;
      if (commit_v)  commit_id  = BBID_W'(q_id[$urandom_range(q_id.size() > 3 ? 3 : q_id.size() - 1)]);
      if (mispred_v) mispred_id = BBID_W'(q_id[$urandom_range(q_id.size() - 1)]);
      // all IDs live: the tail equals the head, a corner for the invalidation
      if (mispred_v && q_id.size() == NUM_BBID && $urandom_range(1) == 0) begin
        mispred_id = BBID_W'(q_id[0]); n_full_mp++;
      end
      if (alloc_v && !alloc_ok) n_full++;
      ok_s = alloc_ok;
      @(posedge clk); #1;
      if (mispred_v) begin
        int k;
        k = 0;
        while (q_id[k] != int'(mispred_id)) k++;
        for (int j = k + 1; j < q_id.size(); j++) begin q_valid[j] = 0; n_inval++; end
      end
      if (commit_v) begin
        int id;
        do begin
          id = q_id.pop_front();
          void'(q_valid.pop_front());
        end while (id != int'(commit_id));
      end
      if (alloc_v && ok_s) begin
        q_id.push_back(next_id); q_valid.push_back(1);
        next_id = (next_id + 1) % NUM_BBID;
      end
      alloc_v = 0; commit_v = 0; mispred_v = 0;
    end
    checks++;
    if (n_full == 0 || n_inval == 0 || n_full_mp == 0) begin
      failures++; $display("not exercised: full %0d invalidations %0d full-list mispredictions %0d", n_full, n_inval, n_full_mp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
