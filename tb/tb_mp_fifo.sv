// tb_mp_fifo: random multi-push / multi-pop traffic against a reference
// queue. Uses a depth of 6 (not a power of two) so the pointer wrap is
// exercised, 3 push lanes with gaps between valid lanes, and 2 pop lanes.
// Checks the head entries, count and free every cycle, and that flush empties.
//
// The rules checked are those of the SEED paper as built in rtl/; stimulus,
// reference model and run length are choices of this testbench.
`timescale 1ns/1ps
module tb_mp_fifo;
  localparam int DEPTH = 6, PN = 3, QN = 2;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [PN-1:0]   push_v;
  logic [7:0]      push_d [PN];
  logic [1:0]      pop_cnt;
  logic [7:0]      head_d [QN];
  logic [QN-1:0]   head_v;
  logic [2:0]      count, free;
  int checks = 0, failures = 0;
  logic [7:0] ref_q [$];
  byte unsigned seq = 0;

  mp_fifo #(.T(logic [7:0]), .DEPTH(DEPTH), .PUSH_N(PN), .POP_N(QN)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (int'(count) != ref_q.size() || int'(free) != DEPTH - ref_q.size()) begin
      failures++; $display("count %0d free %0d, expected %0d", count, free, ref_q.size());
    end
    for (int j = 0; j < QN; j++) begin
      checks++;
      if (head_v[j] != (j < ref_q.size()) || (j < ref_q.size() && head_d[j] != ref_q[j])) begin
        failures++; $display("head %0d: %0d/%0h expected %0h", j, head_v[j], head_d[j], j < ref_q.size() ? ref_q[j] : 0);
      end
    end
  endtask

  initial begin
    push_v = '0; pop_cnt = '0;
    foreach (push_d[i]) push_d[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state();
    for (int c = 0; c < 1500; c++) begin
      int nfree, np, npop;
      @(negedge clk);
      nfree = DEPTH - ref_q.size();
      np = 0;
      for (int i = 0; i < PN; i++) begin
        push_v[i] = ($urandom_range(1) == 1) && (np < nfree);
        push_d[i] = seq + 8'(i);
        if (push_v[i]) np++;
      end
      npop = int'($urandom_range(QN));
      if (npop > ref_q.size()) npop = ref_q.size();
      pop_cnt = 2'(npop);
      flush = (c % 400 == 399);
      @(posedge clk); #1;
      if (flush) ref_q.delete();
      else begin
        for (int k = 0; k < npop; k++) void'(ref_q.pop_front());
        for (int i = 0; i < PN; i++) if (push_v[i]) ref_q.push_back(seq + 8'(i));
      end
      seq += 8'(PN);
      push_v = '0; pop_cnt = '0; flush = 0;
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
