// mp_fifo: first-in first-out queue that accepts several entries and
// releases several entries per clock. SEED uses it for its token queue, the
// dispatch FIFO between rename and the depTable, the re-dispatch overflow
// queue and the in-order issue buffer.
//
// How it works: a circular array with read and write pointers. In one cycle
// the valid lanes of push_v are appended in lane order (lane 0 first) and
// pop_cnt entries are removed from the head. The first POP_N entries are
// visible on head_d/head_v so that the consumer can look at them before it
// decides how many to take.
//
// Interface and timing: pushes and pops take effect at the rising clock
// edge; head_d, count and free reflect the state after that edge. A producer
// may push at most `free` entries in a cycle (space freed by a pop in the
// same cycle is not counted) and the consumer may pop at most `count`.
// rst_n is synchronous and active low. flush empties the queue; it wins over a push in the same cycle.
// The queue organisation is the described one; the lane ordering and the
// flush are choices of this implementation.
//
// The SEED paper names the FIFOs built from this module (dispatch FIFO,
// token queue, re-dispatch queue, issue buffer) but not their construction;
// everything here is an implementation choice.
module mp_fifo #(
  parameter type         T      = logic [7:0],
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned PUSH_N = 1,
  parameter int unsigned POP_N  = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         flush,
  input  logic [PUSH_N-1:0]            push_v,
  input  T                             push_d [PUSH_N],
  input  logic [$clog2(POP_N+1)-1:0]   pop_cnt,
  output T                             head_d [POP_N],
  output logic [POP_N-1:0]             head_v,
  output logic [$clog2(DEPTH+1)-1:0]   count,
  output logic [$clog2(DEPTH+1)-1:0]   free
);
  localparam int unsigned PW = $clog2(DEPTH) > 0 ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T              mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] cnt;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] p, int unsigned n);
    return PW'((int'(p) + n) % DEPTH);
  endfunction

  int unsigned n_push;
  always_comb begin
    n_push = 0;
    for (int i = 0; i < PUSH_N; i++) n_push += int'(push_v[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      rd_ptr <= wrap_add(rd_ptr, int'(pop_cnt));
      wr_ptr <= wrap_add(wr_ptr, n_push);
      cnt    <= CW'(int'(cnt) + n_push - int'(pop_cnt));
    end
  end

  // Storage needs no reset: an entry is only read after it was written.
  always_ff @(posedge clk) begin
    int unsigned k;
    k = 0;
    for (int i = 0; i < PUSH_N; i++) begin
      if (push_v[i] && !flush) begin
        mem[wrap_add(wr_ptr, k)] <= push_d[i];
        k++;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < POP_N; j++) begin
      head_d[j] = mem[wrap_add(rd_ptr, j)];
      head_v[j] = (j < int'(cnt));
    end
  end

  assign count = cnt;
  assign free  = CW'(DEPTH - int'(cnt));

  // Handshake rules: never overfill, never pop what is not there.
  always_ff @(posedge clk) begin
    if (rst_n && !flush) begin
      assert (n_push <= int'(free))
        else $error("mp_fifo: %0d pushes with %0d free entries", n_push, free);
      assert (int'(pop_cnt) <= int'(cnt))
        else $error("mp_fifo: pop of %0d with %0d entries", pop_cnt, cnt);
    end
  end
endmodule
