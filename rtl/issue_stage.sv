// issue_stage: SEED's in-order issue. Woken instructions arrive in an order
// that already respects their dependences, so a small FIFO (the issue
// buffer) and an in-order picker are enough; no wakeup or select matrix is
// needed here.
//
// Each cycle the picker walks the buffer from its head: an instruction of a
// squashed basic block is discarded (it takes a slot of the walk but no
// functional unit); otherwise it issues if both sources are ready in the
// issue scoreboard and a functional unit of its class is still free this
// cycle (3 load/store, 2 branch, 5 integer, 4 floating-point units, at most
// ISSUE_WIDTH in all). The walk stops at the first instruction that cannot
// issue, and nothing issues while exec_stall is high (a load predicted to
// hit has missed and the execution pipeline waits for its data).
//
// The issue scoreboard is updated with what issues: a timed producer makes
// its register ready lat cycles after issue (the next cycle for lat = 1);
// predicted-miss loads and variable-latency operations leave it waiting
// until their completion is reported on cmp_v.
//
// Interface and timing: pushes enter the buffer at the clock edge and can
// issue from the next cycle; iss_v/iss_inst are combinational and an
// instruction shown there leaves the buffer at the edge.
//
// From the SEED paper: 8-entry in-order issue buffer, selection from its
// head as far as the functional units allow (3 load/store, 2 branch, 5
// integer, 4 FP, 6 per cycle), wrong-path instructions discarded at issue.
// Own choices: the walk stops at the first blocked instruction; the
// exec_stall handshake.
//
// Lint: the buffer's occupancy output (count) is not needed and is reported
// unused.
module issue_stage
  import seed_pkg::*;
#(
  parameter int unsigned DEPTH  = ISSUE_BUF,
  parameter int unsigned WIDTH  = ISSUE_WIDTH,
  parameter int unsigned PUSH_N = 2 + WAKE_TOKENS * SUB_ENTRIES,
  parameter int unsigned NBBID  = NUM_BBID
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic [PUSH_N-1:0]         push_v,
  input  inst_t                     push_d [PUSH_N],
  output logic [$clog2(DEPTH+1)-1:0] free,
  input  logic [NBBID-1:0]          bb_valid,
  input  logic                      exec_stall,
  // register allocation at rename
  input  logic                      alloc_v,
  input  logic [PREG_W-1:0]         alloc_reg,
  // completion of an untimed producer
  input  logic                      cmp_v,
  input  logic [PREG_W-1:0]         cmp_reg,
  output logic [WIDTH-1:0]          iss_v,
  output inst_t                     iss_inst [WIDTH],
  output logic [3:0]                ev_issued,
  output logic [3:0]                ev_wp,
  output logic [3:0]                ev_interlock
);
  inst_t                       head_d [WIDTH];
  logic [WIDTH-1:0]            head_v;
  logic [$clog2(WIDTH+1)-1:0]  pop_cnt;
  logic [$clog2(DEPTH+1)-1:0]  count;   // occupancy, not needed by the picker

  mp_fifo #(.T(inst_t), .DEPTH(DEPTH), .PUSH_N(PUSH_N), .POP_N(WIDTH)) u_buf (
    .clk, .rst_n, .flush,
    .push_v, .push_d,
    .pop_cnt, .head_d, .head_v, .count, .free
  );

  logic [PREG_W-1:0]  rd_reg [2*WIDTH];
  logic [2*WIDTH-1:0] rd_rdy;
  logic [WIDTH-1:0]   sb_iss_v;
  logic [PREG_W-1:0]  sb_iss_reg [WIDTH];
  logic [LAT_W-1:0]   sb_iss_lat [WIDTH];

  issue_scoreboard #(.N_ISS(WIDTH), .N_CMP(1), .N_CLR(1), .N_RD(2*WIDTH)) u_sb (
    .clk, .rst_n, .flush,
    .clr_v(alloc_v), .clr_reg('{alloc_reg}),
    .iss_v(sb_iss_v), .iss_reg(sb_iss_reg), .iss_lat(sb_iss_lat),
    .cmp_v(cmp_v), .cmp_reg('{cmp_reg}),
    .rd_reg, .rd_rdy
  );

  always_comb
    for (int j = 0; j < WIDTH; j++) begin
      rd_reg[2*j]   = head_d[j].src1;
      rd_reg[2*j+1] = head_d[j].src2;
    end

  always_comb begin
    logic stop;
    int unsigned n_alu, n_ldst, n_br, n_fp, pops;
    stop = exec_stall;
    n_alu = 0; n_ldst = 0; n_br = 0; n_fp = 0; pops = 0;
    ev_issued = '0; ev_wp = '0; ev_interlock = '0;
    for (int j = 0; j < WIDTH; j++) begin
      logic rdy, fu_ok;
      inst_t d;
      d = head_d[j];
      rdy = (!d.src1_v || rd_rdy[2*j]) && (!d.src2_v || rd_rdy[2*j+1]);
      unique case (d.fu)
        FU_ALU:  fu_ok = n_alu  < NUM_ALU;
        FU_LDST: fu_ok = n_ldst < NUM_LDST;
        FU_BR:   fu_ok = n_br   < NUM_BR;
        default: fu_ok = n_fp   < NUM_FPU;
      endcase
      iss_v[j]      = 1'b0;
      iss_inst[j]   = d;
      sb_iss_v[j]   = 1'b0;
      sb_iss_reg[j] = d.dst;
      sb_iss_lat[j] = d.lat;
      if (!stop && head_v[j]) begin
        if (!bb_valid[d.bbid]) begin
          pops++;
          ev_wp = ev_wp + 1'b1;
        end else if (!rdy) begin
          stop = 1'b1;
          ev_interlock = 4'd1;
        end else if (!fu_ok) begin
          stop = 1'b1;
        end else begin
          pops++;
          iss_v[j]    = 1'b1;
          sb_iss_v[j] = d.dst_v && !wakes_on_completion(d);
          ev_issued   = ev_issued + 1'b1;
          unique case (d.fu)
            FU_ALU:  n_alu++;
            FU_LDST: n_ldst++;
            FU_BR:   n_br++;
            default: n_fp++;
          endcase
        end
      end else begin
        stop = 1'b1;
      end
    end
    pop_cnt = ($clog2(WIDTH+1))'(pops);
  end
endmodule
