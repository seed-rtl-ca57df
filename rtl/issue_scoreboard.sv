// issue_scoreboard: per physical register, whether a consumer issued now
// would find the value (in the register file or on the bypass network). It
// provides the pipeline interlock of SEED's in-order issue stage.
//
// Each register has a "waiting" flag and a small countdown. Allocation at
// rename sets waiting. Issuing a producer with latency n clears waiting and
// loads the countdown with n-1: a one-cycle producer makes its register
// ready for the very next issue cycle, an n-cycle producer n cycles after its
// own issue. Producers whose latency is not known at issue (predicted-miss
// loads, variable-latency operations) leave waiting set; their completion
// clears it. Reset and flush make every register ready.
//
// Timing: reads are combinational and show the state at the start of the
// cycle; updates land at the clock edge. Allocation wins over other updates.
//
// From the SEED paper: a register is marked not ready on allocation and on
// the issue of an n-cycle producer, and ready in cycle n-1 after issue.
// Own choices: the per-register countdown and the completion port used by
// predicted-miss loads and variable-latency operations.
module issue_scoreboard
  import seed_pkg::*;
#(
  parameter int unsigned NPREGS = NUM_PREGS,
  parameter int unsigned N_ISS  = ISSUE_WIDTH,
  parameter int unsigned N_CMP  = 1,
  parameter int unsigned N_CLR  = 1,
  parameter int unsigned N_RD   = 2 * ISSUE_WIDTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic [N_CLR-1:0]          clr_v,
  input  logic [PREG_W-1:0]         clr_reg [N_CLR],
  input  logic [N_ISS-1:0]          iss_v,      // timed producer issued
  input  logic [PREG_W-1:0]         iss_reg [N_ISS],
  input  logic [LAT_W-1:0]          iss_lat [N_ISS],
  input  logic [N_CMP-1:0]          cmp_v,      // untimed producer completed
  input  logic [PREG_W-1:0]         cmp_reg [N_CMP],
  input  logic [PREG_W-1:0]         rd_reg  [N_RD],
  output logic [N_RD-1:0]           rd_rdy
);
  logic [NPREGS-1:0] waiting;
  logic [LAT_W-1:0]  cd [NPREGS];

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      waiting <= '0;
      for (int p = 0; p < NPREGS; p++) cd[p] <= '0;
    end else begin
      for (int p = 0; p < NPREGS; p++)
        if (cd[p] != '0) cd[p] <= cd[p] - 1'b1;
      for (int i = 0; i < N_CMP; i++)
        if (cmp_v[i]) begin
          waiting[cmp_reg[i]] <= 1'b0;
          cd[cmp_reg[i]]      <= '0;
        end
      for (int i = 0; i < N_ISS; i++)
        if (iss_v[i]) begin
          waiting[iss_reg[i]] <= 1'b0;
          cd[iss_reg[i]]      <= (iss_lat[i] > 1) ? iss_lat[i] - 1'b1 : '0;
        end
      for (int i = 0; i < N_CLR; i++)
        if (clr_v[i]) begin
          waiting[clr_reg[i]] <= 1'b1;
          cd[clr_reg[i]]      <= '0;
        end
    end
  end

  always_comb
    for (int i = 0; i < N_RD; i++)
      rd_rdy[i] = !waiting[rd_reg[i]] && (cd[rd_reg[i]] == '0);
endmodule
