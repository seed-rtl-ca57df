// dispatch_scoreboard: one bit per physical register telling the dispatch
// logic whether the producer of that register has already woken up its
// dependents. A set bit means a consumer no longer has to wait in the
// depTable and can go straight to the issue buffer; a clear bit means the
// consumer must be queued under the producer's token.
//
// A bit is cleared when its register is allocated at rename and set when the
// producer's token enters the token queue (for ordinary instructions that is
// the cycle they enter the issue buffer; for predicted-miss loads and
// variable-latency operations it is the cycle their result comes back).
// All bits are set after reset (architectural registers are ready).
//
// Timing: reads are combinational and show the state at the start of the
// cycle; set and clear take effect at the clock edge. A clear wins over a set
// of the same register in the same cycle (a new instance of the register).
//
// From the SEED paper: one bit per physical register, cleared when the
// register is allocated and set once the producer has performed its wakeup.
// Own choices: the set happens when the producer's token enters the token
// queue; all bits are set at reset; one 640-register space (384 INT + 256 FP).
module dispatch_scoreboard
  import seed_pkg::*;
#(
  parameter int unsigned NPREGS = NUM_PREGS,
  parameter int unsigned N_SET  = 1,
  parameter int unsigned N_CLR  = 1,
  parameter int unsigned N_RD   = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,      // all registers ready again
  input  logic [N_CLR-1:0]          clr_v,
  input  logic [PREG_W-1:0]         clr_reg [N_CLR],
  input  logic [N_SET-1:0]          set_v,
  input  logic [PREG_W-1:0]         set_reg [N_SET],
  input  logic [PREG_W-1:0]         rd_reg  [N_RD],
  output logic [N_RD-1:0]           rd_rdy
);
  logic [NPREGS-1:0] sb;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      sb <= '1;
    end else begin
      for (int i = 0; i < N_SET; i++)
        if (set_v[i]) sb[set_reg[i]] <= 1'b1;
      for (int i = 0; i < N_CLR; i++)
        if (clr_v[i]) sb[clr_reg[i]] <= 1'b0;
    end
  end

  always_comb
    for (int i = 0; i < N_RD; i++) rd_rdy[i] = sb[rd_reg[i]];
endmodule
