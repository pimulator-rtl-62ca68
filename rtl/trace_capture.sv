// trace_capture: real-time statistics of the channel model.
//
// Counts, from reset, the emulated cycles and the stalled cycles, the memory
// commands accepted (ACT, RD/RDA, WR/WRA, PRE/PREA, REF), the in-memory
// operations (second activations, triple-row activations, LISA subarray
// hops), the row cache hits, misses and write backs, and the commands a bank
// state machine refused. Inputs are one-cycle event pulses, per bank where
// several banks can report in the same cycle. Counters are 32 bits and wrap.
// Timing: stats reflects the events up to the previous clock.
// That the model collects such statistics (operation counts, bank state
// dynamics, row cache hit rate) follows the published PiMulator design; the exact set of
// counters is this design's choice.
module trace_capture
  import pim_pkg::*;
#(
  parameter int unsigned NB   = 16,
  parameter int unsigned HOP_W = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stall,
  input  logic                  cmd_valid,
  input  cmd_t                  cmd,
  input  logic [NB-1:0]         react,
  input  logic [NB-1:0]         tra,
  input  logic [NB-1:0]         copy,
  input  logic [NB-1:0][HOP_W-1:0] hops,
  input  logic [NB-1:0]         hit,
  input  logic [NB-1:0]         miss,
  input  logic [NB-1:0]         wb,
  input  logic [NB-1:0]         violation,
  output stats_t                stats
);

  function automatic logic [31:0] popc(input logic [NB-1:0] v);
    logic [31:0] n;
    n = '0;
    for (int i = 0; i < NB; i++) n += 32'(v[i]);
    return n;
  endfunction

  logic [31:0] hop_sum;
  always_comb begin
    hop_sum = '0;
    for (int i = 0; i < NB; i++) if (copy[i]) hop_sum += 32'(hops[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      if (stall) stats.stall_cycles <= stats.stall_cycles + 1;
      else       stats.cycles       <= stats.cycles + 1;
      if (cmd_valid) begin
        unique case (cmd)
          CMD_ACT:           stats.n_act <= stats.n_act + 1;
          CMD_RD, CMD_RDA:   stats.n_rd  <= stats.n_rd + 1;
          CMD_WR, CMD_WRA:   stats.n_wr  <= stats.n_wr + 1;
          CMD_PRE, CMD_PREA: stats.n_pre <= stats.n_pre + 1;
          CMD_REF:           stats.n_ref <= stats.n_ref + 1;
          default: ;
        endcase
      end
      stats.n_reactivate <= stats.n_reactivate + popc(react);
      stats.n_tra        <= stats.n_tra + popc(tra);
      stats.n_lisa_hops  <= stats.n_lisa_hops + hop_sum;
      stats.n_hit        <= stats.n_hit + popc(hit);
      stats.n_miss       <= stats.n_miss + popc(miss);
      stats.n_writeback  <= stats.n_writeback + popc(wb);
      stats.n_violation  <= stats.n_violation + popc(violation);
    end
  end

endmodule
