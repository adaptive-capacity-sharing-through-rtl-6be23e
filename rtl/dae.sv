// dae: the Data Access Engine's placement control (Region Select).
//
// For every core it holds the current evicting-probability level Prob_c,
// written by the operating system at the end of each interval (cfg_we,
// cfg_core, cfg_level; out-of-range levels are clamped to the highest). Level
// k stands for the probability s/(p+s) with s = LEVEL_S[k], p = LEVEL_P[k].
// Instead of a random generator per core, placement follows the
// private-to-shared ratio s/p: the first s blocks that need a new data entry
// go to sData, the next p to the private region P, and so on.
//
// sel_core/sel_pfull ask where the next block of a core goes: sel_shared is
// combinational and is 1 only when the core's P is full (P is used first)
// and the core's ratio counter is in its shared phase. commit (same core)
// records that the placement happened and advances the counter; placements
// made while P is not full do not advance it. Writing a level restarts that
// core's counter at the start of the shared phase.
//
// With USE_PG=1 the DAE instead keeps a probability generator PG_i per core,
// a 16-bit LFSR whose value is read as Pr_i in [0,1): the block goes to sData
// when P is full and Pr_i is below s/(p+s) (threshold floor(2^16*s/(p+s))),
// and the generator steps on every commit while P is full. This is the
// fully probabilistic placement the ratio scheme approximates.
//
// Following the document: the per-core Prob_c, the ratio placement, the
// probability generator and filling P first. This design's own choices: the
// level encoding, the restart on a level write, not counting placements while
// P fills, and the LFSR (x^16 + x^14 + x^13 + x^11 + 1) as generator.
module dae #(
  parameter int unsigned N_CORES       = pcs_pkg::N_CORES,
  parameter int unsigned N_LEVELS      = pcs_pkg::N_LEVELS,
  parameter int unsigned LEVEL_S [N_LEVELS] = pcs_pkg::LEVEL_S,
  parameter int unsigned LEVEL_P [N_LEVELS] = pcs_pkg::LEVEL_P,
  parameter int unsigned DEFAULT_LEVEL = pcs_pkg::DEFAULT_LEVEL,
  parameter bit          USE_PG        = 1'b0,
  localparam int unsigned CORE_W = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned LVL_W  = (N_LEVELS > 1) ? $clog2(N_LEVELS) : 1,
  localparam int unsigned RC_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // operating-system side
  input  logic              cfg_we,
  input  logic [CORE_W-1:0] cfg_core,
  input  logic [LVL_W-1:0]  cfg_level,
  output logic [LVL_W-1:0]  level [N_CORES],
  // region select
  input  logic [CORE_W-1:0] sel_core,
  input  logic              sel_pfull,
  output logic              sel_shared,
  input  logic              commit
);

  logic [N_CORES-1:0] shared_phase_q;
  logic [RC_W-1:0]    cnt_q [N_CORES];

  function automatic logic [RC_W-1:0] s_of(input logic [LVL_W-1:0] l);
    return RC_W'(LEVEL_S[l]);
  endfunction
  function automatic logic [RC_W-1:0] p_of(input logic [LVL_W-1:0] l);
    return RC_W'(LEVEL_P[l]);
  endfunction

  // probability generators, one per core
  logic [15:0] pr_q [N_CORES];

  function automatic logic [15:0] lfsr_next(input logic [15:0] x);
    return {x[14:0], x[15] ^ x[13] ^ x[12] ^ x[10]};
  endfunction
  function automatic logic [16:0] thresh(input logic [LVL_W-1:0] l);
    return 17'((64'(LEVEL_S[l]) << 16) / 64'(LEVEL_S[l] + LEVEL_P[l]));
  endfunction

  assign sel_shared = sel_pfull && (USE_PG ? ({1'b0, pr_q[sel_core]} < thresh(level[sel_core]))
                                           : shared_phase_q[sel_core]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CORES; c++) pr_q[c] <= 16'hACE1 ^ 16'(c * 16'h1F3B);
    end else if (USE_PG && commit && sel_pfull) begin
      pr_q[sel_core] <= lfsr_next(pr_q[sel_core]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shared_phase_q <= '1;
      for (int c = 0; c < N_CORES; c++) begin
        level[c] <= LVL_W'(DEFAULT_LEVEL);
        cnt_q[c] <= '0;
      end
    end else begin
      if (commit && sel_pfull) begin
        logic [RC_W-1:0] lim;
        lim = shared_phase_q[sel_core] ? s_of(level[sel_core]) : p_of(level[sel_core]);
        if (cnt_q[sel_core] + 1'b1 >= lim) begin
          cnt_q[sel_core]          <= '0;
          // a zero count in the other phase keeps the current one
          if ((shared_phase_q[sel_core] ? p_of(level[sel_core]) : s_of(level[sel_core])) != '0)
            shared_phase_q[sel_core] <= !shared_phase_q[sel_core];
        end else begin
          cnt_q[sel_core] <= cnt_q[sel_core] + 1'b1;
        end
      end
      if (cfg_we) begin
        level[cfg_core]          <= (cfg_level > LVL_W'(N_LEVELS - 1)) ? LVL_W'(N_LEVELS - 1) : cfg_level;
        cnt_q[cfg_core]          <= '0;
        shared_phase_q[cfg_core] <= 1'b1;
      end
    end
  end

endmodule
