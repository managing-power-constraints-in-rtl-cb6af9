// power_token_manager: power-budget manager for a four-wide out-of-order
// core, built on power tokens.
//
// The core's power is estimated every cycle as the tokens of the
// instructions in its pipeline. A power-token history table (PTHT) gives the
// cost of each instruction at fetch; the cost is added to the running total
// when fetch accepts the instruction and removed when it commits (or is
// squashed), at which point the PTHT learns the measured cost (group base
// tokens + RUU cycles). On this estimate three mechanisms act against the
// budget (budget, in tokens):
//  * PTT, power-token throttling (cfg.ptt_en): fetch lanes are refused while
//    the next instruction would take the total over the budget; branches,
//    and with cfg.ptt_cp predicted-critical instructions, always pass.
//  * BBLM, the basic-block level manager (cfg.bblm_en): decode measures the
//    energy of each basic block and stores it in the gshare entry of the
//    branch that leads into the block; each prediction returns that energy,
//    and from the expected excess over the budget the manager enables
//    critical-path reordering, JRS confidence throttling or decode-commit
//    ratio throttling (tech_cp/tech_jrs/tech_dcr, one-hot level outputs to
//    the core). The over-budget test it uses can be advanced by preventive
//    switch-off (cfg.psoff_en) and switch-on (cfg.pson_en).
//  * DVFS (cfg.dvfs_en): every window the average power picks a V/f mode,
//    limited to modes 0..cfg.dvfs_max (2 gives the two-level set, 4 the
//    full DVFS set).
// The main configuration is the two-level scheme: DVFS over modes 0..2
// lowers the average power and BBLM (with the preventive switches)
// removes the remaining spikes.
//
// Interface (all lanes in program order; combinational paths noted):
//  fetch   f_*  : PCs of the fetch group -> f_tok (PTHT cost, to carry with
//                 each instruction), f_allow/f_stall (combinational).
//  predict bp_* : branch PC -> direction, predictor index (to carry) and
//                 next-block energy (combinational).
//  resolve bu_* : predictor index and outcome of a resolved branch.
//  decode  d_*  : carried token cost, branch flag and predictor index.
//  commit  c_*  : PC, power group, RUU cycles and carried token cost.
//  squash       : sq_tokens, sum of carried costs of squashed instructions.
// The critical-path predictor, the throttling mechanisms themselves and the
// voltage/frequency actuators belong to the core and are outside this
// module; their signals are ports.
//
// What follows the design description: the PTHT (8K x 8 bits), 16-bit
// accounting, the PTT rule, the BBLM thresholds and techniques, the
// preventive switches, and the DVFS window, modes and transition time.
// Port shapes, the combinational fetch-side paths and the use of the
// in-pipeline token total as the power sample for every mechanism are
// choices of this implementation.
module power_token_manager #(
  parameter int unsigned W            = 4,        // fetch/decode/commit width
  parameter int unsigned PC_W         = 32,
  parameter int unsigned PTHT_ENTRIES = 8192,
  parameter int unsigned BP_HIST      = 16,
  parameter int unsigned X_PCT        = 15,
  parameter int unsigned Y_PCT        = 65,
  parameter int unsigned DVFS_WINDOW  = 500_000,
  parameter int unsigned DVFS_TRANS   = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  pt_pkg::cfg_t                 cfg,
  input  pt_pkg::tok_t                 budget,
  // fetch
  input  logic                         f_valid     [W],
  input  logic [PC_W-1:0]              f_pc        [W],
  input  logic                         f_is_branch [W],
  input  logic                         f_critical  [W],
  output pt_pkg::itok_t                f_tok       [W],
  output logic                         f_allow     [W],
  output logic                         f_stall,
  // branch prediction
  input  logic                         bp_valid,
  input  logic [PC_W-1:0]              bp_pc,
  output logic                         bp_taken,
  output logic [BP_HIST-1:0]           bp_idx,
  output pt_pkg::bbtok_t               bp_energy,
  // branch resolution
  input  logic                         bu_valid,
  input  logic [BP_HIST-1:0]           bu_idx,
  input  logic                         bu_taken,
  // decode
  input  logic                         d_valid     [W],
  input  pt_pkg::itok_t                d_tok       [W],
  input  logic                         d_is_branch [W],
  input  logic [BP_HIST-1:0]           d_bp_idx    [W],
  // commit
  input  logic                         c_valid     [W],
  input  logic [PC_W-1:0]              c_pc        [W],
  input  logic [pt_pkg::GROUP_W-1:0]   c_group     [W],
  input  logic [pt_pkg::RUU_CYC_W-1:0] c_ruu_cyc   [W],
  input  pt_pkg::itok_t                c_tok       [W],
  input  pt_pkg::tok_t                 sq_tokens,
  // power state and technique controls
  output pt_pkg::tok_t                 cur_tokens,
  output logic                         over_budget,
  output pt_pkg::tech_e                tech,
  output logic                         tech_cp,
  output logic                         tech_jrs,
  output logic                         tech_dcr,
  output logic                         psoff_fire,
  output logic                         pson_fire,
  output logic [pt_pkg::MODE_W-1:0]    dvfs_mode,
  output logic [6:0]                   dvfs_vdd_pct,
  output logic [6:0]                   dvfs_f_pct,
  output logic                         dvfs_busy,
  output logic                         dvfs_window_done,
  output logic [47:0]                  dvfs_window_sum
);
  import pt_pkg::*;

  // ---------------- token estimation ----------------
  itok_t commit_cost [W];
  logic  add_valid   [W];

  ptht #(.ENTRIES(PTHT_ENTRIES), .PC_W(PC_W), .RD_PORTS(W), .WR_PORTS(W)) u_ptht (
    .clk, .rst_n,
    .rd_pc (f_pc),  .rd_tok (f_tok),
    .wr_en (c_valid), .wr_pc (c_pc), .wr_tok (commit_cost)
  );

  token_cost #(.LANES(W)) u_cost (
    .group (c_group), .ruu_cyc (c_ruu_cyc), .tokens (commit_cost)
  );

  always_comb
    for (int l = 0; l < W; l++) add_valid[l] = f_valid[l] && f_allow[l];

  token_accountant #(.ADD_LANES(W), .REL_LANES(W)) u_acct (
    .clk, .rst_n,
    .add_valid (add_valid), .add_tok (f_tok),
    .rel_valid (c_valid),   .rel_tok (c_tok), .rel_extra (sq_tokens),
    .cur       (cur_tokens)
  );

  // ---------------- PTT ----------------
  ptt_gate #(.LANES(W)) u_ptt (
    .en (cfg.ptt_en), .cp_mode (cfg.ptt_cp),
    .cur (cur_tokens), .budget,
    .valid (f_valid), .tok (f_tok), .is_branch (f_is_branch), .critical (f_critical),
    .allow (f_allow), .stall (f_stall)
  );

  // ---------------- BBLM ----------------
  logic             bb_wr_valid  [W];
  logic [BP_HIST-1:0] bb_wr_idx  [W];
  bbtok_t           bb_wr_energy [W];
  tok_t             bb_acc;
  logic [7:0]       bb_len;
  logic [BP_HIST-1:0] ghr;
  tech_e            bb_sel;

  gshare_bblm #(.HIST(BP_HIST), .PC_W(PC_W), .WR_PORTS(W)) u_bp (
    .clk, .rst_n,
    .pred_pc (bp_pc), .pred_taken (bp_taken), .pred_idx (bp_idx), .pred_energy (bp_energy),
    .upd_valid (bu_valid), .upd_idx (bu_idx), .upd_taken (bu_taken),
    .bb_wr_valid, .bb_wr_idx, .bb_wr_energy, .ghr
  );

  bb_power_acc #(.LANES(W), .IDX_W(BP_HIST)) u_bb (
    .clk, .rst_n,
    .valid (d_valid), .tok (d_tok), .is_branch (d_is_branch), .bp_idx (d_bp_idx),
    .wr_valid (bb_wr_valid), .wr_idx (bb_wr_idx), .wr_energy (bb_wr_energy),
    .acc (bb_acc), .acc_len (bb_len)
  );

  preventive_switch u_prev (
    .clk, .rst_n,
    .psoff_en (cfg.psoff_en), .pson_en (cfg.pson_en),
    .cur (cur_tokens), .budget,
    .over (over_budget), .off_fire (psoff_fire), .on_fire (pson_fire)
  );

  bblm_selector #(.X_PCT(X_PCT), .Y_PCT(Y_PCT)) u_sel (
    .clk, .rst_n, .en (cfg.bblm_en),
    .cur (cur_tokens), .budget,
    .bb_valid (bp_valid), .bb_energy (bp_energy),
    .over (over_budget),
    .sel (bb_sel), .active (tech)
  );

  assign tech_cp  = (tech == TECH_CP);
  assign tech_jrs = (tech == TECH_JRS);
  assign tech_dcr = (tech == TECH_DCR);

  // ---------------- DVFS ----------------
  dvfs_controller #(.WINDOW(DVFS_WINDOW), .TRANS_CYCLES(DVFS_TRANS)) u_dvfs (
    .clk, .rst_n, .en (cfg.dvfs_en), .max_mode (cfg.dvfs_max),
    .sample (cur_tokens), .budget,
    .mode (dvfs_mode), .vdd_pct (dvfs_vdd_pct), .f_pct (dvfs_f_pct),
    .busy (dvfs_busy), .window_done (dvfs_window_done), .last_sum (dvfs_window_sum)
  );
endmodule
