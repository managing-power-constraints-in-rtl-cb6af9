// pt_pkg: types and constants shared by the power-token manager.
//
// Power is counted in power tokens: one token is the energy of one
// instruction sitting in the register update unit (RUU) for one cycle. The
// accounting datapath is 16 bits wide, a PTHT entry holds 8 bits and a
// predictor entry holds 9 extra bits of basic-block energy; these widths,
// the 8 instruction groups, the BBLM thresholds (15 % and 65 %) and the DVFS
// V/f pairs follow the design description. The 2-bit technique encoding, the
// configuration struct and the fixed-point mode factors are choices of this
// implementation.
package pt_pkg;

  localparam int unsigned TOK_W      = 16;  // accounting adders / registers
  localparam int unsigned PTHT_W     = 8;   // bits per PTHT entry
  localparam int unsigned BB_W       = 9;   // extra bits per predictor entry
  localparam int unsigned N_GROUPS   = 8;   // instruction power groups
  localparam int unsigned GROUP_W    = $clog2(N_GROUPS);
  localparam int unsigned RUU_CYC_W  = 8;   // RUU residency counter width
  localparam int unsigned N_MODES    = 5;   // DVFS V/f pairs in the table
  localparam int unsigned MODE_W     = 3;

  typedef logic [TOK_W-1:0]  tok_t;
  typedef logic [PTHT_W-1:0] itok_t;        // tokens of one instruction
  typedef logic [BB_W-1:0]   bbtok_t;       // tokens of one basic block

  // BBLM techniques, from least to most aggressive.
  typedef enum logic [1:0] {
    TECH_NONE = 2'd0,   // nothing applied
    TECH_CP   = 2'd1,   // critical-path instruction reordering
    TECH_JRS  = 2'd2,   // confidence-estimation (JRS) throttling
    TECH_DCR  = 2'd3    // decode-commit ratio throttling
  } tech_e;

  // Run-time selection of the mechanisms.
  typedef struct packed {
    logic             ptt_en;    // power-token throttling of fetch
    logic             ptt_cp;    // PTT lets predicted-critical instructions pass
    logic             bblm_en;   // basic-block level manager
    logic             psoff_en;  // preventive switch-off
    logic             pson_en;   // preventive switch-on
    logic             dvfs_en;   // coarse-grain DVFS level
    logic [MODE_W-1:0] dvfs_max; // slowest mode DVFS may use (2: two-level, 4: DVFS alone)
  } cfg_t;

  // DVFS working modes: (VDD %, f %). Modes 0..2 are the two-level set,
  // modes 0..4 the set used by DVFS alone.
  function automatic int unsigned mode_vdd_pct(int unsigned m);
    case (m)
      0: return 100;
      1: return 95;
      default: return 90;
    endcase
  endfunction

  function automatic int unsigned mode_f_pct(int unsigned m);
    case (m)
      0: return 100;
      1: return 95;
      2: return 90;
      3: return 75;
      default: return 65;
    endcase
  endfunction

  // Relative dynamic power of a mode, P ~ VDD^2 * f, in units of 1e-6
  // (mode 0 = 1_000_000).
  function automatic int unsigned mode_factor(int unsigned m);
    return mode_vdd_pct(m) * mode_vdd_pct(m) * mode_f_pct(m);
  endfunction

endpackage
