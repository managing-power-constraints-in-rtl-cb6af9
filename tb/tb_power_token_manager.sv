// tb_power_token_manager: end-to-end test of the power-token manager at its
// default parameters (8K-entry PTHT, 16-bit gshare, 500K-cycle DVFS
// window), driven by a behavioural four-wide out-of-order core.
//
// The core model streams a 512-instruction loop (a branch every few
// instructions), fetches up to four instructions per cycle up to the first
// branch, keeps up to 128 in flight, decodes them one cycle after fetch and
// commits them in order, up to four per cycle, after their RUU residency.
// Residency alternates between short and long phases so the power crosses
// the budget in both directions; one committed branch in six is treated as
// mispredicted and squashes everything younger.
//
// Every cycle the testbench checks, against its own model: the PTHT value
// returned for each fetched PC (last committed cost = base + RUU cycles),
// the in-pipeline token total, the PTT fetch decision, the basic-block
// energy returned with each prediction, and the technique outputs. The run
// steps through the configurations PTT, PTT with critical bypass, BBLM with
// preventive switch-off/on, the two-level scheme (DVFS modes 0..2 + BBLM)
// and DVFS alone (modes 0..4), and counts how often each mechanism acted:
// fetch stalls, branch and critical bypasses, each BBLM technique, the
// progressive release, both preventive switches, squashes, learnt block
// energies, DVFS window ends, transitions and deep modes. A mechanism that
// never acted counts as a failure.
module tb_power_token_manager;
  import pt_pkg::*;
  localparam int W = 4;
  localparam int PROG = 512;
  localparam int RUU = 128;
  localparam int WIN = 500_000;           // DVFS window of the default top
  localparam int BASE [8] = '{4, 6, 8, 10, 12, 16, 20, 28};
  localparam int P_PTT = 20_000, P_CP = 20_000, P_BBLM = 60_000;
  localparam int P_TWO = 2 * WIN + 20_000, P_DVFS = 2 * WIN + 20_000;
  localparam int TOTAL = P_PTT + P_CP + P_BBLM + P_TWO + P_DVFS;

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  tok_t budget;
  logic f_valid [W], f_is_branch [W], f_critical [W], f_allow [W];
  logic [31:0] f_pc [W];
  itok_t f_tok [W];
  logic f_stall;
  logic bp_valid, bp_taken, bu_valid, bu_taken;
  logic [31:0] bp_pc;
  logic [15:0] bp_idx, bu_idx;
  bbtok_t bp_energy;
  logic d_valid [W], d_is_branch [W];
  itok_t d_tok [W];
  logic [15:0] d_bp_idx [W];
  logic c_valid [W];
  logic [31:0] c_pc [W];
  logic [2:0] c_group [W];
  logic [7:0] c_ruu_cyc [W];
  itok_t c_tok [W];
  tok_t sq_tokens, cur_tokens;
  logic over_budget, tech_cp, tech_jrs, tech_dcr, psoff_fire, pson_fire;
  tech_e tech;
  logic [2:0] dvfs_mode;
  logic [6:0] dvfs_vdd_pct, dvfs_f_pct;
  logic dvfs_busy, dvfs_window_done;
  logic [47:0] dvfs_window_sum;

  power_token_manager dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  initial begin
    #(64'(TOTAL + 10_000) * 10);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- core model state ----------------
  typedef struct {
    int seq; int pc; int tok; int grp; int ruu; bit br; int idx; int ready;
  } inst_t;
  inst_t q [$];          // in flight, oldest first
  inst_t dq [$];         // fetched last cycle, decoded this cycle
  int m_ptht [int];      // reference PTHT, by index
  int m_bb [int];        // reference basic-block energy, by predictor index
  int bb_acc = 0, bb_prev = 0;
  bit bb_have = 0;
  int m_cur = 0;
  int seq = 0;

  // mechanism counters
  int n_stall = 0, n_br_pass = 0, n_cp_pass = 0, n_squash = 0, n_bb_learnt = 0;
  int n_lvl [4] = '{0, 0, 0, 0};
  int n_release = 0, n_off = 0, n_on = 0, n_win = 0, n_trans = 0, n_deep = 0, n_mode2 = 0;
  tech_e last_tech = TECH_NONE;

  function automatic int pc_of(int s);   return 32'h0001_0000 + 4 * (s % PROG); endfunction
  function automatic bit br_of(int s);   int i = s % PROG; return (i % 7 == 6) || (i % 11 == 3); endfunction
  function automatic int grp_of(int s);  int i = s % PROG; return (i * 5 + i / 3) % 8; endfunction
  function automatic bit crit_of(int s); int i = s % PROG; return (i % 5 == 2); endfunction
  function automatic int pidx(int pc);   return (pc >> 2) % 8192; endfunction
  function automatic int ruu_of(int c);
    // long-residency phases raise the power, short ones lower it
    if ((c / 4000) % 2 == 1) return 20 + int'($urandom_range(0, 30));
    return 2 + int'($urandom_range(0, 8));
  endfunction

  task automatic set_cfg(int c);
    cfg = '0;
    case (c)
      0: begin cfg.ptt_en = 1; budget = 16'd1500; end
      1: begin cfg.ptt_en = 1; cfg.ptt_cp = 1; budget = 16'd1500; end
      2: begin cfg.bblm_en = 1; cfg.psoff_en = 1; cfg.pson_en = 1; budget = 16'd1500; end
      3: begin cfg.bblm_en = 1; cfg.psoff_en = 1; cfg.pson_en = 1; cfg.dvfs_en = 1; cfg.dvfs_max = 3'd2; budget = 16'd1200; end
      default: begin cfg.dvfs_en = 1; cfg.dvfs_max = 3'd4; budget = 16'd700; end
    endcase
  endtask

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cycle, what);
  endtask

  initial begin
    int phase_end [5] = '{P_PTT, P_PTT + P_CP, P_PTT + P_CP + P_BBLM,
                          P_PTT + P_CP + P_BBLM + P_TWO, TOTAL};
    int ph;
    ph = 0;
    set_cfg(0);
    for (int l = 0; l < W; l++) begin
      f_valid[l] = 0; f_pc[l] = 0; f_is_branch[l] = 0; f_critical[l] = 0;
      d_valid[l] = 0; d_tok[l] = 0; d_is_branch[l] = 0; d_bp_idx[l] = 0;
      c_valid[l] = 0; c_pc[l] = 0; c_group[l] = 0; c_ruu_cyc[l] = 0; c_tok[l] = 0;
    end
    bp_valid = 0; bp_pc = 0; bu_valid = 0; bu_idx = 0; bu_taken = 0; sq_tokens = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    for (cycle = 0; cycle < TOTAL; cycle++) begin
      int nf, ncm, sq_at, sq_sum, nbr, sq_seq;
      inst_t fg [W];
      bit squash;
      if (cycle == phase_end[ph]) begin ph++; set_cfg(ph); end

      // ---- commit: oldest ready, in order, stop after a branch ----
      ncm = 0; squash = 0; sq_at = -1;
      for (int l = 0; l < W; l++) c_valid[l] = 0;
      bu_valid = 0;
      while (ncm < W && ncm < q.size() && q[ncm].ready <= cycle) begin
        c_valid[ncm] = 1; c_pc[ncm] = q[ncm].pc; c_group[ncm] = 3'(q[ncm].grp);
        c_ruu_cyc[ncm] = 8'(q[ncm].ruu); c_tok[ncm] = 8'(q[ncm].tok);
        ncm++;
        if (q[ncm-1].br) begin
          bu_valid = 1; bu_idx = 16'(q[ncm-1].idx); bu_taken = (q[ncm-1].seq % 3 != 0);
          if ($urandom_range(0, 5) == 0) begin squash = 1; sq_at = ncm; sq_seq = q[ncm-1].seq; end
          break;
        end
      end
      sq_sum = 0;
      if (squash) for (int k = sq_at; k < q.size(); k++) sq_sum += q[k].tok;
      sq_tokens = 16'(sq_sum);

      // ---- decode: what fetch accepted last cycle ----
      for (int l = 0; l < W; l++) begin
        d_valid[l] = (l < dq.size());
        if (d_valid[l]) begin d_tok[l] = 8'(dq[l].tok); d_is_branch[l] = dq[l].br; d_bp_idx[l] = 16'(dq[l].idx); end
        else begin d_tok[l] = 0; d_is_branch[l] = 0; d_bp_idx[l] = 0; end
      end

      // ---- fetch: up to W, up to the first branch, room in the RUU ----
      nf = 0; nbr = 0;
      bp_valid = 0;
      for (int l = 0; l < W; l++) begin
        f_valid[l] = 0; f_is_branch[l] = 0; f_critical[l] = 0;
        if (!squash && nbr == 0 && q.size() + l < RUU) begin
          fg[l].seq = seq + l; fg[l].pc = pc_of(seq + l); fg[l].br = br_of(seq + l);
          fg[l].grp = grp_of(seq + l); fg[l].ruu = ruu_of(cycle);
          fg[l].ready = cycle + 3 + fg[l].ruu; fg[l].idx = 0;
          f_valid[l] = 1; f_pc[l] = fg[l].pc; f_is_branch[l] = fg[l].br; f_critical[l] = crit_of(seq + l);
          if (fg[l].br) begin nbr = 1; bp_valid = 1; bp_pc = fg[l].pc; end
          nf++;
        end
      end

      #1;
      // ---- checks on the combinational answers ----
      checks++;
      if (int'(cur_tokens) != m_cur) fail($sformatf("cur_tokens %0d exp %0d", cur_tokens, m_cur));
      begin
        int run; bit blocked;
        run = m_cur; blocked = 0;
        for (int l = 0; l < W; l++) if (f_valid[l]) begin
          int e; bit ea;
          e = m_ptht.exists(pidx(f_pc[l])) ? m_ptht[pidx(f_pc[l])] : 0;
          checks++;
          if (int'(f_tok[l]) != e) fail($sformatf("f_tok lane %0d pc %h: %0d exp %0d", l, f_pc[l], f_tok[l], e));
          ea = 0;
          if (!blocked) begin
            run += e;
            if (!cfg.ptt_en || run <= int'(budget)) ea = 1;
            else if (f_is_branch[l]) begin ea = 1; n_br_pass++; end
            else if (cfg.ptt_cp && f_critical[l]) begin ea = 1; n_cp_pass++; end
            else begin blocked = 1; n_stall++; end
          end
          checks++;
          if (f_allow[l] !== ea) fail($sformatf("f_allow lane %0d %0b exp %0b", l, f_allow[l], ea));
        end
      end
      if (bp_valid) begin
        int e;
        e = m_bb.exists(int'(bp_idx)) ? m_bb[int'(bp_idx)] : 0;
        checks++;
        if (int'(bp_energy) != e) fail($sformatf("bp_energy %0d exp %0d", bp_energy, e));
        if (e != 0) n_bb_learnt++;
      end
      checks++;
      if ({tech_dcr, tech_jrs, tech_cp} != (tech == TECH_NONE ? 3'b000 : 3'(1 << (int'(tech) - 1))))
        fail("technique outputs not one-hot of tech");
      if (!cfg.bblm_en && tech != TECH_NONE && last_tech == TECH_NONE) fail("technique active with BBLM off");
      checks++;
      if (int'(dvfs_vdd_pct) != (dvfs_mode == 0 ? 100 : dvfs_mode == 1 ? 95 : 90)) fail("vdd pct");
      n_lvl[tech]++;
      if (tech < last_tech) n_release++;
      last_tech = tech;
      if (psoff_fire) n_off++;
      if (pson_fire) n_on++;
      if (dvfs_window_done) n_win++;
      if (dvfs_busy) n_trans++;
      if (dvfs_mode > 2) n_deep++;
      if (dvfs_mode == 2) n_mode2++;
      if (dvfs_mode > 3'(cfg.dvfs_max) && !dvfs_busy && cfg.dvfs_en && cfg.dvfs_max == 4) fail("mode beyond limit");

      // ---- clock edge: advance the model ----
      @(posedge clk);
      // accepted fetches
      dq.delete();
      for (int l = 0; l < W; l++) if (f_valid[l] && f_allow[l]) begin
        fg[l].tok = int'(f_tok[l]);
        if (fg[l].br) fg[l].idx = int'(bp_idx);
        dq.push_back(fg[l]);
        m_cur += fg[l].tok;
      end
      // basic-block model (decode lanes of this cycle)
      for (int l = 0; l < W; l++) if (d_valid[l]) begin
        bb_acc += int'(d_tok[l]);
        if (d_is_branch[l]) begin
          if (bb_have) m_bb[bb_prev] = bb_acc > 511 ? 511 : bb_acc;
          bb_acc = 0; bb_have = 1; bb_prev = int'(d_bp_idx[l]);
        end
      end
      // commits: learn cost, release tokens
      for (int l = 0; l < ncm; l++) begin
        inst_t c;
        c = q.pop_front();
        m_ptht[pidx(c.pc)] = (BASE[c.grp] + c.ruu > 255) ? 255 : BASE[c.grp] + c.ruu;
        m_cur -= c.tok;
      end
      if (squash) begin
        // everything younger than the branch is gone; refetch after it
        n_squash++;
        m_cur -= sq_sum;
        q.delete();
        seq = sq_seq + 1;
      end else begin
        foreach (dq[k]) q.push_back(dq[k]);
        for (int l = 0; l < W; l++) if (f_valid[l] && f_allow[l]) seq++;
      end
      @(negedge clk);
    end

    // ---- every mechanism must have acted ----
    begin
      string names [14] = '{"ptt stall", "branch bypass", "critical bypass", "squash", "bb energy learnt",
                            "CP", "JRS", "DCR", "progressive release", "preventive switch-off",
                            "preventive switch-on", "dvfs window", "dvfs transition", "deep dvfs mode"};
      int cnt [14];
      cnt = '{n_stall, n_br_pass, n_cp_pass, n_squash, n_bb_learnt, n_lvl[1], n_lvl[2], n_lvl[3],
              n_release, n_off, n_on, n_win, n_trans, n_deep};
      for (int k = 0; k < 14; k++) begin
        checks++;
        $display("%-22s %0d", names[k], cnt[k]);
        if (cnt[k] == 0) fail($sformatf("mechanism never happened: %s", names[k]));
      end
      checks++;
      if (n_mode2 == 0) fail("two-level mode 2 never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
