// tb_budget_sweep: budget sweep on the power-token manager at its default
// parameters. A behavioural four-wide core (same shape as the one in
// tb_power_token_manager) runs a fixed synthetic workload whose power
// alternates between low and high phases; the core obeys PTT's fetch
// decision and throttles fetch to two lanes under JRS throttling and to one
// lane under decode-commit ratio throttling.
//
// The reference power (100 %) is the peak in-pipeline token count of an
// unmanaged run. For budgets of 95, 90, 80, 70, 60, 50 and 40 % of it the
// workload is run unmanaged, with PTT and with BBLM plus the preventive
// switches, each from reset, and the testbench measures the cycles over the
// budget and the area over it (sum of tokens above the budget per cycle).
// It checks that PTT and BBLM never leave more area over the budget than
// the unmanaged run, that PTT leaves fewer cycles over it, and that the
// managed runs stay consistent with the in-pipeline token total.
module tb_budget_sweep;
  import pt_pkg::*;
  localparam int W = 4;
  localparam int PROG = 512;
  localparam int RUU = 128;
  localparam int RUN = 40_000;
  localparam int WARM = 4_000;
  localparam int NB = 7;
  localparam int PCT [NB] = '{95, 90, 80, 70, 60, 50, 40};

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

  initial begin
    #(64'(RUN + 100) * 10 * (3 * NB + 2));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int seq; int pc; int tok; int grp; int ruu; bit br; int idx; int ready; } inst_t;

  function automatic bit br_of(int s);  int i = s % PROG; return (i % 7 == 6) || (i % 11 == 3); endfunction
  function automatic int grp_of(int s); int i = s % PROG; return (i * 5 + i / 3) % 8; endfunction
  function automatic bit crit_of(int s); int i = s % PROG; return (i % 5 == 2); endfunction

  // one run from reset; returns peak, cycles over and area over the budget
  task automatic run(input int sel, input int bud, output int peak, output int cov, output longint aopb);
    inst_t q [$];
    inst_t dq [$];
    int seq, m_cur;
    int unsigned lfsr;
    cfg = '0;
    if (sel == 1) cfg.ptt_en = 1;
    if (sel == 2) begin cfg.bblm_en = 1; cfg.psoff_en = 1; cfg.pson_en = 1; end
    budget = 16'(bud);
    seq = 0; m_cur = 0; lfsr = 32'h1234_5678;
    peak = 0; cov = 0; aopb = 0;
    for (int l = 0; l < W; l++) begin f_valid[l] = 0; d_valid[l] = 0; c_valid[l] = 0; end
    bp_valid = 0; bu_valid = 0; sq_tokens = 0;
    @(negedge clk); rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cycle = 0; cycle < RUN; cycle++) begin
      int ncm, sq_at, sq_sum, nbr, sq_seq, lanes;
      inst_t fg [W];
      bit squash;
      ncm = 0; squash = 0; sq_at = -1; sq_seq = 0;
      for (int l = 0; l < W; l++) c_valid[l] = 0;
      bu_valid = 0;
      while (ncm < W && ncm < q.size() && q[ncm].ready <= cycle) begin
        c_valid[ncm] = 1; c_pc[ncm] = q[ncm].pc; c_group[ncm] = 3'(q[ncm].grp);
        c_ruu_cyc[ncm] = 8'(q[ncm].ruu); c_tok[ncm] = 8'(q[ncm].tok);
        ncm++;
        if (q[ncm-1].br) begin
          bu_valid = 1; bu_idx = 16'(q[ncm-1].idx); bu_taken = 1;
          lfsr = lfsr * 1103515245 + 12345;
          if (lfsr[30:28] == 0) begin squash = 1; sq_at = ncm; sq_seq = q[ncm-1].seq; end
          break;
        end
      end
      sq_sum = 0;
      if (squash) for (int k = sq_at; k < q.size(); k++) sq_sum += q[k].tok;
      sq_tokens = 16'(sq_sum);
      for (int l = 0; l < W; l++) begin
        d_valid[l] = (l < dq.size());
        d_tok[l] = d_valid[l] ? 8'(dq[l].tok) : 8'd0;
        d_is_branch[l] = d_valid[l] && dq[l].br;
        d_bp_idx[l] = d_valid[l] ? 16'(dq[l].idx) : 16'd0;
      end
      // the core's reaction to the BBLM techniques
      lanes = tech_dcr ? 1 : tech_jrs ? 2 : W;
      nbr = 0; bp_valid = 0;
      for (int l = 0; l < W; l++) begin
        f_valid[l] = 0; f_is_branch[l] = 0; f_critical[l] = 0;
        if (!squash && nbr == 0 && l < lanes && q.size() + l < RUU) begin
          lfsr = lfsr * 1103515245 + 12345;
          fg[l].seq = seq + l; fg[l].pc = 32'h0001_0000 + 4 * ((seq + l) % PROG); fg[l].br = br_of(seq + l);
          fg[l].grp = grp_of(seq + l);
          fg[l].ruu = ((cycle / 3000) % 2 == 1) ? 20 + int'(lfsr[27:24]) * 2 : 2 + int'(lfsr[26:24]);
          fg[l].ready = cycle + 3 + fg[l].ruu; fg[l].idx = 0;
          f_valid[l] = 1; f_pc[l] = fg[l].pc; f_is_branch[l] = fg[l].br; f_critical[l] = crit_of(seq + l);
          if (fg[l].br) begin nbr = 1; bp_valid = 1; bp_pc = fg[l].pc; end
        end
      end
      #1;
      checks++;
      if (int'(cur_tokens) != m_cur) begin
        failures++;
        if (failures < 10) $display("run %0d cycle %0d: cur %0d exp %0d", sel, cycle, cur_tokens, m_cur);
      end
      if (cycle >= WARM) begin
        if (m_cur > peak) peak = m_cur;
        if (m_cur > bud) begin cov++; aopb += longint'(m_cur - bud); end
      end
      @(posedge clk);
      dq.delete();
      for (int l = 0; l < W; l++) if (f_valid[l] && f_allow[l]) begin
        fg[l].tok = int'(f_tok[l]);
        if (fg[l].br) fg[l].idx = int'(bp_idx);
        dq.push_back(fg[l]);
        m_cur += fg[l].tok;
      end
      for (int l = 0; l < ncm; l++) begin
        inst_t c;
        c = q.pop_front();
        m_cur -= c.tok;
      end
      if (squash) begin
        m_cur -= sq_sum; q.delete(); seq = sq_seq + 1;
      end else begin
        foreach (dq[k]) q.push_back(dq[k]);
        for (int l = 0; l < W; l++) if (f_valid[l] && f_allow[l]) seq++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int peak, cov0, cov1, cov2, pk;
    longint a0, a1, a2;
    run(0, 65535, peak, cov0, a0);
    $display("reference peak: %0d tokens", peak);
    $display("budget%%  cycles-over none/PTT/BBLM        area-over none/PTT/BBLM");
    for (int b = 0; b < NB; b++) begin
      int bud;
      bud = peak * PCT[b] / 100;
      run(0, bud, pk, cov0, a0);
      run(1, bud, pk, cov1, a1);
      run(2, bud, pk, cov2, a2);
      $display("%4d     %7d %7d %7d   %10d %10d %10d", PCT[b], cov0, cov1, cov2, a0, a1, a2);
      checks += 3;
      if (a1 > a0) begin failures++; $display("PTT leaves more area at %0d %%", PCT[b]); end
      if (a2 > a0) begin failures++; $display("BBLM leaves more area at %0d %%", PCT[b]); end
      if (cov1 > cov0) begin failures++; $display("PTT leaves more cycles at %0d %%", PCT[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
