// tb_bblm_selector: checks the BBLM threshold decision at the boundaries
// (budget 1000: estimate 1000 -> none, 1001 -> CP, 1149 -> CP, 1150 -> JRS,
// 1650 -> JRS, 1651 -> DCR), the raise-while-over / release-one-level-per-
// cycle behaviour, and random sequences against a reference model.
module tb_bblm_selector;
  import pt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, bb_valid, over;
  logic [15:0] cur, budget;
  logic [8:0] bb_energy;
  tech_e sel, active;
  int checks = 0, failures = 0;
  int m_sel = 0, m_act = 0;
  int seen [4] = '{0, 0, 0, 0};
  int releases = 0;

  bblm_selector dut (.clk, .rst_n, .en, .cur, .budget, .bb_valid, .bb_energy, .over, .sel, .active);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int target(int c, int e, int b);
    int est;
    est = c + e;
    if (est <= b) return 0;
    if (est * 100 < b * 115) return 1;
    if (est * 100 <= b * 165) return 2;
    return 3;
  endfunction

  task automatic step();
    @(posedge clk);
    if (!en) begin m_sel = 0; m_act = 0; end
    else begin
      int ns, na;
      ns = bb_valid ? target(int'(cur), int'(bb_energy), int'(budget)) : m_sel;
      na = m_act;
      if (over) begin if (m_sel > m_act) na = m_sel; end
      else if (m_act > 0) begin na = m_act - 1; releases++; end
      m_sel = ns; m_act = na;
    end
    #1;
    checks++;
    if (int'(sel) != m_sel || int'(active) != m_act) begin
      failures++; $display("sel %0d/%0d active %0d/%0d", sel, m_sel, active, m_act);
    end
    seen[m_act]++;
  endtask

  initial begin
    en = 1; bb_valid = 0; over = 0; cur = 0; budget = 1000; bb_energy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // boundary decisions
    begin
      int e_list [6] = '{1000, 1001, 1149, 1150, 1650, 1651};
      int t_list [6] = '{0, 1, 1, 2, 2, 3};
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        cur = 16'(e_list[k] - 300); bb_energy = 9'd300; bb_valid = 1; over = 0;
        step();
        checks++;
        if (int'(sel) != t_list[k]) begin failures++; $display("boundary est %0d: sel %0d exp %0d", e_list[k], sel, t_list[k]); end
      end
    end
    // DCR chosen; over -> active raised to DCR, then released DCR->JRS->CP->none
    @(negedge clk); bb_valid = 0; over = 1; step();
    checks++; if (active != TECH_DCR) begin failures++; $display("raise to DCR failed"); end
    @(negedge clk); over = 0;
    for (int k = 2; k >= 0; k--) begin
      step();
      checks++; if (int'(active) != k) begin failures++; $display("release step %0d got %0d", k, active); end
    end
    // random
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 50) != 0);
      budget = 16'($urandom_range(500, 3000));
      cur = 16'(int'(budget) - 400 + $urandom_range(0, 900));
      bb_energy = 9'($urandom);
      bb_valid = ($urandom_range(0, 3) == 0);
      over = (t % 40 < 25);
      step();
    end
    checks++;
    if (seen[1] == 0 || seen[2] == 0 || seen[3] == 0 || releases == 0) begin failures++; $display("levels not all reached"); end
    $display("cycles at none/CP/JRS/DCR: %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
