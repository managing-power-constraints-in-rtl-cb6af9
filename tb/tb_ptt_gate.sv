// tb_ptt_gate: checks the power-token throttling fetch gate against a
// reference of the rule "accept in order while cur + tokens so far stays
// within the budget; branches always, critical ones in PTT-CP mode", with
// directed cases and random groups.
module tb_ptt_gate;
  localparam int unsigned L = 4;
  logic en, cp_mode;
  logic [15:0] cur, budget;
  logic valid [L], is_branch [L], critical [L], allow [L];
  logic [7:0] tok [L];
  logic stall;
  int checks = 0, failures = 0;
  int n_stall = 0, n_branch_pass = 0, n_cp_pass = 0;

  ptt_gate dut (.en, .cp_mode, .cur, .budget, .valid, .tok, .is_branch, .critical, .allow, .stall);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    bit exp [L];
    bit exp_stall, blocked;
    int run;
    #1;
    run = int'(cur); blocked = 0; exp_stall = 0;
    for (int l = 0; l < L; l++) begin
      exp[l] = 0;
      if (valid[l] && !blocked) begin
        run += int'(tok[l]);
        if (!en || run <= int'(budget)) exp[l] = 1;
        else if (is_branch[l]) begin exp[l] = 1; n_branch_pass++; end
        else if (cp_mode && critical[l]) begin exp[l] = 1; n_cp_pass++; end
        else begin blocked = 1; exp_stall = 1; end
      end
    end
    if (exp_stall) n_stall++;
    for (int l = 0; l < L; l++) begin
      checks++;
      if (allow[l] !== exp[l]) begin failures++; $display("lane %0d allow %0b exp %0b", l, allow[l], exp[l]); end
    end
    checks++;
    if (stall !== exp_stall) begin failures++; $display("stall %0b exp %0b", stall, exp_stall); end
  endtask

  initial begin
    // directed: budget 100, cur 90, lanes of 5 tokens: lanes 0,1 fit, lane 2 stalls
    en = 1; cp_mode = 0; cur = 90; budget = 100;
    for (int l = 0; l < L; l++) begin valid[l] = 1; tok[l] = 5; is_branch[l] = 0; critical[l] = 0; end
    compare();
    checks++; if (!(allow[0] && allow[1] && !allow[2] && !allow[3] && stall)) begin failures++; $display("directed 1"); end
    // a branch in lane 2 passes, lane 3 is then over too and stalls
    is_branch[2] = 1; compare();
    checks++; if (!(allow[2] && !allow[3])) begin failures++; $display("directed 2"); end
    // disabled: everything passes
    en = 0; compare();
    checks++; if (!(allow[3] && !stall)) begin failures++; $display("directed 3"); end
    for (int t = 0; t < 20000; t++) begin
      en = ($urandom_range(0, 7) != 0);
      cp_mode = $urandom_range(0, 1);
      budget = 16'($urandom_range(200, 2000));
      cur = 16'(int'(budget) - 300 + $urandom_range(0, 400));
      for (int l = 0; l < L; l++) begin
        valid[l] = ($urandom_range(0, 5) != 0);
        tok[l] = 8'($urandom_range(0, 120));
        is_branch[l] = ($urandom_range(0, 5) == 0);
        critical[l] = ($urandom_range(0, 3) == 0);
      end
      compare();
    end
    checks++;
    if (n_stall == 0 || n_branch_pass == 0 || n_cp_pass == 0) begin
      failures++; $display("mechanism not exercised: stall %0d branch %0d cp %0d", n_stall, n_branch_pass, n_cp_pass);
    end
    $display("stalls %0d branch passes %0d critical passes %0d", n_stall, n_branch_pass, n_cp_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
