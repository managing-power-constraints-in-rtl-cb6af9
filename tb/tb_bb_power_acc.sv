// tb_bb_power_acc: feeds random decode groups (with zero to several
// branches) and checks every energy write record - index of the branch
// that opened the block, energy saturated to 9 bits - and the open block's
// running sum and length, against an instruction-by-instruction model.
module tb_bb_power_acc;
  localparam int unsigned L = 4;
  logic clk = 0, rst_n = 0;
  logic valid [L], is_branch [L], wr_valid [L];
  logic [7:0] tok [L];
  logic [15:0] bp_idx [L], wr_idx [L];
  logic [8:0] wr_energy [L];
  logic [15:0] acc;
  logic [7:0] acc_len;
  int checks = 0, failures = 0;
  int m_acc = 0, m_len = 0, m_prev = 0;
  bit m_have = 0;
  int n_writes = 0, n_sat = 0, n_multi = 0;

  bb_power_acc dut (.clk, .rst_n, .valid, .tok, .is_branch, .bp_idx, .wr_valid, .wr_idx, .wr_energy, .acc, .acc_len);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) begin valid[l] = 0; is_branch[l] = 0; tok[l] = 0; bp_idx[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int nb;
      @(negedge clk);
      checks++;
      if (int'(acc) != m_acc || int'(acc_len) != m_len) begin
        failures++; $display("t=%0d acc %0d/%0d exp %0d/%0d", t, acc, acc_len, m_acc, m_len);
      end
      nb = 0;
      for (int l = 0; l < L; l++) begin
        valid[l] = ($urandom_range(0, 4) != 0);
        tok[l] = 8'($urandom_range(0, 60));
        // long blocks now and then so the 9-bit field saturates
        is_branch[l] = ($urandom_range(0, (t % 1000 < 200) ? 40 : 5) == 0);
        bp_idx[l] = 16'($urandom);
      end
      #1;
      for (int l = 0; l < L; l++) begin
        bit ev; int ee;
        ev = 0; ee = 0;
        if (valid[l]) begin
          m_acc += int'(tok[l]);
          if (m_acc > 65535) m_acc = 65535;
          if (m_len < 255) m_len++;
          if (is_branch[l]) begin
            ev = m_have; ee = (m_acc > 511) ? 511 : m_acc;
            if (m_acc > 511 && m_have) n_sat++;
            nb++;
            checks++;
            if (ev && (int'(wr_idx[l]) != m_prev || int'(wr_energy[l]) != ee)) begin
              failures++; $display("t=%0d lane %0d write idx %0d e %0d exp %0d %0d", t, l, wr_idx[l], wr_energy[l], m_prev, ee);
            end
            if (ev) n_writes++;
            m_acc = 0; m_len = 0; m_have = 1; m_prev = int'(bp_idx[l]);
          end
        end
        checks++;
        if (wr_valid[l] !== ev) begin failures++; $display("t=%0d lane %0d wr_valid %0b exp %0b", t, l, wr_valid[l], ev); end
      end
      if (nb > 1) n_multi++;
      @(posedge clk);
    end
    checks++;
    if (n_writes == 0 || n_sat == 0 || n_multi == 0) begin failures++; $display("not exercised %0d %0d %0d", n_writes, n_sat, n_multi); end
    $display("writes %0d saturated %0d multi-branch groups %0d", n_writes, n_sat, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
