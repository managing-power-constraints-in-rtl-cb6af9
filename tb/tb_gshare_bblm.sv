// tb_gshare_bblm: random predictions, resolutions and basic-block energy
// writes against a reference gshare (2-bit counters, non-speculative
// 16-bit history, 9-bit energy field). Also checks that a branch trained
// taken is then predicted taken and returns the energy written for it.
module tb_gshare_bblm;
  localparam int unsigned H = 16;
  localparam int unsigned P = 4;
  logic clk = 0, rst_n = 0;
  logic [31:0] pred_pc;
  logic pred_taken, upd_valid, upd_taken;
  logic [H-1:0] pred_idx, upd_idx, ghr;
  logic [8:0] pred_energy;
  logic bb_wr_valid [P];
  logic [H-1:0] bb_wr_idx [P];
  logic [8:0] bb_wr_energy [P];
  int checks = 0, failures = 0;
  logic [1:0] m_ctr [1 << H];
  logic [8:0] m_en [1 << H];
  logic [H-1:0] m_ghr;

  gshare_bblm dut (.clk, .rst_n, .pred_pc, .pred_taken, .pred_idx, .pred_energy,
                   .upd_valid, .upd_idx, .upd_taken, .bb_wr_valid, .bb_wr_idx, .bb_wr_energy, .ghr);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pred();
    logic [H-1:0] i;
    #1;
    i = pred_pc[H+1:2] ^ m_ghr;
    checks++;
    if (pred_idx !== i || pred_taken !== m_ctr[i][1] || pred_energy !== m_en[i] || ghr !== m_ghr) begin
      failures++;
      $display("pred pc=%h idx %h/%h taken %0b/%0b energy %0d/%0d", pred_pc, pred_idx, i, pred_taken, m_ctr[i][1], pred_energy, m_en[i]);
    end
  endtask

  task automatic clock_model();
    @(posedge clk);
    if (upd_valid) begin
      if (upd_taken && m_ctr[upd_idx] != 2'b11) m_ctr[upd_idx]++;
      if (!upd_taken && m_ctr[upd_idx] != 2'b00) m_ctr[upd_idx]--;
      m_ghr = {m_ghr[H-2:0], upd_taken};
    end
    for (int p = 0; p < P; p++) if (bb_wr_valid[p]) m_en[bb_wr_idx[p]] = bb_wr_energy[p];
  endtask

  initial begin
    for (int i = 0; i < (1 << H); i++) begin m_ctr[i] = 2'b01; m_en[i] = 0; end
    m_ghr = 0;
    pred_pc = 0; upd_valid = 0; upd_taken = 0; upd_idx = 0;
    for (int p = 0; p < P; p++) begin bb_wr_valid[p] = 0; bb_wr_idx[p] = 0; bb_wr_energy[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: train one branch taken with history held at zero by
    // predicting and resolving at its index, then write its energy
    @(negedge clk);
    pred_pc = 32'h0000_1230;
    check_pred();
    begin
      logic [H-1:0] i0;
      i0 = pred_idx;
      upd_valid = 1; upd_idx = i0; upd_taken = 1;
      bb_wr_valid[0] = 1; bb_wr_idx[0] = i0; bb_wr_energy[0] = 9'd300;
      bb_wr_valid[3] = 1; bb_wr_idx[3] = i0; bb_wr_energy[3] = 9'd77;   // higher port wins
      clock_model();
      @(negedge clk);
      upd_valid = 0; for (int p = 0; p < P; p++) bb_wr_valid[p] = 0;
      pred_pc = 32'h0000_1230 ^ {14'd0, m_ghr, 2'b00};   // same index under the new history
      check_pred();
      checks++;
      if (!(pred_idx == i0 && pred_taken && pred_energy == 9'd77)) begin failures++; $display("directed training failed"); end
    end
    for (int t = 0; t < 30000; t++) begin
      @(negedge clk);
      pred_pc = ($urandom_range(0, 1) ? 32'($urandom_range(0, 255)) << 2 : $urandom);
      upd_valid = $urandom_range(0, 1);
      upd_taken = ($urandom_range(0, 3) != 0);
      upd_idx = ($urandom_range(0, 1)) ? H'($urandom_range(0, 255)) : H'($urandom);
      for (int p = 0; p < P; p++) begin
        bb_wr_valid[p] = ($urandom_range(0, 3) == 0);
        bb_wr_idx[p] = ($urandom_range(0, 1)) ? H'($urandom_range(0, 255)) : H'($urandom);
        bb_wr_energy[p] = 9'($urandom);
      end
      check_pred();
      clock_model();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
