// tb_ptht: self-checking test of the power-token history table.
// Resets the table, checks that every entry reads the reset value, then
// issues random commit writes (including several lanes hitting one entry,
// where the highest lane must win) and random fetch reads, comparing every
// read against a reference copy of the table kept in the testbench.
module tb_ptht;
  localparam int unsigned ENTRIES = 8192;
  localparam int unsigned P = 4;

  logic clk = 0, rst_n = 0;
  logic [31:0] rd_pc [P];
  logic [7:0]  rd_tok [P];
  logic        wr_en [P];
  logic [31:0] wr_pc [P];
  logic [7:0]  wr_tok [P];
  int checks = 0, failures = 0;
  logic [7:0] model [ENTRIES];

  ptht dut (.clk, .rst_n, .rd_pc, .rd_tok, .wr_en, .wr_pc, .wr_tok);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(logic [31:0] pc);
    return int'(pc[14:2]);
  endfunction

  task automatic check_reads();
    #1;
    for (int p = 0; p < P; p++) begin
      checks++;
      if (rd_tok[p] !== model[idx(rd_pc[p])]) begin
        failures++;
        $display("read mismatch pc=%h got %0d exp %0d", rd_pc[p], rd_tok[p], model[idx(rd_pc[p])]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < ENTRIES; i++) model[i] = 8'd0;
    for (int p = 0; p < P; p++) begin wr_en[p] = 0; wr_pc[p] = '0; wr_tok[p] = '0; rd_pc[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset value everywhere (sampled)
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) rd_pc[p] = 32'($urandom_range(0, ENTRIES-1)) << 2;
      check_reads();
    end
    // same entry from all lanes: highest lane wins
    @(negedge clk);
    for (int p = 0; p < P; p++) begin wr_en[p] = 1; wr_pc[p] = 32'h0000_0040; wr_tok[p] = 8'(10 + p); end
    @(posedge clk); #1;
    for (int p = 0; p < P; p++) wr_en[p] = 0;
    model[16] = 8'd13;
    rd_pc[0] = 32'h40; rd_pc[1] = 32'h40 | 32'h8000_0000; rd_pc[2] = 32'h41; rd_pc[3] = 32'h44;
    check_reads();
    // random traffic, mostly on a small set of PCs so reads hit written entries
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        wr_en[p]  = ($urandom_range(0, 3) != 0);
        wr_pc[p]  = ($urandom_range(0, 1) ? 32'($urandom_range(0, 63)) : $urandom) & ~32'h3;
        wr_tok[p] = 8'($urandom);
        rd_pc[p]  = ($urandom_range(0, 1) ? 32'($urandom_range(0, 63)) : $urandom) & ~32'h3;
      end
      check_reads();
      @(posedge clk);
      for (int p = 0; p < P; p++) if (wr_en[p]) model[idx(wr_pc[p])] = wr_tok[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
