// tb_token_accountant: random fetch additions and commit/squash releases
// against an integer model of the in-pipeline token total, including
// saturation at zero and at 65535.
module tb_token_accountant;
  localparam int unsigned L = 4;
  logic clk = 0, rst_n = 0;
  logic add_valid [L], rel_valid [L];
  logic [7:0] add_tok [L], rel_tok [L];
  logic [15:0] rel_extra, cur;
  int checks = 0, failures = 0;
  int model = 0;
  int sat_hi = 0, sat_lo = 0;

  token_accountant dut (.clk, .rst_n, .add_valid, .add_tok, .rel_valid, .rel_tok, .rel_extra, .cur);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) begin add_valid[l] = 0; rel_valid[l] = 0; add_tok[l] = 0; rel_tok[l] = 0; end
    rel_extra = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int bias;
      @(negedge clk);
      checks++;
      if (int'(cur) != model) begin
        failures++;
        $display("t=%0d cur=%0d exp %0d", t, cur, model);
      end
      // phases: grow towards the top, shrink towards zero, balanced
      bias = (t / 2500) % 3;
      for (int l = 0; l < L; l++) begin
        add_valid[l] = ($urandom_range(0, 3) < (bias == 0 ? 4 : 2));
        add_tok[l]   = 8'($urandom);
        rel_valid[l] = ($urandom_range(0, 3) < (bias == 1 ? 4 : 1));
        rel_tok[l]   = 8'($urandom);
      end
      rel_extra = ($urandom_range(0, 15) == 0) ? 16'($urandom_range(0, 3000)) : 16'd0;
      @(posedge clk);
      begin
        int n;
        n = model - int'(rel_extra);
        for (int l = 0; l < L; l++) begin
          if (add_valid[l]) n += int'(add_tok[l]);
          if (rel_valid[l]) n -= int'(rel_tok[l]);
        end
        if (n < 0) begin n = 0; sat_lo++; end
        if (n > 65535) begin n = 65535; sat_hi++; end
        model = n;
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
