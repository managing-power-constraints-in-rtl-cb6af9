// tb_preventive_switch: drives power traces shaped like the three cases of
// the trend predictor (a small rise ending at the budget, a steep rise
// crossing it, a fall from above it) and random traces, checking the
// advanced over-budget indication against cur + (cur - prev).
module tb_preventive_switch;
  logic clk = 0, rst_n = 0;
  logic psoff_en, pson_en, over, off_fire, on_fire;
  logic [15:0] cur, budget;
  int checks = 0, failures = 0;
  int prev = 0;
  int n_off = 0, n_on = 0;

  preventive_switch dut (.clk, .rst_n, .psoff_en, .pson_en, .cur, .budget, .over, .off_fire, .on_fire);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(int c);
    int d, p;
    bit raw, eoff, eon, eov;
    @(negedge clk);
    cur = 16'(c);
    #1;
    d = c - prev; p = c + d;
    raw = c > int'(budget);
    eoff = psoff_en && !raw && d > 0 && p > int'(budget);
    eon  = pson_en && raw && d < 0 && p <= int'(budget);
    eov  = (raw || eoff) && !eon;
    checks++;
    if (over !== eov || off_fire !== eoff || on_fire !== eon) begin
      failures++; $display("cur %0d prev %0d: over %0b/%0b off %0b/%0b on %0b/%0b", c, prev, over, eov, off_fire, eoff, on_fire, eon);
    end
    if (eoff) n_off++;
    if (eon) n_on++;
    @(posedge clk);
    prev = c;
  endtask

  initial begin
    psoff_en = 1; pson_en = 1; cur = 0; budget = 1000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // A: slow rise that would cross - switch-off fires
    drive(990); drive(995); drive(998);
    checks++; if (!(over && off_fire)) begin failures++; $display("case A"); end
    // B: steep rise from far below
    drive(700); drive(850); drive(950);
    checks++; if (!(over && off_fire)) begin failures++; $display("case B"); end
    drive(1200);
    // C: falling from above, next predicted under: switch-on fires
    drive(1100); drive(1040);
    checks++; if (!(!over && on_fire)) begin failures++; $display("case C"); end
    // switches disabled: plain comparison
    psoff_en = 0; pson_en = 0;
    drive(900); drive(990);
    checks++; if (over) begin failures++; $display("disabled off"); end
    drive(1300); drive(1010);
    checks++; if (!over) begin failures++; $display("disabled on"); end
    psoff_en = 1; pson_en = 1;
    for (int t = 0; t < 20000; t++) begin
      psoff_en = ($urandom_range(0, 7) != 0);
      pson_en = ($urandom_range(0, 7) != 0);
      begin
        int c;
        c = prev + int'($urandom_range(0, 200)) - 100;
        if (c < 0) c = 0;
        if (c > 2000) c = 2000;
        drive(c);
      end
    end
    checks++;
    if (n_off < 10 || n_on < 10) begin failures++; $display("few predictions %0d %0d", n_off, n_on); end
    $display("switch-off %0d switch-on %0d", n_off, n_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
