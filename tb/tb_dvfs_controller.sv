// tb_dvfs_controller: with a 100-cycle window, drives one constant power
// level per window and checks, cycle by cycle, against a model: the window
// cadence and sum, the mode chosen at each window end by "fastest mode
// with avg * F_k / F_m <= budget" (limited to max_mode), the 4-cycle
// transition (busy for exactly 4 cycles, old mode kept meanwhile), the
// return to mode 0 when disabled and the VDD/f outputs.
module tb_dvfs_controller;
  localparam int unsigned WIN = 100;
  localparam int NW = 80;
  logic clk = 0, rst_n = 0;
  logic en;
  logic [2:0] max_mode, mode;
  logic [15:0] sample, budget;
  logic [6:0] vdd_pct, f_pct;
  logic busy, window_done;
  logic [47:0] last_sum;
  int checks = 0, failures = 0;
  int changes = 0, limited = 0;
  real F [5] = '{1.0, 0.857375, 0.729, 0.6075, 0.5265};
  int V [5] = '{100, 95, 90, 90, 90};
  int FR [5] = '{100, 95, 90, 75, 65};
  int S [NW], MX [NW];
  bit EN [NW];

  dvfs_controller #(.WINDOW(WIN)) dut (.clk, .rst_n, .en, .max_mode, .sample, .budget,
    .mode, .vdd_pct, .f_pct, .busy, .window_done, .last_sum);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int choose(int avg, int b, int m, int mx);
    for (int k = 0; k <= mx; k++)
      if (real'(avg) * F[k] / F[m] <= real'(b) * 1.0000001) return k;
    return mx;
  endfunction

  initial begin
    int m_mode, m_target, trans, inwin;
    // directed windows first, then random ones
    int ds [8] = '{1100, 1100, 2000, 1300, 1200, 300, 2500, 2500};
    int dm [8] = '{2, 2, 2, 4, 4, 4, 4, 4};
    for (int w = 0; w < NW; w++) begin
      if (w < 8) begin S[w] = ds[w]; MX[w] = dm[w]; EN[w] = (w != 7); end
      else begin S[w] = $urandom_range(200, 2200); MX[w] = $urandom_range(0, 1) ? 2 : 4; EN[w] = ($urandom_range(0, 9) != 0); end
    end
    budget = 1000; en = EN[0]; sample = 16'(S[0]); max_mode = 3'(MX[0]);
    m_mode = 0; m_target = 0; trans = 0; inwin = 0;
    @(negedge clk); rst_n = 1;
    for (int w = 0; w < NW; ) begin
      @(posedge clk);
      // model of this edge
      if (trans > 0) begin trans--; if (trans == 0) m_mode = m_target; end
      inwin++;
      #1;
      if (inwin == int'(WIN)) begin
        int d;
        checks++;
        if (!window_done || int'(last_sum) != S[w] * int'(WIN)) begin
          failures++; $display("window %0d: done %0b sum %0d exp %0d", w, window_done, last_sum, S[w] * WIN);
        end
        d = EN[w] ? choose(S[w], 1000, m_mode, MX[w]) : 0;
        if (EN[w] && d == MX[w] && choose(S[w], 1000, m_mode, 4) > MX[w]) limited++;
        if (d != m_mode) begin m_target = d; trans = 4; changes++; end
        inwin = 0;
        w++;
        if (w < NW) begin
          @(negedge clk);
          sample = 16'(S[w]); max_mode = 3'(MX[w]); en = EN[w];
        end
      end else begin
        checks++;
        if (window_done) begin failures++; $display("window_done out of place"); end
      end
      checks++;
      if (int'(mode) != m_mode || busy != (trans > 0)) begin
        failures++; $display("window %0d cycle %0d: mode %0d exp %0d busy %0b exp %0b", w, inwin, mode, m_mode, busy, trans > 0);
      end
      checks++;
      if (int'(vdd_pct) != V[mode] || int'(f_pct) != FR[mode]) begin failures++; $display("pct outputs"); end
    end
    checks++;
    if (changes < 10 || limited == 0) begin failures++; $display("few mode changes %0d limited %0d", changes, limited); end
    $display("mode changes %0d, limited by max_mode %0d", changes, limited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
