// dvfs_controller: coarse-grain level of the two-level power manager.
//
// Over an exploration window of WINDOW cycles the controller sums the
// per-cycle power sample (tokens now in the pipeline). At the end of a
// window it predicts the window's average power in every allowed mode k
// from the average measured in the current mode m, scaling by the modes'
// relative dynamic power F = VDD^2 * f:  P_k = P_m * F_k / F_m. It selects
// the fastest mode (lowest index, up to max_mode) whose predicted average is
// within the budget, or max_mode when none is. The test is done without a
// divider:  sum * F_k <= budget * WINDOW * F_m.
// A change of mode takes TRANS_CYCLES cycles, during which execution goes
// on in the old mode (busy is high); then mode switches to the new one.
// With en low the controller returns to mode 0.
//
// Outputs: mode and its VDD and f in percent of nominal, busy, and a
// one-cycle window_done pulse with the finished window's sum in last_sum.
//
// The 500K-cycle window, the five V/f pairs (the first three being the set
// of the two-level scheme) and the 4-cycle transition follow the design
// description. The scaling rule, the "fastest mode within the budget"
// choice and the use of token counts as the power sample are this
// implementation's choices.
module dvfs_controller #(
  parameter int unsigned WINDOW       = 500_000,
  parameter int unsigned TRANS_CYCLES = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [pt_pkg::MODE_W-1:0] max_mode,
  input  pt_pkg::tok_t              sample,
  input  pt_pkg::tok_t              budget,
  output logic [pt_pkg::MODE_W-1:0] mode,
  output logic [6:0]                vdd_pct,
  output logic [6:0]                f_pct,
  output logic                      busy,
  output logic                      window_done,
  output logic [47:0]               last_sum
);
  import pt_pkg::*;

  localparam int unsigned CNT_W = $clog2(WINDOW + 1);
  localparam int unsigned TC_W  = $clog2(TRANS_CYCLES + 1);

  logic [CNT_W-1:0]  cnt;
  logic [47:0]       sum;
  logic [MODE_W-1:0] target, decision;
  logic [TC_W-1:0]   tcnt;
  logic [47:0]       win_sum;

  always_comb begin
    logic [79:0] lhs, rhs;
    logic        found;
    win_sum  = sum + 48'(sample);
    decision = (max_mode < MODE_W'(N_MODES)) ? max_mode : MODE_W'(N_MODES - 1);
    found    = 1'b0;
    rhs      = 80'(budget) * 80'(WINDOW) * 80'(mode_factor(32'(mode)));
    for (int k = 0; k < N_MODES; k++) begin
      lhs = 80'(win_sum) * 80'(mode_factor(k));
      if (!found && MODE_W'(k) <= max_mode && lhs <= rhs) begin
        decision = MODE_W'(k);
        found    = 1'b1;
      end
    end
    if (!en) decision = '0;
    vdd_pct = 7'(mode_vdd_pct(32'(mode)));
    f_pct   = 7'(mode_f_pct(32'(mode)));
  end

  assign busy = (tcnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      sum         <= '0;
      mode        <= '0;
      target      <= '0;
      tcnt        <= '0;
      window_done <= 1'b0;
      last_sum    <= '0;
    end else begin
      window_done <= 1'b0;
      if (cnt == CNT_W'(WINDOW - 1)) begin
        cnt         <= '0;
        sum         <= '0;
        last_sum    <= win_sum;
        window_done <= 1'b1;
        if (!busy && decision != mode) begin
          target <= decision;
          tcnt   <= TC_W'(TRANS_CYCLES);
        end
      end else begin
        cnt <= cnt + 1'b1;
        sum <= win_sum;
      end
      if (busy) begin
        tcnt <= tcnt - 1'b1;
        if (tcnt == TC_W'(1)) mode <= target;
      end
    end
  end
endmodule
