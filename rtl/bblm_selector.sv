// bblm_selector: technique choice of the basic-block level manager.
//
// When a branch is predicted (bb_valid) the expected power after the next
// basic block is est = cur + bb_energy (tokens now in the pipeline plus the
// block's recorded energy). Its excess over the budget, as a percentage of
// the budget, picks the technique for that block:
//   est <= budget                       -> none
//   excess <  X %                       -> critical-path reordering (CP)
//   X % <= excess <= Y %                -> JRS confidence throttling
//   excess >  Y %                       -> decode-commit ratio throttling
// (compared without a divider: est*100 against budget*(100+X) and
// budget*(100+Y)). The chosen technique is held in sel.
// The active technique follows it while the processor is over the budget
// (over, possibly advanced by the preventive switch): it is raised to sel
// whenever sel is more aggressive and otherwise kept. Once the processor is
// under the budget the techniques are switched off one level per cycle, in
// reverse order (DCR, then JRS, then CP). With en low everything stays off.
//
// Timing: sel and active are registered, so a prediction or a change of
// "over" shows on active one cycle later.
//
// The three techniques, their order, the thresholds X = 15 and Y = 65 and
// the progressive switch-off follow the design description. The estimate
// cur + bb_energy, the hold-while-over rule and the one-level-per-cycle
// release are choices of this implementation.
module bblm_selector #(
  parameter int unsigned X_PCT = 15,
  parameter int unsigned Y_PCT = 65
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  pt_pkg::tok_t   cur,
  input  pt_pkg::tok_t   budget,
  input  logic           bb_valid,
  input  pt_pkg::bbtok_t bb_energy,
  input  logic           over,
  output pt_pkg::tech_e  sel,
  output pt_pkg::tech_e  active
);
  import pt_pkg::*;

  localparam int unsigned PW = TOK_W + 9;

  tech_e         target;
  logic [PW-1:0] est100, lim_x, lim_y;
  logic [TOK_W:0] est;

  always_comb begin
    est    = {1'b0, cur} + (TOK_W+1)'(bb_energy);
    est100 = PW'(est) * PW'(100);
    lim_x  = PW'(budget) * PW'(100 + X_PCT);
    lim_y  = PW'(budget) * PW'(100 + Y_PCT);
    if (est <= (TOK_W+1)'(budget)) target = TECH_NONE;
    else if (est100 < lim_x)       target = TECH_CP;
    else if (est100 <= lim_y)      target = TECH_JRS;
    else                           target = TECH_DCR;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel    <= TECH_NONE;
      active <= TECH_NONE;
    end else if (!en) begin
      sel    <= TECH_NONE;
      active <= TECH_NONE;
    end else begin
      if (bb_valid) sel <= target;
      if (over) begin
        if (sel > active) active <= sel;
      end else if (active != TECH_NONE) begin
        active <= tech_e'(active - 2'd1);
      end
    end
  end
endmodule
