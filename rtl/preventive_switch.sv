// preventive_switch: power-trend prediction for switching techniques early.
//
// The unit keeps last cycle's power and forms delta = cur - prev. It
// predicts next cycle's power as cur + delta and turns the plain "over the
// budget" test (cur > budget) into the indication the managers act on:
//   switch-off (psoff_en): under the budget but rising, and cur + delta
//     exceeds the budget -> report "over" now, so power-saving techniques
//     start before the budget is crossed;
//   switch-on (pson_en): over the budget but falling, and cur + delta is
//     within the budget -> report "not over" now, so techniques are released
//     early and their hysteresis brings power under the budget.
// off_fire / on_fire pulse in the cycles where a prediction changed the
// result.
//
// Timing: over is combinational from cur and the registered prev; prev is
// reset to zero.
//
// Both predictions (current power plus the difference of the last two
// cycles) follow the design description; the signed 18-bit arithmetic is
// this implementation's choice.
module preventive_switch (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         psoff_en,
  input  logic         pson_en,
  input  pt_pkg::tok_t cur,
  input  pt_pkg::tok_t budget,
  output logic         over,
  output logic         off_fire,
  output logic         on_fire
);
  import pt_pkg::*;

  tok_t prev;
  logic signed [TOK_W+1:0] delta, pred;
  logic raw_over;

  always_comb begin
    delta    = $signed({2'b00, cur}) - $signed({2'b00, prev});
    pred     = $signed({2'b00, cur}) + delta;
    raw_over = cur > budget;
    off_fire = psoff_en && !raw_over && delta > 0 && pred > $signed({2'b00, budget});
    on_fire  = pson_en  &&  raw_over && delta < 0 && pred <= $signed({2'b00, budget});
    over     = (raw_over || off_fire) && !on_fire;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev <= '0;
    else        prev <= cur;
  end
endmodule
