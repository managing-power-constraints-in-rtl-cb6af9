// token_cost: power tokens dissipated by committing instructions.
//
// An instruction's cost is the base token count of its power group (the
// regular structure accesses it makes) plus one token for every cycle it
// stayed in the RUU (its share of the wakeup/match logic). The sum saturates
// at the 8-bit width of a PTHT entry. One lane per commit slot, purely
// combinational.
//
// The rule "base tokens + RUU cycles" and the 8 groups follow the design
// description; the base token values of the groups are not given there, so
// BASE_TOKENS is a placeholder table to be filled from a power model, and the
// saturation is this implementation's choice.
module token_cost #(
  parameter int unsigned LANES = 4,
  parameter logic [pt_pkg::PTHT_W-1:0] BASE_TOKENS [pt_pkg::N_GROUPS] =
    '{8'd4, 8'd6, 8'd8, 8'd10, 8'd12, 8'd16, 8'd20, 8'd28}
) (
  input  logic [pt_pkg::GROUP_W-1:0]   group    [LANES],
  input  logic [pt_pkg::RUU_CYC_W-1:0] ruu_cyc  [LANES],
  output pt_pkg::itok_t                tokens   [LANES]
);
  import pt_pkg::*;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [PTHT_W:0] sum;
      sum = {1'b0, BASE_TOKENS[group[l]]} + (PTHT_W+1)'(ruu_cyc[l]);
      tokens[l] = sum[PTHT_W] ? '1 : sum[PTHT_W-1:0];
    end
  end
endmodule
