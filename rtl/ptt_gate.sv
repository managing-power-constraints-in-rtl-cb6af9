// ptt_gate: power-token throttling of the fetch stage.
//
// "If there is power left to burn, let the instruction in; otherwise stall
// fetch." Lanes are considered in program order. Lane i is accepted when all
// older lanes were accepted and the current pipeline tokens plus the tokens
// of lanes 0..i stay within the budget. A branch is always accepted, so that
// mispredictions are still found early; with cp_mode set (the PTT-CP
// variant) an instruction predicted critical is accepted as well. The first
// refused lane and every younger lane are held, and stall is raised.
// With en low every valid lane is accepted.
//
// Combinational; cur comes from token_accountant and tok from the PTHT read
// of the same fetch group. The in-order cut-off and the use of the running
// sum of the group are choices of this implementation.
module ptt_gate #(
  parameter int unsigned LANES = 4
) (
  input  logic          en,
  input  logic          cp_mode,
  input  pt_pkg::tok_t  cur,
  input  pt_pkg::tok_t  budget,
  input  logic          valid     [LANES],
  input  pt_pkg::itok_t tok       [LANES],
  input  logic          is_branch [LANES],
  input  logic          critical  [LANES],
  output logic          allow     [LANES],
  output logic          stall
);
  import pt_pkg::*;

  localparam int unsigned SW = TOK_W + 4;

  always_comb begin
    logic [SW-1:0] run;
    logic          blocked;
    run     = SW'(cur);
    blocked = 1'b0;
    stall   = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      allow[l] = 1'b0;
      if (valid[l] && !blocked) begin
        run += SW'(tok[l]);
        if (!en || run <= SW'(budget) || is_branch[l] || (cp_mode && critical[l]))
          allow[l] = 1'b1;
        else begin
          blocked = 1'b1;
          stall   = 1'b1;
        end
      end
    end
  end
endmodule
