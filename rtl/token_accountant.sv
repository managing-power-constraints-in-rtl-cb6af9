// token_accountant: current processor power in power tokens.
//
// One register holds the tokens of every instruction now in the pipeline.
// Each cycle the tokens of the instructions accepted by fetch are added and
// the tokens of the instructions leaving it (committed, plus a lump sum for
// squashed wrong-path instructions) are taken away:
//   cur' = cur + sum(add_tok[accepted]) - sum(rel_tok[committed]) - rel_extra
// The datapath is 16 bits wide and saturates at 0 and at 2^16-1. It is built
// from one adder per lane plus one for the total, as in the design
// description (four lanes and one total adder for a four-wide core).
//
// Timing: cur is registered; the value seen in a cycle includes everything
// accepted and released up to the previous edge. Reset clears it.
//
// The add-at-fetch / release-at-commit rule follows the design description.
// The squash port and the saturation are choices of this implementation.
module token_accountant #(
  parameter int unsigned ADD_LANES = 4,
  parameter int unsigned REL_LANES = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          add_valid [ADD_LANES],
  input  pt_pkg::itok_t add_tok   [ADD_LANES],
  input  logic          rel_valid [REL_LANES],
  input  pt_pkg::itok_t rel_tok   [REL_LANES],
  input  pt_pkg::tok_t  rel_extra,
  output pt_pkg::tok_t  cur
);
  import pt_pkg::*;

  localparam int unsigned SW = TOK_W + 4;
  logic [SW-1:0] add_sum, rel_sum;
  logic signed [SW+1:0] nxt;

  always_comb begin
    add_sum = '0;
    rel_sum = SW'(rel_extra);
    for (int l = 0; l < ADD_LANES; l++)
      if (add_valid[l]) add_sum += SW'(add_tok[l]);
    for (int l = 0; l < REL_LANES; l++)
      if (rel_valid[l]) rel_sum += SW'(rel_tok[l]);
    nxt = $signed((SW+2)'(cur)) + $signed({2'b00, add_sum}) - $signed({2'b00, rel_sum});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            cur <= '0;
    else if (nxt < 0)                      cur <= '0;
    else if (nxt > $signed((SW+2)'({TOK_W{1'b1}}))) cur <= '1;
    else                                   cur <= nxt[TOK_W-1:0];
  end
endmodule
