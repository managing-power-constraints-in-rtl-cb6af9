// bb_power_acc: energy of each basic block, measured at decode.
//
// A basic block is the run of instructions after one branch up to and
// including the next branch. A register with a 16-bit adder sums the power
// tokens (as read from the PTHT at fetch) of every decoded instruction.
// When a branch is decoded the block it closes is finished: its energy,
// saturated to the 9 bits a predictor entry holds, is sent to the predictor
// entry of the branch that started the block (the previous branch, whose
// predictor index this unit remembers), not to the entry of the branch just
// decoded. The register then restarts from zero and the new branch's index
// becomes the one to write next time.
//
// Interface: up to LANES instructions per cycle, in program order; each
// branch carries the predictor index it was predicted with. Several
// branches in one group give several write records in the same cycle
// (wr_valid[l] belongs to the branch in lane l). No write is made for the
// first branch after reset, as no block has been started yet.
// Timing: write records are combinational from the decode lanes; the
// running sum, its length and the remembered index are registered.
//
// The measurement point, the 16-bit register/adder, the 9-bit field and the
// "previous branch's entry" rule follow the design description. Counting
// the closing branch inside the block and the saturation are this
// implementation's choices.
module bb_power_acc #(
  parameter int unsigned LANES = 4,
  parameter int unsigned IDX_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid     [LANES],
  input  pt_pkg::itok_t    tok       [LANES],
  input  logic             is_branch [LANES],
  input  logic [IDX_W-1:0] bp_idx    [LANES],
  output logic             wr_valid  [LANES],
  output logic [IDX_W-1:0] wr_idx    [LANES],
  output pt_pkg::bbtok_t   wr_energy [LANES],
  output pt_pkg::tok_t     acc,          // energy of the open block so far
  output logic [7:0]       acc_len       // instructions in the open block
);
  import pt_pkg::*;

  logic             have_prev, have_prev_n;
  logic [IDX_W-1:0] prev_idx, prev_idx_n;
  tok_t             acc_n;
  logic [7:0]       len_n;

  always_comb begin
    logic [TOK_W:0] s;
    s           = '0;
    acc_n       = acc;
    len_n       = acc_len;
    have_prev_n = have_prev;
    prev_idx_n  = prev_idx;
    for (int l = 0; l < LANES; l++) begin
      wr_valid[l]  = 1'b0;
      wr_idx[l]    = prev_idx_n;
      wr_energy[l] = '0;
      if (valid[l]) begin
        s     = {1'b0, acc_n} + (TOK_W+1)'(tok[l]);
        acc_n = s[TOK_W] ? '1 : s[TOK_W-1:0];
        if (len_n != 8'hFF) len_n = len_n + 8'd1;
        if (is_branch[l]) begin
          wr_valid[l]  = have_prev_n;
          wr_energy[l] = (acc_n > tok_t'({BB_W{1'b1}})) ? '1 : acc_n[BB_W-1:0];
          acc_n        = '0;
          len_n        = '0;
          have_prev_n  = 1'b1;
          prev_idx_n   = bp_idx[l];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_len   <= '0;
      have_prev <= 1'b0;
      prev_idx  <= '0;
    end else begin
      acc       <= acc_n;
      acc_len   <= len_n;
      have_prev <= have_prev_n;
      prev_idx  <= prev_idx_n;
    end
  end
endmodule
