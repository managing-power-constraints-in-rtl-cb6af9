// gshare_bblm: gshare branch predictor extended with basic-block energy.
//
// A table of 2^HIST entries is indexed by the branch PC (above the 4-byte
// offset) XORed with a HIST-bit global history. Each entry holds a 2-bit
// saturating direction counter and BB_W (9) extra bits: the energy, in power
// tokens, of the basic block that followed this branch the last time. So a
// prediction returns both the direction and the expected energy of the block
// about to be fetched, which the basic-block level manager uses.
//
// Ports and timing:
//  * predict: combinational; pred_idx is the index used, to be carried with
//    the branch and given back at decode (energy write) and at resolve.
//  * update (branch resolved): the entry's counter moves toward the outcome
//    and the outcome is shifted into the global history at the next edge;
//    the history is non-speculative.
//  * energy writes (from bb_power_acc): one port per decode lane, taking
//    effect at the next edge; a higher port wins on the same index.
// Reset sets every counter to weakly not-taken, every energy field to zero
// and the history to zero.
//
// The 16-bit gshare and the 9 extra bits per entry follow the design
// description. Writing the energy field when the branch that closes the
// block is decoded (rather than when the counter is updated) follows its
// description of the decode-time measurement; the table size of 2^HIST,
// the counter encoding, the non-speculative history and the reset values
// are this implementation's choices.
module gshare_bblm #(
  parameter int unsigned HIST     = 16,
  parameter int unsigned PC_W     = 32,
  parameter int unsigned PC_LSB   = 2,
  parameter int unsigned WR_PORTS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // predict
  input  logic [PC_W-1:0]  pred_pc,
  output logic             pred_taken,
  output logic [HIST-1:0]  pred_idx,
  output pt_pkg::bbtok_t   pred_energy,
  // resolve
  input  logic             upd_valid,
  input  logic [HIST-1:0]  upd_idx,
  input  logic             upd_taken,
  // basic-block energy writes
  input  logic             bb_wr_valid  [WR_PORTS],
  input  logic [HIST-1:0]  bb_wr_idx    [WR_PORTS],
  input  pt_pkg::bbtok_t   bb_wr_energy [WR_PORTS],
  output logic [HIST-1:0]  ghr
);
  import pt_pkg::*;

  localparam int unsigned ENTRIES = 1 << HIST;

  logic [1:0] ctr    [ENTRIES];
  bbtok_t     energy [ENTRIES];

  always_comb begin
    pred_idx    = pred_pc[PC_LSB +: HIST] ^ ghr;
    pred_taken  = ctr[pred_idx][1];
    pred_energy = energy[pred_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        ctr[i]    <= 2'b01;
        energy[i] <= '0;
      end
      ghr <= '0;
    end else begin
      if (upd_valid) begin
        if (upd_taken && ctr[upd_idx] != 2'b11)  ctr[upd_idx] <= ctr[upd_idx] + 2'b01;
        if (!upd_taken && ctr[upd_idx] != 2'b00) ctr[upd_idx] <= ctr[upd_idx] - 2'b01;
        ghr <= {ghr[HIST-2:0], upd_taken};
      end
      for (int p = 0; p < WR_PORTS; p++)
        if (bb_wr_valid[p]) energy[bb_wr_idx[p]] <= bb_wr_energy[p];
    end
  end
endmodule
