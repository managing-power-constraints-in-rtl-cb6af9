// ptht: power-token history table.
//
// Holds, for each static instruction, the number of power tokens its last
// execution dissipated. It is indexed by the PC bits above the 4-byte
// instruction offset (direct mapped, no tag: aliasing instructions share an
// entry). The fetch stage reads one entry per fetch lane to learn the cost of
// the instructions it is about to send down the pipeline; the commit stage
// writes one entry per committing instruction with its measured cost.
//
// Interface/timing: reads are combinational (the three-stage fetch unit
// leaves time for the lookup); writes take effect at the next clock edge,
// and when two commit lanes write the same entry in one cycle the younger
// (higher) lane wins. Reset clears every entry to INIT_TOKENS.
//
// The 8K entries of 8 bits follow the design description; the asynchronous
// read, the PC slicing, the reset value and the write priority are choices
// of this implementation.
module ptht #(
  parameter int unsigned ENTRIES     = 8192,
  parameter int unsigned W           = pt_pkg::PTHT_W,
  parameter int unsigned PC_W        = 32,
  parameter int unsigned PC_LSB      = 2,
  parameter int unsigned RD_PORTS    = 4,
  parameter int unsigned WR_PORTS    = 4,
  parameter logic [W-1:0] INIT_TOKENS = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PC_W-1:0]     rd_pc  [RD_PORTS],
  output logic [W-1:0]        rd_tok [RD_PORTS],
  input  logic                wr_en  [WR_PORTS],
  input  logic [PC_W-1:0]     wr_pc  [WR_PORTS],
  input  logic [W-1:0]        wr_tok [WR_PORTS]
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [W-1:0] mem [ENTRIES];

  always_comb begin
    for (int p = 0; p < RD_PORTS; p++)
      rd_tok[p] = mem[rd_pc[p][PC_LSB +: IDX_W]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) mem[i] <= INIT_TOKENS;
    end else begin
      for (int p = 0; p < WR_PORTS; p++)
        if (wr_en[p]) mem[wr_pc[p][PC_LSB +: IDX_W]] <= wr_tok[p];
    end
  end
endmodule
