// bbit: Basic Block Identification Table (BBIT).
//
// One entry per basic block of the encoded loop: the PC of the block's first
// instruction, the index of the block's first Transformation Table entry and a
// valid bit. At the start of a basic block the fetch sequencer presents the
// fetch PC; every valid entry compares its PC in parallel and a match returns
// the TT index in the same cycle (lowest matching entry wins; software should
// not store one PC twice, which an assertion checks).
//
// Write port: 32-bit words, word 0 = start PC, word 1 = {valid in bit 31, TT
// index in the low bits}. The table content (PC and TT index per basic block)
// and its size of about ten entries follow the design; the fully associative
// lookup, the valid bit, the write format and reset to all-invalid are this
// design's choices.
module bbit
  import imt_pkg::*;
#(
  parameter int unsigned ENTRIES    = 10,
  parameter int unsigned PC_WIDTH   = 32,
  parameter int unsigned TT_ENTRIES = 16,
  localparam int unsigned IDX_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned TT_IDX_W = (TT_ENTRIES > 1) ? $clog2(TT_ENTRIES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write port
  input  logic                 we,
  input  logic [IDX_W-1:0]     waddr,
  input  logic                 wword,
  input  logic [CFG_WORD-1:0]  wdata,
  // lookup
  input  logic [PC_WIDTH-1:0]  lookup_pc,
  output logic                 hit,
  output logic [TT_IDX_W-1:0]  hit_tt_idx
);

  logic [PC_WIDTH-1:0] pc_q    [ENTRIES];
  logic [TT_IDX_W-1:0] idx_q   [ENTRIES];
  logic [ENTRIES-1:0]  valid_q;
  logic [ENTRIES-1:0]  match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        pc_q[i]  <= '0;
        idx_q[i] <= '0;
      end
    end else if (we && (32'(waddr) < ENTRIES)) begin
      if (!wword) begin
        pc_q[waddr] <= wdata[PC_WIDTH-1:0];
      end else begin
        idx_q[waddr]   <= wdata[TT_IDX_W-1:0];
        valid_q[waddr] <= wdata[CFG_WORD-1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) match[i] = valid_q[i] && (pc_q[i] == lookup_pc);
  end

  always_comb begin
    hit        = 1'b0;
    hit_tt_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit        = 1'b1;
        hit_tt_idx = idx_q[i];
      end
    end
  end

  // A start PC must identify one basic block.
  a_unique_pc: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("bbit: PC %h matches several entries", lookup_pc);

endmodule
