// tt_table: Transformation Table (TT).
//
// A small memory with one entry per encoded block of code. An entry holds, for
// every bus line, the 3-bit index of the transformation that restores that
// line over the block, an End bit E that marks the last entry of a basic block,
// and CT, the number of instructions fetched under that last entry. Entries of
// one basic block sit in consecutive addresses.
//
// Interface: one write port of 32-bit words (an entry is written as
// tt_entry_words() words, word w covering entry bits [32*w +: 32]) and one
// asynchronous read port returning a whole entry. Entry layout: see imt_pkg.
// The read is combinational so the fetch sequencer can load the next entry in
// the same cycle as it retires the current one. The 16-entry default follows
// the design; the word-wide write port and the reset-to-zero (all identity,
// E clear) are this design's choices.
module tt_table
  import imt_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 24,
  parameter int unsigned CT_WIDTH   = 8,
  parameter int unsigned ENTRIES    = 16,
  localparam int unsigned IDX_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned E_BITS  = DATA_WIDTH * TAU_BITS + 1 + CT_WIDTH,
  localparam int unsigned E_WORDS = (E_BITS + CFG_WORD - 1) / CFG_WORD,
  localparam int unsigned WORD_W  = (E_WORDS > 1) ? $clog2(E_WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write port
  input  logic                 we,
  input  logic [IDX_W-1:0]     waddr,
  input  logic [WORD_W-1:0]    wword,
  input  logic [CFG_WORD-1:0]  wdata,
  // read port
  input  logic [IDX_W-1:0]     raddr,
  output logic [E_BITS-1:0]    rdata
);

  logic [E_BITS-1:0] mem [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) mem[i] <= '0;
    end else if (we && (32'(waddr) < ENTRIES) && (32'(wword) < E_WORDS)) begin
      for (int b = 0; b < CFG_WORD; b++) begin
        if (32'(wword) * CFG_WORD + b < E_BITS)
          mem[waddr][32'(wword) * CFG_WORD + b] <= wdata[b];
      end
    end
  end

  assign rdata = (32'(raddr) < ENTRIES) ? mem[raddr] : '0;

endmodule
