// cfg_port: configuration peripheral of the transformation decoder.
//
// The decoder's tables are filled either by the program loader or by a few
// store instructions executed just before the loop is entered; either way they
// appear as the memory of a peripheral. This block decodes a 12-bit word
// address on a simple write bus (valid + address + 32-bit data, one write per
// cycle, always accepted) into TT writes, BBIT writes and a control register
// whose bit 0 enables decoding. Address map: see imt_pkg. Writes to unmapped
// addresses are ignored and flagged on 'bad_addr' for one cycle. The existence
// of a memory-mapped path follows the design; the bus, the address map, the
// enable bit and its reset value (off) are this design's choices.
module cfg_port
  import imt_pkg::*;
#(
  parameter int unsigned TT_ENTRIES   = 16,
  parameter int unsigned TT_WORDS     = 3,
  parameter int unsigned BBIT_ENTRIES = 10,
  localparam int unsigned TT_IDX_W   = (TT_ENTRIES > 1) ? $clog2(TT_ENTRIES) : 1,
  localparam int unsigned TT_WORD_W  = (TT_WORDS > 1) ? $clog2(TT_WORDS) : 1,
  localparam int unsigned BB_IDX_W   = (BBIT_ENTRIES > 1) ? $clog2(BBIT_ENTRIES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration bus
  input  logic                 cfg_we,
  input  logic [11:0]          cfg_addr,
  input  logic [CFG_WORD-1:0]  cfg_wdata,
  output logic                 bad_addr,
  // decoded writes
  output logic                 tt_we,
  output logic [TT_IDX_W-1:0]  tt_waddr,
  output logic [TT_WORD_W-1:0] tt_wword,
  output logic                 bbit_we,
  output logic [BB_IDX_W-1:0]  bbit_waddr,
  output logic                 bbit_wword,
  output logic [CFG_WORD-1:0]  wdata,
  // control register
  output logic                 enable
);

  logic [3:0] region;
  logic [5:0] tt_idx_f;
  logic [1:0] tt_word_f;
  logic [6:0] bb_idx_f;
  logic       ctrl_hit, tt_hit, bb_hit;

  assign region    = cfg_addr[11:8];
  assign tt_idx_f  = cfg_addr[7:2];
  assign tt_word_f = cfg_addr[1:0];
  assign bb_idx_f  = cfg_addr[7:1];

  always_comb begin
    ctrl_hit = (region == CFG_REGION_CTRL) && (cfg_addr[7:0] == 8'h00);
    tt_hit   = (region == CFG_REGION_TT) && (32'(tt_idx_f) < TT_ENTRIES)
               && (32'(tt_word_f) < TT_WORDS);
    bb_hit   = (region == CFG_REGION_BBIT) && (32'(bb_idx_f) < BBIT_ENTRIES);
  end

  assign tt_we      = cfg_we && tt_hit;
  assign tt_waddr   = TT_IDX_W'(tt_idx_f);
  assign tt_wword   = TT_WORD_W'(tt_word_f);
  assign bbit_we    = cfg_we && bb_hit;
  assign bbit_waddr = BB_IDX_W'(bb_idx_f);
  assign bbit_wword = cfg_addr[0];
  assign wdata      = cfg_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable   <= 1'b0;
      bad_addr <= 1'b0;
    end else begin
      if (cfg_we && ctrl_hit) enable <= cfg_wdata[0];
      bad_addr <= cfg_we && !(ctrl_hit || tt_hit || bb_hit);
    end
  end

endmodule
