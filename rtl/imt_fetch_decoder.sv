// imt_fetch_decoder: instruction-bus transformation decoder (top level).
//
// Sits between the instruction memory data bus and the processor's fetch
// stage. The memory holds the hot loop's code in an encoded form with far fewer
// bit transitions per bus line; this unit restores the original instructions
// in the same cycle as they arrive. It consists of
//   * cfg_port     - memory-mapped write port that fills the tables and holds
//                    the enable bit,
//   * tt_table     - Transformation Table: per encoded block, one 3-bit
//                    transformation index per bus line plus End bit and CT,
//   * bbit         - Basic Block Identification Table: start PC -> first TT
//                    entry of each encoded basic block,
//   * restore_ctrl - the sequencer and the DATA_WIDTH tau gates.
// Interface: configuration write bus (cfg_*), fetch input (valid, PC, encoded
// word) and restored output (instr_valid, instr), plus status and event pulses
// for observation. The restored word is combinational from the fetched word.
// Defaults follow the design: 24 bus lines as drawn for a TT entry, block size
// 5, 16 TT entries, about 10 BBIT entries. CT width, PC width and the bus are
// this design's choices. The address map limits DATA_WIDTH to 39, TT_ENTRIES to 64
// and BBIT_ENTRIES to 128; larger values stop elaboration.
module imt_fetch_decoder
  import imt_pkg::*;
#(
  parameter int unsigned DATA_WIDTH   = 24,
  parameter int unsigned BLOCK_SIZE   = 5,
  parameter int unsigned TT_ENTRIES   = 16,
  parameter int unsigned BBIT_ENTRIES = 10,
  parameter int unsigned CT_WIDTH     = 8,
  parameter int unsigned PC_WIDTH     = 32,
  localparam int unsigned TT_IDX_W = (TT_ENTRIES > 1) ? $clog2(TT_ENTRIES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration bus
  input  logic                  cfg_we,
  input  logic [11:0]           cfg_addr,
  input  logic [CFG_WORD-1:0]   cfg_wdata,
  output logic                  cfg_bad_addr,
  // fetch
  input  logic                  fetch_valid,
  input  logic [PC_WIDTH-1:0]   fetch_pc,
  input  logic [DATA_WIDTH-1:0] fetch_data,
  output logic                  instr_valid,
  output logic [DATA_WIDTH-1:0] instr,
  // status
  output logic                  enabled,
  output logic                  active,
  output logic [TT_IDX_W-1:0]   cur_tt_idx,
  output logic                  ev_bb_start,
  output logic                  ev_bbit_miss,
  output logic                  ev_entry_adv,
  output logic                  ev_bb_end
);

  localparam int unsigned E_BITS    = tt_entry_bits(DATA_WIDTH, CT_WIDTH);
  localparam int unsigned E_WORDS   = tt_entry_words(DATA_WIDTH, CT_WIDTH);
  localparam int unsigned TT_WORD_W = (E_WORDS > 1) ? $clog2(E_WORDS) : 1;
  localparam int unsigned BB_IDX_W  = (BBIT_ENTRIES > 1) ? $clog2(BBIT_ENTRIES) : 1;

  // The configuration address map has room for 4 words per TT entry, 64 TT
  // entries and 128 BBIT entries.
  if (E_WORDS > 4 || TT_ENTRIES > 64 || BBIT_ENTRIES > 128) begin : g_cfg_range
    $error("imt_fetch_decoder: size exceeds the configuration address map");
  end

  logic                 tt_we;
  logic [TT_IDX_W-1:0]  tt_waddr;
  logic [TT_WORD_W-1:0] tt_wword;
  logic                 bbit_we;
  logic [BB_IDX_W-1:0]  bbit_waddr;
  logic                 bbit_wword;
  logic [CFG_WORD-1:0]  wdata;
  logic [PC_WIDTH-1:0]  bbit_pc;
  logic                 bbit_hit;
  logic [TT_IDX_W-1:0]  bbit_tt_idx;
  logic [TT_IDX_W-1:0]  tt_raddr;
  logic [E_BITS-1:0]    tt_rdata;

  cfg_port #(
    .TT_ENTRIES   (TT_ENTRIES),
    .TT_WORDS     (E_WORDS),
    .BBIT_ENTRIES (BBIT_ENTRIES)
  ) u_cfg (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata,
    .bad_addr (cfg_bad_addr),
    .tt_we, .tt_waddr, .tt_wword,
    .bbit_we, .bbit_waddr, .bbit_wword,
    .wdata,
    .enable   (enabled)
  );

  tt_table #(
    .DATA_WIDTH (DATA_WIDTH),
    .CT_WIDTH   (CT_WIDTH),
    .ENTRIES    (TT_ENTRIES)
  ) u_tt (
    .clk, .rst_n,
    .we    (tt_we),
    .waddr (tt_waddr),
    .wword (tt_wword),
    .wdata (wdata),
    .raddr (tt_raddr),
    .rdata (tt_rdata)
  );

  bbit #(
    .ENTRIES    (BBIT_ENTRIES),
    .PC_WIDTH   (PC_WIDTH),
    .TT_ENTRIES (TT_ENTRIES)
  ) u_bbit (
    .clk, .rst_n,
    .we         (bbit_we),
    .waddr      (bbit_waddr),
    .wword      (bbit_wword),
    .wdata      (wdata),
    .lookup_pc  (bbit_pc),
    .hit        (bbit_hit),
    .hit_tt_idx (bbit_tt_idx)
  );

  restore_ctrl #(
    .DATA_WIDTH (DATA_WIDTH),
    .BLOCK_SIZE (BLOCK_SIZE),
    .TT_ENTRIES (TT_ENTRIES),
    .CT_WIDTH   (CT_WIDTH),
    .PC_WIDTH   (PC_WIDTH)
  ) u_ctrl (
    .clk, .rst_n,
    .enable      (enabled),
    .fetch_valid, .fetch_pc, .fetch_data,
    .instr_valid, .instr,
    .bbit_pc, .bbit_hit, .bbit_tt_idx,
    .tt_raddr, .tt_rdata,
    .active, .cur_tt_idx,
    .ev_bb_start, .ev_bbit_miss, .ev_entry_adv, .ev_bb_end
  );

endmodule
