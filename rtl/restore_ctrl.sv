// restore_ctrl: fetch-side sequencer that restores encoded instructions.
//
// The code of the hot loop is stored encoded: every bus line is cut, per basic
// block, into blocks of BLOCK_SIZE bits that overlap their neighbour by one bit,
// so each Transformation Table (TT) entry governs BLOCK_SIZE-1 new instructions
// (the first entry of a basic block also covers the block's first instruction,
// which is stored unencoded, BLOCK_SIZE in all). This module follows the fetched
// stream and restores it:
//   * Outside an encoded basic block every fetched word passes unchanged. Its PC
//     is looked up in the BBIT; on a hit the word is the first instruction of
//     an encoded basic block, its TT index is taken from the BBIT and that TT
//     entry is loaded into the current-entry register.
//   * Inside a basic block each bus line i is restored as
//     x_n = tau_i(enc_n, h) with h the previous restored bit of that line,
//     except at the first instruction of every later entry, where h is the
//     previous encoded bit (the overlapped bit belongs to the previous block).
//   * A down counter counts the instructions left under the current entry:
//     BLOCK_SIZE (first entry) or BLOCK_SIZE-1, or CT when the entry's End bit
//     is set. At zero the next TT entry is loaded, or, after an End entry, the
//     basic block is complete and the next fetch is looked up in the BBIT.
//     CT = 0 is treated as 1.
// Timing: the restored word 'instr' is combinational from 'fetch_data' (one
// mux and one two-input gate per line, controlled by registers only), so the
// fetch stage gains no cycle. Tables are read combinationally from registered
// indices and the result is registered for the next fetch. A fetch is taken
// when fetch_valid is high; with 'enable' low everything passes unchanged and
// the sequencer returns to the idle state.
// The block/overlap structure, the BBIT and TT roles, the E/CT tail counter and
// the history rule follow the design. The counter semantics (CT counts all
// instructions fetched under its entry, so a one-entry identity block of N
// instructions uses CT = N), TT index wrap-around and the event outputs are
// this design's choices.
module restore_ctrl
  import imt_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 24,
  parameter int unsigned BLOCK_SIZE = 5,
  parameter int unsigned TT_ENTRIES = 16,
  parameter int unsigned CT_WIDTH   = 8,
  parameter int unsigned PC_WIDTH   = 32,
  localparam int unsigned TT_IDX_W = (TT_ENTRIES > 1) ? $clog2(TT_ENTRIES) : 1,
  localparam int unsigned E_BITS   = DATA_WIDTH * TAU_BITS + 1 + CT_WIDTH,
  localparam int unsigned CNT_W    = (CT_WIDTH > $clog2(BLOCK_SIZE + 1)) ? CT_WIDTH
                                                                         : $clog2(BLOCK_SIZE + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  // fetch side
  input  logic                  fetch_valid,
  input  logic [PC_WIDTH-1:0]   fetch_pc,
  input  logic [DATA_WIDTH-1:0] fetch_data,
  output logic                  instr_valid,
  output logic [DATA_WIDTH-1:0] instr,
  // BBIT lookup
  output logic [PC_WIDTH-1:0]   bbit_pc,
  input  logic                  bbit_hit,
  input  logic [TT_IDX_W-1:0]   bbit_tt_idx,
  // TT read
  output logic [TT_IDX_W-1:0]   tt_raddr,
  input  logic [E_BITS-1:0]     tt_rdata,
  // status and event pulses (one cycle, on a taken fetch)
  output logic                  active,
  output logic [TT_IDX_W-1:0]   cur_tt_idx,
  output logic                  ev_bb_start,
  output logic                  ev_bbit_miss,
  output logic                  ev_entry_adv,
  output logic                  ev_bb_end
);

  localparam int unsigned TAUS_W = DATA_WIDTH * TAU_BITS;

  // state
  logic                  active_q;
  logic [TT_IDX_W-1:0]   idx_q;
  logic [TAUS_W-1:0]     taus_q;
  logic                  tail_q;
  logic [CNT_W-1:0]      left_q;
  logic                  first_q;     // next fetch is the first under a later entry
  logic [DATA_WIDTH-1:0] hist_q;      // previous restored word
  logic [DATA_WIDTH-1:0] prev_enc_q;  // previous encoded word

  // loaded entry fields
  logic [TAUS_W-1:0]     ld_taus;
  logic                  ld_end;
  logic [CT_WIDTH-1:0]   ld_ct;
  logic [CNT_W-1:0]      ld_ct_eff;

  logic                  take;
  logic [DATA_WIDTH-1:0] hist_sel;
  logic [DATA_WIDTH-1:0] restored;
  logic [TT_IDX_W-1:0]   next_idx;

  assign take    = fetch_valid && enable;
  assign ld_taus = tt_rdata[TAUS_W-1:0];
  assign ld_end  = tt_rdata[TAUS_W];
  assign ld_ct   = tt_rdata[TAUS_W+1 +: CT_WIDTH];
  assign ld_ct_eff = (ld_ct == '0) ? CNT_W'(1) : CNT_W'(ld_ct);

  assign next_idx = (32'(idx_q) == TT_ENTRIES - 1) ? '0 : idx_q + 1'b1;

  // table addressing
  assign bbit_pc  = fetch_pc;
  assign tt_raddr = active_q ? next_idx : bbit_tt_idx;

  // restoring datapath
  assign hist_sel = first_q ? prev_enc_q : hist_q;

  for (genvar i = 0; i < DATA_WIDTH; i++) begin : g_line
    tau_gate u_tau (
      .sel      (tau_e'(taus_q[i*TAU_BITS +: TAU_BITS])),
      .enc_bit  (fetch_data[i]),
      .hist_bit (hist_sel[i]),
      .dec_bit  (restored[i])
    );
  end

  assign instr       = (active_q && enable) ? restored : fetch_data;
  assign instr_valid = fetch_valid;
  assign active      = active_q;
  assign cur_tt_idx  = idx_q;

  // events
  always_comb begin
    ev_bb_start  = 1'b0;
    ev_bbit_miss = 1'b0;
    ev_entry_adv = 1'b0;
    ev_bb_end    = 1'b0;
    if (take) begin
      if (!active_q) begin
        ev_bb_start  = bbit_hit;
        ev_bbit_miss = !bbit_hit;
        // a basic block that ends with its first instruction
        ev_bb_end    = bbit_hit && ld_end && (ld_ct_eff == CNT_W'(1));
      end else if (left_q == CNT_W'(1)) begin
        ev_bb_end    = tail_q;
        ev_entry_adv = !tail_q;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q   <= 1'b0;
      idx_q      <= '0;
      taus_q     <= '0;
      tail_q     <= 1'b0;
      left_q     <= '0;
      first_q    <= 1'b0;
      hist_q     <= '0;
      prev_enc_q <= '0;
    end else if (!enable) begin
      active_q <= 1'b0;
      first_q  <= 1'b0;
    end else if (take) begin
      hist_q     <= instr;
      prev_enc_q <= fetch_data;
      if (!active_q) begin
        if (bbit_hit) begin
          idx_q   <= bbit_tt_idx;
          taus_q  <= ld_taus;
          tail_q  <= ld_end;
          first_q <= 1'b1;
          if (ld_end) begin
            left_q   <= ld_ct_eff - 1'b1;
            active_q <= (ld_ct_eff != CNT_W'(1));
          end else begin
            left_q   <= CNT_W'(BLOCK_SIZE - 1);
            active_q <= 1'b1;
          end
        end
      end else begin
        first_q <= 1'b0;
        if (left_q == CNT_W'(1)) begin
          if (tail_q) begin
            active_q <= 1'b0;
          end else begin
            idx_q   <= next_idx;
            taus_q  <= ld_taus;
            tail_q  <= ld_end;
            first_q <= 1'b1;
            left_q  <= ld_end ? ld_ct_eff : CNT_W'(BLOCK_SIZE - 1);
          end
        end else begin
          left_q <= left_q - 1'b1;
        end
      end
    end
  end

  // The tail counter never runs below one while a basic block is active.
  a_left_nonzero: assert property (@(posedge clk) disable iff (!rst_n) active_q |-> (left_q != '0))
    else $error("restore_ctrl: empty entry active");

endmodule
