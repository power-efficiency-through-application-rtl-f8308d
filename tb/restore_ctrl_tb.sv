// restore_ctrl_tb: self-checking test of the fetch-side restore sequencer.
//
// The TT and BBIT are modelled here as plain arrays, so the sequencer is tested
// on its own. A loop of basic blocks shaped like a typical loop body
// (B1 -> B2 or B3 -> B4, back to B1), plus a one-instruction block and a rarely
// run "cold" block stored unencoded under one identity entry, is filled with
// random instructions and encoded by the reference encoder. The testbench then
// fetches the loop many times, with random fetch bubbles, leaves it into code
// that is not in the BBIT, and checks in the same cycle that every restored
// word equals the original one (zero added latency). It counts basic block
// starts, BBIT misses, entry advances and basic block ends against the
// expected numbers, and checks that disabling decoding mid-block passes the
// raw words and that decoding resumes cleanly afterwards.
module restore_ctrl_tb;
  import imt_pkg::*;
  import imt_enc_pkg::*;

  localparam int W = 24, K = 5, NTT = 16, CTW = 8;
  localparam int EB = 3 * W + 1 + CTW;
  localparam int NBB = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b0;
  logic          fetch_valid = 1'b0;
  logic [31:0]   fetch_pc = '0;
  logic [W-1:0]  fetch_data = '0;
  logic          instr_valid, active;
  logic [W-1:0]  instr;
  logic [31:0]   bbit_pc;
  logic          bbit_hit;
  logic [3:0]    bbit_tt_idx, tt_raddr, cur_tt_idx;
  logic [EB-1:0] tt_rdata;
  logic          ev_bb_start, ev_bbit_miss, ev_entry_adv, ev_bb_end;

  restore_ctrl dut (
    .clk, .rst_n, .enable, .fetch_valid, .fetch_pc, .fetch_data, .instr_valid, .instr,
    .bbit_pc, .bbit_hit, .bbit_tt_idx, .tt_raddr, .tt_rdata, .active, .cur_tt_idx,
    .ev_bb_start, .ev_bbit_miss, .ev_entry_adv, .ev_bb_end
  );

  // program: basic block lengths, start PCs, cold flags
  int     bb_len  [NBB] = '{9, 6, 5, 13, 1, 7};
  bit     bb_cold [NBB] = '{0, 0, 0, 0, 0, 1};
  logic [31:0] bb_pc [NBB];
  int     bb_tt   [NBB];
  word_t  orig [NBB][];
  word_t  code [NBB][];
  logic [EB-1:0] tt_mem [NTT];
  int     n_entries [NBB];

  // table models
  always_comb begin
    bbit_hit = 1'b0;
    bbit_tt_idx = '0;
    for (int b = 0; b < NBB; b++)
      if (bbit_pc == bb_pc[b]) begin
        bbit_hit = 1'b1;
        bbit_tt_idx = 4'(bb_tt[b]);
      end
  end
  assign tt_rdata = tt_mem[tt_raddr];

  always #5 clk = ~clk;

  int n_start = 0, n_miss = 0, n_adv = 0, n_end = 0, n_bubble = 0;
  int e_start = 0, e_miss = 0, e_adv = 0, e_end = 0;

  always @(posedge clk) begin
    n_start += int'(ev_bb_start);
    n_miss  += int'(ev_bbit_miss);
    n_adv   += int'(ev_entry_adv);
    n_end   += int'(ev_bb_end);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(logic [31:0] pc, logic [W-1:0] enc, logic [W-1:0] exp);
    while ($urandom % 4 == 0) begin
      @(negedge clk);
      fetch_valid = 1'b0;
      fetch_data  = W'($urandom);
      n_bubble++;
    end
    @(negedge clk);
    fetch_valid = 1'b1;
    fetch_pc    = pc;
    fetch_data  = enc;
    #1;
    checks++;
    if (!instr_valid || instr !== exp) begin
      failures++;
      $display("FAIL pc %h: got %h expected %h", pc, instr, exp);
    end
  endtask

  task automatic run_bb(int b);
    for (int i = 0; i < bb_len[b]; i++) fetch(bb_pc[b] + 32'(4 * i), code[b][i][W-1:0], orig[b][i][W-1:0]);
    e_start++;
    e_end++;
    e_adv += n_entries[b] - 1;
  endtask

  initial begin
    int t = 0;
    for (int b = 0; b < NBB; b++) begin
      entry_t ents[$];
      word_t chk[];
      bb_pc[b] = 32'h0040_1000 + 32'(b) * 32'h100;
      orig[b] = new[bb_len[b]];
      foreach (orig[b][i]) orig[b][i] = {$urandom, $urandom} & ((64'd1 << W) - 1);
      encode_bb(orig[b], W, K, bb_cold[b], code[b], ents);
      decode_bb(code[b], ents, W, K, chk);
      foreach (chk[i]) if (chk[i] !== orig[b][i]) $display("reference encoder mismatch bb %0d", b);
      bb_tt[b] = t;
      n_entries[b] = ents.size();
      foreach (ents[e]) begin
        logic [31:0] words[];
        logic [95:0] v;
        pack_entry(ents[e], W, CTW, words);
        v = {words[2], words[1], words[0]};
        tt_mem[t] = v[EB-1:0];
        t++;
      end
    end
    for (int i = t; i < NTT; i++) tt_mem[i] = '0;

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    for (int it = 0; it < 60; it++) begin
      run_bb(0);
      run_bb(($urandom % 2 == 0) ? 1 : 2);
      run_bb(3);
      if (it % 5 == 1) run_bb(4);
      if (it % 7 == 3) run_bb(5);
    end
    // leave the loop: code not in the BBIT passes unchanged
    for (int i = 0; i < 8; i++) begin
      logic [W-1:0] d;
      d = W'($urandom);
      fetch(32'h0040_2000 + 32'(4 * i), d, d);
      e_miss++;
    end
    // disable in the middle of B4: the rest passes raw
    for (int i = 0; i < 6; i++) fetch(bb_pc[3] + 32'(4 * i), code[3][i][W-1:0], orig[3][i][W-1:0]);
    e_start++;
    e_adv++;  // B4's first entry (5 instructions) retired
    @(negedge clk);
    fetch_valid = 1'b0;
    enable = 1'b0;
    for (int i = 6; i < 13; i++) fetch(bb_pc[3] + 32'(4 * i), code[3][i][W-1:0], code[3][i][W-1:0]);
    @(negedge clk);
    fetch_valid = 1'b0;
    enable = 1'b1;
    // decoding resumes at the next basic block start
    run_bb(0);
    run_bb(1);
    @(negedge clk);
    fetch_valid = 1'b0;
    @(negedge clk);

    checks += 4;
    if (n_start != e_start) begin failures++; $display("FAIL bb starts %0d expected %0d", n_start, e_start); end
    if (n_miss  != e_miss)  begin failures++; $display("FAIL misses %0d expected %0d", n_miss, e_miss); end
    if (n_adv   != e_adv)   begin failures++; $display("FAIL advances %0d expected %0d", n_adv, e_adv); end
    if (n_end   != e_end)   begin failures++; $display("FAIL bb ends %0d expected %0d", n_end, e_end); end
    checks++;
    if (n_bubble == 0) begin failures++; $display("FAIL no fetch bubble"); end
    $display("starts=%0d misses=%0d advances=%0d ends=%0d bubbles=%0d", n_start, n_miss, n_adv, n_end, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
