// imt_fetch_decoder_tb: end-to-end test of the transformation decoder at its
// default size (24 bus lines, block size 5, 16 TT entries, 10 BBIT entries).
//
// Two hot loops are run one after the other, as a program would do when it
// reprograms the decoder before each hot spot:
//   loop A: B1 -> (B2 | B3) -> B4 -> B1, plus a one-instruction block and a
//           cold block kept unencoded under a single identity entry;
//   loop B: a different set of blocks and table contents.
// Before each loop the testbench writes the encoded tables through the
// configuration bus (as software stores would), then fetches the encoded code
// with random fetch bubbles. Every restored word is checked against the
// original instruction in the cycle it is fetched. Between the loops the code
// runs through unencoded code (BBIT misses) and decoding is switched off and
// on. A write to an unmapped address must raise the bad-address flag.
// The testbench counts how often each mechanism happened (basic block start,
// BBIT miss, TT entry advance, End/CT tail completion, one-instruction block,
// cold identity block, fetch bubble, enable switch, table reload, bad
// configuration address) and fails if one never did. It also counts bit
// transitions on the instruction bus for the encoded and the original stream
// over the encoded blocks and requires at least a 35 % reduction (random code
// with block size 5 gives close to 50 %).
module imt_fetch_decoder_tb;
  import imt_pkg::*;
  import imt_enc_pkg::*;

  localparam int W = 24, K = 5, CTW = 8;
  localparam int NBB = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic        cfg_we = 1'b0;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic        cfg_bad_addr;
  logic        fetch_valid = 1'b0;
  logic [31:0] fetch_pc = '0;
  logic [W-1:0] fetch_data = '0;
  logic        instr_valid, enabled, active;
  logic [W-1:0] instr;
  logic [3:0]  cur_tt_idx;
  logic        ev_bb_start, ev_bbit_miss, ev_entry_adv, ev_bb_end;

  imt_fetch_decoder dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_bad_addr,
    .fetch_valid, .fetch_pc, .fetch_data, .instr_valid, .instr,
    .enabled, .active, .cur_tt_idx,
    .ev_bb_start, .ev_bbit_miss, .ev_entry_adv, .ev_bb_end
  );

  always #5 clk = ~clk;

  // current loop
  int          bb_len  [NBB];
  bit          bb_cold [NBB];
  logic [31:0] bb_pc   [NBB];
  int          n_ent   [NBB];
  word_t       orig [NBB][];
  word_t       code [NBB][];

  // mechanism counters
  int n_start = 0, n_miss = 0, n_adv = 0, n_end = 0;
  int n_single = 0, n_cold = 0, n_bubble = 0, n_switch = 0, n_reload = 0, n_bad = 0;
  int e_start = 0, e_miss = 0, e_adv = 0;
  // bus transitions over encoded blocks
  longint tr_enc = 0, tr_orig = 0;
  logic [W-1:0] last_enc, last_orig;
  bit have_last = 1'b0;

  always @(posedge clk) begin
    n_start += int'(ev_bb_start);
    n_miss  += int'(ev_bbit_miss);
    n_adv   += int'(ev_entry_adv);
    n_end   += int'(ev_bb_end);
    n_bad   += int'(cfg_bad_addr);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    fetch_valid = 1'b0;
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic fetch(logic [31:0] pc, logic [W-1:0] enc, logic [W-1:0] exp, bit count_tr);
    while ($urandom % 5 == 0) begin
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
    if (count_tr && have_last) begin
      tr_enc  += $countones(enc ^ last_enc);
      tr_orig += $countones(exp ^ last_orig);
    end
    last_enc = enc;
    last_orig = exp;
    have_last = count_tr;
  endtask

  // Build a loop: random code, reference encoding, tables written over the bus.
  task automatic load_loop(int lens[NBB], bit cold[NBB], logic [31:0] base);
    int t = 0;
    for (int b = 0; b < NBB; b++) begin
      entry_t ents[$];
      bb_len[b]  = lens[b];
      bb_cold[b] = cold[b];
      bb_pc[b]   = base + 32'(b) * 32'h80;
      orig[b] = new[lens[b]];
      foreach (orig[b][i]) orig[b][i] = {32'h0, $urandom} & ((64'd1 << W) - 1);
      encode_bb(orig[b], W, K, cold[b], code[b], ents);
      n_ent[b] = ents.size();
      cfg_write(12'h200 | 12'(b << 1), bb_pc[b]);
      cfg_write(12'h201 | 12'(b << 1), {1'b1, 27'b0, 4'(t)});
      foreach (ents[e]) begin
        logic [31:0] words[];
        pack_entry(ents[e], W, CTW, words);
        foreach (words[w]) cfg_write(12'h100 | 12'(t << 2) | 12'(w), words[w]);
        t++;
      end
    end
    n_reload++;
  endtask

  task automatic run_bb(int b);
    have_last = 1'b0;
    for (int i = 0; i < bb_len[b]; i++)
      fetch(bb_pc[b] + 32'(4 * i), code[b][i][W-1:0], orig[b][i][W-1:0], !bb_cold[b]);
    e_start++;
    e_adv += n_ent[b] - 1;
    if (bb_len[b] == 1) n_single++;
    if (bb_cold[b]) n_cold++;
  endtask

  task automatic run_plain(int n, logic [31:0] base);
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] d;
      d = W'($urandom);
      fetch(base + 32'(4 * i), d, d, 1'b0);
      e_miss++;
    end
  endtask

  task automatic set_enable(bit en);
    cfg_write(12'h000, {31'b0, en});
    n_switch++;
  endtask

  initial begin
    int lens_a [NBB] = '{9, 6, 5, 13, 1, 7};
    bit cold_a [NBB] = '{0, 0, 0, 0, 0, 1};
    int lens_b [NBB] = '{17, 4, 8, 3, 2, 12};
    bit cold_b [NBB] = '{0, 0, 0, 0, 0, 0};
    int n_end0;

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // decoding off after reset: code passes unchanged
    run_plain(4, 32'h0040_0000);
    e_miss -= 4;  // no lookups while disabled

    load_loop(lens_a, cold_a, 32'h0040_1000);
    set_enable(1'b1);
    run_plain(5, 32'h0040_0000);
    for (int it = 0; it < 40; it++) begin
      run_bb(0);
      run_bb(($urandom % 2 == 0) ? 1 : 2);
      run_bb(3);
      if (it % 4 == 1) run_bb(4);
      if (it % 6 == 3) run_bb(5);
    end
    run_plain(6, 32'h0040_3000);

    // reprogram for a second hot loop
    set_enable(1'b0);
    load_loop(lens_b, cold_b, 32'h0040_8000);
    cfg_write(12'h3F0, 32'hDEAD_BEEF);  // unmapped address
    set_enable(1'b1);
    for (int it = 0; it < 30; it++) begin
      run_bb(0);
      run_bb(1 + ($urandom % 3));
      if (it % 3 == 0) run_bb(4);
      run_bb(5);
    end
    run_plain(3, 32'h0040_3000);
    @(negedge clk);
    fetch_valid = 1'b0;
    @(negedge clk);

    n_end0 = n_end;
    checks += 4;
    if (n_start != e_start) begin failures++; $display("FAIL bb starts %0d expected %0d", n_start, e_start); end
    if (n_miss != e_miss)   begin failures++; $display("FAIL misses %0d expected %0d", n_miss, e_miss); end
    if (n_adv != e_adv)     begin failures++; $display("FAIL advances %0d expected %0d", n_adv, e_adv); end
    if (n_end0 != e_start)  begin failures++; $display("FAIL bb ends %0d expected %0d", n_end0, e_start); end

    $display("mechanisms: bb_start=%0d bbit_miss=%0d entry_adv=%0d tail_end=%0d single=%0d cold=%0d",
             n_start, n_miss, n_adv, n_end, n_single, n_cold);
    $display("            bubbles=%0d enable_switches=%0d reloads=%0d bad_cfg=%0d",
             n_bubble, n_switch, n_reload, n_bad);
    checks += 10;
    if (n_start == 0)  begin failures++; $display("FAIL no basic block start"); end
    if (n_miss == 0)   begin failures++; $display("FAIL no BBIT miss"); end
    if (n_adv == 0)    begin failures++; $display("FAIL no TT entry advance"); end
    if (n_end == 0)    begin failures++; $display("FAIL no tail completion"); end
    if (n_single == 0) begin failures++; $display("FAIL no one-instruction block"); end
    if (n_cold == 0)   begin failures++; $display("FAIL no cold block"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no fetch bubble"); end
    if (n_switch < 2)  begin failures++; $display("FAIL no enable switch"); end
    if (n_reload < 2)  begin failures++; $display("FAIL no table reload"); end
    if (n_bad != 1)    begin failures++; $display("FAIL bad address flagged %0d times", n_bad); end

    $display("bus transitions over encoded blocks: original=%0d encoded=%0d reduction=%0.1f%%",
             tr_orig, tr_enc, 100.0 * real'(tr_orig - tr_enc) / real'(tr_orig));
    checks++;
    if (real'(tr_enc) > 0.65 * real'(tr_orig)) begin
      failures++;
      $display("FAIL reduction below 35%%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
