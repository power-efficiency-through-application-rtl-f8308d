// random_stream_tb: the random bit-stream experiment.
//
// Each of the 24 bus lines carries a random bit sequence of length 1000,
// encoded with block size 5 as one long basic block (one unencoded first
// instruction, then 250 overlapping blocks of four new bits). The sequencer
// restores the stream through a 256-entry table model; every word is checked
// against the original, and the total transition reduction on the bus must lie
// within one percentage point of 50 %, the value expected for block size 5 on
// uniformly distributed bits.
module random_stream_tb;
  import imt_pkg::*;
  import imt_enc_pkg::*;

  localparam int W = 24, K = 5, NTT = 256, CTW = 8, N = 1000;
  localparam int EB = 3 * W + 1 + CTW;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic          fetch_valid = 1'b0;
  logic [31:0]   fetch_pc = '0;
  logic [W-1:0]  fetch_data = '0;
  logic          instr_valid, active;
  logic [W-1:0]  instr;
  logic [31:0]   bbit_pc;
  logic          bbit_hit;
  logic [7:0]    tt_raddr, cur_tt_idx;
  logic [EB-1:0] tt_rdata;
  logic          ev_bb_start, ev_bbit_miss, ev_entry_adv, ev_bb_end;
  logic [EB-1:0] tt_mem [NTT];

  restore_ctrl #(.DATA_WIDTH(W), .BLOCK_SIZE(K), .TT_ENTRIES(NTT), .CT_WIDTH(CTW)) dut (
    .clk, .rst_n, .enable(1'b1), .fetch_valid, .fetch_pc, .fetch_data, .instr_valid, .instr,
    .bbit_pc, .bbit_hit, .bbit_tt_idx(8'd0), .tt_raddr, .tt_rdata, .active, .cur_tt_idx,
    .ev_bb_start, .ev_bbit_miss, .ev_entry_adv, .ev_bb_end
  );

  assign bbit_hit = (bbit_pc == 32'h0001_0000);
  assign tt_rdata = tt_mem[tt_raddr];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x[], c[];
    entry_t ents[$];
    longint tr_x = 0, tr_c = 0;
    real red;
    int cycles = 0;
    x = new[N];
    foreach (x[i]) x[i] = {40'h0, 24'($urandom)};
    encode_bb(x, W, K, 1'b0, c, ents);
    checks++;
    if (ents.size() != 250) begin failures++; $display("FAIL %0d entries", ents.size()); end
    foreach (tt_mem[i]) tt_mem[i] = '0;
    foreach (ents[e]) begin
      logic [31:0] words[];
      logic [95:0] v;
      pack_entry(ents[e], W, CTW, words);
      v = {words[2], words[1], words[0]};
      tt_mem[e] = v[EB-1:0];
    end
    for (int i = 1; i < N; i++) begin
      tr_x += $countones(x[i] ^ x[i-1]);
      tr_c += $countones(c[i] ^ c[i-1]);
    end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      fetch_valid = 1'b1;
      fetch_pc = 32'h0001_0000 + 32'(4 * i);
      fetch_data = c[i][W-1:0];
      #1;
      checks++;
      cycles++;
      if (instr !== x[i][W-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: %h expected %h", i, instr, x[i][W-1:0]);
      end
    end
    @(negedge clk);
    fetch_valid = 1'b0;
    @(negedge clk);
    // one word per cycle, no stall cycles added
    checks++;
    if (cycles != N) failures++;
    checks++;
    if (active) begin failures++; $display("FAIL block not closed"); end
    red = 100.0 * real'(tr_x - tr_c) / real'(tr_x);
    $display("random stream: original=%0d encoded=%0d transitions, reduction=%0.2f%%", tr_x, tr_c, red);
    checks++;
    if (red < 49.0 || red > 51.0) begin failures++; $display("FAIL reduction outside 50 +- 1 %%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
