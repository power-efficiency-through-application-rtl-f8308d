// block_size_run: testbench helper that runs one decoder of block size K.
//
// Builds one basic block of 49 pseudo-random 24-bit instructions (a fixed
// linear congruential sequence, identical for every K), encodes it with block
// size K, writes the tables through the configuration bus, enables decoding
// and fetches the block 20 times as a loop body. Every restored word is
// checked in its fetch cycle. Reports the checks, failures and the transition
// counts of the original and encoded block (within the block only).
module block_size_run #(
  parameter int K = 5
) (
  input  logic   clk,
  output int     checks,
  output int     failures,
  output longint tr_orig,
  output longint tr_enc,
  output bit     done
);
  import imt_pkg::*;
  import imt_enc_pkg::*;

  localparam int W = 24, CTW = 8, L = 49;

  logic        rst_n = 1'b1;
  logic        cfg_we = 1'b0;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic        cfg_bad_addr, instr_valid, enabled, active;
  logic        fetch_valid = 1'b0;
  logic [31:0] fetch_pc = '0;
  logic [W-1:0] fetch_data = '0, instr;
  logic [3:0]  cur_tt_idx;
  logic        ev_bb_start, ev_bbit_miss, ev_entry_adv, ev_bb_end;

  imt_fetch_decoder #(.BLOCK_SIZE(K)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_bad_addr,
    .fetch_valid, .fetch_pc, .fetch_data, .instr_valid, .instr,
    .enabled, .active, .cur_tt_idx,
    .ev_bb_start, .ev_bbit_miss, .ev_entry_adv, .ev_bb_end
  );

  task automatic cfg_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  initial begin
    word_t x[], c[];
    entry_t ents[$];
    logic [31:0] lcg;
    checks = 0; failures = 0; tr_orig = 0; tr_enc = 0; done = 1'b0;
    x = new[L];
    lcg = 32'h1234_5678;
    foreach (x[i]) begin
      lcg = lcg * 32'd1664525 + 32'd1013904223;
      x[i] = {40'h0, lcg[31:8]};
    end
    encode_bb(x, W, K, 1'b0, c, ents);
    for (int i = 1; i < L; i++) begin
      tr_orig += $countones(x[i] ^ x[i-1]);
      tr_enc  += $countones(c[i] ^ c[i-1]);
    end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    cfg_write(12'h200, 32'h0000_4000);
    cfg_write(12'h201, 32'h8000_0000);
    foreach (ents[e]) begin
      logic [31:0] words[];
      pack_entry(ents[e], W, CTW, words);
      foreach (words[w]) cfg_write(12'h100 | 12'(e << 2) | 12'(w), words[w]);
    end
    cfg_write(12'h000, 32'h1);
    for (int it = 0; it < 20; it++)
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        fetch_valid = 1'b1;
        fetch_pc = 32'h0000_4000 + 32'(4 * i);
        fetch_data = c[i][W-1:0];
        #1;
        checks++;
        if (instr !== x[i][W-1:0]) begin
          failures++;
          if (failures < 5) $display("FAIL K=%0d word %0d: %h expected %h", K, i, instr, x[i][W-1:0]);
        end
        if (i == 0 && !ev_bb_start) begin
          failures++;
          $display("FAIL K=%0d: no basic block start", K);
        end
      end
    @(negedge clk);
    fetch_valid = 1'b0;
    checks++;
    if (active) begin failures++; $display("FAIL K=%0d: block not closed", K); end
    done = 1'b1;
  end
endmodule
