// mmul_loop_tb: a matrix-multiply kernel through a 32-bit decoder.
//
// The loop nest of C = A * B for 100 x 100 integer matrices, written as MIPS32
// machine code (assembled here by small helper functions), forms three basic
// blocks: the prologue of one C element, the inner product loop (nine
// instructions including the branch delay slot) and the epilogue that stores
// the element and branches back. All three are encoded with block size 5 and
// loaded over the configuration bus into a decoder with DATA_WIDTH = 32
// (105-bit TT entries, four configuration words each). The testbench then
// fetches the dynamic instruction stream of ten C elements (ten prologues,
// 1000 inner iterations, ten epilogues), checks every restored word, and
// reports the bus transitions of the original and encoded streams; the
// encoded stream must save at least 25 %. The code, register use and
// addresses are this testbench's own; only the kernel and matrix size come
// from the benchmark description.
module mmul_loop_tb;
  import imt_pkg::*;
  import imt_enc_pkg::*;

  localparam int W = 32, K = 5, CTW = 8;
  localparam int NBB = 3;
  localparam int N = 100;     // matrix size
  localparam int ELEMS = 10;  // C elements simulated

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic        cfg_we = 1'b0;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic        cfg_bad_addr, instr_valid, enabled, active;
  logic        fetch_valid = 1'b0;
  logic [31:0] fetch_pc = '0;
  logic [W-1:0] fetch_data = '0, instr;
  logic [3:0]  cur_tt_idx;
  logic        ev_bb_start, ev_bbit_miss, ev_entry_adv, ev_bb_end;

  imt_fetch_decoder #(.DATA_WIDTH(W), .BLOCK_SIZE(K)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_bad_addr,
    .fetch_valid, .fetch_pc, .fetch_data, .instr_valid, .instr,
    .enabled, .active, .cur_tt_idx,
    .ev_bb_start, .ev_bbit_miss, .ev_entry_adv, .ev_bb_end
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // MIPS32 register numbers
  localparam logic [4:0] ZERO = 5'd0, T0 = 5'd8, T1 = 5'd9, T2 = 5'd10, T3 = 5'd11,
                         T4 = 5'd12, T5 = 5'd13, T6 = 5'd14, T7 = 5'd15,
                         S0 = 5'd16, S1 = 5'd17, S2 = 5'd18;

  function automatic logic [31:0] rtype(logic [4:0] rs, logic [4:0] rt, logic [4:0] rd, logic [5:0] fn);
    return {6'h00, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] op, logic [4:0] rs, logic [4:0] rt, int imm);
    return {op, rs, rt, 16'(imm)};
  endfunction
  function automatic logic [31:0] addu(logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);
    return rtype(rs, rt, rd, 6'h21);
  endfunction
  function automatic logic [31:0] addiu(logic [4:0] rt, logic [4:0] rs, int imm);
    return itype(6'h09, rs, rt, imm);
  endfunction
  function automatic logic [31:0] lw(logic [4:0] rt, int off, logic [4:0] base);
    return itype(6'h23, base, rt, off);
  endfunction
  function automatic logic [31:0] sw(logic [4:0] rt, int off, logic [4:0] base);
    return itype(6'h2b, base, rt, off);
  endfunction
  function automatic logic [31:0] bne(logic [4:0] rs, logic [4:0] rt, int off);
    return itype(6'h05, rs, rt, off);
  endfunction

  logic [31:0] bb_pc [NBB] = '{32'h0040_0100, 32'h0040_0110, 32'h0040_0134};
  word_t orig [NBB][];
  word_t code [NBB][];
  longint tr_orig = 0, tr_enc = 0;
  logic [W-1:0] last_o = '0, last_e = '0;
  bit have_last = 1'b0;
  int n_fetch = 0;

  task automatic cfg_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic run_bb(int b);
    for (int i = 0; i < orig[b].size(); i++) begin
      @(negedge clk);
      fetch_valid = 1'b1;
      fetch_pc = bb_pc[b] + 32'(4 * i);
      fetch_data = code[b][i][W-1:0];
      #1;
      checks++;
      if (instr !== orig[b][i][W-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL pc %h: %h expected %h", fetch_pc, instr, orig[b][i][W-1:0]);
      end
      if (have_last) begin
        tr_orig += $countones(orig[b][i][W-1:0] ^ last_o);
        tr_enc  += $countones(code[b][i][W-1:0] ^ last_e);
      end
      last_o = orig[b][i][W-1:0];
      last_e = code[b][i][W-1:0];
      have_last = 1'b1;
      n_fetch++;
    end
  endtask

  initial begin
    int t = 0;
    real red;
    // B0: prologue of one element of C
    orig[0] = new[4];
    orig[0][0] = {32'h0, addu(T3, ZERO, ZERO)};    // sum = 0
    orig[0][1] = {32'h0, addu(T0, S0, ZERO)};      // &A[i][0]
    orig[0][2] = {32'h0, addu(T1, S1, ZERO)};      // &B[0][j]
    orig[0][3] = {32'h0, addiu(T2, S0, 4 * N)};    // end of row i
    // B1: inner product loop
    orig[1] = new[9];
    orig[1][0] = {32'h0, lw(T4, 0, T0)};
    orig[1][1] = {32'h0, lw(T5, 0, T1)};
    orig[1][2] = {32'h0, addiu(T0, T0, 4)};
    orig[1][3] = {32'h0, addiu(T1, T1, 4 * N)};
    orig[1][4] = {32'h0, rtype(T4, T5, 5'd0, 6'h18)};  // mult
    orig[1][5] = {32'h0, rtype(5'd0, 5'd0, T6, 6'h12)}; // mflo
    orig[1][6] = {32'h0, addu(T3, T3, T6)};
    orig[1][7] = {32'h0, bne(T0, T2, -8)};          // back to B1
    orig[1][8] = '0;                                // delay slot nop
    // B2: store C[i][j], next j
    orig[2] = new[6];
    orig[2][0] = {32'h0, sw(T3, 0, T7)};
    orig[2][1] = {32'h0, addiu(T7, T7, 4)};
    orig[2][2] = {32'h0, addiu(S1, S1, 4)};
    orig[2][3] = {32'h0, addiu(S2, S2, -1)};
    orig[2][4] = {32'h0, bne(S2, ZERO, -18)};       // back to B0
    orig[2][5] = '0;

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBB; b++) begin
      entry_t ents[$];
      encode_bb(orig[b], W, K, 1'b0, code[b], ents);
      cfg_write(12'h200 | 12'(b << 1), bb_pc[b]);
      cfg_write(12'h201 | 12'(b << 1), {1'b1, 27'b0, 4'(t)});
      foreach (ents[e]) begin
        logic [31:0] words[];
        pack_entry(ents[e], W, CTW, words);
        checks++;
        if (words.size() != 4) failures++;
        foreach (words[w]) cfg_write(12'h100 | 12'(t << 2) | 12'(w), words[w]);
        t++;
      end
    end
    cfg_write(12'h000, 32'h1);

    for (int el = 0; el < ELEMS; el++) begin
      run_bb(0);
      for (int k = 0; k < N; k++) run_bb(1);
      run_bb(2);
    end
    @(negedge clk);
    fetch_valid = 1'b0;
    @(negedge clk);

    red = 100.0 * real'(tr_orig - tr_enc) / real'(tr_orig);
    $display("mmul: %0d fetches, %0d TT entries, bus transitions original=%0d encoded=%0d, reduction=%0.1f%%",
             n_fetch, t, tr_orig, tr_enc, red);
    checks++;
    if (red < 25.0) begin failures++; $display("FAIL reduction below 25%%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
