// bbit_tb: self-checking test of the Basic Block Identification Table.
//
// Fills the ten entries with distinct start PCs and TT indices, then looks up
// every stored PC (hit, right index), PCs that are stored nowhere (miss), an
// entry made invalid again (miss), and checks the all-invalid reset state.
module bbit_tb;
  localparam int N = 10;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic we = 1'b0, wword = 1'b0;
  logic [3:0]  waddr = '0;
  logic [31:0] wdata = '0, lookup_pc = '0;
  logic        hit;
  logic [3:0]  hit_tt_idx;
  logic [31:0] pcs [N];
  logic [3:0]  idxs [N];

  bbit dut (.clk, .rst_n, .we, .waddr, .wword, .wdata, .lookup_pc, .hit, .hit_tt_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, bit w, logic [31:0] d);
    @(negedge clk);
    we = 1'b1; waddr = 4'(a); wword = w; wdata = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic look(logic [31:0] pc, bit exp_hit, logic [3:0] exp_idx);
    lookup_pc = pc;
    #1;
    checks++;
    if (hit !== exp_hit || (exp_hit && hit_tt_idx !== exp_idx)) begin
      failures++;
      $display("FAIL pc %h: hit %0d idx %0d, expected %0d %0d", pc, hit, hit_tt_idx, exp_hit, exp_idx);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    look(32'h0, 1'b0, '0);
    for (int i = 0; i < N; i++) begin
      pcs[i]  = 32'h0040_0000 + 32'(i) * 32'h44 + 32'(($urandom % 8) * 4);
      idxs[i] = 4'((i * 7 + 3) % 16);
      wr(i, 1'b0, pcs[i]);
      look(pcs[i], 1'b0, '0);  // PC written, entry not yet valid
      wr(i, 1'b1, {1'b1, 27'b0, idxs[i]});
    end
    for (int i = 0; i < N; i++) look(pcs[i], 1'b1, idxs[i]);
    for (int i = 0; i < 20; i++) look(32'h1000_0000 + 32'($urandom % 4096) * 4, 1'b0, '0);
    wr(4, 1'b1, 32'h0);  // invalidate entry 4
    look(pcs[4], 1'b0, '0);
    look(pcs[5], 1'b1, idxs[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
