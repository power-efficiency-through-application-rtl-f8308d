// cfg_port_tb: self-checking test of the configuration address decoder.
//
// Drives writes to the control register, to every word of every TT entry, to
// both words of every BBIT entry and to unmapped addresses, and checks the
// decoded strobes, indices and word numbers, the enable register and the
// bad-address flag against the address map (control 0x000, TT 0x100 +
// 4*entry + word, BBIT 0x200 + 2*entry + word).
module cfg_port_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic        cfg_we = 1'b0;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic        bad_addr, tt_we, bbit_we, bbit_wword, enable;
  logic [3:0]  tt_waddr, bbit_waddr;
  logic [1:0]  tt_wword;
  logic [31:0] wdata;

  cfg_port dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .bad_addr,
                .tt_we, .tt_waddr, .tt_wword, .bbit_we, .bbit_waddr, .bbit_wword,
                .wdata, .enable);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (addr %h)", what, cfg_addr);
    end
  endtask

  // one write; checks the strobes in the write cycle and the flag after it
  task automatic wr(logic [11:0] a, logic [31:0] d, bit e_tt, bit e_bb, bit e_bad);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    #1;
    chk(tt_we == e_tt, "tt_we");
    chk(bbit_we == e_bb, "bbit_we");
    chk(wdata == d, "wdata");
    if (e_tt) chk(tt_waddr == a[5:2] && tt_wword == a[1:0], "tt address");
    if (e_bb) chk(bbit_waddr == a[4:1] && bbit_wword == a[0], "bbit address");
    @(negedge clk);
    cfg_we = 1'b0;
    chk(bad_addr == e_bad, "bad_addr");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    chk(enable == 1'b0, "enable after reset");
    wr(12'h000, 32'h1, 0, 0, 0);
    chk(enable == 1'b1, "enable set");
    for (int e = 0; e < 16; e++)
      for (int w = 0; w < 3; w++) wr(12'h100 | 12'(e << 2) | 12'(w), $urandom, 1, 0, 0);
    wr(12'h103, 32'h5, 0, 0, 1);           // word 3 does not exist
    for (int e = 0; e < 10; e++)
      for (int w = 0; w < 2; w++) wr(12'h200 | 12'(e << 1) | 12'(w), $urandom, 0, 1, 0);
    wr(12'h214, 32'h5, 0, 0, 1);           // BBIT entry 10 does not exist
    wr(12'h140, 32'h5, 0, 0, 1);           // TT entry 16 does not exist
    wr(12'h300, 32'h5, 0, 0, 1);           // unmapped region
    wr(12'h004, 32'h0, 0, 0, 1);           // unmapped control word
    chk(enable == 1'b1, "enable kept");
    wr(12'h000, 32'h0, 0, 0, 0);
    chk(enable == 1'b0, "enable cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
