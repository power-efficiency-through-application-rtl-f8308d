// tt_table_tb: self-checking test of the Transformation Table.
//
// Writes random entries word by word through the 32-bit write port, keeps a
// shadow copy of the packed entries, and reads every entry back through the
// asynchronous read port. Also checks the reset value (all zero: identity,
// End clear), that out-of-range word numbers are ignored and that a partial
// rewrite only changes its own word. Runs at the default size (24 lines,
// CT width 8, 16 entries: 81-bit entries in three words).
module tt_table_tb;
  localparam int W = 24, CTW = 8, N = 16;
  localparam int EB = 3 * W + 1 + CTW;
  localparam int NW = (EB + 31) / 32;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic we = 1'b0;
  logic [3:0]  waddr = '0, raddr = '0;
  logic [1:0]  wword = '0;
  logic [31:0] wdata = '0;
  logic [EB-1:0] rdata;
  logic [NW*32-1:0] shadow [N];

  tt_table dut (.clk, .rst_n, .we, .waddr, .wword, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int a, int w, logic [31:0] d);
    @(negedge clk);
    we = 1'b1; waddr = 4'(a); wword = 2'(w); wdata = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic check_all(string tag);
    for (int a = 0; a < N; a++) begin
      raddr = 4'(a);
      #1;
      checks++;
      if (rdata !== shadow[a][EB-1:0]) begin
        failures++;
        $display("FAIL %s entry %0d: %h expected %h", tag, a, rdata, shadow[a][EB-1:0]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++) shadow[a] = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_all("reset");
    for (int a = 0; a < N; a++)
      for (int w = 0; w < NW; w++) begin
        logic [31:0] d;
        d = $urandom;
        write_word(a, w, d);
        shadow[a][32*w +: 32] = d;
      end
    check_all("fill");
    // a word number past the entry is ignored
    write_word(3, 3, 32'hFFFF_FFFF);
    check_all("bad word");
    // rewrite the middle word of entry 7 only
    write_word(7, 1, 32'h1234_5678);
    shadow[7][63:32] = 32'h1234_5678;
    check_all("rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
