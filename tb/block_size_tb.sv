// block_size_tb: the decoder at block sizes 4, 5, 6 and 7.
//
// Runs the same 49-instruction random loop body through four decoders that
// differ only in BLOCK_SIZE, checks exact restoration in each, and checks the
// trend of the transition reduction: shorter blocks must reduce more, and each
// reduction must be at least the theoretical value for uniform bits minus six
// points (58.3, 50.0, 43.8 and 38.5 % for block sizes 4 to 7).
module block_size_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NK = 4;
  int     c [NK], f [NK];
  longint to [NK], te [NK];
  bit     d [NK];
  real    theory [NK] = '{58.3, 50.0, 43.8, 38.5};

  block_size_run #(.K(4)) r4 (.clk, .checks(c[0]), .failures(f[0]), .tr_orig(to[0]), .tr_enc(te[0]), .done(d[0]));
  block_size_run #(.K(5)) r5 (.clk, .checks(c[1]), .failures(f[1]), .tr_orig(to[1]), .tr_enc(te[1]), .done(d[1]));
  block_size_run #(.K(6)) r6 (.clk, .checks(c[2]), .failures(f[2]), .tr_orig(to[2]), .tr_enc(te[2]), .done(d[2]));
  block_size_run #(.K(7)) r7 (.clk, .checks(c[3]), .failures(f[3]), .tr_orig(to[3]), .tr_enc(te[3]), .done(d[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real red [NK];
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int k = 0; k < NK; k++) begin
      checks += c[k];
      failures += f[k];
      red[k] = 100.0 * real'(to[k] - te[k]) / real'(to[k]);
      $display("block size %0d: original=%0d encoded=%0d transitions, reduction=%0.1f%%",
               k + 4, to[k], te[k], red[k]);
      checks++;
      if (red[k] < theory[k] - 6.0) begin
        failures++;
        $display("FAIL block size %0d below expectation", k + 4);
      end
      if (k > 0) begin
        checks++;
        if (red[k] >= red[k-1]) begin
          failures++;
          $display("FAIL block size %0d does not reduce less than %0d", k + 4, k + 3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
