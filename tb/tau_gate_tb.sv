// tau_gate_tb: self-checking test of the restoring gate.
//
// 1. Compares all 32 input combinations with an independent truth-table model.
// 2. Replays the worked examples: the column 1,0,1,0 stored as 1,0,0,0 and
//    restored with the negated history bit, and every row of the published
//    mapping tables for three-bit words and for the five-bit words that start
//    with 0 (word, code word, function).
// 3. Reproduces the theoretical transition table of the eight-function set:
//    for block sizes 2..7 it sums, over all 2^k words, the original
//    transitions (TTN) and the fewest transitions of a code word that the gate
//    maps back to the word (RTN), using the gate under test for the mapping.
//    Expected values: TTN = (k-1)*2^(k-1); RTN = 0, 2, 10, 32, 90 for k = 2..6
//    (an improvement of 100, 75, 58.3, 50 and 43.8 percent) and 236 for k = 7.
module tau_gate_tb;
  import imt_pkg::*;
  import imt_enc_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0] sel;
  logic       enc, hist, dec;

  typedef struct packed {
    logic [2:0] len;
    logic [4:0] x;
    logic [4:0] c;
    logic [2:0] f;
  } row_t;

  localparam row_t rows [33] = '{
    '{3'd4, 5'b01010, 5'b01000, TAU_NY},
    '{3'd3, 5'b000, 5'b000, TAU_X},   '{3'd3, 5'b001, 5'b111, TAU_NX},
    '{3'd3, 5'b010, 5'b000, TAU_NY},  '{3'd3, 5'b011, 5'b011, TAU_X},
    '{3'd3, 5'b100, 5'b100, TAU_X},   '{3'd3, 5'b101, 5'b111, TAU_NY},
    '{3'd3, 5'b110, 5'b000, TAU_NX},  '{3'd3, 5'b111, 5'b111, TAU_X},
    '{3'd5, 5'b00000, 5'b00000, TAU_X},    '{3'd5, 5'b00001, 5'b11111, TAU_NX},
    '{3'd5, 5'b00010, 5'b11100, TAU_NX},   '{3'd5, 5'b00011, 5'b00011, TAU_X},
    '{3'd5, 5'b00100, 5'b00100, TAU_X},    '{3'd5, 5'b00101, 5'b01111, TAU_XOR},
    '{3'd5, 5'b00110, 5'b11000, TAU_NX},   '{3'd5, 5'b00111, 5'b00111, TAU_X},
    '{3'd5, 5'b01000, 5'b11000, TAU_XOR},  '{3'd5, 5'b01001, 5'b00111, TAU_NOR},
    '{3'd5, 5'b01010, 5'b00000, TAU_NY},   '{3'd5, 5'b01011, 5'b00011, TAU_XNOR},
    '{3'd5, 5'b01100, 5'b01100, TAU_X},    '{3'd5, 5'b01101, 5'b10011, TAU_NX},
    '{3'd5, 5'b01110, 5'b10000, TAU_NX},   '{3'd5, 5'b01111, 5'b01111, TAU_X},
    // the mirrored half: every bit inverted, XOR<->XNOR and NOR<->NAND swapped
    '{3'd5, 5'b10110, 5'b11000, TAU_NAND}, '{3'd5, 5'b10100, 5'b11100, TAU_XOR},
    '{3'd5, 5'b11010, 5'b10000, TAU_XNOR}, '{3'd5, 5'b10101, 5'b11111, TAU_NY},
    '{3'd5, 5'b11111, 5'b11111, TAU_X},    '{3'd5, 5'b10000, 5'b10000, TAU_X},
    '{3'd5, 5'b11001, 5'b00111, TAU_NX},    '{3'd5, 5'b10010, 5'b01100, TAU_NX}
  };

  tau_gate dut (.sel(tau_e'(sel)), .enc_bit(enc), .hist_bit(hist), .dec_bit(dec));

  function automatic int trans(int v, int k);
    int n = 0;
    for (int i = 0; i + 1 < k; i++) n += int'(v[i] != v[i+1]);
    return n;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_rtn [2:7] = '{0, 2, 10, 32, 90, 236};
    for (int s = 0; s < 8; s++)
      for (int e = 0; e < 2; e++)
        for (int h = 0; h < 2; h++) begin
          sel = 3'(s); enc = 1'(e); hist = 1'(h);
          #1;
          checks++;
          if (dec !== tau_ref(3'(s), 1'(e), 1'(h))) begin
            failures++;
            $display("FAIL sel=%0d enc=%0d hist=%0d got %0d", s, e, h, dec);
          end
        end

    // worked examples: {length, word, code word, function}; the rightmost bit
    // is the first in time
    for (int r = 0; r < $size(rows); r++) begin
      logic ok, h;
      int k;
      logic [4:0] xw, cw;
      {k, xw, cw} = {rows[r].len, rows[r].x, rows[r].c};
      ok = (xw[0] == cw[0]);
      h = cw[0];
      for (int i = 1; i < k; i++) begin
        sel = rows[r].f; enc = cw[i]; hist = h;
        #1;
        if (dec != xw[i]) ok = 1'b0;
        h = dec;
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL example %0d: code %b does not restore %b", r, cw, xw);
      end
    end

    for (int k = 2; k <= 7; k++) begin
      int ttn, rtn;
      ttn = 0;
      rtn = 0;
      for (int x = 0; x < (1 << k); x++) begin
        int best;
        best = 100;
        ttn += trans(x, k);
        for (int c = 0; c < (1 << k); c++) begin
          if (c[0] != x[0]) continue;
          if (trans(c, k) >= best) continue;
          for (int t = 0; t < 8; t++) begin
            logic ok, h;
            ok = 1'b1;
            h = x[0];
            for (int i = 1; i < k; i++) begin
              sel = 3'(t); enc = c[i]; hist = h;
              #1;
              if (dec != x[i]) ok = 1'b0;
              h = dec;
            end
            if (ok) begin
              best = trans(c, k);
              break;
            end
          end
        end
        rtn += best;
      end
      checks += 2;
      if (ttn != (k - 1) * (1 << (k - 1))) begin
        failures++;
        $display("FAIL k=%0d TTN %0d", k, ttn);
      end
      if (rtn != exp_rtn[k]) begin
        failures++;
        $display("FAIL k=%0d RTN %0d expected %0d", k, rtn, exp_rtn[k]);
      end
      $display("block size %0d: TTN=%0d RTN=%0d improvement=%0.1f%%", k, ttn, rtn,
               100.0 * real'(ttn - rtn) / real'(ttn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
