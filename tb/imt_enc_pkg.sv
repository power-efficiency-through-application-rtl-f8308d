// imt_enc_pkg: behavioural reference for the testbenches.
//
// Holds an independent model of the eight restoring functions (as 4-bit truth
// tables, not as gate expressions) and a greedy encoder of a basic block, which
// stands in for the offline code analysis that produces the encoded program and
// the table contents. The encoder follows the same conventions as the hardware:
// the first instruction of a basic block is stored unencoded, the first table
// entry covers it and BLOCK_SIZE-1 more instructions, each later entry
// BLOCK_SIZE-1 instructions, and the first bit under a later entry is restored
// with the previous *encoded* bit as history. For every line and entry it tries
// all eight functions and all code words and keeps the one with the fewest
// transitions (counting the transition from the overlapped bit).
package imt_enc_pkg;

  localparam int MAXW = 64;    // widest instruction word modelled
  localparam int MAXE = 512;   // most entries produced for one basic block

  typedef logic [MAXW-1:0] word_t;

  typedef struct {
    logic [2:0] tau [MAXW];
    bit         e;
    int         ct;
  } entry_t;

  // truth tables indexed by {enc, hist}: bit (2*enc + hist)
  function automatic logic tau_ref(logic [2:0] sel, logic enc, logic hist);
    logic [3:0] tt;
    case (sel)
      3'd0: tt = 4'b1100;  // enc
      3'd1: tt = 4'b0011;  // ~enc
      3'd2: tt = 4'b0110;  // xor
      3'd3: tt = 4'b1001;  // xnor
      3'd4: tt = 4'b0001;  // nor
      3'd5: tt = 4'b0111;  // nand
      3'd6: tt = 4'b0101;  // ~hist
      default: tt = 4'b1010;  // hist
    endcase
    return tt[{enc, hist}];
  endfunction

  function automatic int popcount(word_t v, int w);
    int n = 0;
    for (int i = 0; i < w; i++) n += int'(v[i]);
    return n;
  endfunction

  // Best code for new bits x[0..m-1] of one line given the fixed previous
  // encoded bit c0. Returns the chosen function and code bits (bit j = code of
  // x[j]); the cost is the transition count of c0 followed by the code.
  function automatic void best_code(input logic c0, input logic [7:0] x, input int m,
                                    output logic [2:0] tau, output logic [7:0] code);
    int best = 1000;
    tau  = 3'd0;
    code = x;
    for (int t = 0; t < 8; t++) begin
      for (int cw = 0; cw < (1 << m); cw++) begin
        logic h, ok, prev;
        int cost;
        h = c0; ok = 1'b1; cost = 0; prev = c0;
        for (int j = 0; j < m; j++) begin
          logic v;
          v = tau_ref(3'(t), cw[j], h);
          if (v != x[j]) ok = 1'b0;
          h = v;
          if (cw[j] != prev) cost++;
          prev = cw[j];
        end
        if (ok && cost < best) begin
          best = cost;
          tau  = 3'(t);
          code = 8'(cw);
        end
      end
    end
  endfunction

  // Encode basic block x[0..n-1] (w lines, block size k). When 'cold' is set the
  // block gets one identity entry with CT = n and is stored unchanged.
  function automatic void encode_bb(input word_t x[], input int w, input int k, input bit cold,
                                    output word_t c[], output entry_t ent[$]);
    int n = x.size();
    int s, m;
    entry_t e;
    c = new[n];
    ent.delete();
    if (cold) begin
      for (int i = 0; i < n; i++) c[i] = x[i];
      foreach (e.tau[l]) e.tau[l] = 3'd0;
      e.e = 1'b1;
      e.ct = n;
      ent.push_back(e);
      return;
    end
    c[0] = x[0];
    s = 1;
    do begin
      m = (n - s < k - 1) ? n - s : k - 1;
      foreach (e.tau[l]) e.tau[l] = 3'd0;
      for (int l = 0; l < w; l++) begin
        logic [7:0] xb, cb;
        logic [2:0] t;
        xb = '0;
        for (int j = 0; j < m; j++) xb[j] = x[s + j][l];
        best_code(c[s - 1][l], xb, m, t, cb);
        e.tau[l] = t;
        for (int j = 0; j < m; j++) c[s + j][l] = cb[j];
      end
      e.ct = (ent.size() == 0) ? m + 1 : m;
      s += m;
      e.e = (s >= n);
      ent.push_back(e);
    end while (s < n);
  endfunction

  // Reference restoration of a basic block from its code and entries.
  function automatic void decode_bb(input word_t c[], input entry_t ent[$], input int w,
                                    input int k, output word_t x[]);
    int n = c.size();
    int ei = 0, left;
    x = new[n];
    x[0] = c[0];
    left = ent[0].e ? ent[0].ct - 1 : k - 1;
    for (int i = 1; i < n; i++) begin
      bit first;
      first = (i == 1);
      if (left == 0) begin
        ei++;
        left = ent[ei].e ? ent[ei].ct : k - 1;
        first = 1'b1;
      end
      for (int l = 0; l < w; l++)
        x[i][l] = tau_ref(ent[ei].tau[l], c[i][l], first ? c[i-1][l] : x[i-1][l]);
      left--;
    end
  endfunction

  // Pack an entry into 32-bit configuration words (layout as in the TT).
  function automatic void pack_entry(input entry_t e, input int w, input int ct_w,
                                     output logic [31:0] words[]);
    int bits = 3 * w + 1 + ct_w;
    int nw = (bits + 31) / 32;
    logic [MAXW*3+64-1:0] v;
    v = '0;
    for (int l = 0; l < w; l++) v[3*l +: 3] = e.tau[l];
    v[3*w] = e.e;
    for (int b = 0; b < ct_w; b++) v[3*w + 1 + b] = e.ct[b];
    words = new[nw];
    for (int i = 0; i < nw; i++) words[i] = v[32*i +: 32];
  endfunction

endpackage
