// imt_pkg: shared types and constants of the instruction-memory transformation
// decoder.
//
// Each bus line of the instruction bus is restored bit by bit with a two-input
// function x_n = tau(enc_n, hist), where enc_n is the bit read from memory and
// hist a one-bit history. Eight functions are enough to reach the best possible
// transition count for every block size up to seven, so a transformation is
// named by a 3-bit index. The eight functions are identity, inversion, XOR,
// XNOR, NOR and NAND (the six the design names), the negated history bit (used
// in the three-bit example table) and, to fill the eighth code, the history bit
// itself. The numbering of the codes is this design's choice; identity is code
// 0 so that a cleared table entry leaves the code untouched.
//
// Transformation Table entries are packed vectors, laid out from bit 0 up:
// DATA_WIDTH 3-bit indices (line i at [3*i +: 3]), then the End bit, then the
// CT tail counter. The helpers below compute that layout for any width.
package imt_pkg;

  typedef enum logic [2:0] {
    TAU_X    = 3'd0,  // identity: x_n = enc
    TAU_NX   = 3'd1,  // inversion: x_n = ~enc
    TAU_XOR  = 3'd2,  // x_n = enc ^ hist
    TAU_XNOR = 3'd3,  // x_n = ~(enc ^ hist)
    TAU_NOR  = 3'd4,  // x_n = ~(enc | hist)
    TAU_NAND = 3'd5,  // x_n = ~(enc & hist)
    TAU_NY   = 3'd6,  // x_n = ~hist
    TAU_Y    = 3'd7   // x_n = hist
  } tau_e;

  localparam int unsigned TAU_BITS = 3;
  localparam int unsigned CFG_WORD = 32;  // width of the configuration bus

  // Bits of one Transformation Table entry.
  function automatic int unsigned tt_entry_bits(int unsigned data_width, int unsigned ct_width);
    return data_width * TAU_BITS + 1 + ct_width;
  endfunction

  // Configuration words needed to write one entry.
  function automatic int unsigned tt_entry_words(int unsigned data_width, int unsigned ct_width);
    return (tt_entry_bits(data_width, ct_width) + CFG_WORD - 1) / CFG_WORD;
  endfunction

  // Configuration address map (word addresses on a 12-bit bus):
  //   0x000                      control register, bit 0 = decoding enable
  //   0x100 | idx<<2 | word      TT entry idx, 32-bit word 'word' (idx < 64)
  //   0x200 | idx<<1 | word      BBIT entry idx, word 0 = start PC,
  //                              word 1 = {valid bit 31, TT index in low bits}
  localparam logic [3:0] CFG_REGION_CTRL = 4'h0;
  localparam logic [3:0] CFG_REGION_TT   = 4'h1;
  localparam logic [3:0] CFG_REGION_BBIT = 4'h2;

endpackage
