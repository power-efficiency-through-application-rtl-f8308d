// tau_gate: restoring transformation of one instruction bus line.
//
// Computes x_n = tau(enc_bit, hist_bit) for one of the eight two-input
// functions of imt_pkg::tau_e, chosen by the 3-bit index 'sel'. It is a pure
// combinational cell: a single two-input gate selected by a small multiplexer,
// so restoring the instruction adds one gate level and one mux level to the
// fetch path. The set of functions and the one-bit history follow the design;
// the code assigned to each function is this design's choice (see imt_pkg).
module tau_gate
  import imt_pkg::*;
(
  input  tau_e sel,       // transformation index
  input  logic enc_bit,   // encoded bit from the instruction bus
  input  logic hist_bit,  // history bit
  output logic dec_bit    // restored bit
);

  always_comb begin
    unique case (sel)
      TAU_X:    dec_bit = enc_bit;
      TAU_NX:   dec_bit = ~enc_bit;
      TAU_XOR:  dec_bit = enc_bit ^ hist_bit;
      TAU_XNOR: dec_bit = ~(enc_bit ^ hist_bit);
      TAU_NOR:  dec_bit = ~(enc_bit | hist_bit);
      TAU_NAND: dec_bit = ~(enc_bit & hist_bit);
      TAU_NY:   dec_bit = ~hist_bit;
      TAU_Y:    dec_bit = hist_bit;
      default:  dec_bit = enc_bit;
    endcase
  end

endmodule
