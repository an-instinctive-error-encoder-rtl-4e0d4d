// mbedc_syndrome: syndrome calculation of the MBEDC decoder.
//
// The data half of a received codeword is passed through a second copy of
// the encoder to recalculate the diagonal, parity and check bits; XOR with
// the redundancy stored in the codeword gives the syndromes
//   SDi = Di ^ RDi,  SPi = Pi ^ RPi,  SCi = Ci ^ RCi
// which are returned in the same layout as the redundancy (redund_t). A zero
// syndrome means that stored and recalculated redundancy agree. Reusing the
// encoder for the recalculation follows the scheme; the layout is this
// design's choice.
//
// Interface: code_i (received codeword) in, syn_o out. Combinational.
// An assertion checks that the data half of the recalculated codeword is
// the received data.
module mbedc_syndrome
  import mbedc_pkg::*;
(
  input  codeword_t code_i,
  output redund_t   syn_o
);

  codeword_t recalc;

  mbedc_encoder u_recalc (
    .data_i (code_i.data),
    .code_o (recalc)
  );

  assign syn_o = code_i.red ^ recalc.red;

  // The encoder passes the data half through untouched.
  always_comb
    assert (recalc.data == code_i.data)
      else $error("recalculated codeword does not carry the received data");

endmodule
