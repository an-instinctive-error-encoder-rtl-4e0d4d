// mbedc_decoder: MBEDC decoder, 32-bit codeword to 16 data bits.
//
// Three stages in a row, as the scheme orders them: syndrome calculation
// (mbedc_syndrome), verification and region selection
// (mbedc_region_select), correction (mbedc_corrector). Errors confined to a
// single 4-bit region are corrected unless they hit both bits 1 and 3 and
// both bits 2 and 4 of it evenly (see mbedc_region_select); a single
// flipped redundancy bit is reported and ignored; everything else the
// syndromes see is reported as uncorrectable.
//
// Interface: code_i in; data_o (corrected data), status_o, region_o
// (selected region when status_o is ST_CORRECTED) and syn_o (the syndromes,
// for monitoring) out. Combinational: data_o follows code_i in the same
// cycle.
module mbedc_decoder
  import mbedc_pkg::*;
(
  input  codeword_t code_i,
  output data_t     data_o,
  output status_e   status_o,
  output region_e   region_o,
  output redund_t   syn_o
);

  logic [4:1] flip;

  mbedc_syndrome u_syndrome (
    .code_i (code_i),
    .syn_o  (syn_o)
  );

  mbedc_region_select u_select (
    .syn_i    (syn_o),
    .status_o (status_o),
    .region_o (region_o),
    .flip_o   (flip)
  );

  mbedc_corrector u_correct (
    .data_i   (code_i.data),
    .region_i (region_o),
    .flip_i   (flip),
    .data_o   (data_o)
  );

endmodule
