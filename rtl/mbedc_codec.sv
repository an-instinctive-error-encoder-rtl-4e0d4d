// mbedc_codec: MBEDC encoder and decoder for a 16-bit memory word.
//
// Write path: data_i is encoded into the 32-bit codeword code_o, which the
// memory stores. Read path: the codeword read back, code_i, is decoded into
// the corrected data_o with a status. The memory itself is outside this
// module; the two paths are independent and can be used in the same cycle.
//
// Codeword layout: code[31:16] data, code[15:12] diagonal bits D4..D1,
// code[11:8] parity bits P4..P1, code[7:0] check bits
// {Cx24, Cx13, Cy24, Cy13, Cz24, Cz13, Cw24, Cw13}.
// status_o: 0 clean, 1 corrected, 2 single redundancy bit flipped (data
// intact), 3 uncorrectable error detected. region_o: 0..3 = X, Y, Z, W, the
// region that was corrected.
//
// Timing: both paths are combinational (latency 0); register them outside
// if the memory interface is synchronous.
module mbedc_codec
  import mbedc_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,
  output logic [CODE_W-1:0] code_o,
  input  logic [CODE_W-1:0] code_i,
  output logic [DATA_W-1:0] data_o,
  output logic [1:0]        status_o,
  output logic [1:0]        region_o,
  output logic              err_detected_o,
  output logic              uncorrectable_o
);

  codeword_t enc_code;
  data_t     dec_data;
  status_e   status;
  region_e   region;
  redund_t   syn;

  mbedc_encoder u_encoder (
    .data_i (data_t'(data_i)),
    .code_o (enc_code)
  );

  mbedc_decoder u_decoder (
    .code_i   (codeword_t'(code_i)),
    .data_o   (dec_data),
    .status_o (status),
    .region_o (region),
    .syn_o    (syn)
  );

  assign code_o          = enc_code;
  assign data_o          = dec_data;
  assign status_o        = status;
  assign region_o        = region;
  assign err_detected_o  = (syn != '0);
  assign uncorrectable_o = (status == ST_UNCORR);

endmodule
