// mbedc_encoder: MBEDC (multiple bit error detection and correction)
// encoder, 16 data bits to a 32-bit codeword.
//
// The data word is read as a 4x4 matrix whose columns are the groups X, Y,
// Z, W (see mbedc_pkg). Sixteen redundancy bits are formed by XOR trees:
//   diagonal  D1 = X1^Y2^Z1^W2   D2 = X2^Y1^Z2^W1
//             D3 = X3^Y4^Z3^W4   D4 = X4^Y3^Z4^W3
//   parity    Pr = Xr^Yr^Zr^Wr               (r = 1..4)
//   check     Cg13 = G1^G3, Cg24 = G2^G4     (G = X, Y, Z, W)
// D1, D2, P1, P2 and the check bits of the form Cg13/Cg24 are the scheme's
// own equations; D3/D4 and P3/P4 extend the same pattern to rows 3 and 4,
// which is this design's reading. The codeword is {data, D, P, C}.
//
// Interface: data_i in, code_o out. Purely combinational, no clock: the
// codeword is valid in the same cycle as the data (latency 0).
module mbedc_encoder
  import mbedc_pkg::*;
(
  input  data_t     data_i,
  output codeword_t code_o
);

  redund_t red;

  always_comb begin
    // Diagonal bits over the 2x2 sub-matrices of rows 1-2 and rows 3-4.
    red.d[1] = data_i.x[1] ^ data_i.y[2] ^ data_i.z[1] ^ data_i.w[2];
    red.d[2] = data_i.x[2] ^ data_i.y[1] ^ data_i.z[2] ^ data_i.w[1];
    red.d[3] = data_i.x[3] ^ data_i.y[4] ^ data_i.z[3] ^ data_i.w[4];
    red.d[4] = data_i.x[4] ^ data_i.y[3] ^ data_i.z[4] ^ data_i.w[3];

    // Row parity: the r-th bit of every group.
    for (int r = 1; r <= 4; r++)
      red.p[r] = data_i.x[r] ^ data_i.y[r] ^ data_i.z[r] ^ data_i.w[r];

    // Check bits: alternate bits inside each group.
    red.c.x[1] = data_i.x[1] ^ data_i.x[3];
    red.c.x[2] = data_i.x[2] ^ data_i.x[4];
    red.c.y[1] = data_i.y[1] ^ data_i.y[3];
    red.c.y[2] = data_i.y[2] ^ data_i.y[4];
    red.c.z[1] = data_i.z[1] ^ data_i.z[3];
    red.c.z[2] = data_i.z[2] ^ data_i.z[4];
    red.c.w[1] = data_i.w[1] ^ data_i.w[3];
    red.c.w[2] = data_i.w[2] ^ data_i.w[4];
  end

  assign code_o = '{data: data_i, red: red};

  // The packed types must add up to the 16 -> 32 bit code.
  if ($bits(data_t) != DATA_W || $bits(codeword_t) != CODE_W) begin : gen_size_check
    $error("mbedc_pkg types do not match DATA_W/CODE_W");
  end

endmodule
