// mbedc_pkg: types and constants shared by the MBEDC encoder and decoder.
//
// The 16-bit data word is seen as a 4x4 matrix. Its four columns are the
// groups (regions) X, Y, Z and W, four bits each; row r holds X_r, Y_r, Z_r
// and W_r. Bit indices run 1..4 so that the names in the code match the
// usual X1..X4 notation. Group X is data[15:12], Y data[11:8], Z data[7:4]
// and W data[3:0]; inside a group, bit r sits at position r-1, so X1 is
// data[12] and X4 is data[15]. The group structure and the three kinds of
// redundancy bits follow the scheme; the packing order is this design's
// choice.
//
// Redundancy (16 bits):
//   d[4:1]  diagonal bits D1..D4, one per row, over 2x2 sub-matrices
//   p[4:1]  parity bits  P1..P4, the XOR of each row
//   c.x/y/z/w[2:1]  check bits per group: [1] = bits 1^3, [2] = bits 2^4
//
// Codeword (32 bits): {data, redundancy}, data in the upper half.
package mbedc_pkg;

  localparam int unsigned DATA_W   = 16;
  localparam int unsigned RED_W    = 16;
  localparam int unsigned CODE_W   = DATA_W + RED_W;

  typedef logic [4:1] group_t;  // one 4-bit region, index = row

  typedef struct packed {
    group_t x;
    group_t y;
    group_t z;
    group_t w;
  } data_t;

  typedef logic [2:1] chk_t;    // [1] = bits 1^3, [2] = bits 2^4

  typedef struct packed {
    chk_t x;
    chk_t y;
    chk_t z;
    chk_t w;
  } check_t;

  typedef struct packed {
    logic [4:1] d;
    logic [4:1] p;
    check_t     c;
  } redund_t;

  typedef struct packed {
    data_t   data;
    redund_t red;
  } codeword_t;

  // Region (group) index, used by region selection and correction.
  typedef enum logic [1:0] {
    REG_X = 2'd0,
    REG_Y = 2'd1,
    REG_Z = 2'd2,
    REG_W = 2'd3
  } region_e;

  // Outcome of one decode.
  typedef enum logic [1:0] {
    ST_CLEAN     = 2'd0,  // all syndrome bits zero
    ST_CORRECTED = 2'd1,  // data errors confined to one region, inverted
    ST_CHECK_ERR = 2'd2,  // a single stored redundancy bit flipped, data intact
    ST_UNCORR    = 2'd3   // error detected but not correctable
  } status_e;

endpackage
