// tb_mbedc_ref_pkg: reference model of the MBEDC code for the testbenches.
//
// Written independently of the RTL: it works on flat bit vectors and
// derives every redundancy bit from the position of each data bit in the
// 4x4 matrix instead of from the XOR equations. Data bit (row r, group g),
// r and g counted from 0 with g = 0..3 for X, Y, Z, W, sits at data bit
// (3-g)*4 + r. Such a bit feeds
//   parity   P[r]                       at code bit 8 + r
//   diagonal D[(r/2)*2 + ((r%2)^(g%2))] at code bit 12 + that index
//   check    C[g][r%2] (0 = 1^3, 1 = 2^4) at code bit (3-g)*2 + r%2
// The decoder reference tries every error pattern confined to one region
// and accepts the syndrome when exactly one of them explains it.
package tb_mbedc_ref_pkg;

  typedef struct {
    logic [15:0] data;
    int          status;   // 0 clean, 1 corrected, 2 check bit, 3 uncorrectable
    int          region;   // valid when status == 1
    logic [3:0]  flip;     // bit r-1 = row r of the region, when status == 1
  } ref_dec_t;

  function automatic logic [15:0] ref_redundancy(logic [15:0] data);
    logic [15:0] red = '0;
    for (int g = 0; g < 4; g++)
      for (int r = 0; r < 4; r++)
        if (data[(3-g)*4 + r]) begin
          red[8 + r]                                   ^= 1'b1;
          red[12 + (r/2)*2 + ((r%2) ^ (g%2))]          ^= 1'b1;
          red[(3-g)*2 + (r%2)]                         ^= 1'b1;
        end
    return red;
  endfunction

  function automatic logic [31:0] ref_encode(logic [15:0] data);
    return {data, ref_redundancy(data)};
  endfunction

  function automatic logic [15:0] ref_syndrome(logic [31:0] code);
    return code[15:0] ^ ref_redundancy(code[31:16]);
  endfunction

  // Classification of a syndrome alone.
  function automatic ref_dec_t ref_classify(logic [15:0] syn);
    ref_dec_t res;
    int       hits = 0;
    res.data   = '0;
    res.status = 3;
    res.region = 0;
    res.flip   = '0;
    if (syn == '0) begin
      res.status = 0;
      return res;
    end
    if ($countones(syn) == 1) begin
      res.status = 2;
      return res;
    end
    for (int g = 0; g < 4; g++)
      for (int e = 1; e < 16; e++) begin
        logic [15:0] err = '0;
        for (int r = 0; r < 4; r++)
          err[(3-g)*4 + r] = e[r];
        if (ref_redundancy(err) == syn) begin
          hits++;
          res.region = g;
          res.flip   = 4'(e);
        end
      end
    if (hits == 1) res.status = 1;
    else begin
      res.region = 0;
      res.flip   = '0;
    end
    return res;
  endfunction

  function automatic ref_dec_t ref_decode(logic [31:0] code);
    ref_dec_t res = ref_classify(ref_syndrome(code));
    res.data = code[31:16];
    if (res.status == 1)
      for (int r = 0; r < 4; r++)
        res.data[(3-res.region)*4 + r] ^= res.flip[r];
    return res;
  endfunction

endpackage
