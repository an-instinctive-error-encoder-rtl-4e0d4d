// mbedc_region_select: verification and region selection of the MBEDC
// decoder.
//
// How it works. If the data errors are confined to one group (region) g,
// then, because every row holds exactly one bit of g, the parity syndrome
// SP is exactly the error vector of that region (SPr = 1 <=> bit r of g
// flipped). The other syndromes must then agree with SP:
//   - check syndrome of g:  SCg = {SP2^SP4, SP1^SP3}, all other SC zero;
//   - diagonal syndrome:    SD = SP for X and Z, and SD = SP with rows 1<->2
//                           and 3<->4 swapped for Y and W (from the
//                           diagonal equations).
// Each region is tested for this agreement in parallel (verification). If
// exactly one region agrees and SP is non-zero, that region is selected and
// SP is handed to the corrector as the pattern of bits to invert. A syndrome
// of weight one can only come from a single flipped redundancy bit: the data
// is then intact. Anything else is reported as detected but uncorrectable;
// this includes a pattern that hits bits 1 and 3 (or 2 and 4, or all four)
// of one region, which X and Z (or Y and W) give identical syndromes for.
//
// The scheme asks that the diagonal and parity syndromes hold a 1 and that
// the check syndromes flag the error before a region is selected; requiring
// full agreement of all three, as done here, is this design's reading of
// that rule, as are the weight-one rule and the status codes.
//
// Interface: syn_i in; status_o, region_o (valid when status_o is
// ST_CORRECTED) and flip_o (bits of the region to invert, zero unless
// ST_CORRECTED) out. Combinational.
module mbedc_region_select
  import mbedc_pkg::*;
(
  input  redund_t    syn_i,
  output status_e    status_o,
  output region_e    region_o,
  output logic [4:1] flip_o
);

  logic [4:1] sp, sd, sd_swap;
  chk_t       sc_exp;
  logic [3:0] sc_nz;     // per region: its check syndrome is non-zero
  logic [3:0] match;     // per region: all syndromes agree with it
  logic [4:0] weight;

  always_comb begin
    sp      = syn_i.p;
    sd      = syn_i.d;
    sd_swap = {sp[3], sp[4], sp[1], sp[2]};
    sc_exp  = {sp[2] ^ sp[4], sp[1] ^ sp[3]};

    sc_nz[REG_X] = |syn_i.c.x;
    sc_nz[REG_Y] = |syn_i.c.y;
    sc_nz[REG_Z] = |syn_i.c.z;
    sc_nz[REG_W] = |syn_i.c.w;

    // A region agrees when its own check syndrome is the expected one, no
    // other region's check syndrome is set and SD has its diagonal pattern.
    match[REG_X] = (syn_i.c.x == sc_exp) && ((sc_nz & 4'b1110) == '0) && (sd == sp);
    match[REG_Y] = (syn_i.c.y == sc_exp) && ((sc_nz & 4'b1101) == '0) && (sd == sd_swap);
    match[REG_Z] = (syn_i.c.z == sc_exp) && ((sc_nz & 4'b1011) == '0) && (sd == sp);
    match[REG_W] = (syn_i.c.w == sc_exp) && ((sc_nz & 4'b0111) == '0) && (sd == sd_swap);

    weight = '0;
    for (int i = 0; i < RED_W; i++)
      weight += 5'(syn_i[i]);

    status_o = ST_UNCORR;
    region_o = REG_X;
    flip_o   = '0;
    if (weight == 5'd0) begin
      status_o = ST_CLEAN;
    end else if (weight == 5'd1) begin
      status_o = ST_CHECK_ERR;
    end else if (sp != '0) begin
      unique case (match)
        4'b0001: begin status_o = ST_CORRECTED; region_o = REG_X; end
        4'b0010: begin status_o = ST_CORRECTED; region_o = REG_Y; end
        4'b0100: begin status_o = ST_CORRECTED; region_o = REG_Z; end
        4'b1000: begin status_o = ST_CORRECTED; region_o = REG_W; end
        default: status_o = ST_UNCORR;
      endcase
      if (status_o == ST_CORRECTED)
        flip_o = sp;
    end
  end

endmodule
