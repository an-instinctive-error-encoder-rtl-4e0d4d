// tb_mbedc_codec: end-to-end test of the MBEDC codec in front of a memory.
//
// A memory of DEPTH 32-bit codewords lives in this testbench. Every address
// is written with a data word through the encoder (address 0 holds the
// worked example word 1101 1100 1100 1111), then upsets are injected into
// the stored codewords, one scenario per address (address mod 8): none, a
// single data bit, a single redundancy bit, an adjacent double and a triple
// burst inside one region, a full 4-bit region burst, two bits of one row
// in different regions, and a random burst of 2 to 4 adjacent codeword
// bits. Every address is then read back through the decoder, one word per
// clock, and data, status and region are compared with the reference
// decoder; where the code guarantees a correction the data must equal the
// word originally written. Each mechanism (clean read, single-bit
// correction, multi-bit correction, redundancy-bit error, uncorrectable
// detection, selection of each of the four regions) is counted and must
// occur at least once. Both paths are combinational: each result is taken
// in the cycle its input is applied. The codec runs at its defaults.
module tb_mbedc_codec;
  import tb_mbedc_ref_pkg::*;

  localparam int DEPTH = 256;

  logic        clk = 1'b0;
  logic [15:0] data_i, data_o;
  logic [31:0] code_o, code_i;
  logic [1:0]  status_o, region_o;
  logic        err_detected_o, uncorrectable_o;

  logic [31:0] mem     [DEPTH];
  logic [15:0] written [DEPTH];
  logic [31:0] upset   [DEPTH];
  bit          must_fix[DEPTH];

  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_multi = 0, n_check = 0, n_uncorr = 0, n_miscorr = 0;
  int n_region [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  mbedc_codec dut (
    .data_i          (data_i),
    .code_o          (code_o),
    .code_i          (code_i),
    .data_o          (data_o),
    .status_o        (status_o),
    .region_o        (region_o),
    .err_detected_o  (err_detected_o),
    .uncorrectable_o (uncorrectable_o)
  );

  initial begin
    repeat (3 * DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    ref_dec_t exp;
    int       g, r, b, len;

    // Write phase.
    for (int a = 0; a < DEPTH; a++) begin
      data_i     = (a == 0) ? 16'b1101_1100_1100_1111 : 16'($urandom);
      written[a] = data_i;
      @(posedge clk); #1;
      mem[a] = code_o;
      checks++;
      if (code_o !== ref_encode(data_i)) begin
        failures++;
        $display("write %0d: code %h expected %h", a, code_o, ref_encode(data_i));
      end
    end

    // Upset injection.
    for (int a = 0; a < DEPTH; a++) begin
      g = $urandom_range(0, 3);
      r = $urandom_range(0, 3);
      upset[a]    = '0;
      must_fix[a] = 1'b0;
      case (a % 8)
        0: must_fix[a] = 1'b1;
        1: begin upset[a][16 + $urandom_range(0, 15)] = 1'b1; must_fix[a] = 1'b1; end
        2: begin upset[a][$urandom_range(0, 15)] = 1'b1;      must_fix[a] = 1'b1; end
        3: begin  // adjacent double inside region g, rows r, r+1
          r = $urandom_range(0, 2);
          upset[a] = 32'b11 << (16 + (3 - g) * 4 + r);
          must_fix[a] = 1'b1;
        end
        4: begin  // triple burst inside region g
          r = $urandom_range(0, 1);
          upset[a] = 32'b111 << (16 + (3 - g) * 4 + r);
          must_fix[a] = 1'b1;
        end
        5: upset[a] = 32'hF << (16 + (3 - g) * 4);          // whole region
        6: upset[a] = (32'd1 << (16 + (3 - g) * 4 + r)) |
                      (32'd1 << (16 + (3 - ((g + 1) % 4)) * 4 + r));
        default: begin
          len = $urandom_range(2, 4);
          b   = $urandom_range(0, 32 - len);
          upset[a] = ((32'd1 << len) - 1) << b;
        end
      endcase
      mem[a] ^= upset[a];
    end

    // Read phase.
    for (int a = 0; a < DEPTH; a++) begin
      code_i = mem[a];
      exp    = ref_decode(mem[a]);
      @(posedge clk); #1;
      checks++;
      if (data_o !== exp.data || int'(status_o) != exp.status ||
          (exp.status == 1 && int'(region_o) != exp.region) ||
          err_detected_o != (ref_syndrome(mem[a]) != '0) ||
          uncorrectable_o != (exp.status == 3) ||
          (must_fix[a] && data_o !== written[a])) begin
        failures++;
        $display("read %0d upset %h: data %h status %0d region %0d, expected %h %0d %0d (written %h)",
                 a, upset[a], data_o, status_o, region_o, exp.data, exp.status, exp.region, written[a]);
      end
      case (status_o)
        2'd0: n_clean++;
        2'd1: begin
          n_region[region_o]++;
          if ($countones(upset[a][31:16]) == 1) n_single++;
          else                                  n_multi++;
          if (data_o !== written[a]) n_miscorr++;
        end
        2'd2: n_check++;
        default: n_uncorr++;
      endcase
    end

    $display("clean %0d, single-bit corrected %0d, multi-bit corrected %0d, redundancy-bit %0d, uncorrectable %0d, miscorrected %0d",
             n_clean, n_single, n_multi, n_check, n_uncorr, n_miscorr);
    $display("regions selected X %0d Y %0d Z %0d W %0d", n_region[0], n_region[1], n_region[2], n_region[3]);
    need("clean read", n_clean);
    need("single-bit correction", n_single);
    need("multi-bit correction", n_multi);
    need("redundancy-bit error", n_check);
    need("uncorrectable detection", n_uncorr);
    need("region X", n_region[0]);
    need("region Y", n_region[1]);
    need("region Z", n_region[2]);
    need("region W", n_region[3]);
    // The worked example must come back unchanged.
    checks++;
    code_i = mem[0];
    #1;
    if (data_o !== 16'b1101_1100_1100_1111) begin
      failures++;
      $display("example word read back as %b", data_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
