// tb_mbedc_decoder: check of the full decoder (syndrome, region selection,
// correction).
//
// For random data words the codeword is built by the reference encoder and
// corrupted with: no error; each of the 32 single-bit errors; each of the
// 496 double errors; each of the 60 patterns confined to one region; and
// random masks of weight 3 to 8. Data, status and region are compared with
// the reference decoder. On top of that, the guarantees are checked against
// the original data: single data-bit and region-confined correctable errors
// must give back the written word, and a single redundancy-bit error must
// leave the data untouched.
module tb_mbedc_decoder;
  import mbedc_pkg::*;
  import tb_mbedc_ref_pkg::*;

  localparam int N_WORDS  = 40;
  localparam int N_RANDOM = 200;

  logic      clk = 1'b0;
  codeword_t code;
  data_t     data;
  status_e   status;
  region_e   region;
  redund_t   syn;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  mbedc_decoder dut (.code_i(code), .data_o(data), .status_o(status), .region_o(region), .syn_o(syn));

  initial begin
    repeat (N_WORDS * (1 + 32 + 496 + 60 + N_RANDOM) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Applies one corrupted word; must_fix: the data must come back as orig.
  task automatic apply(logic [15:0] orig, logic [31:0] mask, bit must_fix);
    logic [31:0] c   = ref_encode(orig) ^ mask;
    ref_dec_t    exp = ref_decode(c);
    code = codeword_t'(c);
    @(posedge clk); #1;
    checks++;
    if (data !== exp.data || int'(status) != exp.status ||
        (exp.status == 1 && int'(region) != exp.region) ||
        syn !== ref_syndrome(c) || (must_fix && data !== orig)) begin
      failures++;
      if (failures < 10)
        $display("orig %h mask %h: data %h status %0d region %0d, expected %h %0d %0d",
                 orig, mask, data, status, region, exp.data, exp.status, exp.region);
    end
  endtask

  initial begin
    logic [15:0] d;
    logic [31:0] m;
    for (int w = 0; w < N_WORDS; w++) begin
      d = (w == 0) ? 16'b1101_1100_1100_1111 : 16'($urandom);
      apply(d, '0, 1'b1);
      for (int i = 0; i < 32; i++)
        apply(d, 32'd1 << i, 1'b1);
      for (int i = 0; i < 32; i++)
        for (int j = i + 1; j < 32; j++)
          apply(d, (32'd1 << i) | (32'd1 << j), 1'b0);
      for (int g = 0; g < 4; g++)
        for (int e = 1; e < 16; e++) begin
          bit fixable = !(e[0] == e[2] && e[1] == e[3]);
          apply(d, 32'(e) << (16 + (3 - g) * 4), fixable);
        end
      for (int k = 0; k < N_RANDOM; k++) begin
        m = '0;
        for (int n = $urandom_range(3, 8); n > 0; n--)
          m[$urandom_range(0, 31)] = 1'b1;
        apply(d, m, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
