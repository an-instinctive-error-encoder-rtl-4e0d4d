// tb_mbedc_burst: burst-error capability of the MBEDC codec.
//
// For random data words, every burst of 1 to 4 adjacent flipped bits in the
// 16-bit data half of the codeword is applied through the codec, at every
// start position. Expected outcome per burst, from the structure of the
// code: a burst of 1 to 3 bits in_region one 4-bit region is corrected and
// gives back the written word; a 4-bit burst filling one region, and any
// burst crossing a region boundary, is flagged as uncorrectable, and is
// never passed as clean or miscorrected. The outcome counts are printed.
// Bursts over the whole 32-bit codeword are also applied; there the
// result must match the reference decoder and never be reported clean.
module tb_mbedc_burst;
  import tb_mbedc_ref_pkg::*;

  localparam int N_WORDS = 50;

  logic        clk = 1'b0;
  logic [15:0] data_i, data_o;
  logic [31:0] code_o, code_i;
  logic [1:0]  status_o, region_o;
  logic        err_detected_o, uncorrectable_o;
  int          checks = 0, failures = 0;
  int          n_fixed = 0, n_flagged = 0;

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
    repeat (N_WORDS * 200 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] clean, mask;
    ref_dec_t    exp;
    bit          in_region;
    for (int w = 0; w < N_WORDS; w++) begin
      data_i = 16'($urandom);
      @(posedge clk); #1;
      clean = code_o;
      // Bursts in the data half.
      for (int len = 1; len <= 4; len++)
        for (int s = 0; s + len <= 16; s++) begin
          mask   = ((32'd1 << len) - 1) << (16 + s);
          in_region = (s / 4) == ((s + len - 1) / 4);
          code_i = clean ^ mask;
          @(posedge clk); #1;
          checks++;
          if (in_region && len < 4) begin
            if (status_o != 2'd1 || data_o !== data_i || region_o != 2'(3 - s / 4)) begin
              failures++;
              $display("burst len %0d at %0d not corrected: status %0d", len, s, status_o);
            end else begin
              n_fixed++;
            end
          end else begin
            if (status_o != 2'd3 || !uncorrectable_o || !err_detected_o) begin
              failures++;
              $display("burst len %0d at %0d not flagged: status %0d", len, s, status_o);
            end else begin
              n_flagged++;
            end
          end
        end
      // Bursts anywhere in the codeword.
      for (int len = 1; len <= 4; len++)
        for (int s = 0; s + len <= 32; s++) begin
          mask   = ((32'd1 << len) - 1) << s;
          code_i = clean ^ mask;
          exp    = ref_decode(clean ^ mask);
          @(posedge clk); #1;
          checks++;
          if (int'(status_o) != exp.status || data_o !== exp.data || status_o == 2'd0) begin
            failures++;
            $display("codeword burst len %0d at %0d: status %0d expected %0d", len, s, status_o, exp.status);
          end
        end
    end
    $display("data-half bursts corrected %0d, flagged %0d", n_fixed, n_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
