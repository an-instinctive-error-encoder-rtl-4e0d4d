// tb_mbedc_corrector: check of the correction stage.
//
// For random data words, every region and every 4-bit inversion pattern,
// the output must equal the input with exactly those bits of that region
// inverted and the other 12 bits untouched. The expected word is built
// from flat bit positions (region g at bits (3-g)*4 .. (3-g)*4+3).
module tb_mbedc_corrector;
  import mbedc_pkg::*;

  localparam int N_WORDS = 500;

  logic       clk = 1'b0;
  data_t      din, dout;
  region_e    region;
  logic [4:1] flip;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  mbedc_corrector dut (.data_i(din), .region_i(region), .flip_i(flip), .data_o(dout));

  initial begin
    repeat (N_WORDS * 64 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, exp;
    for (int i = 0; i < N_WORDS; i++) begin
      d = 16'($urandom);
      for (int g = 0; g < 4; g++)
        for (int f = 0; f < 16; f++) begin
          din    = data_t'(d);
          region = region_e'(g);
          flip   = 4'(f);
          exp    = d ^ (16'(f) << ((3 - g) * 4));
          @(posedge clk); #1;
          checks++;
          if (dout !== exp) begin
            failures++;
            if (failures < 10) $display("d %h g %0d f %h: %h expected %h", d, g, f, dout, exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
