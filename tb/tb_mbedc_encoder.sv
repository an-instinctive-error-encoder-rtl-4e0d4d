// tb_mbedc_encoder: exhaustive check of the MBEDC encoder.
//
// Every one of the 65536 data words is applied, one per clock, and the
// 32-bit codeword is compared with the reference model; the data half must
// be the input unchanged. The worked example word 1101 1100 1100 1111 is
// also checked against hand-computed redundancy. The encoder is
// combinational, so the codeword is checked 1 ns after the data changes.
module tb_mbedc_encoder;
  import mbedc_pkg::*;
  import tb_mbedc_ref_pkg::*;

  logic      clk = 1'b0;
  data_t     data;
  codeword_t code;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  mbedc_encoder dut (.data_i(data), .code_o(code));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example word: X = 1101 read as X4..X1 = data[15:12], and so on.
    // Hand computation with X=1101 Y=1100 Z=1100 W=1111 (bit 3 = row 4):
    //   rows (X,Y,Z,W): r1 = 1,0,0,1  r2 = 0,0,0,1  r3 = 1,1,1,1  r4 = 1,1,1,1
    //   P1..P4 = 0,1,0,0          -> p[4:1] = 4'b0010
    //   D1 = X1^Y2^Z1^W2 = 1^0^0^1 = 0, D2 = X2^Y1^Z2^W1 = 0^0^0^1 = 1
    //   D3 = X3^Y4^Z3^W4 = 0, D4 = X4^Y3^Z4^W3 = 0 -> d[4:1] = 4'b0010
    //   Cx = {X2^X4, X1^X3} = {1,0}, Cy = {1,1}, Cz = {1,1}, Cw = {0,0}
    data = 16'b1101_1100_1100_1111;
    @(posedge clk); #1;
    checks++;
    if (code !== {16'b1101_1100_1100_1111, 4'b0010, 4'b0010, 8'b10_11_11_00}) begin
      failures++;
      $display("example word: code %h", code);
    end

    for (int v = 0; v < 65536; v++) begin
      data = data_t'(v[15:0]);
      @(posedge clk); #1;
      checks++;
      if (code !== ref_encode(v[15:0])) begin
        failures++;
        if (failures < 10) $display("data %h: code %h expected %h", v[15:0], code, ref_encode(v[15:0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
