// tb_mbedc_syndrome: check of the syndrome calculation.
//
// Random data words are encoded by the reference model, corrupted with
// random error masks of weight 0 to 6 plus every single-bit mask, and the
// syndrome of the block is compared with the reference syndrome. The block
// is combinational; outputs are sampled 1 ns after each input change.
module tb_mbedc_syndrome;
  import mbedc_pkg::*;
  import tb_mbedc_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  logic      clk = 1'b0;
  codeword_t code;
  redund_t   syn;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  mbedc_syndrome dut (.code_i(code), .syn_o(syn));

  initial begin
    repeat (N_RANDOM + 40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] c);
    code = codeword_t'(c);
    @(posedge clk); #1;
    checks++;
    if (syn !== ref_syndrome(c)) begin
      failures++;
      if (failures < 10) $display("code %h: syn %h expected %h", c, syn, ref_syndrome(c));
    end
  endtask

  initial begin
    logic [15:0] d;
    logic [31:0] mask;
    for (int i = 0; i < N_RANDOM; i++) begin
      d    = 16'($urandom);
      mask = '0;
      for (int k = $urandom_range(0, 6); k > 0; k--)
        mask[$urandom_range(0, 31)] = 1'b1;
      apply(ref_encode(d) ^ mask);
    end
    for (int b = 0; b < 32; b++)
      apply(ref_encode(16'($urandom)) ^ (32'd1 << b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
