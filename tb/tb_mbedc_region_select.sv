// tb_mbedc_region_select: exhaustive check of verification and region
// selection.
//
// All 65536 syndrome values are applied; status, selected region and the
// pattern of bits to invert are compared with the reference, which finds
// the answer by trying every error pattern confined to one region. The
// number of syndromes in each class is also checked: 1 clean, 16 single
// redundancy-bit, and the correctable ones, which are every region-confined
// pattern except those with bit1 == bit3 and bit2 == bit4 (4 regions x 12).
module tb_mbedc_region_select;
  import mbedc_pkg::*;
  import tb_mbedc_ref_pkg::*;

  logic       clk = 1'b0;
  redund_t    syn;
  status_e    status;
  region_e    region;
  logic [4:1] flip;
  int         checks = 0, failures = 0;
  int         n_status [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  mbedc_region_select dut (.syn_i(syn), .status_o(status), .region_o(region), .flip_o(flip));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_dec_t exp;
    for (int v = 0; v < 65536; v++) begin
      syn = redund_t'(v[15:0]);
      exp = ref_classify(v[15:0]);
      @(posedge clk); #1;
      checks++;
      n_status[int'(status)]++;
      if (int'(status) != exp.status ||
          (exp.status == 1 && (int'(region) != exp.region || flip != exp.flip)) ||
          (exp.status != 1 && flip != '0)) begin
        failures++;
        if (failures < 10)
          $display("syn %h: status %0d region %0d flip %b, expected %0d %0d %b",
                   v[15:0], status, region, flip, exp.status, exp.region, exp.flip);
      end
    end
    checks++;
    if (n_status[0] != 1 || n_status[1] != 48 || n_status[2] != 16) begin
      failures++;
      $display("class counts clean %0d corrected %0d check %0d", n_status[0], n_status[1], n_status[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
