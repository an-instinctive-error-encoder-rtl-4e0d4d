// mbedc_corrector: correction stage of the MBEDC decoder.
//
// The bits of the selected region named by flip_i are inverted (XOR with 1);
// the other three regions pass unchanged. With flip_i zero the data passes
// untouched, so the same path serves clean words.
//
// Interface: data_i (received data), region_i, flip_i in; data_o out.
// Combinational.
module mbedc_corrector
  import mbedc_pkg::*;
(
  input  data_t      data_i,
  input  region_e    region_i,
  input  logic [4:1] flip_i,
  output data_t      data_o
);

  always_comb begin
    data_o = data_i;
    unique case (region_i)
      REG_X: data_o.x = data_i.x ^ flip_i;
      REG_Y: data_o.y = data_i.y ^ flip_i;
      REG_Z: data_o.z = data_i.z ^ flip_i;
      REG_W: data_o.w = data_i.w ^ flip_i;
    endcase
  end

endmodule
