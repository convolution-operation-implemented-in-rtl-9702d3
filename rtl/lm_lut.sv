// lm_lut: one look-up table of a LUT-based constant multiplier.
//
// A small ROM addressed by a C_W-bit slice of the sample; entry a holds COEF * a,
// the product of the fixed coefficient and that slice. The table is computed at
// elaboration from COEF and read combinationally (FPGA distributed memory); the
// caller shifts the output by the slice's weight and adds the slices in an
// adder tree. Output: signed, H_W + C_W bits.
module lm_lut #(
  parameter int unsigned C_W  = 4,
  parameter int unsigned H_W  = conv_pkg::DEF_H_W,
  parameter int          COEF = 1
) (
  input  logic                      [C_W-1:0] addr,
  output logic signed [H_W+C_W-1:0]           dout
);

  logic signed [H_W+C_W-1:0] rom [2**C_W];

  for (genvar a = 0; a < 2**C_W; a++) begin : g_rom
    localparam int PROD = COEF * a;
    assign rom[a] = (H_W + C_W)'(PROD);
  end

  assign dout = rom[addr];

endmodule
