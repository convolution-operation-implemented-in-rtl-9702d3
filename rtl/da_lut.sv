// da_lut: one distributed-arithmetic look-up table.
//
// Address bit t is the current bit-plane bit of tap t of a group of G taps; entry
// a holds the sum of the coefficients of the taps whose bit is set, i.e.
// sum_t h(t) * a[t]. Because all address bits have the same weight, the output
// is only H_W + clog2(G) bits wide. The table is computed at elaboration from
// COEFFS (coefficient t in bits [t*H_W +: H_W]) and read combinationally; the
// caller weights the output by 2^j for bit plane j.
module da_lut #(
  parameter int unsigned       G      = 4,
  parameter int unsigned       H_W    = conv_pkg::DEF_H_W,
  parameter logic [G*H_W-1:0]  COEFFS = '0,
  parameter int unsigned       O_W    = H_W + ((G > 1) ? $clog2(G) : 0)
) (
  input  logic              [G-1:0] addr,
  output logic signed [O_W-1:0]     dout
);

  function automatic int entry(int unsigned a);
    int s;
    s = 0;
    for (int unsigned t = 0; t < G; t++)
      if (((a >> t) & 1) != 0) s += int'($signed(COEFFS[t*H_W +: H_W]));
    return s;
  endfunction

  logic signed [O_W-1:0] rom [2**G];

  for (genvar a = 0; a < 2**G; a++) begin : g_rom
    localparam int SUM = entry(a);
    assign rom[a] = O_W'(SUM);
  end

  assign dout = rom[addr];

endmodule
