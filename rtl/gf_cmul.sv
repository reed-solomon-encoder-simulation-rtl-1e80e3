// gf_cmul: multiply a GF(2^8) element by a constant fixed at elaboration.
//
// Because the constant C is known, every output bit is the XOR of a fixed
// subset of input bits: an AND with a 0 bit of the constant vanishes and an
// AND with a 1 bit is the input bit itself, so the circuit reduces to a small
// XOR network (for C = alpha^225 output bit 0 is a3^a6^a7, and so on). The
// module builds that network from the columns of the multiplication matrix
// M[j] = C * alpha^j: output bit k is the XOR of the a[j] with M[j][k] = 1.
// Purely combinational, no clock.
//
// The default constant alpha^225 = 0x24 is the worked example of the design;
// the encoder, syndrome, Chien and Forney blocks instantiate it with their own
// constants. Field polynomial 0x11D (see gf256_pkg).
module gf_cmul
  import gf256_pkg::*;
#(
  parameter gf_t C = 8'h24      // alpha^225
) (
  input  gf_t a,
  output gf_t y
);
  // column j of the constant multiplication matrix
  function automatic gf_t column(int j);
    gf_t s = C;
    for (int k = 0; k < j; k++) s = gf_xtime(s);
    return s;
  endfunction

  always_comb begin
    y = '0;
    for (int j = 0; j < 8; j++)
      if (a[j]) y ^= column(j);
  end
endmodule
