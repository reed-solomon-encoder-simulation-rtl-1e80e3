// rs_syndrome: syndrome calculator for one RS(255,239) codeword.
//
// The 16 syndromes are S_i = r(alpha^i), i = 0..15, the received polynomial
// evaluated at the roots of the generator. They are accumulated by Horner's
// rule while the codeword arrives, highest-degree symbol first:
//   S_i <- S_i * alpha^i + r_j.
// The first symbol of a codeword (start = 1) loads S_i = r_j instead, so no
// separate clear cycle is needed between codewords. All syndromes zero means
// the codeword is error-free; that check (zero) is provided for the decoder's
// bypass of the correction path.
//
// Interface: en strobes one symbol; syndromes are registered and valid the
// cycle after the 255th symbol of the codeword. Reset active-low, synchronous.
// Function from the design description; Horner accumulation is the standard
// realisation and this design's choice.
module rs_syndrome
  import gf256_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        start,
  input  gf_t         din,
  output gf_vec_par_t synd,
  output logic        zero
);
  gf_t scaled [RS_NPAR];

  for (genvar i = 0; i < RS_NPAR; i++) begin : g_mul
    gf_cmul #(.C(gf_alpha_pow(RS_B + i))) u_mul (.a(synd[i]), .y(scaled[i]));
  end

  always_comb begin
    zero = 1'b1;
    for (int i = 0; i < RS_NPAR; i++) if (synd[i] != '0) zero = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < RS_NPAR; i++) synd[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < RS_NPAR; i++) synd[i] <= start ? din : (scaled[i] ^ din);
    end
  end
endmodule
