// rs_chien: error locator (Chien search) for one RS(255,239) codeword.
//
// The error locator Lambda(x) has its roots at X^-1 for every error location
// X = alpha^e (e = degree of the erroneous symbol). Symbols arrive highest
// degree first, so symbol p of the codeword (p = 0..254 in arrival order) has
// degree 254-p and is in error exactly when Lambda(alpha^(p+1)) = 0.
//
// How it works: register i holds Lambda_i * alpha^(i*(p+1)). load sets it to
// Lambda_i * alpha^i (position 0); each step multiplies it again by the
// constant alpha^i, moving to the next position. The same constant multiplier
// serves both. The sum of all registers is Lambda at the current position
// (root = 1 when it is zero); the sum of the odd registers is
// x*Lambda'(x) at that point, which the error evaluator needs.
// root_cnt counts the roots met so far; after the 255 steps of a codeword a
// count different from deg(Lambda) means the error pattern is uncorrectable.
//
// Interface: load with lambda; then one step per symbol. root and lam_odd
// are combinational from the registers and describe the current position.
// Reset active-low, synchronous. The role follows the design description;
// the register organisation is the standard Chien search, this design's choice.
module rs_chien
  import gf256_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  gf_loc_t    lambda,
  input  logic       step,
  output logic       root,
  output gf_t        lam_odd,
  output logic [7:0] root_cnt
);
  gf_loc_t q;          // Lambda_i * alpha^(i*(p+1))
  gf_loc_t q_mul;
  gf_t     sum;

  for (genvar i = 0; i <= RS_T; i++) begin : g_mul
    gf_cmul #(.C(gf_alpha_pow(i))) u_mul (.a(load ? lambda[i] : q[i]), .y(q_mul[i]));
  end

  always_comb begin
    sum     = '0;
    lam_odd = '0;
    for (int i = 0; i <= RS_T; i++) begin
      sum ^= q[i];
      if (i % 2 == 1) lam_odd ^= q[i];
    end
  end
  assign root = (sum == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= RS_T; i++) q[i] <= '0;
      root_cnt <= '0;
    end else if (load) begin
      q        <= q_mul;
      root_cnt <= '0;
    end else if (step) begin
      q <= q_mul;
      if (root) root_cnt <= root_cnt + 8'd1;
    end
  end
endmodule
