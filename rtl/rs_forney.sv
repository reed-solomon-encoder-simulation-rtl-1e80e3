// rs_forney: error evaluator (Forney algorithm) for one RS(255,239) codeword.
//
// For an error at location X the error value is, with first root alpha^0,
//   e = X * Omega(X^-1) / Lambda'(X^-1) = Omega(X^-1) / Lambda_odd(X^-1)
// where Lambda_odd holds the odd-degree terms of Lambda, equal to
// x*Lambda'(x) in characteristic 2. Lambda_odd at the current position comes
// from the error locator (rs_chien), which steps in lock with this block.
//
// How it works: Omega(x) is evaluated position by position like the Chien
// search: register i holds Omega_i * alpha^(i*(p+1)), loaded with
// Omega_i * alpha^i and multiplied by alpha^i at every step. The division is
// a multiplication by the inverse of Lambda_odd, looked up in a 256-entry
// table computed at elaboration (gf256_pkg::GF_INV). The error value is
// forced to zero where the locator reports no root.
//
// Interface: load with omega, then one step per symbol together with the
// locator; err is combinational for the current position. Reset active-low,
// synchronous. Role from the design description; algorithm and structure are
// this design's choice.
module rs_forney
  import gf256_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  gf_eval_t omega,
  input  logic     step,
  input  logic     root,
  input  gf_t      lam_odd,
  output gf_t      err
);
  gf_eval_t q;
  gf_eval_t q_mul;
  gf_t      om_val;

  for (genvar i = 0; i < RS_T; i++) begin : g_mul
    gf_cmul #(.C(gf_alpha_pow(i))) u_mul (.a(load ? omega[i] : q[i]), .y(q_mul[i]));
  end

  always_comb begin
    om_val = '0;
    for (int i = 0; i < RS_T; i++) om_val ^= q[i];
  end

  assign err = root ? gf_mul(om_val, GF_INV[lam_odd]) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < RS_T; i++) q[i] <= '0;
    end else if (load || step) begin
      q <= q_mul;
    end
  end
endmodule
