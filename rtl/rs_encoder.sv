// rs_encoder: systematic Reed-Solomon RS(255,239) encoder for one codeword
// stream, as used by G.709 forward error correction.
//
// How it works: a 16-stage linear-feedback shift register divides the message
// polynomial m(x)*x^16 by the generator g(x) = prod_{i=0}^{15}(x + alpha^i).
// For each of the 239 data symbols the feedback fb = din ^ p[15] is multiplied
// by the fixed generator coefficients (constant multipliers, pure XOR logic)
// and added into the shifting registers. The data symbol is passed straight
// to dout. For the following 16 symbols the register holds the remainder,
// which is shifted out highest degree first as the parity; the register is
// left at zero, ready for the next codeword.
//
// Interface: one symbol per cycle in which en is high. A symbol counter
// (0..254) tracks the position in the codeword; parity_phase is high while the
// next symbol to be produced is a parity symbol, and din is then ignored.
// dout is combinational from din and the state (zero latency), so several
// encoders can be time-multiplexed on one byte stream by their en inputs.
// Reset (active-low, synchronous) clears the remainder and the counter.
//
// The code parameters and the generator follow G.709 (b = 0); the
// enable-per-symbol interface is this design's own choice.
module rs_encoder
  import gf256_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  gf_t  din,
  output gf_t  dout,
  output logic parity_phase
);
  gf_t  p [RS_NPAR];          // remainder register, p[15] = highest degree
  gf_t  fb;
  gf_t  gfb [RS_NPAR];        // fb * g_i
  logic [7:0] cnt;            // position in the codeword, 0..254

  assign parity_phase = (cnt >= 8'(RS_K));
  assign fb = parity_phase ? '0 : (din ^ p[RS_NPAR-1]);
  assign dout = parity_phase ? p[RS_NPAR-1] : din;

  for (genvar i = 0; i < RS_NPAR; i++) begin : g_tap
    gf_cmul #(.C(RS_GEN[i])) u_mul (.a(fb), .y(gfb[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < RS_NPAR; i++) p[i] <= '0;
    end else if (en) begin
      cnt <= (cnt == 8'(RS_N - 1)) ? '0 : cnt + 8'd1;
      // in the parity phase fb = 0, so this is a plain shift
      p[0] <= gfb[0];
      for (int i = 1; i < RS_NPAR; i++) p[i] <= p[i-1] ^ gfb[i];
    end
  end
endmodule
