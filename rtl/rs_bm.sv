// rs_bm: key equation solver (Berlekamp-Massey) for RS(255,239).
//
// From the 16 syndromes S_0..S_15 it finds the error locator polynomial
// Lambda(x) (degree L <= 8, roots at the inverses of the error locations) and
// the error evaluator polynomial Omega(x) = S(x)Lambda(x) mod x^8.
//
// How it works: the inversion-free form of the Berlekamp-Massey iteration is
// used, so no field division is needed. One iteration per clock, r = 0..15:
//   delta  = sum_i Lambda_i * S_{r-i}
//   Lambda <- gamma*Lambda + delta * x * B
//   if delta != 0 and 2L <= r:  B <- old Lambda, L <- r+1-L, gamma <- delta
//   else                        B <- x * B
// The result is Lambda scaled by a non-zero constant, which changes neither
// its roots nor the Forney ratio used by the error evaluator. A window
// register holding S_r, S_{r-1}, ... S_{r-8} feeds the dot product, so no
// syndrome multiplexer is needed. After the 16 iterations the same dot-product
// hardware produces Omega_k = sum_{j<=k} Lambda_j S_{k-j}, one coefficient
// per clock for k = 0..7.
//
// Lambda and B are kept to 9 coefficients. This is exact whenever the final
// L <= 8; a larger L means more than 8 errors, which is reported on fail
// (no correction possible).
//
// Interface: pulse start with synd valid; busy while working; done pulses one
// cycle when lambda, omega, deg and fail are valid (they then hold until the
// next start). Latency: 1 + 16 + 8 = 25 cycles from start to done.
// Reset active-low, synchronous. The block's role follows the design
// description; the inversion-free algorithm and the schedule are this design's.
module rs_bm
  import gf256_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  gf_vec_par_t synd,
  output logic        busy,
  output logic        done,
  output gf_loc_t     lambda,
  output gf_eval_t    omega,
  output logic [4:0]  deg,
  output logic        fail
);
  typedef enum logic [1:0] {S_IDLE, S_BM, S_OMEGA} state_t;
  state_t state;

  gf_vec_par_t s;              // captured syndromes
  gf_loc_t     w;              // window: w[i] = S_{r-i}
  gf_loc_t     b;              // correction polynomial B(x)
  gf_t         gamma;
  logic [4:0]  r;              // iteration / Omega coefficient index
  gf_t         delta;
  gf_t         s_next;

  // dot product Lambda . window
  always_comb begin
    delta = '0;
    for (int i = 0; i <= RS_T; i++) delta ^= gf_mul(lambda[i], w[i]);
  end

  // next syndrome to enter the window, zero past S_15
  always_comb begin
    s_next = '0;
    for (int i = 0; i < RS_NPAR; i++) if (5'(i) == r + 5'd1) s_next = s[i];
  end

  assign busy = (state != S_IDLE);
  assign fail = (deg > 5'(RS_T));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      r     <= '0;
      deg   <= '0;
      gamma <= '0;
      for (int i = 0; i < RS_NPAR; i++) s[i] <= '0;
      for (int i = 0; i <= RS_T; i++) begin
        lambda[i] <= '0;
        b[i]      <= '0;
        w[i]      <= '0;
      end
      for (int i = 0; i < RS_T; i++) omega[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          s      <= synd;
          for (int i = 0; i <= RS_T; i++) begin
            lambda[i] <= (i == 0) ? 8'h01 : '0;
            b[i]      <= (i == 0) ? 8'h01 : '0;
            w[i]      <= (i == 0) ? synd[0] : '0;
          end
          gamma  <= 8'h01;
          deg    <= '0;
          r      <= '0;
          state  <= S_BM;
        end
        S_BM: begin
          for (int i = 0; i <= RS_T; i++)
            lambda[i] <= gf_mul(gamma, lambda[i]) ^ ((i > 0) ? gf_mul(delta, b[i-1]) : '0);
          if (delta != '0 && {deg, 1'b0} <= {1'b0, r}) begin
            b     <= lambda;
            deg   <= r + 5'd1 - deg;
            gamma <= delta;
          end else begin
            b[0] <= '0;
            for (int i = 1; i <= RS_T; i++) b[i] <= b[i-1];
          end
          if (r == 5'(RS_NPAR - 1)) begin
            // restart the window for Omega = S*Lambda mod x^8
            for (int i = 0; i <= RS_T; i++) w[i] <= (i == 0) ? s[0] : '0;
            r     <= '0;
            state <= S_OMEGA;
          end else begin
            w[0] <= s_next;
            for (int i = 1; i <= RS_T; i++) w[i] <= w[i-1];
            r <= r + 5'd1;
          end
        end
        S_OMEGA: begin
          omega[r[2:0]] <= delta;
          w[0] <= s_next;
          for (int i = 1; i <= RS_T; i++) w[i] <= w[i-1];
          r <= r + 5'd1;
          if (r == 5'(RS_T - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
