// otn_rs_decoder: G.709 RS(255,239) decoder for a stream of OTU rows, with
// the receive buffer and syndrome stage duplicated and the correction stage
// shared.
//
// A row is 4080 bytes: 16 byte-interleaved RS(255,239) codewords. A decoder
// can only start correcting a row once all of it has arrived, and meanwhile
// the next row keeps arriving. Instead of two complete sets of 16 decoders,
// this block duplicates only the cheap front end:
//   * two banks (A/B) of 16 syndrome calculators (rs_syndrome) and
//   * two row FIFOs (rs_line_fifo, 4080 bytes each),
// used in ping-pong: the incoming row goes into the write bank while the
// other bank's row is being corrected. One set of 16 key equation solvers
// (rs_bm), 16 error locators (rs_chien) and 16 error evaluators (rs_forney) is
// shared; a multiplexer feeds it the syndromes of the bank being corrected.
//
// Correction of a completed row (read side):
//   1. If all 256 syndromes of the row are zero the row is error-free and the
//      key equation stage is skipped (bypass); otherwise all 16 rs_bm start
//      together and finish in 25 cycles.
//   2. The 3824 information bytes are read from the FIFO in arrival order,
//      one per cycle. Byte j belongs to lane j mod 16; the locator/evaluator
//      pair of that lane supplies the error value for its current position
//      and steps to the next. The corrected byte (stored ^ error) is output.
//   3. The parity positions are not output; the 16 locators step through them
//      together in 16 cycles so that every codeword is searched completely.
//   4. A lane is flagged uncorrectable if its locator degree exceeds 8 (its
//      corrections are then suppressed) or if the number of roots found
//      differs from that degree (its bytes have already been output by then).
//      The FIFO is cleared (dropping the parity bytes) and the bank released.
// Read-side time per row is at most 1 + 25 + 3824 + 16 + 1 = 3867 cycles,
// less than the 4080 cycles the next row needs to arrive at one byte per
// clock, so the input never has to stall.
//
// Interface: in_valid/in_data, one byte per cycle at most, no backpressure;
// rows are counted from reset (byte 0 after reset starts a row). Output
// out_valid/out_data carries 3824 bytes per row, out_sor marks the first.
// row_done pulses after the last byte of a row with row_uncorr (one bit per
// lane), row_bypass (no errors) and row_nfix (corrected information bytes).
// overrun is a sticky flag set if a row completes while both banks are busy.
// Reset active-low, synchronous.
//
// The bank duplication, the shared correction set and the block order
// follow the design description; the scheduling, the handshake and the
// status outputs are this design's choices.
module otn_rs_decoder
  import gf256_pkg::*;
#(
  parameter int N_CH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  gf_t  in_data,
  output logic out_valid,
  output gf_t  out_data,
  output logic out_sor,
  output logic row_done,
  output logic [N_CH-1:0] row_uncorr,
  output logic row_bypass,
  output logic [15:0] row_nfix,
  output logic overrun
);
  localparam int LW    = $clog2(N_CH);
  localparam int DEPTH = N_CH * RS_N;
  localparam int CW    = $clog2(DEPTH + 1);

  // ------------------------------------------------------------ write side
  logic [LW-1:0] wlane;
  logic [7:0]    wpos;
  logic          wfirst, wlast_info, wparity, wlast;
  logic          wbank;
  logic [1:0]    bank_full;
  logic [1:0]    set_full, clr_full;

  otn_lane_counter #(.N_CH(N_CH)) u_wcnt (
    .clk, .rst_n, .clear(1'b0), .step(in_valid),
    .lane(wlane), .pos(wpos), .first(wfirst), .last_info(wlast_info),
    .is_parity(wparity), .last(wlast)
  );

  gf_vec_par_t    synd  [2][N_CH];
  logic [N_CH-1:0] szero [2];
  gf_t            fifo_rdata [2];
  logic [1:0]     fifo_rvalid;
  logic [1:0]     fifo_push, fifo_pop, fifo_clear;
  logic [1:0]     fifo_full, fifo_empty;
  logic [CW-1:0]  fifo_count [2];

  for (genvar bk = 0; bk < 2; bk++) begin : g_bank
    for (genvar c = 0; c < N_CH; c++) begin : g_syn
      rs_syndrome u_syn (
        .clk, .rst_n,
        .en   (in_valid && (wbank == 1'(bk)) && (wlane == LW'(c))),
        .start(wpos == 8'd0),
        .din  (in_data),
        .synd (synd[bk][c]),
        .zero (szero[bk][c])
      );
    end
    assign fifo_push[bk] = in_valid && (wbank == 1'(bk));
    rs_line_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .clear (fifo_clear[bk]),
      .push  (fifo_push[bk]),
      .wdata (in_data),
      .pop   (fifo_pop[bk]),
      .rdata (fifo_rdata[bk]),
      .rvalid(fifo_rvalid[bk]),
      .count (fifo_count[bk]),
      .full  (fifo_full[bk]),
      .empty (fifo_empty[bk])
    );
  end

  always_comb begin
    set_full = '0;
    if (in_valid && wlast) set_full[wbank] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      bank_full <= '0;
      overrun   <= 1'b0;
    end else begin
      bank_full <= (bank_full | set_full) & ~clr_full;
      if (in_valid && wlast) begin
        wbank <= ~wbank;
        // the bank we switch to must already be released
        if (bank_full[~wbank] && !clr_full[~wbank]) overrun <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------- read side
  typedef enum logic [2:0] {P_IDLE, P_BM, P_OUT, P_TAIL, P_DONE} pstate_t;
  pstate_t pstate;
  logic    rbank;
  logic    corr_en;             // 0 in bypass: no correction at all
  logic [4:0] tail_cnt;

  // shared correction set, fed from the read bank by a multiplexer
  gf_vec_par_t     bm_synd [N_CH];
  logic [N_CH-1:0] bm_busy, bm_done, bm_fail;
  gf_loc_t         bm_lambda [N_CH];
  gf_eval_t        bm_omega  [N_CH];
  logic [4:0]      bm_deg    [N_CH];
  logic            bm_start;
  logic [N_CH-1:0] ch_step, ch_root;
  gf_t             ch_lodd  [N_CH];
  logic [7:0]      ch_cnt   [N_CH];
  gf_t             fy_err   [N_CH];

  logic [LW-1:0] rlane;
  logic [7:0]    rpos;
  logic          rfirst, rlast_info, rparity, rlast;
  logic          pop;

  assign pop = (pstate == P_OUT);

  otn_lane_counter #(.N_CH(N_CH)) u_rcnt (
    .clk, .rst_n, .clear(pstate == P_IDLE), .step(pop),
    .lane(rlane), .pos(rpos), .first(rfirst), .last_info(rlast_info),
    .is_parity(rparity), .last(rlast)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_corr
    assign bm_synd[c] = rbank ? synd[1][c] : synd[0][c];
    assign ch_step[c] = (pop && rlane == LW'(c)) || (pstate == P_TAIL);

    rs_bm u_bm (
      .clk, .rst_n, .start(bm_start), .synd(bm_synd[c]),
      .busy(bm_busy[c]), .done(bm_done[c]),
      .lambda(bm_lambda[c]), .omega(bm_omega[c]), .deg(bm_deg[c]), .fail(bm_fail[c])
    );
    rs_chien u_chien (
      .clk, .rst_n, .load(bm_done[c]), .lambda(bm_lambda[c]), .step(ch_step[c]),
      .root(ch_root[c]), .lam_odd(ch_lodd[c]), .root_cnt(ch_cnt[c])
    );
    rs_forney u_forney (
      .clk, .rst_n, .load(bm_done[c]), .omega(bm_omega[c]), .step(ch_step[c]),
      .root(ch_root[c]), .lam_odd(ch_lodd[c]), .err(fy_err[c])
    );
  end

  assign bm_start = (pstate == P_IDLE) && bank_full[rbank] && !(&szero[rbank]);

  always_comb begin
    fifo_pop   = '0;
    fifo_clear = '0;
    clr_full   = '0;
    fifo_pop[rbank] = pop;
    if (pstate == P_DONE) begin
      fifo_clear[rbank] = 1'b1;
      clr_full[rbank]   = 1'b1;
    end
  end

  // error value for the byte being read, registered to line up with the
  // FIFO's registered read data
  gf_t  err_q;
  logic sor_q;
  gf_t  err_now;
  assign err_now = (corr_en && !bm_fail[rlane]) ? fy_err[rlane] : '0;

  logic [N_CH-1:0] uncorr_now;
  always_comb begin
    for (int c = 0; c < N_CH; c++)
      uncorr_now[c] = corr_en && (bm_fail[c] || (ch_cnt[c] != {3'b000, bm_deg[c]}));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pstate     <= P_IDLE;
      rbank      <= 1'b0;
      corr_en    <= 1'b0;
      tail_cnt   <= '0;
      err_q      <= '0;
      sor_q      <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_sor    <= 1'b0;
      row_done   <= 1'b0;
      row_uncorr <= '0;
      row_bypass <= 1'b0;
      row_nfix   <= '0;
    end else begin
      row_done  <= 1'b0;
      err_q     <= err_now;
      sor_q     <= pop && rfirst;
      // output stage: registered FIFO data plus registered error value
      out_valid <= fifo_rvalid[rbank];
      out_data  <= fifo_rdata[rbank] ^ err_q;
      out_sor   <= sor_q;
      if (fifo_rvalid[rbank] && err_q != '0) row_nfix <= row_nfix + 16'd1;

      unique case (pstate)
        P_IDLE: if (bank_full[rbank]) begin
          row_nfix <= '0;
          if (&szero[rbank]) begin
            corr_en <= 1'b0;
            pstate  <= P_OUT;
          end else begin
            corr_en <= 1'b1;
            pstate  <= P_BM;
          end
        end
        P_BM: if (bm_done[0]) pstate <= P_OUT;
        P_OUT: if (rlast_info) begin
          tail_cnt <= '0;
          pstate   <= P_TAIL;
        end
        P_TAIL: begin
          tail_cnt <= tail_cnt + 5'd1;
          if (tail_cnt == 5'(RS_NPAR - 1)) pstate <= P_DONE;
        end
        P_DONE: begin
          row_done   <= 1'b1;
          row_uncorr <= uncorr_now;
          row_bypass <= !corr_en;
          rbank      <= ~rbank;
          pstate     <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // The front end must never overwrite a row that is still being corrected.
  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && bank_full[wbank]))
    else $error("otn_rs_decoder: row arrived while both banks are busy");
  // all shared key equation solvers run in lock-step
  assert property (@(posedge clk) disable iff (!rst_n) bm_done == {N_CH{bm_done[0]}})
    else $error("otn_rs_decoder: key equation solvers out of step");
endmodule
