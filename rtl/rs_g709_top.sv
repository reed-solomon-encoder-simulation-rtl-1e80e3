// rs_g709_top: G.709 Reed-Solomon forward error correction, transmit and
// receive side.
//
// Transmit: otn_rs_encoder takes the 3824 information bytes of each OTU row
// and appends 256 parity bytes, computed by 16 byte-interleaved RS(255,239)
// encoders, giving a 4080-byte row. Its input stalls (tx_in_ready low) while
// parity is emitted.
// Receive: otn_rs_decoder takes 4080-byte rows from the line, corrects up to 8
// symbol errors per codeword in each of the 16 interleaved codewords, and
// delivers the 3824 corrected information bytes; per row it reports which
// codewords could not be corrected.
//
// The two sides are independent (separate ports); the optical line between
// them is outside this design. Both run on one clock with an active-low,
// synchronous reset. Timing of each side is described in its module.
module rs_g709_top
  import gf256_pkg::*;
#(
  parameter int N_CH = 16
) (
  input  logic clk,
  input  logic rst_n,
  // transmit side
  input  logic tx_in_valid,
  output logic tx_in_ready,
  input  gf_t  tx_in_data,
  output logic tx_out_valid,
  output gf_t  tx_out_data,
  output logic tx_out_sor,
  output logic tx_out_parity,
  // receive side
  input  logic rx_in_valid,
  input  gf_t  rx_in_data,
  output logic rx_out_valid,
  output gf_t  rx_out_data,
  output logic rx_out_sor,
  output logic rx_row_done,
  output logic [N_CH-1:0] rx_row_uncorr,
  output logic rx_row_bypass,
  output logic [15:0] rx_row_nfix,
  output logic rx_overrun
);
  otn_rs_encoder #(.N_CH(N_CH)) u_tx (
    .clk, .rst_n,
    .in_valid  (tx_in_valid),
    .in_ready  (tx_in_ready),
    .in_data   (tx_in_data),
    .out_valid (tx_out_valid),
    .out_data  (tx_out_data),
    .out_sor   (tx_out_sor),
    .out_parity(tx_out_parity)
  );

  otn_rs_decoder #(.N_CH(N_CH)) u_rx (
    .clk, .rst_n,
    .in_valid  (rx_in_valid),
    .in_data   (rx_in_data),
    .out_valid (rx_out_valid),
    .out_data  (rx_out_data),
    .out_sor   (rx_out_sor),
    .row_done  (rx_row_done),
    .row_uncorr(rx_row_uncorr),
    .row_bypass(rx_row_bypass),
    .row_nfix  (rx_row_nfix),
    .overrun   (rx_overrun)
  );
endmodule
