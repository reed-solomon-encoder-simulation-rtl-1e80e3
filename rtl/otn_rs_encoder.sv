// otn_rs_encoder: forward-error-correction encoder for one G.709 OTU row.
//
// A row carries 3824 information bytes that belong, byte-interleaved, to 16
// RS(255,239) codewords: byte j goes to codeword j mod 16. This block holds 16
// rs_encoder instances and an otn_lane_counter. Each accepted byte enables
// only the encoder of its lane, so each encoder sees its own 239 symbols. After
// the last information byte all 16 encoders are in their parity phase and the
// block emits the 256 parity bytes, again interleaved (parity symbol 0 of lanes
// 0..15, then parity symbol 1, ...), to complete the 4080-byte row.
//
// Interface: valid/ready input stream. in_ready is low while parity bytes are
// being emitted (256 cycles per row), which stalls the source; the output
// stream has no backpressure. out_valid/out_data are registered: one cycle of
// latency from an accepted input byte. out_sor marks the first byte of a row,
// out_parity marks parity bytes. Reset active-low, synchronous.
//
// The 16-encoder structure and the interleaved row order follow G.709; the
// stall-during-parity handshake is this design's choice.
module otn_rs_encoder
  import gf256_pkg::*;
#(
  parameter int N_CH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_data,
  output logic out_valid,
  output gf_t  out_data,
  output logic out_sor,
  output logic out_parity
);
  localparam int LW = $clog2(N_CH);

  logic [LW-1:0] lane;
  logic [7:0]    pos;
  logic          first, last_info, is_parity, last;
  logic          fire;
  gf_t           enc_out [N_CH];
  logic [N_CH-1:0] enc_par;

  assign in_ready = !is_parity;
  assign fire     = is_parity || in_valid;

  otn_lane_counter #(.N_CH(N_CH)) u_cnt (
    .clk, .rst_n, .clear(1'b0), .step(fire),
    .lane, .pos, .first, .last_info, .is_parity, .last
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_enc
    rs_encoder u_enc (
      .clk, .rst_n,
      .en (fire && (lane == LW'(c))),
      .din(in_data),
      .dout(enc_out[c]),
      .parity_phase(enc_par[c])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_sor    <= 1'b0;
      out_parity <= 1'b0;
    end else begin
      out_valid  <= fire;
      out_data   <= enc_out[lane];
      out_sor    <= fire && first;
      out_parity <= is_parity;
    end
  end

  // The lane encoders must agree with the row counter about the parity phase.
  assert property (@(posedge clk) disable iff (!rst_n) enc_par[lane] == is_parity)
    else $error("otn_rs_encoder: lane encoder out of step with row counter");
endmodule
