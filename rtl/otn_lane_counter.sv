// otn_lane_counter: byte sequencer for the interleaved RS codewords of one
// OTN row.
//
// An OTU row carries N_CH Reed-Solomon codewords byte-interleaved: byte j of
// the row belongs to codeword (lane) j mod N_CH and is symbol j div N_CH of
// that codeword. The first 239*N_CH bytes are information, the last 16*N_CH
// are parity. This counter advances by one byte on every cycle with step
// high and reports, for the current byte, its lane, its symbol position, and
// whether it is the first byte, the last information byte, a parity byte or
// the last byte of the row. It wraps to the next row after the last byte.
//
// Interface: clear (synchronous) returns to byte 0; lane/pos/flags are
// registered state, valid in the cycle they describe. Reset active-low,
// synchronous. The counter itself is this design's realisation of the
// row interleaving of G.709.
module otn_lane_counter
  import gf256_pkg::*;
#(
  parameter int N_CH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic step,
  output logic [$clog2(N_CH)-1:0] lane,
  output logic [7:0]              pos,
  output logic                    first,
  output logic                    last_info,
  output logic                    is_parity,
  output logic                    last
);
  localparam int LW = $clog2(N_CH);

  assign first     = (lane == '0) && (pos == '0);
  assign last_info = (lane == LW'(N_CH - 1)) && (pos == 8'(RS_K - 1));
  assign is_parity = (pos >= 8'(RS_K));
  assign last      = (lane == LW'(N_CH - 1)) && (pos == 8'(RS_N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      lane <= '0;
      pos  <= '0;
    end else if (step) begin
      if (lane == LW'(N_CH - 1)) begin
        lane <= '0;
        pos  <= last ? '0 : pos + 8'd1;
      end else begin
        lane <= lane + 1'b1;
      end
    end
  end
endmodule
