// rs_line_fifo: first-in first-out buffer for one received OTN row.
//
// While the syndromes of a row are accumulated, its bytes are stored here; the
// correction stage later reads them back in arrival order and adds the error
// values. The storage is a simple dual-port memory (DEPTH x 8 bits, one write
// and one registered read per cycle) with write and read pointers. clear
// empties the buffer, which lets the decoder drop the parity bytes at the end
// of a row without reading them.
//
// Interface: push writes wdata if not full; pop reads the oldest byte if not
// empty and presents it on rdata in the next cycle (rvalid). count gives the
// fill level. Pushing when full or popping when empty is a protocol error and
// is flagged by assertions. Reset active-low, synchronous (pointers only; the
// memory itself is not reset). DEPTH = 4080 bytes, one row, as in the design
// description; the memory organisation is this design's choice.
module rs_line_fifo
  import gf256_pkg::*;
#(
  parameter int DEPTH = 4080
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic push,
  input  gf_t  wdata,
  input  logic pop,
  output gf_t  rdata,
  output logic rvalid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic full,
  output logic empty
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);

  gf_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
    if (do_pop)  rdata <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wptr   <= '0;
      rptr   <= '0;
      count  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= do_pop;
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || clear) push |-> !full)
    else $error("rs_line_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n || clear) pop |-> !empty)
    else $error("rs_line_fifo: pop while empty");
endmodule
