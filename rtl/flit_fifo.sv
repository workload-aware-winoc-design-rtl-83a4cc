// flit_fifo: first-in first-out flit buffer of a hub transceiver slot.
//
// Used as Buffer_from_tile (router -> transmitter) and Buffer_to_tile
// (receiver -> router). Besides a valid/ready FIFO it reports where the
// packet boundaries are, which the hub control module needs before it may
// relink a MUX slot to another router:
//   wr_open - the last flit written was not a tail: a packet is still
//             arriving at the write end.
//   rd_open - the last flit read was not a tail: a packet has partly left
//             through the read end.
// The document's rules are "the buffer header is the head flit" (read end)
// and "the end of the buffer is the tail flit" (write end), or empty; the
// open flags carry the same information and stay correct when the buffer
// drains in the middle of a packet.
// Timing: a write is visible at the output the cycle after it is accepted;
// full throughput of one flit per cycle. Depth 4 flits follows Table 1.
module flit_fifo
  import winoc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  input  logic  in_valid,
  output logic  in_ready,
  output flit_t out_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output logic  empty,
  output logic  wr_open,
  output logic  rd_open,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  wptr, rptr;
  logic           do_wr, do_rd;

  assign empty     = (count == 0);
  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = !empty;
  assign out_flit  = mem[rptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      rptr    <= '0;
      count   <= '0;
      wr_open <= 1'b0;
      rd_open <= 1'b0;
    end else begin
      if (do_wr) begin
        wptr    <= incr(wptr);
        wr_open <= !is_tail(in_flit.ftype);
      end
      if (do_rd) begin
        rptr    <= incr(rptr);
        rd_open <= !is_tail(out_flit.ftype);
      end
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_flit;
  end

endmodule
