// wi_link: behavioural model of one wireless transmitter, its dedicated
// millimetre-wave channel and the matching receiver in another hub.
//
// This is a model of an analog/RF part, not a circuit to synthesise as is:
// the real part is a transceiver with a zig-zag antenna on one of twelve
// non-overlapping channels. Digitally it behaves as a point-to-point flit
// pipe. A flit accepted at tx takes LATENCY cycles to reach the receiver
// buffer (two cycles: the document counts one wireless hop as two wired
// hops), and rx then offers it with valid/ready. The transmitter accepts a
// flit only when the receiver buffer is sure to have room for it and all
// flits still in the air, so nothing is lost on the channel. The receiver
// depth and the credit rule are this design's choices.
module wi_link
  import winoc_pkg::*;
#(
  parameter int unsigned LATENCY  = 2,
  parameter int unsigned RX_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t tx_flit,
  input  logic  tx_valid,
  output logic  tx_ready,
  output flit_t rx_flit,
  output logic  rx_valid,
  input  logic  rx_ready
);

  localparam int unsigned CW = $clog2(RX_DEPTH + 1);

  flit_t         air_f [LATENCY];
  logic          air_v [LATENCY];
  logic [CW-1:0] rx_count;
  logic          rx_in_ready;
  logic          rx_empty, rx_wr_open, rx_rd_open;
  int unsigned   in_air;

  always_comb begin
    in_air = 0;
    for (int i = 0; i < LATENCY; i++) in_air += air_v[i] ? 1 : 0;
    tx_ready = (in_air + int'(rx_count)) < RX_DEPTH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        air_v[i] <= 1'b0;
        air_f[i] <= '0;
      end
    end else begin
      air_v[0] <= tx_valid && tx_ready;
      air_f[0] <= tx_flit;
      for (int i = 1; i < LATENCY; i++) begin
        air_v[i] <= air_v[i-1];
        air_f[i] <= air_f[i-1];
      end
    end
  end

  flit_fifo #(.DEPTH(RX_DEPTH)) u_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_flit  (air_f[LATENCY-1]),
    .in_valid (air_v[LATENCY-1]),
    .in_ready (rx_in_ready),
    .out_flit (rx_flit),
    .out_valid(rx_valid),
    .out_ready(rx_ready),
    .empty    (rx_empty),
    .wr_open  (rx_wr_open),
    .rd_open  (rx_rd_open),
    .count    (rx_count)
  );

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    air_v[LATENCY-1] |-> rx_in_ready);

endmodule
