// traffic_monitor: collects the three traffic metrics of every tile that
// form the 8x8x3 input of the neural network.
//
// Per tile and per sampling window of WINDOW cycles it measures
//   feature 0, packet duration: sum of the latencies of packets delivered
//              at the tile, divided by 2**DUR_SHIFT;
//   feature 1, throughput: number of flits the tile's router forwarded;
//   feature 2, cross-subnet frequency: number of packets the tile sent to
//              another subnet.
// At the end of each window all 64 x 3 values are saturated to 8 bits,
// copied to feat, feat_valid pulses for one cycle and the counters restart.
// The three metrics and the 100-cycle window follow the document; how each
// metric is counted, scaled and saturated is this design's choice.
module traffic_monitor
  import winoc_pkg::*;
#(
  parameter int unsigned WINDOW    = 100,
  parameter int unsigned DUR_SHIFT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_NODES-1:0] pkt_done,
  input  logic [7:0]           pkt_lat   [NUM_NODES],
  input  logic [NUM_NODES-1:0] flit_fwd,
  input  logic [NUM_NODES-1:0] cross_pkt,
  output logic [7:0]           feat      [NUM_NODES][3],
  output logic                 feat_valid
);

  localparam int unsigned WW = $clog2(WINDOW);

  logic [15:0]   acc [NUM_NODES][3];
  logic [15:0]   nxt [NUM_NODES][3];
  logic [WW-1:0] tick;
  logic          last;

  assign last = (tick == WW'(WINDOW - 1));

  function automatic logic [7:0] sat8(logic [15:0] v);
    return (v > 16'd255) ? 8'd255 : v[7:0];
  endfunction

  function automatic logic [15:0] sat_add(logic [15:0] a, logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[16] ? 16'hffff : s[15:0];
  endfunction

  always_comb
    for (int n = 0; n < NUM_NODES; n++) begin
      nxt[n][0] = pkt_done[n]  ? sat_add(acc[n][0], {8'd0, pkt_lat[n]}) : acc[n][0];
      nxt[n][1] = flit_fwd[n]  ? sat_add(acc[n][1], 16'd1) : acc[n][1];
      nxt[n][2] = cross_pkt[n] ? sat_add(acc[n][2], 16'd1) : acc[n][2];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick       <= '0;
      feat_valid <= 1'b0;
      for (int n = 0; n < NUM_NODES; n++)
        for (int m = 0; m < 3; m++) begin
          acc[n][m]  <= '0;
          feat[n][m] <= '0;
        end
    end else begin
      feat_valid <= last;
      tick       <= last ? '0 : tick + 1'b1;
      for (int n = 0; n < NUM_NODES; n++) begin
        if (last) begin
          feat[n][0] <= sat8(nxt[n][0] >> DUR_SHIFT);
          feat[n][1] <= sat8(nxt[n][1]);
          feat[n][2] <= sat8(nxt[n][2]);
          for (int m = 0; m < 3; m++) acc[n][m] <= '0;
        end else begin
          for (int m = 0; m < 3; m++) acc[n][m] <= nxt[n][m];
        end
      end
    end
  end

endmodule
