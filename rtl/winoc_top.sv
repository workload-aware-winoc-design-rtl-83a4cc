// winoc_top: reconfiguration fabric of an 8x8 hybrid wired/wireless NoC.
//
// Four 4x4 subnets each have one wireless hub with three transceivers
// (twelve in all); transmitter k of hub h talks over its own channel to
// receiver k of hub (h + k + 1) mod 4, so every hub reaches every other hub
// directly. Each hub can link its three transceivers to any three of its
// sixteen routers. Every router carries the wireless additions
// (router_wi_port) and a routing unit that chooses between XY and the
// wireless shortcut using the current hub links.
// Reconfiguration loop: routers report dropped packets; when every subnet
// has seen THRESHOLD drops, the neural network (ann_engine) runs on the
// latest 8x8x3 traffic snapshot from traffic_monitor and produces one
// instruction per subnet; the four hubs then relink, each slot as soon as
// no packet is cut by doing so. No new run starts while the network or a
// hub is still busy.
// The conventional wired routers are outside this module: their
// Output_port_WI, local input buffer, Local2 ejection, packet-drop and
// traffic-event signals, and the routing query, are ports here, one entry
// per node {y[2:0], x[2:0]}. Network weights are loaded through w_*.
// The structure follows the document; the hub numbering, the event
// interfaces and the start/hold handshake are this design's choices.
module winoc_top
  import winoc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 4,
  parameter int unsigned WI_LATENCY = 2,
  parameter int unsigned THRESHOLD  = 3,
  parameter int unsigned WINDOW     = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  // router crossbar -> Output_port_WI
  input  flit_t       rtr_wi_flit   [NUM_NODES],
  input  logic [NUM_NODES-1:0] rtr_wi_valid,
  output logic [NUM_NODES-1:0] rtr_wi_ready,
  // PE injection
  input  flit_t       pe_flit       [NUM_NODES],
  input  logic [NUM_NODES-1:0] pe_valid,
  output logic [NUM_NODES-1:0] pe_ready,
  // into each router's local-direction input buffer
  output flit_t       lib_flit      [NUM_NODES],
  output logic [NUM_NODES-1:0] lib_valid,
  input  logic [NUM_NODES-1:0] lib_ready,
  // Local2 ejection of wireless packets
  output flit_t       l2_flit       [NUM_NODES],
  output logic [NUM_NODES-1:0] l2_valid,
  input  logic [NUM_NODES-1:0] l2_ready,
  output logic [NUM_NODES-1:0] wi_sel,
  // routing query of each router
  input  node_id_t    rc_dst        [NUM_NODES],
  input  logic [NUM_NODES-1:0] rc_wired_only,
  output dir_e        rc_dir        [NUM_NODES],
  output logic [NUM_NODES-1:0] rc_use_wi,
  // router events
  input  logic [NUM_NODES-1:0] pkt_drop,
  input  logic [NUM_NODES-1:0] pkt_done,
  input  logic [7:0]  pkt_lat       [NUM_NODES],
  input  logic [NUM_NODES-1:0] flit_fwd,
  input  logic [NUM_NODES-1:0] cross_pkt,
  // network weights
  input  logic        w_we,
  input  logic [11:0] w_addr,
  input  logic [15:0] w_data,
  // status
  output logic        reconfig_start,
  output logic        ann_done,
  output logic [11:0] instr         [NUM_SUBNETS],
  output rtr_id_t     mux_sel       [NUM_SUBNETS][NUM_WI],
  output logic [NUM_WI-1:0] relink  [NUM_SUBNETS],
  output logic [NUM_WI-1:0] tx_contend [NUM_SUBNETS],
  output logic [NUM_NODES-1:0] wi_wait,
  output logic        reconfig_busy,
  output logic [NUM_SUBNETS-1:0] hub_busy,   // a hub slot waits to relink
  output logic        feat_valid             // a new traffic snapshot is ready
);

  // hub <-> router port wiring, indexed [subnet][router]
  flit_t                   h_in_flit  [NUM_SUBNETS][SUBNET_NODES];
  logic [SUBNET_NODES-1:0] h_in_valid [NUM_SUBNETS];
  logic [SUBNET_NODES-1:0] h_in_ready [NUM_SUBNETS];
  flit_t                   h_out_flit [NUM_SUBNETS][SUBNET_NODES];
  logic [SUBNET_NODES-1:0] h_out_valid[NUM_SUBNETS];
  logic [SUBNET_NODES-1:0] h_out_ready[NUM_SUBNETS];
  logic [SUBNET_NODES-1:0] h_sel      [NUM_SUBNETS];
  // hub <-> link wiring, indexed [hub][transceiver]
  flit_t                   tx_flit    [NUM_SUBNETS][NUM_WI];
  logic [NUM_WI-1:0]       tx_valid   [NUM_SUBNETS];
  logic [NUM_WI-1:0]       tx_ready   [NUM_SUBNETS];
  flit_t                   rx_flit    [NUM_SUBNETS][NUM_WI];
  logic [NUM_WI-1:0]       rx_valid   [NUM_SUBNETS];
  logic [NUM_WI-1:0]       rx_ready   [NUM_SUBNETS];
  logic [NUM_WI-1:0]       hub_avail  [NUM_SUBNETS];
  // per node WI port signals
  flit_t                   n_wi_in_flit [NUM_NODES];
  logic [NUM_NODES-1:0]    n_wi_in_valid, n_wi_in_ready;
  flit_t                   n_hub_flit   [NUM_NODES];
  logic [NUM_NODES-1:0]    n_hub_valid, n_hub_ready;

  logic [7:0]  feat [NUM_NODES][3];
  logic        ann_busy;
  logic [7:0]  drop_count [NUM_SUBNETS];
  logic [7:0]  prob [NUM_NODES];

  // ---------------- hubs and links ----------------
  for (genvar s = 0; s < NUM_SUBNETS; s++) begin : g_hub
    wireless_hub #(.HUB_ID(2'(s)), .BUF_DEPTH(BUF_DEPTH)) u_hub (
      .clk          (clk),
      .rst_n        (rst_n),
      .rtr_in_flit  (h_in_flit[s]),
      .rtr_in_valid (h_in_valid[s]),
      .rtr_in_ready (h_in_ready[s]),
      .rtr_out_flit (h_out_flit[s]),
      .rtr_out_valid(h_out_valid[s]),
      .rtr_out_ready(h_out_ready[s]),
      .wi_sel       (h_sel[s]),
      .tx_flit      (tx_flit[s]),
      .tx_valid     (tx_valid[s]),
      .tx_ready     (tx_ready[s]),
      .rx_flit      (rx_flit[s]),
      .rx_valid     (rx_valid[s]),
      .rx_ready     (rx_ready[s]),
      .cfg_valid    (ann_done),
      .cfg_instr    (instr[s]),
      .mux_sel      (mux_sel[s]),
      .relink       (relink[s]),
      .busy         (hub_busy[s]),
      .tx_contend   (tx_contend[s]),
      .avail        (hub_avail[s])
    );

    for (genvar k = 0; k < NUM_WI; k++) begin : g_link
      localparam int unsigned D = (s + k + 1) % NUM_SUBNETS;
      wi_link #(.LATENCY(WI_LATENCY), .RX_DEPTH(BUF_DEPTH)) u_link (
        .clk     (clk),
        .rst_n   (rst_n),
        .tx_flit (tx_flit[s][k]),
        .tx_valid(tx_valid[s][k]),
        .tx_ready(tx_ready[s][k]),
        .rx_flit (rx_flit[D][k]),
        .rx_valid(rx_valid[D][k]),
        .rx_ready(rx_ready[D][k])
      );
    end
  end

  // ---------------- per-router additions ----------------
  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    localparam subnet_id_t S = subnet_of(6'(n));
    localparam rtr_id_t    R = local_of(6'(n));

    assign n_wi_in_flit[n]      = h_out_flit[S][R];
    assign n_wi_in_valid[n]     = h_out_valid[S][R];
    assign h_out_ready[S][R]    = n_wi_in_ready[n];
    assign h_in_flit[S][R]      = n_hub_flit[n];
    assign h_in_valid[S][R]     = n_hub_valid[n];
    assign n_hub_ready[n]       = h_in_ready[S][R];
    assign wi_sel[n]            = h_sel[S][R];

    router_wi_port #(.NODE_ID(6'(n))) u_port (
      .clk         (clk),
      .rst_n       (rst_n),
      .wi_sel      (wi_sel[n]),
      .wi_in_flit  (n_wi_in_flit[n]),
      .wi_in_valid (n_wi_in_valid[n]),
      .wi_in_ready (n_wi_in_ready[n]),
      .l2_flit     (l2_flit[n]),
      .l2_valid    (l2_valid[n]),
      .l2_ready    (l2_ready[n]),
      .pe_flit     (pe_flit[n]),
      .pe_valid    (pe_valid[n]),
      .pe_ready    (pe_ready[n]),
      .lib_flit    (lib_flit[n]),
      .lib_valid   (lib_valid[n]),
      .lib_ready   (lib_ready[n]),
      .rtr_wi_flit (rtr_wi_flit[n]),
      .rtr_wi_valid(rtr_wi_valid[n]),
      .rtr_wi_ready(rtr_wi_ready[n]),
      .hub_flit    (n_hub_flit[n]),
      .hub_valid   (n_hub_valid[n]),
      .hub_ready   (n_hub_ready[n]),
      .wi_wait     (wi_wait[n])
    );

    wi_route_compute #(.NODE_ID(6'(n))) u_rc (
      .dst       (rc_dst[n]),
      .wired_only(rc_wired_only[n]),
      .hub_sel   (h_sel),
      .dir       (rc_dir[n]),
      .use_wi    (rc_use_wi[n])
    );
  end

  // ---------------- reconfiguration control ----------------
  traffic_monitor #(.WINDOW(WINDOW)) u_mon (
    .clk       (clk),
    .rst_n     (rst_n),
    .pkt_done  (pkt_done),
    .pkt_lat   (pkt_lat),
    .flit_fwd  (flit_fwd),
    .cross_pkt (cross_pkt),
    .feat      (feat),
    .feat_valid(feat_valid)
  );

  assign reconfig_busy = ann_busy || ann_done || (|hub_busy);

  reconfig_trigger #(.THRESHOLD(THRESHOLD)) u_trig (
    .clk  (clk),
    .rst_n(rst_n),
    .drop (pkt_drop),
    .hold (reconfig_busy),
    .start(reconfig_start),
    .count(drop_count)
  );

  ann_engine u_ann (
    .clk   (clk),
    .rst_n (rst_n),
    .feat  (feat),
    .start (reconfig_start),
    .w_we  (w_we),
    .w_addr(w_addr),
    .w_data(w_data),
    .busy  (ann_busy),
    .done  (ann_done),
    .instr (instr),
    .prob  (prob)
  );

endmodule
