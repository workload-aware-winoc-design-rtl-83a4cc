// wireless_hub: reconfigurable wireless hub of one 4x4 subnet.
//
// The hub has a wired line to all sixteen routers of its subnet but only
// three of them are connected at a time, through three 16:1 MUX slots whose
// selects come from the control module (hub_control). Each slot has a
// Buffer_from_tile, filled by the selected router's Output_port_WI, and a
// Buffer_to_tile, drained into that router's Input_port_WI.
// Transmit path: the from-tile buffers feed a 3x3 switch whose output k is
// transmitter k, which serves the subnet (HUB_ID + k + 1) mod 4; contending
// packets are ordered by the slot's priority rank.
// Receive path: receiver k (from subnet (HUB_ID - k - 1) mod 4) goes
// through a second 3x3 switch to the to-tile buffer of the slot whose
// router is the packet's destination or, if the destination is not
// connected, the slot whose router is nearest to it (first slot on a tie).
// A slot may be relinked (Available_i) only when its to-tile buffer has no
// packet half-delivered and its from-tile buffer no packet half-received.
// Interface: valid/ready flit ports towards the 16 routers, the three
// transmitters and the three receivers; cfg_valid/cfg_instr carries the
// 12-bit reconfiguration instruction; wi_sel marks the connected routers.
// Structure, buffers, MUXes, switch arbitration and Available_i follow the
// document; the transmitter numbering and the receive-side slot choice are
// this design's.
module wireless_hub
  import winoc_pkg::*;
#(
  parameter subnet_id_t  HUB_ID    = 2'd0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // routers -> hub (Output_port_WI of each router)
  input  flit_t       rtr_in_flit  [SUBNET_NODES],
  input  logic [SUBNET_NODES-1:0] rtr_in_valid,
  output logic [SUBNET_NODES-1:0] rtr_in_ready,
  // hub -> routers (Input_port_WI of each router)
  output flit_t       rtr_out_flit [SUBNET_NODES],
  output logic [SUBNET_NODES-1:0] rtr_out_valid,
  input  logic [SUBNET_NODES-1:0] rtr_out_ready,
  output logic [SUBNET_NODES-1:0] wi_sel,
  // transmitters
  output flit_t       tx_flit  [NUM_WI],
  output logic [NUM_WI-1:0] tx_valid,
  input  logic [NUM_WI-1:0] tx_ready,
  // receivers
  input  flit_t       rx_flit  [NUM_WI],
  input  logic [NUM_WI-1:0] rx_valid,
  output logic [NUM_WI-1:0] rx_ready,
  // reconfiguration
  input  logic        cfg_valid,
  input  logic [11:0] cfg_instr,
  output rtr_id_t     mux_sel  [NUM_WI],
  output logic [NUM_WI-1:0] relink,
  output logic        busy,
  output logic [NUM_WI-1:0] tx_contend,
  output logic [NUM_WI-1:0] avail
);

  logic [1:0] prio [NUM_WI];

  // Buffer_from_tile signals
  flit_t             ft_in_flit  [NUM_WI];
  logic [NUM_WI-1:0] ft_in_valid, ft_in_ready;
  flit_t             ft_out_flit [NUM_WI];
  logic [NUM_WI-1:0] ft_out_valid, ft_out_ready;
  logic [NUM_WI-1:0] ft_empty, ft_wr_open, ft_rd_open;
  // Buffer_to_tile signals
  flit_t             tt_in_flit  [NUM_WI];
  logic [NUM_WI-1:0] tt_in_valid, tt_in_ready;
  flit_t             tt_out_flit [NUM_WI];
  logic [NUM_WI-1:0] tt_out_valid, tt_out_ready;
  logic [NUM_WI-1:0] tt_empty, tt_wr_open, tt_rd_open;

  logic [1:0]        tx_dest [NUM_WI];
  logic [1:0]        rx_dest [NUM_WI];
  logic [1:0]        rx_prio [NUM_WI];
  logic [NUM_WI-1:0] rx_contend;

  hub_control u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_valid(cfg_valid),
    .cfg_instr(cfg_instr),
    .avail    (avail),
    .mux_sel  (mux_sel),
    .prio     (prio),
    .relink   (relink),
    .busy     (busy)
  );

  // Available_i: no packet is cut by relinking slot i.
  always_comb
    for (int i = 0; i < NUM_WI; i++)
      avail[i] = !tt_rd_open[i] && !ft_wr_open[i];

  // 16:1 MUXes (router -> slot) and their reverse (slot -> router).
  always_comb begin
    rtr_in_ready  = '0;
    rtr_out_valid = '0;
    wi_sel        = '0;
    tt_out_ready  = '0;
    for (int r = 0; r < SUBNET_NODES; r++) rtr_out_flit[r] = '0;
    for (int i = 0; i < NUM_WI; i++) begin
      ft_in_flit[i]  = rtr_in_flit[mux_sel[i]];
      ft_in_valid[i] = rtr_in_valid[mux_sel[i]];
      rtr_in_ready[mux_sel[i]]  = ft_in_ready[i];
      rtr_out_flit[mux_sel[i]]  = tt_out_flit[i];
      rtr_out_valid[mux_sel[i]] = tt_out_valid[i];
      tt_out_ready[i]           = rtr_out_ready[mux_sel[i]];
      wi_sel[mux_sel[i]]        = 1'b1;
    end
  end

  for (genvar i = 0; i < NUM_WI; i++) begin : g_slot
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_from_tile (
      .clk(clk), .rst_n(rst_n),
      .in_flit(ft_in_flit[i]), .in_valid(ft_in_valid[i]), .in_ready(ft_in_ready[i]),
      .out_flit(ft_out_flit[i]), .out_valid(ft_out_valid[i]), .out_ready(ft_out_ready[i]),
      .empty(ft_empty[i]), .wr_open(ft_wr_open[i]), .rd_open(ft_rd_open[i]), .count()
    );
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_to_tile (
      .clk(clk), .rst_n(rst_n),
      .in_flit(tt_in_flit[i]), .in_valid(tt_in_valid[i]), .in_ready(tt_in_ready[i]),
      .out_flit(tt_out_flit[i]), .out_valid(tt_out_valid[i]), .out_ready(tt_out_ready[i]),
      .empty(tt_empty[i]), .wr_open(tt_wr_open[i]), .rd_open(tt_rd_open[i]), .count()
    );
  end

  // Transmit side: destination subnet picks the transmitter.
  always_comb
    for (int i = 0; i < NUM_WI; i++)
      tx_dest[i] = tx_index(HUB_ID, subnet_of(ft_out_flit[i].dst));

  wi_switch #(.N(NUM_WI)) u_tx_switch (
    .clk(clk), .rst_n(rst_n),
    .in_flit(ft_out_flit), .in_valid(ft_out_valid), .in_ready(ft_out_ready),
    .in_dest(tx_dest), .in_prio(prio),
    .out_flit(tx_flit), .out_valid(tx_valid), .out_ready(tx_ready),
    .contend(tx_contend)
  );

  // Receive side: the slot connected to the destination, else the nearest.
  always_comb begin
    logic [3:0] best_d, d;
    for (int k = 0; k < NUM_WI; k++) begin
      rx_prio[k] = 2'(k);
      rx_dest[k] = 2'd0;
      best_d     = 4'hf;
      for (int i = 0; i < NUM_WI; i++) begin
        d = mdist(node_of(HUB_ID, mux_sel[i]), rx_flit[k].dst);
        if (d < best_d) begin
          best_d     = d;
          rx_dest[k] = 2'(i);
        end
      end
    end
  end

  wi_switch #(.N(NUM_WI)) u_rx_switch (
    .clk(clk), .rst_n(rst_n),
    .in_flit(rx_flit), .in_valid(rx_valid), .in_ready(rx_ready),
    .in_dest(rx_dest), .in_prio(rx_prio),
    .out_flit(tt_in_flit), .out_valid(tt_in_valid), .out_ready(tt_in_ready),
    .contend(rx_contend)
  );

  // A packet leaving by wireless must be bound for another subnet.
  for (genvar i = 0; i < NUM_WI; i++) begin : g_chk
    a_foreign_dst: assert property (@(posedge clk) disable iff (!rst_n)
      ft_out_valid[i] |-> subnet_of(ft_out_flit[i].dst) != HUB_ID);
  end

endmodule
