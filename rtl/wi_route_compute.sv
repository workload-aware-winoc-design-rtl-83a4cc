// wi_route_compute: routing computation of a router in the hybrid
// wired/wireless mesh.
//
// For a packet at this router (NODE_ID) bound for dst it decides between
// plain XY routing and a wireless shortcut. Let W_s be the router of this
// subnet connected to the hub that is nearest to here, and W_d the router
// of the destination subnet connected to its hub that is nearest to dst.
// The wireless path is taken when
//     D(here, dst) > D(here, W_s) + D(W_d, dst) + 2
// with D the Manhattan distance; the 2 is the cost of the wireless hop,
// worth two wired hops. On the wireless path the packet goes XY to W_s and
// leaves there through Output_port_WI. A packet that has already crossed a
// wireless link travels in the wired virtual channel (wired_only = 1) and
// never re-enters the wireless one; this breaks the cycle that mixing XY
// and wireless routes could form. use_wi tells which virtual channel the
// packet uses next.
// Purely combinational. The decision rule and the virtual-channel split
// follow the document; nearest-connected-router choice of W_s and W_d and
// the first-index tie rule are this design's reading.
module wi_route_compute
  import winoc_pkg::*;
#(
  parameter node_id_t NODE_ID = 6'd0
) (
  input  node_id_t                dst,
  input  logic                    wired_only,
  input  logic [SUBNET_NODES-1:0] hub_sel [NUM_SUBNETS],  // connected routers per subnet
  output dir_e                    dir,
  output logic                    use_wi
);

  function automatic dir_e xy_step(node_id_t from, node_id_t to);
    if      (to[2:0] > from[2:0]) return DIR_EAST;
    else if (to[2:0] < from[2:0]) return DIR_WEST;
    else if (to[5:3] > from[5:3]) return DIR_SOUTH;
    else if (to[5:3] < from[5:3]) return DIR_NORTH;
    else                          return DIR_LOCAL;
  endfunction

  // Nearest router of subnet s connected to its hub, as seen from node n.
  function automatic node_id_t nearest_wi(subnet_id_t s, logic [SUBNET_NODES-1:0] sel,
                                          node_id_t n);
    node_id_t   best;
    logic [3:0] best_d, d;
    best   = node_of(s, 4'd0);
    best_d = 4'hf;
    for (int r = 0; r < SUBNET_NODES; r++) begin
      d = mdist(node_of(s, 4'(r)), n);
      if (sel[r] && d < best_d) begin
        best   = node_of(s, 4'(r));
        best_d = d;
      end
    end
    return best;
  endfunction

  subnet_id_t s_here, s_dst;
  node_id_t   w_s, w_d;
  logic [4:0] d_direct, d_wireless;

  always_comb begin
    s_here     = subnet_of(NODE_ID);
    s_dst      = subnet_of(dst);
    w_s        = nearest_wi(s_here, hub_sel[s_here], NODE_ID);
    w_d        = nearest_wi(s_dst, hub_sel[s_dst], dst);
    d_direct   = {1'b0, mdist(NODE_ID, dst)};
    d_wireless = {1'b0, mdist(NODE_ID, w_s)} + {1'b0, mdist(w_d, dst)} + 5'd2;
    use_wi     = !wired_only && (s_here != s_dst) && (d_direct > d_wireless);
    if (use_wi) dir = (w_s == NODE_ID) ? DIR_WI : xy_step(NODE_ID, w_s);
    else        dir = xy_step(NODE_ID, dst);
  end

endmodule
