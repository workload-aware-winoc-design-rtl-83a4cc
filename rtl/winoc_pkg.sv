// winoc_pkg: types and constants shared by the reconfigurable wireless NoC.
//
// The network is an 8x8 mesh of tiles split into four 4x4 subnets. A node
// address is 6 bits: {y[2:0], x[2:0]}. Inside a subnet a router is numbered
// R0..R15 as {y[1:0], x[1:0]}, the subnet as {y[2], x[2]}.
// Flits carry a 2-bit type, the destination and source node and a 32-bit
// payload (the wired link width). Packets are four flits long.
// Mesh size, subnet size, wireless interface count (3 per hub) and packet
// length follow the document; the flit layout is this design's choice.
package winoc_pkg;

  localparam int unsigned MESH_DIM     = 8;   // 8x8 mesh
  localparam int unsigned NUM_NODES    = 64;
  localparam int unsigned NUM_SUBNETS  = 4;
  localparam int unsigned SUBNET_NODES = 16;
  localparam int unsigned NUM_WI       = 3;   // transceivers per hub
  localparam int unsigned DATA_W       = 32;  // wired link width
  localparam int unsigned PKT_FLITS    = 4;

  typedef enum logic [1:0] {
    FLIT_HEAD     = 2'd0,
    FLIT_BODY     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3
  } flit_type_e;

  typedef logic [5:0] node_id_t;   // {y[2:0], x[2:0]}
  typedef logic [3:0] rtr_id_t;    // router index inside a subnet
  typedef logic [1:0] subnet_id_t; // {y[2], x[2]}

  typedef struct packed {
    flit_type_e       ftype;
    node_id_t         dst;
    node_id_t         src;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Output directions of the routing computation.
  typedef enum logic [2:0] {
    DIR_LOCAL = 3'd0,
    DIR_NORTH = 3'd1,   // y - 1
    DIR_EAST  = 3'd2,   // x + 1
    DIR_SOUTH = 3'd3,   // y + 1
    DIR_WEST  = 3'd4,   // x - 1
    DIR_WI    = 3'd5    // Output_port_WI towards the hub
  } dir_e;

  function automatic logic is_head(flit_type_e t);
    return (t == FLIT_HEAD) || (t == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FLIT_TAIL) || (t == FLIT_HEADTAIL);
  endfunction

  function automatic subnet_id_t subnet_of(node_id_t n);
    return {n[5], n[2]};
  endfunction

  function automatic rtr_id_t local_of(node_id_t n);
    return {n[4:3], n[1:0]};
  endfunction

  function automatic node_id_t node_of(subnet_id_t s, rtr_id_t r);
    return {s[1], r[3:2], s[0], r[1:0]};
  endfunction

  // Manhattan distance between two nodes.
  function automatic logic [3:0] mdist(node_id_t a, node_id_t b);
    logic [2:0] dx, dy;
    dx = (a[2:0] > b[2:0]) ? a[2:0] - b[2:0] : b[2:0] - a[2:0];
    dy = (a[5:3] > b[5:3]) ? a[5:3] - b[5:3] : b[5:3] - a[5:3];
    return {1'b0, dx} + {1'b0, dy};
  endfunction

  // Transmitter k of hub h sends to hub (h + k + 1) mod 4; receiver k of hub
  // h listens to hub (h - k - 1) mod 4.
  function automatic logic [1:0] tx_index(subnet_id_t h, subnet_id_t dst);
    return 2'(dst - h - 2'd1);
  endfunction

endpackage
