// router_wi_port: the additions a router needs to be linked to a
// reconfigurable wireless hub.
//
// Input_port_WI receives packets from the hub's Buffer_to_tile. A DEMUX
// sends a packet whose destination is this router straight to a separate
// ejection port, Local2, so wireless traffic does not queue behind local
// traffic; any other packet (the hub may deliver to a router near the
// destination when the destination itself is not connected) goes into the
// router's local-direction input buffer and is then routed over wired
// links. A MUX in front of that input buffer shares it between the PE's own
// injection and the WI path; it switches to the WI path only when the last
// flit written to the buffer is a tail, so packets never interleave, and
// holds the chosen source until its tail. At a packet boundary the WI path
// goes first.
// Output_port_WI (router -> hub) is passed on only while wi_sel says this
// router is connected to the hub; otherwise it is held not-ready.
// Timing: all paths are combinational valid/ready; the route of a packet
// is fixed by its head flit. l2_flit and hub_flit are plain wires from
// wi_in_flit and rtr_wi_flit; only the valid/ready handshakes are steered. The DEMUX, MUX and the tail-flit rule follow
// the document; the WI-first order at a boundary is this design's choice.
module router_wi_port
  import winoc_pkg::*;
#(
  parameter node_id_t NODE_ID = 6'd0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wi_sel,
  // Input_port_WI (from the hub)
  input  flit_t wi_in_flit,
  input  logic  wi_in_valid,
  output logic  wi_in_ready,
  // Output_port_Local2 (ejection to the PE)
  output flit_t l2_flit,
  output logic  l2_valid,
  input  logic  l2_ready,
  // injection from the PE
  input  flit_t pe_flit,
  input  logic  pe_valid,
  output logic  pe_ready,
  // into the router's local-direction input buffer
  output flit_t lib_flit,
  output logic  lib_valid,
  input  logic  lib_ready,
  // Output_port_WI: router crossbar -> hub
  input  flit_t rtr_wi_flit,
  input  logic  rtr_wi_valid,
  output logic  rtr_wi_ready,
  output flit_t hub_flit,
  output logic  hub_valid,
  input  logic  hub_ready,
  // events
  output logic  wi_wait      // a WI packet waits for a PE packet to finish
);

  typedef enum logic [1:0] {SRC_NONE, SRC_PE, SRC_WI} src_e;

  src_e owner_q;
  logic wi_busy_q, wi_l2_q;
  logic wi_to_l2;
  logic grant_wi, grant_pe;

  assign wi_to_l2 = wi_busy_q ? wi_l2_q : (wi_in_flit.dst == NODE_ID);

  always_comb begin
    grant_wi = 1'b0;
    grant_pe = 1'b0;
    case (owner_q)
      SRC_WI:   grant_wi = 1'b1;
      SRC_PE:   grant_pe = 1'b1;
      default: begin
        if (wi_in_valid && !wi_to_l2) grant_wi = 1'b1;
        else                          grant_pe = 1'b1;
      end
    endcase

    l2_flit  = wi_in_flit;
    l2_valid = wi_in_valid && wi_to_l2;

    lib_flit  = grant_wi ? wi_in_flit : pe_flit;
    lib_valid = grant_wi ? (wi_in_valid && !wi_to_l2) : (grant_pe && pe_valid);
    pe_ready  = grant_pe && lib_ready;

    wi_in_ready = wi_to_l2 ? l2_ready : (grant_wi && lib_ready);
    wi_wait     = wi_in_valid && !wi_to_l2 && !grant_wi;

    hub_flit     = rtr_wi_flit;
    hub_valid    = wi_sel && rtr_wi_valid;
    rtr_wi_ready = wi_sel && hub_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_q   <= SRC_NONE;
      wi_busy_q <= 1'b0;
      wi_l2_q   <= 1'b0;
    end else begin
      if (lib_valid && lib_ready)
        owner_q <= is_tail(lib_flit.ftype) ? SRC_NONE : (grant_wi ? SRC_WI : SRC_PE);
      if (wi_in_valid && wi_in_ready) begin
        wi_busy_q <= !is_tail(wi_in_flit.ftype);
        wi_l2_q   <= wi_to_l2;
      end
    end
  end

endmodule
