// wi_switch: 3x3 crossover switch with priority switch arbitration.
//
// Connects the three MUX slots of a hub to its three transmitters (and, in
// the receive direction, the three receivers to the three Buffer_to_tile
// slots). Switching is wormhole: a head flit asks for the output given in
// in_dest; when several heads want a free output, the input with the lowest
// in_prio value (the router ranked highest by the reconfiguration
// instruction) wins, equal ranks going to the lower input index. The winner
// then holds the output, like a token, until its tail flit has passed; only
// then can another packet start on that transmitter.
// Interface: valid/ready on every input and output, flits pass
// combinationally in the cycle the output is ready. Priority arbitration and
// holding the channel until the whole packet is sent follow the document;
// the tie rule and the combinational pass-through are this design's choices.
module wi_switch
  import winoc_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             in_flit  [N],
  input  logic [N-1:0]      in_valid,
  output logic [N-1:0]      in_ready,
  input  logic [1:0]        in_dest  [N],
  input  logic [1:0]        in_prio  [N],
  output flit_t             out_flit [N],
  output logic [N-1:0]      out_valid,
  input  logic [N-1:0]      out_ready,
  output logic [N-1:0]      contend        // more than one head wanted a free output
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  lock_q;
  logic [IW-1:0] owner_q [N];
  logic [N-1:0]  sel_v;
  logic [IW-1:0] sel   [N];

  always_comb begin
    logic [1:0] best;
    int unsigned nreq;
    in_ready = '0;
    for (int o = 0; o < N; o++) begin
      sel_v[o]    = 1'b0;
      sel[o]      = '0;
      best        = 2'd3;
      nreq        = 0;
      contend[o]  = 1'b0;
      if (lock_q[o]) begin
        sel_v[o] = 1'b1;
        sel[o]   = owner_q[o];
      end else begin
        for (int i = 0; i < N; i++) begin
          if (in_valid[i] && is_head(in_flit[i].ftype) && (in_dest[i] == 2'(o))) begin
            nreq++;
            if (!sel_v[o] || (in_prio[i] < best)) begin
              sel_v[o] = 1'b1;
              sel[o]   = IW'(i);
              best     = in_prio[i];
            end
          end
        end
        contend[o] = (nreq > 1);
      end
      out_flit[o]  = in_flit[sel[o]];
      out_valid[o] = sel_v[o] && in_valid[sel[o]];
      if (sel_v[o]) in_ready[sel[o]] = out_ready[o];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q <= '0;
      for (int o = 0; o < N; o++) owner_q[o] <= '0;
    end else begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          if (is_tail(out_flit[o].ftype)) begin
            lock_q[o] <= 1'b0;
          end else begin
            lock_q[o]  <= 1'b1;
            owner_q[o] <= sel[o];
          end
        end
      end
    end
  end

endmodule
