// tb_winoc_traffic: runs the synthetic traffic mixes Mix1, Mix2, Mix3 and
// Random through the wireless fabric at its default parameters.
//
// The wired mesh around the fabric is a behavioural model in this file: a
// wired leg of a packet simply takes one cycle per hop, without contention.
// Everything on the wireless path is the real design: every processing
// element creates packets at INJ_PER_MIL packets per thousand cycles, to a
// destination given by the current pattern:
//   Transpose1  (x, y) -> (7 - y, 7 - x)
//   Transpose2  (x, y) -> (y, x)
//   Ulocal      uniform random destination (the model does not define a
//               separate long-distance mix)
//   Random      uniform random destination
// Mix1 alternates Transpose1/Transpose2 every PHASE cycles, Mix2
// Transpose1/Ulocal, Mix3 Transpose1/Transpose2/Ulocal, for RUN cycles each.
// For each new packet the routing unit of the source is asked whether to
// use the wireless path, and the answer is compared with this file's own
// evaluation of the distance rule on the live hub links. A wireless packet
// walks to the nearest linked router and is offered there, flit by flit, at
// Output_port_WI. If that router was unlinked meanwhile, it walks on to the
// nearest router that is still linked. A head flit that waits DROP_WAIT cycles
// at a linked router reports a packet drop (the packet is kept), so the
// drop counters, the network and the hub relinking all run under load. The
// network weights are random, so the chosen links follow the traffic
// snapshot.
// Checks: every wireless packet arrives exactly once, complete and in
// order, either on Local2 of its destination or in the local buffer of a
// linked router in the destination subnet; every routing decision matches.
// Counted per mix: wireless packets, Local2 and neighbour deliveries, walks
// to a new router after a relink, drops, reconfigurations and relinks.
module tb_winoc_traffic;
  import winoc_pkg::*;

  localparam int RUN         = 21000;
  localparam int PHASE       = 4000;
  localparam int INJ_PER_MIL = 28;
  localparam int DROP_WAIT   = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t       rtr_wi_flit [NUM_NODES], pe_flit [NUM_NODES], lib_flit [NUM_NODES], l2_flit [NUM_NODES];
  logic [63:0] rtr_wi_valid, rtr_wi_ready, pe_valid, pe_ready, lib_valid, lib_ready;
  logic [63:0] l2_valid, l2_ready, wi_sel, rc_wired_only, rc_use_wi;
  node_id_t    rc_dst [NUM_NODES];
  dir_e        rc_dir [NUM_NODES];
  logic [63:0] pkt_drop, pkt_done, flit_fwd, cross_pkt, wi_wait;
  logic [7:0]  pkt_lat [NUM_NODES];
  logic        w_we, reconfig_start, ann_done, reconfig_busy;
  logic [11:0] w_addr;
  logic [15:0] w_data;
  logic [11:0] instr [NUM_SUBNETS];
  rtr_id_t     mux_sel [NUM_SUBNETS][NUM_WI];
  logic [2:0]  relink [NUM_SUBNETS], tx_contend [NUM_SUBNETS];
  logic [3:0]  hub_busy;
  logic        feat_valid;

  winoc_top dut (.*);

  typedef struct {
    int       id;
    node_id_t src;
    node_id_t dst;
    int       born;
    int       ready_t;
  } pkt_t;

  typedef enum int {T1, T2, ULOCAL, RANDOM} pattern_e;

  int checks = 0, failures = 0, cyc = 0;
  pattern_e pattern = T1;
  logic     generating = 1'b0;

  pkt_t q [NUM_NODES][$];
  logic active [NUM_NODES];
  int   sidx [NUM_NODES], wait_cnt [NUM_NODES];
  logic gen_pend [NUM_NODES];
  node_id_t gen_dst [NUM_NODES];
  int   rx_id [2][NUM_NODES], rx_idx [2][NUM_NODES];
  bit   got [int];
  int   born_of [int];
  int   next_id = 0;
  logic [63:0] ev_done, ev_cross, ev_fwd, ev_drop;
  logic [7:0]  ev_lat [NUM_NODES];

  // statistics of the current mix
  int n_wi, n_wired, n_l2, n_lib, n_reroute, n_drop, n_start, n_relink, n_recv, n_mismatch;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic int hops(node_id_t a, node_id_t b);
    return int'(mdist(a, b));
  endfunction

  // nearest linked router of subnet s as seen from node n, lowest router first
  function automatic node_id_t nearest_linked(subnet_id_t s, node_id_t n);
    node_id_t best;
    int       bd;
    best = node_of(s, 4'd0);
    bd   = 99;
    for (int r = 0; r < SUBNET_NODES; r++)
      if (wi_sel[node_of(s, 4'(r))] && hops(node_of(s, 4'(r)), n) < bd) begin
        best = node_of(s, 4'(r));
        bd   = hops(best, n);
      end
    return best;
  endfunction

  function automatic logic model_use_wi(node_id_t c, node_id_t d);
    node_id_t ws, wd;
    if (subnet_of(c) == subnet_of(d)) return 1'b0;
    ws = nearest_linked(subnet_of(c), c);
    wd = nearest_linked(subnet_of(d), d);
    return hops(c, d) > hops(c, ws) + hops(wd, d) + 2;
  endfunction

  function automatic node_id_t pick_dst(node_id_t s);
    logic [2:0] x, y;
    x = s[2:0];
    y = s[5:3];
    case (pattern)
      T1:      return {3'(7 - x), 3'(7 - y)};
      T2:      return {x, y};
      default: return 6'($urandom_range(0, NUM_NODES - 1));
    endcase
  endfunction

  function automatic flit_t mk(pkt_t p, int pos);
    flit_t f;
    f.ftype = (pos == 0) ? FLIT_HEAD : (pos == 3) ? FLIT_TAIL : FLIT_BODY;
    f.dst   = p.dst;
    f.src   = p.src;
    f.data  = 32'(p.id * 4 + pos);
    return f;
  endfunction

  always @(posedge clk) cyc++;

  // drive: just after the rising edge
  always @(posedge clk) if (rst_n) begin
    #1;
    pkt_done = ev_done; cross_pkt = ev_cross; flit_fwd = ev_fwd; pkt_drop = ev_drop;
    for (int n = 0; n < NUM_NODES; n++) pkt_lat[n] = ev_lat[n];
    ev_done = '0; ev_cross = '0; ev_fwd = '0; ev_drop = '0;
    for (int n = 0; n < NUM_NODES; n++) begin
      // new packet of this PE
      gen_pend[n] = 1'b0;
      if (generating && $urandom_range(0, 999) < INJ_PER_MIL) begin
        gen_dst[n] = pick_dst(6'(n));
        if (gen_dst[n] != 6'(n)) begin
          gen_pend[n] = 1'b1;
          rc_dst[n]   = gen_dst[n];
        end
      end
      // a head not yet taken at a router that lost its link walks on
      if (active[n] && sidx[n] == 0 && !wi_sel[n]) active[n] = 1'b0;
      if (!active[n] && q[n].size() > 0 && q[n][0].ready_t <= cyc) begin
        if (wi_sel[n]) begin
          active[n]   = 1'b1;
          sidx[n]     = 0;
          wait_cnt[n] = 0;
        end else begin
          pkt_t     p;
          node_id_t w;
          p = q[n].pop_front();
          w = nearest_linked(subnet_of(6'(n)), 6'(n));
          p.ready_t = cyc + hops(6'(n), w);
          q[w].push_back(p);
          n_reroute++;
        end
      end
      rtr_wi_valid[n] = active[n];
      if (active[n]) rtr_wi_flit[n] = mk(q[n][0], sidx[n]);
    end
  end

  // sample: at the falling edge
  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NUM_NODES; n++) begin
      // routing decision of a new packet
      if (gen_pend[n]) begin
        logic exp_wi;
        exp_wi = model_use_wi(6'(n), gen_dst[n]);
        check(rc_use_wi[n] == exp_wi, "routing decision");
        if (rc_use_wi[n] != exp_wi) n_mismatch++;
        if (subnet_of(6'(n)) != subnet_of(gen_dst[n])) ev_cross[n] = 1'b1;
        if (exp_wi) begin
          pkt_t     p;
          node_id_t w;
          w = nearest_linked(subnet_of(6'(n)), 6'(n));
          p.id = next_id++; p.src = 6'(n); p.dst = gen_dst[n]; p.born = cyc;
          born_of[p.id] = cyc;
          p.ready_t = cyc + hops(6'(n), w);
          q[w].push_back(p);
          n_wi++;
        end else begin
          n_wired++;
          ev_done[gen_dst[n]] = 1'b1;
          ev_lat[gen_dst[n]]  = 8'(hops(6'(n), gen_dst[n]));
        end
      end
      // Output_port_WI transfers
      if (rtr_wi_valid[n] && rtr_wi_ready[n]) begin
        sidx[n]++;
        ev_fwd[n] = 1'b1;
        if (sidx[n] == 4) begin
          active[n] = 1'b0;
          void'(q[n].pop_front());
        end
      end else if (rtr_wi_valid[n] && wi_sel[n] && sidx[n] == 0) begin
        wait_cnt[n]++;
        if (wait_cnt[n] == DROP_WAIT) begin ev_drop[n] = 1'b1; n_drop++; end
      end
      // deliveries: port 0 Local2, port 1 local input buffer
      for (int pt = 0; pt < 2; pt++) begin
        flit_t f;
        logic  v;
        f = pt == 0 ? l2_flit[n] : lib_flit[n];
        v = pt == 0 ? l2_valid[n] : lib_valid[n];
        if (v) begin
          ev_fwd[n] = 1'b1;
          if (rx_idx[pt][n] == 0) rx_id[pt][n] = int'(f.data >> 2);
          check(int'(f.data[1:0]) == rx_idx[pt][n] && int'(f.data >> 2) == rx_id[pt][n] &&
                f.ftype == ((rx_idx[pt][n] == 0) ? FLIT_HEAD : (rx_idx[pt][n] == 3) ? FLIT_TAIL : FLIT_BODY),
                "flit order inside a packet");
          rx_idx[pt][n]++;
          if (rx_idx[pt][n] == 4) begin
            rx_idx[pt][n] = 0;
            if (pt == 0) begin
              check(f.dst == 6'(n), "Local2 only for the destination");
              n_l2++;
            end else begin
              check(subnet_of(f.dst) == subnet_of(6'(n)) && f.dst != 6'(n), "neighbour delivery in the destination subnet");
              n_lib++;
            end
            check(!got.exists(rx_id[pt][n]), "packet delivered once");
            got[rx_id[pt][n]] = 1'b1;
            n_recv++;
            ev_done[f.dst] = 1'b1;
            ev_lat[f.dst]  = 8'((cyc - born_of[rx_id[pt][n]] + hops(6'(n), f.dst) > 255) ? 255 :
                                 (cyc - born_of[rx_id[pt][n]] + hops(6'(n), f.dst)));
          end
        end
      end
    end
    for (int s = 0; s < NUM_SUBNETS; s++) n_relink += $countones(relink[s]);
    if (reconfig_start) n_start++;
  end

  function automatic int queued();
    int c;
    c = 0;
    for (int n = 0; n < NUM_NODES; n++) c += q[n].size();
    return c;
  endfunction

  task automatic run_mix(string name, pattern_e a, pattern_e b, pattern_e c, int nph);
    int first_id, wait_c;
    n_wi = 0; n_wired = 0; n_l2 = 0; n_lib = 0; n_reroute = 0; n_drop = 0;
    n_start = 0; n_relink = 0; n_recv = 0; n_mismatch = 0;
    first_id = next_id;
    generating = 1'b1;
    for (int t = 0; t < RUN; t++) begin
      int ph;
      ph = (t / PHASE) % nph;
      pattern = ph == 0 ? a : ph == 1 ? b : c;
      @(posedge clk);
    end
    generating = 1'b0;
    wait_c = 0;
    while ((queued() > 0 || n_recv < n_wi) && wait_c < 20000) begin
      @(posedge clk);
      wait_c++;
    end
    for (int i = first_id; i < next_id; i++) check(got.exists(i), "every wireless packet arrives");
    check(n_wi > 0, "wireless packets were sent");
    check(n_start > 0, "a reconfiguration ran");
    check(n_relink > 0, "hubs relinked");
    $display("%s: wireless=%0d wired=%0d local2=%0d neighbour=%0d rerouted=%0d drops=%0d reconfigs=%0d relinks=%0d decision_mismatch=%0d drain=%0d",
             name, n_wi, n_wired, n_l2, n_lib, n_reroute, n_drop, n_start, n_relink, n_mismatch, wait_c);
  endtask

  initial begin
    rtr_wi_valid = '0; pe_valid = '0; lib_ready = '1; l2_ready = '1;
    rc_wired_only = '0; pkt_drop = '0; pkt_done = '0; flit_fwd = '0; cross_pkt = '0;
    ev_done = '0; ev_cross = '0; ev_fwd = '0; ev_drop = '0;
    w_we = 0; w_addr = '0; w_data = '0;
    for (int n = 0; n < NUM_NODES; n++) begin
      rtr_wi_flit[n] = '0; pe_flit[n] = '0; rc_dst[n] = '0; pkt_lat[n] = '0; ev_lat[n] = '0;
      active[n] = 0; sidx[n] = 0; wait_cnt[n] = 0; gen_pend[n] = 0; gen_dst[n] = '0;
      for (int pt = 0; pt < 2; pt++) begin rx_id[pt][n] = 0; rx_idx[pt][n] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // random weights: positive kernel, signed fully connected weights and biases
    for (int a = 0; a < 128 + 64 * 49; a++) begin
      w_we = 1; w_addr = 12'(a);
      if (a < 12)       w_data = 16'($urandom_range(0, 7));
      else if (a < 64)  w_data = 16'd0;
      else if (a < 128) w_data = 16'($signed($urandom_range(0, 1023)) - 512);
      else              w_data = 16'($signed($urandom_range(0, 15)) - 8);
      @(posedge clk) #1;
    end
    w_we = 0;
    @(posedge clk);

    run_mix("Mix1", T1, T2, T2, 2);
    run_mix("Mix2", T1, ULOCAL, ULOCAL, 2);
    run_mix("Mix3", T1, T2, ULOCAL, 3);
    run_mix("Random", RANDOM, RANDOM, RANDOM, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
