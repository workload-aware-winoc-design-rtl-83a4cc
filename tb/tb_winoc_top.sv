// tb_winoc_top: end-to-end test of the reconfiguration fabric at its
// default parameters.
// The network weights are loaded so that the output layer reduces to its
// biases, which makes the chosen links known in advance. The test then
//  - sends packets between subnets over the wireless links: one is ejected
//    on Local2 at its destination, one arrives at the connected router
//    nearest its destination and enters that router's local input buffer,
//    where it has to wait for a half-injected PE packet;
//  - makes two routers contend for one transmitter;
//  - queries the routing units before and after reconfiguration;
//  - reports three packet drops in every subnet, which starts the network;
//    the hubs then relink, subnet 0's changed slot only after a packet that
//    is half-way through it has finished;
//  - sends a packet from a newly connected router over the new links.
// Each mechanism is counted, and one that never happened is a failure.
module tb_winoc_top;
  import winoc_pkg::*;

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

  int checks = 0, failures = 0, cyc = 0;
  int n_l2 = 0, n_fwd = 0, n_wait = 0, n_contend = 0, n_start = 0, n_done = 0;
  int n_relink = 0, n_deferred = 0, n_rc_wi = 0, n_rc_xy = 0, n_rc_port = 0, n_window = 0;
  int t_start = 0, t_done = 0;
  flit_t l2_log [$], lib_log [$];
  int    l2_node [$], lib_node [$];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(int pos, node_id_t d, node_id_t s, int tag);
    flit_t f;
    f.ftype = (pos == 0) ? FLIT_HEAD : (pos == 3) ? FLIT_TAIL : FLIT_BODY;
    f.dst = d; f.src = s; f.data = 32'(tag * 16 + pos);
    return f;
  endfunction

  // sample at the falling edge; a transfer happens at the next rising edge
  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NUM_NODES; n++) begin
      if (l2_valid[n] && l2_ready[n]) begin l2_log.push_back(l2_flit[n]); l2_node.push_back(n); end
      if (lib_valid[n] && lib_ready[n] && lib_flit[n].src != 6'(n)) begin
        lib_log.push_back(lib_flit[n]); lib_node.push_back(n);
      end
    end
    n_wait    += $countones(wi_wait);
    for (int s = 0; s < NUM_SUBNETS; s++) begin
      n_contend += $countones(tx_contend[s]);
      n_relink  += $countones(relink[s]);
    end
    if (hub_busy != 0 && !ann_done) n_deferred++;
    if (reconfig_start) begin n_start++; t_start = cyc; end
    if (ann_done) begin n_done++; t_done = cyc; end
    if (feat_valid) n_window++;
  end
  always @(posedge clk) cyc++;

  task automatic send_pkt(int n, node_id_t d, int tag, int pause_at, int pause);
    @(posedge clk) #1;
    for (int p = 0; p < 4; p++) begin
      if (p == pause_at) repeat (pause) @(posedge clk) #1;
      rtr_wi_flit[n] = mk(p, d, 6'(n), tag);
      rtr_wi_valid[n] = 1'b1;
      do begin @(negedge clk); end while (!rtr_wi_ready[n]);
      @(posedge clk) #1;
      rtr_wi_valid[n] = 1'b0;
    end
  endtask

  task automatic pe_pkt(int n, node_id_t d, int tag, int pause_at, int pause);
    @(posedge clk) #1;
    for (int p = 0; p < 4; p++) begin
      if (p == pause_at) repeat (pause) @(posedge clk) #1;
      pe_flit[n] = mk(p, d, 6'(n), tag);
      pe_valid[n] = 1'b1;
      do begin @(negedge clk); end while (!pe_ready[n]);
      @(posedge clk) #1;
      pe_valid[n] = 1'b0;
    end
  endtask

  function automatic int find_pkt(ref flit_t log [$], input int tag);
    int cnt;
    cnt = 0;
    foreach (log[i]) if (log[i].data[31:4] == 28'(tag)) cnt++;
    return cnt;
  endfunction

  function automatic int pkt_node(ref flit_t log [$], ref int nodes [$], input int tag);
    foreach (log[i]) if (log[i].data[31:4] == 28'(tag)) return nodes[i];
    return -1;
  endfunction

  task automatic query(int n, node_id_t d, logic wired, logic exp_wi, dir_e exp_dir, string what);
    rc_dst[n] = d; rc_wired_only[n] = wired; #1;
    check(rc_use_wi[n] == exp_wi, {what, ": wireless decision"});
    check(rc_dir[n] == exp_dir, {what, ": direction"});
    @(posedge clk) #1;
    if (rc_use_wi[n]) n_rc_wi++; else n_rc_xy++;
    if (rc_dir[n] == DIR_WI) n_rc_port++;
  endtask

  // bias of output neuron s*16+r: the three chosen routers rank first
  function automatic int bias_for(int s, int r);
    int pick [4][3] = '{'{0, 6, 9}, '{5, 6, 9}, '{15, 14, 13}, '{9, 5, 6}};
    for (int k = 0; k < 3; k++) if (pick[s][k] == r) return 3000 - 1000 * k;
    return -1000;
  endfunction

  initial begin
    rtr_wi_valid = '0; pe_valid = '0; lib_ready = '1; l2_ready = '1;
    rc_wired_only = '0; pkt_drop = '0; pkt_done = '0; flit_fwd = '0; cross_pkt = '0;
    w_we = 0; w_addr = '0; w_data = '0;
    for (int n = 0; n < NUM_NODES; n++) begin
      rtr_wi_flit[n] = '0; pe_flit[n] = '0; rc_dst[n] = '0; pkt_lat[n] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // weights: convolution and fully connected weights zero, biases rank the links
    for (int a = 0; a < 128 + 64 * 49; a++) begin
      w_we = 1; w_addr = 12'(a);
      w_data = (a >= 64 && a < 128) ? 16'(bias_for((a - 64) / 16, (a - 64) % 16)) : 16'd0;
      @(posedge clk) #1;
    end
    w_we = 0;
    for (int s = 0; s < NUM_SUBNETS; s++)
      check(wi_sel[node_of(2'(s), 4'd5)] && wi_sel[node_of(2'(s), 4'd6)] && wi_sel[node_of(2'(s), 4'd9)] &&
            $countones(wi_sel) == 12, "reset links");

    // routing queries with the reset links
    query(0, 6'd63, 1'b0, 1'b1, DIR_EAST, "(0,0)->(7,7) takes the wireless path");
    query(9, 6'd63, 1'b0, 1'b1, DIR_WI,   "(1,1)->(7,7) leaves through the WI port");
    query(9, 6'd63, 1'b1, 1'b0, DIR_EAST, "wired class stays wired");
    query(0, 6'd3,  1'b0, 1'b0, DIR_EAST, "intra-subnet is XY");

    // wireless packets: R6 of subnet 0 -> R9 of subnet 2 (Local2),
    // R5 of subnet 0 -> R10 of subnet 3 (nearest connected is R6 of subnet 3,
    // whose PE is half-way through its own packet)
    fork
      send_pkt(node_of(0, 6), node_of(2, 9), 1, 9, 0);
      send_pkt(node_of(0, 5), node_of(3, 10), 2, 9, 0);
      pe_pkt(node_of(3, 6), 6'd0, 3, 2, 40);
    join
    repeat (60) @(posedge clk) #1;
    check(find_pkt(l2_log, 1) == 4 && pkt_node(l2_log, l2_node, 1) == int'(node_of(2, 9)), "Local2 ejection at the destination");
    check(find_pkt(lib_log, 2) == 4 && pkt_node(lib_log, lib_node, 2) == int'(node_of(3, 6)), "delivered to nearest connected router");
    n_l2 = find_pkt(l2_log, 1) / 4;
    n_fwd = find_pkt(lib_log, 2) / 4;

    // contention: R5 and R6 of subnet 0 both to subnet 1
    fork
      send_pkt(node_of(0, 5), node_of(1, 5), 4, 9, 0);
      send_pkt(node_of(0, 6), node_of(1, 6), 5, 9, 0);
    join
    repeat (40) @(posedge clk) #1;
    check(find_pkt(l2_log, 4) == 4 && find_pkt(l2_log, 5) == 4, "both contending packets delivered");

    // traffic events for the monitor
    flit_fwd = '1; cross_pkt = 64'h1; repeat (100) @(posedge clk) #1; flit_fwd = '0; cross_pkt = '0;

    // R5 of subnet 0 stops half-way through a packet, then drops are reported
    fork
      send_pkt(node_of(0, 5), node_of(2, 6), 6, 2, 1200);
      begin
        repeat (10) @(posedge clk) #1;
        for (int k = 0; k < 3; k++) begin
          pkt_drop = '0;
          pkt_drop[node_of(0, 4'(k))] = 1; pkt_drop[node_of(1, 4'(k))] = 1;
          pkt_drop[node_of(2, 4'(k))] = 1; pkt_drop[node_of(3, 4'(k))] = 1;
          @(posedge clk) #1;
        end
        pkt_drop = '0;
        wait (ann_done); @(posedge clk) #1;
        check(instr[0] == 12'h069 && instr[1] == 12'h569 && instr[2] == 12'hfed && instr[3] == 12'h956, "instructions from the network");
        repeat (20) @(posedge clk) #1;
        check(mux_sel[0][0] == 4'd5 && hub_busy[0], "subnet 0 relink waits for the packet");
        check(wi_sel[node_of(2, 15)] && wi_sel[node_of(2, 13)] && !wi_sel[node_of(2, 5)] && !wi_sel[node_of(2, 9)], "subnet 2 slots 0 and 2 relinked");
        check(mux_sel[2][1] == 4'd6, "subnet 2 slot 1 waits: its router is receiving a packet");
      end
    join
    repeat (10) @(posedge clk) #1;
    check(n_start == 1 && n_done == 1, "one reconfiguration");
    check(t_done - t_start == 799, "network run time: start cycle plus 798");
    check(mux_sel[0][0] == 4'd0 && wi_sel[node_of(0, 0)] && !wi_sel[node_of(0, 5)], "subnet 0 relinked after the tail");
    check(mux_sel[2][1] == 4'd14 && !hub_busy[2], "subnet 2 slot 1 relinked after the tail left");
    check(mux_sel[1][0] == 4'd5 && mux_sel[1][1] == 4'd6 && mux_sel[1][2] == 4'd9, "subnet 1 kept its links");
    check(find_pkt(lib_log, 6) + find_pkt(l2_log, 6) == 4, "half-sent packet not lost");

    // routing with the new links: (0,0) is now connected
    query(0, 6'd63, 1'b0, 1'b1, DIR_WI, "(0,0) now leaves through the WI port");
    // new link in use: R0 of subnet 0 -> R13 of subnet 2
    send_pkt(node_of(0, 0), node_of(2, 13), 7, 9, 0);
    repeat (40) @(posedge clk) #1;
    check(find_pkt(l2_log, 7) == 4 && pkt_node(l2_log, l2_node, 7) == int'(node_of(2, 13)), "new link delivers");

    check(n_l2 > 0, "Local2 ejection happened");
    check(n_fwd > 0, "forward to nearest router happened");
    check(n_wait > 0, "WI wait for PE tail happened");
    check(n_contend > 0, "transmitter contention happened");
    check(n_start > 0 && n_done > 0, "reconfiguration happened");
    check(n_relink >= 4, "relinks happened");
    check(n_deferred > 0, "deferred relink happened");
    check(n_rc_wi > 0 && n_rc_xy > 0 && n_rc_port > 0, "routing decisions happened");
    check(n_window > 0, "monitor windows happened");
    $display("l2=%0d fwd=%0d wait=%0d contend=%0d start=%0d done=%0d relink=%0d deferred=%0d rc_wi=%0d rc_xy=%0d rc_port=%0d windows=%0d",
             n_l2, n_fwd, n_wait, n_contend, n_start, n_done, n_relink, n_deferred, n_rc_wi, n_rc_xy, n_rc_port, n_window);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
