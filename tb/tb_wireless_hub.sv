// tb_wireless_hub: self-checking test of one reconfigurable wireless hub
// (subnet 0). Directed part: a packet from each connected router leaves on
// the transmitter of its destination subnet; two routers contending for
// one transmitter are served by rank; an unconnected router is held off; a
// received packet reaches its destination router, or the nearest connected
// router; a relink is deferred while a packet is half-way through the slot
// and happens as soon as its tail has entered the buffer.
// Random part: all routers and receivers send packets while the hub is
// reconfigured every 150 cycles; every flit must arrive exactly once, in
// order, with packets never interleaved on a transmitter or a router port.
module tb_wireless_hub;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t       rtr_in_flit [16], rtr_out_flit [16], tx_flit [3], rx_flit [3];
  logic [15:0] rtr_in_valid, rtr_in_ready, rtr_out_valid, rtr_out_ready, wi_sel;
  logic [2:0]  tx_valid, tx_ready, rx_valid, rx_ready, relink, tx_contend, avail;
  logic        cfg_valid, busy;
  logic [11:0] cfg_instr;
  rtr_id_t     mux_sel [3];
  int checks = 0, failures = 0;
  int n_contend = 0, n_relink = 0, n_deferred = 0, n_nearest = 0;

  wireless_hub #(.HUB_ID(2'd0), .BUF_DEPTH(4)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(int pos, node_id_t d, node_id_t s, int seq);
    flit_t f;
    f.ftype = (pos == 0) ? FLIT_HEAD : (pos == 3) ? FLIT_TAIL : FLIT_BODY;
    f.dst = d; f.src = s; f.data = 32'(seq);
    return f;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n_relink += $countones(relink);
    n_contend += $countones(tx_contend);
    if (busy && (avail != 3'b111)) n_deferred++;
  end

  task automatic idle_inputs;
    rtr_in_valid = '0; rtr_out_ready = '0; tx_ready = '0; rx_valid = '0; cfg_valid = 0;
    for (int r = 0; r < 16; r++) rtr_in_flit[r] = '0;
    for (int k = 0; k < 3; k++) rx_flit[k] = '0;
  endtask

  // ---------------- random phase state ----------------
  int src_pos [16], src_seq [16];
  node_id_t src_dst [16];
  int rx_pos [3], rx_seq [3];
  node_id_t rx_dst [3];
  int tx_open [3];          // source router of the packet open on transmitter k, -1 none
  int exp_seq [16];         // next flit expected on transmitter k inside a packet
  int out_open [16];        // receiver whose packet is open on router port r, -1 none
  int exp_rx [3];
  int exp_port [16];        // next flit expected on router port r inside a packet
  int sent_f = 0, got_f = 0, rsent_f = 0, rgot_f = 0;
  logic gen;

  initial begin
    idle_inputs();
    cfg_instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(wi_sel == 16'b0000_0010_0110_0000, "reset links R5 R6 R9");
    // R5 -> subnet 1 (tx 0), R6 -> subnet 2 (tx 1), R9 -> subnet 3 (tx 2)
    tx_ready = 3'b000;
    for (int p = 0; p < 4; p++) begin
      rtr_in_valid = 16'b0000_0010_0110_0001;
      rtr_in_flit[5] = mk(p, node_of(2'd1, 4'd3), node_of(0, 5), p);
      rtr_in_flit[6] = mk(p, node_of(2'd2, 4'd3), node_of(0, 6), p);
      rtr_in_flit[9] = mk(p, node_of(2'd3, 4'd3), node_of(0, 9), p);
      rtr_in_flit[0] = mk(p, node_of(2'd3, 4'd3), node_of(0, 0), p);
      #1;
      check(rtr_in_ready[5] && rtr_in_ready[6] && rtr_in_ready[9], "connected routers accepted");
      check(!rtr_in_ready[0], "unconnected router held off");
      @(negedge clk);
    end
    rtr_in_valid = '0;
    tx_ready = 3'b111;
    begin
      int seen [3];
      for (int k = 0; k < 3; k++) seen[k] = 0;
      for (int c = 0; c < 8; c++) begin
        #1;
        for (int k = 0; k < 3; k++) if (tx_valid[k]) begin
          check(tx_flit[k].src == node_of(0, k == 0 ? 4'd5 : k == 1 ? 4'd6 : 4'd9), "transmitter by destination subnet");
          check(int'(tx_flit[k].data) == seen[k], "flit order on transmitter");
          seen[k]++;
        end
        @(negedge clk);
      end
      check(seen[0] == 4 && seen[1] == 4 && seen[2] == 4, "three packets sent");
    end
    // contention: R6 (rank 1) and R5 (rank 0) both to subnet 1; R6 starts first cycle together
    tx_ready = '0;
    for (int p = 0; p < 4; p++) begin
      rtr_in_valid = 16'b0000_0000_0110_0000;
      rtr_in_flit[5] = mk(p, node_of(2'd1, 4'd1), node_of(0, 5), 10 + p);
      rtr_in_flit[6] = mk(p, node_of(2'd1, 4'd2), node_of(0, 6), 20 + p);
      @(negedge clk);
    end
    rtr_in_valid = '0;
    tx_ready = 3'b001; #1;
    check(tx_contend[0], "contention flagged");
    check(tx_valid[0] && tx_flit[0].src == node_of(0, 5), "higher rank wins");
    for (int c = 0; c < 8; c++) begin
      #1;
      check(tx_valid[0] && tx_flit[0].src == node_of(0, c < 4 ? 4'd5 : 4'd6), "packets not interleaved");
      @(negedge clk);
    end
    // receive: destination R6 connected, destination R7 not (nearest R6)
    rtr_out_ready = 16'hffff;
    for (int p = 0; p < 4; p++) begin
      rx_valid = 3'b011;
      rx_flit[0] = mk(p, node_of(0, 6), 6'd40, p);
      rx_flit[1] = mk(p, node_of(0, 4'd10), 6'd41, p);
      #1;
      @(negedge clk);
    end
    rx_valid = '0;
    // R10 is nearest to R9 (distance 1)
    // relink deferred while R5 is half-way through a packet
    tx_ready = '0;
    rtr_in_valid = 16'b0000_0000_0010_0000;
    rtr_in_flit[5] = mk(0, node_of(2'd2, 4'd0), node_of(0, 5), 0);
    @(negedge clk);
    rtr_in_flit[5] = mk(1, node_of(2'd2, 4'd0), node_of(0, 5), 1);
    @(negedge clk);
    rtr_in_valid = '0;
    cfg_valid = 1; cfg_instr = {4'd0, 4'd6, 4'd9};
    @(negedge clk); cfg_valid = 0;
    repeat (3) @(negedge clk);
    check(mux_sel[0] == 4'd5 && busy && !avail[0], "relink deferred mid-packet");
    rtr_in_valid = 16'b0000_0000_0010_0000;
    rtr_in_flit[5] = mk(2, node_of(2'd2, 4'd0), node_of(0, 5), 2);
    @(negedge clk);
    rtr_in_flit[5] = mk(3, node_of(2'd2, 4'd0), node_of(0, 5), 3);
    @(negedge clk);
    rtr_in_valid = '0; #1;
    check(mux_sel[0] == 4'd0 && wi_sel[0] && !wi_sel[5], "relinked after the tail");
    @(negedge clk);
    check(mux_sel[0] == 4'd0 && !busy, "relink complete");
    tx_ready = 3'b111;
    repeat (6) @(negedge clk);

    // ---------------- random phase ----------------
    rst_n = 0; idle_inputs(); @(negedge clk); rst_n = 1;
    for (int r = 0; r < 16; r++) begin src_pos[r] = 0; src_seq[r] = 0; exp_seq[r] = 0; out_open[r] = -1; src_dst[r] = '0; end
    for (int k = 0; k < 3; k++) begin rx_pos[k] = 0; rx_seq[k] = 0; tx_open[k] = -1; exp_rx[k] = 0; rx_dst[k] = '0; end
    gen = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      logic [15:0] in_fire, out_fire;
      logic [2:0]  tx_fire, rx_fire;
      flit_t txf [3], outf [16];
      logic [15:0] sel_now;
      @(negedge clk);
      if (cyc == 7000) gen = 0;
      for (int r = 0; r < 16; r++) begin
        if (!rtr_in_valid[r] && (src_pos[r] != 0 || (gen && $urandom_range(0, 3) == 0))) begin
          if (src_pos[r] == 0) src_dst[r] = node_of(2'($urandom_range(1, 3)), 4'($urandom_range(0, 15)));
          rtr_in_flit[r]  = mk(src_pos[r], src_dst[r], node_of(0, 4'(r)), src_seq[r]);
          rtr_in_valid[r] = 1;
        end
      end
      for (int k = 0; k < 3; k++) begin
        if (!rx_valid[k] && (rx_pos[k] != 0 || (gen && $urandom_range(0, 2) == 0))) begin
          if (rx_pos[k] == 0) rx_dst[k] = node_of(2'd0, 4'($urandom_range(0, 15)));
          rx_flit[k]  = mk(rx_pos[k], rx_dst[k], 6'(48 + k), rx_seq[k]);
          rx_valid[k] = 1;
        end
      end
      tx_ready      = 3'($urandom);
      rtr_out_ready = 16'($urandom);
      cfg_valid = (cyc % 150 == 75);
      if (cfg_valid) begin
        rtr_id_t a, b, c;
        a = 4'($urandom); do b = 4'($urandom); while (b == a);
        do c = 4'($urandom); while (c == a || c == b);
        cfg_instr = {a, b, c};
      end
      #1;
      in_fire = rtr_in_valid & rtr_in_ready; out_fire = rtr_out_valid & rtr_out_ready;
      tx_fire = tx_valid & tx_ready;         rx_fire = rx_valid & rx_ready;
      sel_now = wi_sel;
      for (int k = 0; k < 3; k++) txf[k] = tx_flit[k];
      for (int r = 0; r < 16; r++) outf[r] = rtr_out_flit[r];
      for (int k = 0; k < 3; k++) if (tx_fire[k]) begin
        int s;
        s = int'(local_of(txf[k].src));
        check(tx_open[k] < 0 || tx_open[k] == s, "no interleave on transmitter");
        check(tx_index(2'd0, subnet_of(txf[k].dst)) == 2'(k), "right transmitter");
        if (is_head(txf[k].ftype)) check(txf[k].data % 4 == 0, "packet starts with its head");
        else check(int'(txf[k].data) == exp_seq[k], "flit order inside packet");
        exp_seq[k] = int'(txf[k].data) + 1;
        tx_open[k] = is_tail(txf[k].ftype) ? -1 : s;
        got_f++;
      end
      for (int r = 0; r < 16; r++) if (out_fire[r]) begin
        int k;
        k = int'(outf[r].src) - 48;
        check(sel_now[r], "delivered only to a connected router");
        check(out_open[r] < 0 || out_open[r] == k, "no interleave on router port");
        if (is_head(outf[r].ftype)) check(outf[r].data % 4 == 0, "packet starts with its head");
        else check(int'(outf[r].data) == exp_port[r], "flit order inside packet");
        if (is_head(outf[r].ftype) && local_of(outf[r].dst) != 4'(r)) n_nearest++;
        exp_port[r] = int'(outf[r].data) + 1;
        out_open[r] = is_tail(outf[r].ftype) ? -1 : k;
        rgot_f++;
      end
      @(posedge clk); #1;
      for (int r = 0; r < 16; r++) if (in_fire[r]) begin
        rtr_in_valid[r] = 0; src_pos[r] = (src_pos[r] + 1) % 4; src_seq[r]++; sent_f++;
      end
      for (int k = 0; k < 3; k++) if (rx_fire[k]) begin
        rx_valid[k] = 0; rx_pos[k] = (rx_pos[k] + 1) % 4; rx_seq[k]++; rsent_f++;
      end
    end
    check(sent_f == got_f && sent_f > 500, "all router flits transmitted");
    check(rsent_f == rgot_f && rsent_f > 500, "all received flits delivered");
    check(n_contend > 0 && n_relink > 10 && n_deferred > 0 && n_nearest > 0, "mechanisms exercised");
    $display("tx %0d/%0d rx %0d/%0d contend=%0d relink=%0d deferred=%0d nearest=%0d",
             got_f, sent_f, rgot_f, rsent_f, n_contend, n_relink, n_deferred, n_nearest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
