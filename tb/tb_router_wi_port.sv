// tb_router_wi_port: self-checking test of the router's wireless additions.
// A WI source sends four-flit packets, some for this router and some for
// other routers, while the PE injects its own packets; all sinks stall at
// random. Checks: packets for this router leave on Local2 and only there;
// the others enter the local input buffer; packets in that buffer never
// interleave; every flit arrives once and in order; a WI packet waits
// while a PE packet is half-written (counted); Output_port_WI passes only
// while wi_sel is high.
module tb_router_wi_port;
  import winoc_pkg::*;

  localparam node_id_t ME = 6'd27;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  wi_sel;
  flit_t wi_in_flit, l2_flit, pe_flit, lib_flit, rtr_wi_flit, hub_flit;
  logic  wi_in_valid, wi_in_ready, l2_valid, l2_ready, pe_valid, pe_ready;
  logic  lib_valid, lib_ready, rtr_wi_valid, rtr_wi_ready, hub_valid, hub_ready, wi_wait;
  int checks = 0, failures = 0;

  router_wi_port #(.NODE_ID(ME)) dut (.*);

  int wi_n = 0, pe_n = 0;           // flits sent
  node_id_t wi_dst;
  int exp_l2 = 0, exp_wi_lib = 0, exp_pe = 0;  // next expected sequence numbers
  flit_t l2_q[$], wlib_q[$];
  int lib_owner = -1;               // 0 PE, 1 WI, -1 none
  int waits = 0, n_l2 = 0, n_fwd = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(int n, node_id_t d, int src);
    flit_t f;
    f.ftype = (n % 4 == 0) ? FLIT_HEAD : (n % 4 == 3) ? FLIT_TAIL : FLIT_BODY;
    f.dst = d; f.src = 6'(src); f.data = 32'(n);
    return f;
  endfunction

  initial begin
    wi_sel = 0; wi_in_valid = 0; pe_valid = 0; l2_ready = 0; lib_ready = 0;
    rtr_wi_valid = 0; hub_ready = 0; wi_in_flit = '0; pe_flit = '0; rtr_wi_flit = '0;
    wi_dst = ME;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Output_port_WI gating
    @(negedge clk);
    rtr_wi_valid = 1; hub_ready = 1; rtr_wi_flit = mk(0, 6'd1, 1); #1;
    check(!hub_valid && !rtr_wi_ready, "WI output blocked when not selected");
    wi_sel = 1; #1;
    check(hub_valid && rtr_wi_ready && hub_flit == rtr_wi_flit, "WI output passes when selected");
    rtr_wi_valid = 0;
    // directed: PE packet half-written, then a WI packet for another router
    lib_ready = 1; l2_ready = 1;
    pe_valid = 1; pe_flit = mk(0, 6'd5, 0);
    @(posedge clk) #1; pe_flit = mk(1, 6'd5, 0);
    @(posedge clk) #1; pe_valid = 0;
    wi_in_valid = 1; wi_in_flit = mk(0, 6'd30, 2); #1;
    check(wi_wait && !wi_in_ready, "WI waits for the PE tail");
    pe_valid = 1; pe_flit = mk(2, 6'd5, 0);
    @(posedge clk) #1; pe_flit = mk(3, 6'd5, 0); #1;
    check(pe_ready && lib_flit == mk(3, 6'd5, 0), "PE finishes its packet");
    @(posedge clk) #1; pe_valid = 1; pe_flit = mk(4, 6'd5, 0); #1;
    check(wi_in_ready && lib_flit == mk(0, 6'd30, 2) && !pe_ready, "WI takes the buffer at the boundary");
    // let reset clear the directed traffic
    wi_in_valid = 0; pe_valid = 0;
    rst_n = 0; @(posedge clk) #1; rst_n = 1;
    pe_n = 0;
    // random traffic
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic wf, pf, lf, l2f;
      flit_t lfl, l2fl;
      @(negedge clk);
      if (!wi_in_valid) begin
        if (wi_n % 4 == 0) wi_dst = ($urandom_range(0, 1) == 0) ? ME : 6'($urandom_range(0, 63));
        wi_in_valid = ($urandom_range(0, 2) != 0);
        wi_in_flit  = mk(wi_n, wi_dst, 2);
      end
      if (!pe_valid) begin
        pe_valid = ($urandom_range(0, 2) != 0);
        pe_flit  = mk(pe_n, 6'd9, 0);
      end
      lib_ready = ($urandom_range(0, 3) != 0);
      l2_ready  = ($urandom_range(0, 3) != 0);
      #1;
      if (wi_wait) waits++;
      wf = wi_in_valid && wi_in_ready; pf = pe_valid && pe_ready;
      lf = lib_valid && lib_ready;     l2f = l2_valid && l2_ready;
      lfl = lib_flit; l2fl = l2_flit;
      if (wf) begin
        if (wi_in_flit.dst == ME) l2_q.push_back(wi_in_flit);
        else                      wlib_q.push_back(wi_in_flit);
      end
      if (l2f) begin
        check(l2_q.size() > 0 && l2fl == l2_q[0] && l2fl.dst == ME, "Local2 flit");
        if (l2_q.size() > 0) void'(l2_q.pop_front());
        if (is_tail(l2fl.ftype)) n_l2++;
      end
      if (lf) begin
        if (lfl.src == 6'd2) begin
          check(lib_owner != 0, "no interleave (WI inside PE packet)");
          check(wlib_q.size() > 0 && lfl == wlib_q[0], "WI flit into local buffer");
          if (wlib_q.size() > 0) void'(wlib_q.pop_front());
          lib_owner = is_tail(lfl.ftype) ? -1 : 1;
          if (is_tail(lfl.ftype)) n_fwd++;
        end else begin
          check(lib_owner != 1, "no interleave (PE inside WI packet)");
          check(int'(lfl.data) == exp_pe, "PE flit order");
          exp_pe++;
          lib_owner = is_tail(lfl.ftype) ? -1 : 0;
        end
      end
      @(posedge clk); #1;
      if (wf) begin wi_n++; wi_in_valid = 0; end
      if (pf) begin pe_n++; pe_valid = 0; end
    end
    check(waits > 0 && n_l2 > 20 && n_fwd > 20, "all paths exercised");
    $display("waits=%0d local2=%0d forwarded=%0d pe=%0d", waits, n_l2, n_fwd, exp_pe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
