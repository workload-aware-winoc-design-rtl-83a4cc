// tb_traffic_monitor: self-checking test of the per-tile metric sampler.
// Random delivery latencies, forwarded flits and cross-subnet packets are
// applied to all 64 tiles; at the end of every 100-cycle window the 8x8x3
// features must equal a model's sums (latency sum shifted right by four,
// all saturated to 8 bits) and feat_valid must pulse exactly once per
// window.
module tb_traffic_monitor;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_NODES-1:0] pkt_done, flit_fwd, cross_pkt;
  logic [7:0] pkt_lat [NUM_NODES];
  logic [7:0] feat [NUM_NODES][3];
  logic feat_valid;
  int checks = 0, failures = 0, windows = 0, saturations = 0;
  int acc [NUM_NODES][3];

  traffic_monitor #(.WINDOW(100), .DUR_SHIFT(4)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] s8(int v); return (v > 255) ? 8'd255 : 8'(v); endfunction

  initial begin
    pkt_done = '0; flit_fwd = '0; cross_pkt = '0;
    for (int n = 0; n < NUM_NODES; n++) begin
      pkt_lat[n] = '0;
      for (int k = 0; k < 3; k++) acc[n][k] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int w = 0; w < 8; w++) begin
      for (int c = 0; c < 100; c++) begin
        for (int n = 0; n < NUM_NODES; n++) begin
          pkt_done[n]  = (n < 4) || ($urandom_range(0, 7) == 0);
          pkt_lat[n]   = (n < 4) ? 8'd255 : 8'($urandom_range(0, 255));
          flit_fwd[n]  = (n < 8) ? 1'b1 : ($urandom_range(0, 1) == 0);
          cross_pkt[n] = ($urandom_range(0, 5) == 0);
          if (pkt_done[n]) acc[n][0] += pkt_lat[n];
          if (flit_fwd[n]) acc[n][1]++;
          if (cross_pkt[n]) acc[n][2]++;
        end
        @(negedge clk);
        if (c < 99) check(!feat_valid, "no early feat_valid");
      end
      check(feat_valid, "feat_valid at window end");
      windows++;
      for (int n = 0; n < NUM_NODES; n++) begin
        check(feat[n][0] == s8(acc[n][0] >> 4), "packet duration");
        check(feat[n][1] == s8(acc[n][1]), "throughput");
        check(feat[n][2] == s8(acc[n][2]), "cross-subnet frequency");
        if (acc[n][0] >> 4 > 255) saturations++;
        for (int k = 0; k < 3; k++) acc[n][k] = 0;
      end
    end
    check(saturations > 0, "saturation exercised");
    $display("windows=%0d saturations=%0d", windows, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
