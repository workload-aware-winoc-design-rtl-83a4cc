// tb_wi_link: self-checking test of the wireless link model.
// Sends numbered flits with random gaps while the receiver stalls at
// random; checks that nothing is lost, duplicated or reordered, that a flit
// sent into an idle link appears LATENCY+1 cycles later (two cycles in the
// air, one in the receive buffer) and that a stalled receiver stops the
// transmitter once RX_DEPTH flits are on their way.
module tb_wi_link;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t tx_flit, rx_flit;
  logic  tx_valid, tx_ready, rx_valid, rx_ready;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, cyc = 0, t_sent = 0;

  wi_link #(.LATENCY(2), .RX_DEPTH(4)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) cyc++;

  initial begin
    tx_valid = 0; rx_ready = 0; tx_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency on an idle link
    @(negedge clk);
    tx_flit.data = 32'hcafe0000; tx_flit.ftype = FLIT_HEADTAIL; tx_valid = 1;
    @(posedge clk); t_sent = cyc; #1; tx_valid = 0;
    while (!rx_valid) @(posedge clk) #1;
    check(cyc - t_sent == 3, "latency LATENCY+1");
    check(rx_flit.data == 32'hcafe0000, "latency flit");
    rx_ready = 1; @(posedge clk) #1; rx_ready = 0;
    // back-pressure: receiver stalled
    tx_valid = 1;
    for (int k = 0; k < 8; k++) begin
      tx_flit.data = 32'(k);
      @(posedge clk); if (tx_ready) sent++; #1;
    end
    check(sent == 4, "transmitter stops at RX_DEPTH");
    tx_valid = 0;
    for (int k = 0; k < 4; k++) begin
      rx_ready = 1; #1;
      check(rx_valid && rx_flit.data == 32'(k), "stalled flits kept");
      @(posedge clk) #1;
    end
    rx_ready = 0;
    sent = 0; got = 0;
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      logic tx_fire, rx_fire;
      @(negedge clk);
      tx_valid = ($urandom_range(0, 2) != 0);
      tx_flit.data = 32'(sent + 1000);
      rx_ready = ($urandom_range(0, 2) != 0);
      #1;
      tx_fire = tx_valid && tx_ready;
      rx_fire = rx_valid && rx_ready;
      if (rx_fire) check(rx_flit.data == 32'(got + 1000), "order");
      @(posedge clk);
      if (tx_fire) sent++;
      if (rx_fire) got++;
    end
    tx_valid = 0; rx_ready = 1;
    repeat (10) @(posedge clk);
    check(sent > 1000, "throughput");
    $display("sent=%0d got=%0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
