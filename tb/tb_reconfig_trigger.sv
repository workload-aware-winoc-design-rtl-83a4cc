// tb_reconfig_trigger: self-checking test of reconfiguration activation.
// Random drop pulses (several per cycle, from any router) are counted per
// subnet against a model; start must pulse exactly when all four subnet
// counters have reached three, never while hold is high, and the counters
// must then clear. A directed part checks that three drops in only three
// subnets do not start a reconfiguration.
module tb_reconfig_trigger;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_NODES-1:0] drop;
  logic hold, start;
  logic [7:0] count [NUM_SUBNETS];
  int checks = 0, failures = 0, starts = 0, held = 0;
  int m [NUM_SUBNETS];

  reconfig_trigger #(.THRESHOLD(3)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int sub(int n); return (n / 32) * 2 + (n % 8) / 4; endfunction

  task automatic tick_model;
    logic all3;
    int inc [NUM_SUBNETS];
    all3 = 1;
    for (int s = 0; s < NUM_SUBNETS; s++) begin inc[s] = 0; if (m[s] < 3) all3 = 0; end
    for (int n = 0; n < NUM_NODES; n++) if (drop[n]) inc[sub(n)]++;
    check(start == (all3 && !hold), "start");
    if (all3 && hold) held++;
    if (start) starts++;
    for (int s = 0; s < NUM_SUBNETS; s++) begin
      check(count[s] == 8'(m[s]), "count");
      m[s] = (all3 && !hold) ? inc[s] : ((m[s] + inc[s] > 255) ? 255 : m[s] + inc[s]);
    end
  endtask

  initial begin
    drop = '0; hold = 0;
    for (int s = 0; s < NUM_SUBNETS; s++) m[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // three drops in subnets 0..2 only: no start
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      drop = '0; drop[0] = 1; drop[4] = 1; drop[32] = 1; #1;
      tick_model;
    end
    @(negedge clk); drop = '0; #1;
    check(!start, "no start while one subnet is below threshold");
    tick_model;
    // the fourth subnet reaches three
    @(negedge clk); drop = '0; drop[63] = 1; drop[60] = 1; drop[36] = 1; #1; tick_model;
    @(negedge clk); drop = '0; #1;
    check(start, "start once all subnets reach three");
    tick_model;
    @(negedge clk); drop = '0; #1;
    check(!start && count[0] == 0, "counters cleared");
    tick_model;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      drop = '0;
      if ($urandom_range(0, 3) == 0) drop[$urandom_range(0, 63)] = 1'b1;
      if ($urandom_range(0, 9) == 0) drop[$urandom_range(0, 63)] = 1'b1;
      hold = ($urandom_range(0, 9) < 3);
      #1;
      tick_model;
    end
    check(starts > 5 && held > 0, "starts and holds seen");
    $display("starts=%0d held=%0d", starts, held);
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
