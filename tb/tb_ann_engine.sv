// tb_ann_engine: self-checking test of the neural network engine.
// Loads random weights through the write port, applies random 8x8x3
// features, runs the network and compares all 64 probabilities and the
// four 12-bit instructions with a reference computed here in plain integer
// arithmetic (convolution with ReLU, shift and saturation; fully connected
// layer; hard sigmoid; three largest per subnet, lower index on a tie).
// It also checks the run time: 13 + 784 + 1 cycles from start to done.
module tb_ann_engine;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  feat [NUM_NODES][3];
  logic        start, w_we, busy, done;
  logic [11:0] w_addr;
  logic [15:0] w_data;
  logic [11:0] instr [NUM_SUBNETS];
  logic [7:0]  prob [NUM_NODES];
  int checks = 0, failures = 0, ties = 0;

  ann_engine #(.CONV_SHIFT(2), .SIG_SHIFT(6)) dut (.*);

  int kw [12], kb, fb [64], fw [64][49];
  int conv [49], ep [64];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); w_we = 1; w_addr = 12'(a); w_data = 16'(d);
    @(posedge clk); #1; w_we = 0;
  endtask

  task automatic reference;
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++) begin
        int s;
        s = kb;
        for (int dy = 0; dy < 2; dy++)
          for (int dx = 0; dx < 2; dx++)
            for (int ch = 0; ch < 3; ch++)
              s += int'(feat[(r + dy) * 8 + c + dx][ch]) * kw[(dy * 2 + dx) * 3 + ch];
        s = (s < 0) ? 0 : (s >>> 2);
        conv[r * 7 + c] = (s > 255) ? 255 : s;
      end
    for (int n = 0; n < 64; n++) begin
      int a;
      a = fb[n];
      for (int j = 0; j < 49; j++) a += conv[j] * fw[n][j];
      a = (a >>> 6) + 128;
      ep[n] = (a < 0) ? 0 : (a > 255) ? 255 : a;
    end
  endtask

  function automatic logic [11:0] best3(int s);
    int pick [3];
    logic [15:0] used;
    used = '0;
    for (int k = 0; k < 3; k++) begin
      int bv;
      bv = -1; pick[k] = 0;
      for (int i = 0; i < 16; i++)
        if (!used[i] && ep[s * 16 + i] > bv) begin bv = ep[s * 16 + i]; pick[k] = i; end
      used[pick[k]] = 1;
    end
    return {4'(pick[0]), 4'(pick[1]), 4'(pick[2])};
  endfunction

  initial begin
    start = 0; w_we = 0; w_addr = 0; w_data = 0;
    for (int n = 0; n < NUM_NODES; n++) for (int c = 0; c < 3; c++) feat[n][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int t0, t1;
      for (int i = 0; i < 12; i++) begin kw[i] = $urandom_range(0, 8) - 4; wr(i, kw[i]); end
      kb = $urandom_range(0, 200) - 100; wr(12, kb);
      for (int n = 0; n < 64; n++) begin fb[n] = $urandom_range(0, 4000) - 2000; wr(64 + n, fb[n]); end
      for (int n = 0; n < 64; n++)
        for (int j = 0; j < 49; j++) begin
          fw[n][j] = $urandom_range(0, 16) - 8;
          wr(128 + n * 49 + j, fw[n][j]);
        end
      @(negedge clk);
      for (int n = 0; n < NUM_NODES; n++)
        for (int c = 0; c < 3; c++) feat[n][c] = 8'($urandom_range(0, 255));
      if (run == 2) for (int n = 0; n < NUM_NODES; n++) feat[n][0] = 8'd0;
      reference();
      start = 1;
      @(posedge clk); t0 = $time / 10; #1; start = 0;
      check(busy, "busy after start");
      // change the inputs while busy: the engine must use its snapshot
      for (int n = 0; n < NUM_NODES; n++) feat[n][1] = 8'd0;
      while (!done) @(posedge clk) #1;
      t1 = $time / 10;
      check(t1 - t0 == 798, "run time 798 cycles");
      check(!busy, "idle when done");
      for (int n = 0; n < 64; n++) check(prob[n] == 8'(ep[n]), "probability");
      for (int s = 0; s < 4; s++) begin
        check(instr[s] == best3(s), "instruction");
        for (int i = 0; i < 16; i++) for (int k = i + 1; k < 16; k++)
          if (ep[s * 16 + i] == ep[s * 16 + k]) ties++;
      end
      $display("run %0d: instr %h %h %h %h, %0d cycles", run, instr[0], instr[1], instr[2], instr[3], t1 - t0);
    end
    check(ties > 0, "equal probabilities exercised");
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
