// tb_hub_control: self-checking test of the hub control module.
// Checks the reset links, the worked example of dynamic mapping (links
// 1,2,4 and new instruction 2,7,1: only one slot relinks), priorities by
// instruction order, relinking held back while Available_i is low and
// taking effect in the cycle it rises, and then random instructions and
// random Available_i against a reference model of the allocator.
module tb_hub_control;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_valid;
  logic [11:0] cfg_instr;
  logic [2:0]  avail, relink;
  rtr_id_t     mux_sel [3];
  logic [1:0]  prio [3];
  logic        busy;
  int checks = 0, failures = 0, relinks = 0;

  hub_control dut (.*);

  // reference state
  rtr_id_t m_out [3], m_new [3];
  logic [1:0] m_prio [3], m_new_prio [3];
  logic [2:0] m_pend;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic model_cfg(logic [11:0] ins);
    rtr_id_t r [3];
    logic [2:0] kept;
    int nxt;
    r[0] = ins[11:8]; r[1] = ins[7:4]; r[2] = ins[3:0];
    kept = '0;
    for (int i = 0; i < 3; i++) begin
      m_new[i] = m_out[i];
      for (int j = 0; j < 3; j++) if (m_out[i] == r[j]) begin kept[i] = 1; m_new_prio[i] = 2'(j); end
    end
    nxt = 0;
    for (int j = 0; j < 3; j++) begin
      if (!(r[j] == m_out[0] || r[j] == m_out[1] || r[j] == m_out[2])) begin
        while (kept[nxt]) nxt++;
        m_new[nxt] = r[j]; m_new_prio[nxt] = 2'(j); kept[nxt] = 1;
      end
    end
    for (int i = 0; i < 3; i++) begin
      m_pend[i] = (m_new[i] != m_out[i]);
      if (!m_pend[i]) m_prio[i] = m_new_prio[i];
    end
  endtask

  task automatic send(logic [11:0] ins);
    cfg_instr = ins; cfg_valid = 1;
    @(posedge clk); model_cfg(ins);
    @(negedge clk); cfg_valid = 0;
  endtask

  task automatic compare(string what);
    for (int i = 0; i < 3; i++) begin
      check(mux_sel[i] == ((m_pend[i] && avail[i]) ? m_new[i] : m_out[i]), {what, " sel"});
      check(prio[i] == ((m_pend[i] && avail[i]) ? m_new_prio[i] : m_prio[i]), {what, " prio"});
    end
    check(busy == (m_pend != 0), {what, " busy"});
  endtask

  task automatic step_model;
    for (int i = 0; i < 3; i++)
      if (m_pend[i] && avail[i]) begin
        m_out[i] = m_new[i]; m_prio[i] = m_new_prio[i]; m_pend[i] = 0;
      end
  endtask

  always @(posedge clk) if (rst_n) relinks += $countones(relink);

  initial begin
    cfg_valid = 0; cfg_instr = '0; avail = 3'b111;
    m_out[0] = 5; m_out[1] = 6; m_out[2] = 9;
    m_prio[0] = 0; m_prio[1] = 1; m_prio[2] = 2; m_pend = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; @(negedge clk);
    check(mux_sel[0] == 5 && mux_sel[1] == 6 && mux_sel[2] == 9 && !busy, "reset links");
    // link R1, R2, R4
    send(12'h124);
    @(negedge clk); step_model;
    check(mux_sel[0] == 1 && mux_sel[1] == 2 && mux_sel[2] == 4, "links 1,2,4");
    // worked example: new 2,7,1 with slot 2 not yet available
    avail = 3'b011;
    relinks = 0;
    send(12'h271);
    compare("example pending");
    check(mux_sel[2] == 4 && busy, "slot 2 waits for Available");
    check(prio[0] == 2 && prio[1] == 0, "kept slots re-ranked");
    repeat (3) @(negedge clk);
    check(mux_sel[2] == 4 && busy && relinks == 0, "still waiting");
    avail = 3'b111; #1;
    check(mux_sel[2] == 7 && relink == 3'b100, "relinks in the cycle Available rises");
    @(negedge clk); step_model;
    check(mux_sel[0] == 1 && mux_sel[1] == 2 && mux_sel[2] == 7 && prio[2] == 1, "example result");
    check(relinks == 1, "only one MUX relinked");
    // random
    for (int t = 0; t < 400; t++) begin
      rtr_id_t a, b, c;
      a = 4'($urandom); do b = 4'($urandom); while (b == a);
      do c = 4'($urandom); while (c == a || c == b);
      avail = 3'($urandom);
      send({a, b, c});
      for (int k = 0; k < 4; k++) begin
        avail = 3'($urandom); #1;
        compare("random");
        @(negedge clk); step_model;
      end
    end
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
