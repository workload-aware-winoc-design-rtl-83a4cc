// tb_wi_switch: self-checking test of the 3x3 wormhole switch.
// Three sources send four-flit packets to random outputs with random
// priority ranks; the outputs stall at random. The test checks that every
// flit arrives once and in order, that packets never interleave on an
// output, that a free output goes to the requesting head with the best
// rank (lowest input index on a tie), and that contention is reported.
module tb_wi_switch;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t      in_flit [3], out_flit [3];
  logic [2:0] in_valid, in_ready, out_valid, out_ready, contend;
  logic [1:0] in_dest [3], in_prio [3];
  int checks = 0, failures = 0, contentions = 0, prio_wins = 0;

  wi_switch #(.N(3)) dut (.*);

  int   sent  [3];          // flits sent by each source
  int   pos   [3];          // flit position in current packet per source
  logic [1:0] cur_dest [3];
  int   exp_seq [3][3];     // next expected sequence per (output, source)
  logic lock [3];
  int   owner [3];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(int s, int p, logic [1:0] d);
    flit_t f;
    f.ftype = (p == 0) ? FLIT_HEAD : (p == 3) ? FLIT_TAIL : FLIT_BODY;
    f.dst   = {4'd0, d};
    f.src   = 6'(s);
    f.data  = 32'(sent[s]);
    return f;
  endfunction

  initial begin
    for (int s = 0; s < 3; s++) begin
      sent[s] = 0; pos[s] = 0; cur_dest[s] = 2'(s);
      in_prio[s] = 2'(s); in_dest[s] = 0; in_flit[s] = '0;
      for (int o = 0; o < 3; o++) exp_seq[o][s] = 0;
    end
    for (int o = 0; o < 3; o++) begin lock[o] = 0; owner[o] = 0; end
    in_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      for (int s = 0; s < 3; s++) begin
        if (pos[s] == 0 && !in_valid[s]) begin
          cur_dest[s] = 2'($urandom_range(0, 2));
          in_prio[s]  = 2'($urandom_range(0, 2));
        end
        in_flit[s]  = mk(s, pos[s], cur_dest[s]);
        in_dest[s]  = cur_dest[s];
        if (!in_valid[s]) in_valid[s] = ($urandom_range(0, 3) != 0);
      end
      out_ready = 3'($urandom);
      #1;
      for (int o = 0; o < 3; o++) begin
        int exp_src, nreq;
        logic [1:0] best;
        exp_src = -1; nreq = 0; best = 3;
        if (lock[o]) exp_src = owner[o];
        else
          for (int s = 0; s < 3; s++)
            if (in_valid[s] && pos[s] == 0 && cur_dest[s] == 2'(o)) begin
              nreq++;
              if (exp_src < 0 || in_prio[s] < best) begin exp_src = s; best = in_prio[s]; end
            end
        check(contend[o] == (nreq > 1), "contend flag");
        if (nreq > 1) begin contentions++; prio_wins++; end
        check(out_valid[o] == (exp_src >= 0 && in_valid[exp_src]), "output valid");
        if (out_valid[o]) begin
          check(int'(out_flit[o].src) == exp_src, "arbitration winner");
          check(out_flit[o].dst[1:0] == 2'(o), "routed to the asked output");
        end
      end
      begin
        logic [2:0] o_fire, i_fire;
        flit_t      o_f [3];
        o_fire = out_valid & out_ready;
        i_fire = in_valid & in_ready;
        for (int o = 0; o < 3; o++) o_f[o] = out_flit[o];
        for (int o = 0; o < 3; o++)
          if (o_fire[o]) begin
            int s;
            s = int'(o_f[o].src);
            check(i_fire[s], "ready back to the source");
            check(int'(o_f[o].data) == sent[s], "flit order");
            lock[o]  = !is_tail(o_f[o].ftype);
            owner[o] = s;
          end
        @(posedge clk);
        #1;
        for (int s = 0; s < 3; s++)
          if (i_fire[s]) begin
            sent[s]++;
            pos[s] = (pos[s] + 1) % 4;
            in_valid[s] = 0;
          end
      end
    end
    check(contentions > 0, "contention happened");
    check(sent[0] > 100 && sent[1] > 100 && sent[2] > 100, "all sources progressed");
    $display("contentions=%0d flits=%0d/%0d/%0d", contentions, sent[0], sent[1], sent[2]);
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
