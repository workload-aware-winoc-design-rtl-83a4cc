// tb_flit_fifo: self-checking test of the hub slot buffer.
// Streams random four-flit packets through the FIFO with random stalls on
// both sides and compares the output order, the count, the full limit of
// four flits, the one-cycle write-to-read latency and the wr_open/rd_open
// packet-boundary flags against a queue model.
module tb_flit_fifo;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t in_flit, out_flit;
  logic  in_valid, in_ready, out_valid, out_ready, empty, wr_open, rd_open;
  logic [2:0] count;
  int checks = 0, failures = 0;

  flit_fifo #(.DEPTH(4)) dut (.*);

  flit_t q[$];
  logic  m_wr_open = 1'b0, m_rd_open = 1'b0;
  int    seq = 0;

  function automatic flit_t mk(int n);
    flit_t f;
    f.ftype = (n % 4 == 0) ? FLIT_HEAD : (n % 4 == 3) ? FLIT_TAIL : FLIT_BODY;
    f.dst   = 6'(n);
    f.src   = 6'(n >> 6);
    f.data  = 32'(n * 32'h9e3779b1);
    return f;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !out_valid && !wr_open && !rd_open, "reset state");
    // latency: write one flit, it is readable the next cycle
    in_flit = mk(seq); in_valid = 1;
    @(negedge clk);
    check(out_valid && out_flit == mk(0), "one-cycle latency");
    in_valid = 0;
    q.push_back(mk(seq)); seq++;
    m_wr_open = 1'b1;
    // fill up to four
    out_ready = 0;
    for (int k = 0; k < 5; k++) begin
      in_flit = mk(seq); in_valid = 1;
      @(posedge clk);
      if (in_ready) begin q.push_back(mk(seq)); seq++; m_wr_open = !is_tail(in_flit.ftype); end
      @(negedge clk);
    end
    check(count == 3'd4 && !in_ready, "full at four flits");
    check(wr_open == m_wr_open, "wr_open after fill");
    // random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      in_flit   = mk(seq);
      #1;
      check(count == 3'(q.size()), "count");
      check(out_valid == (q.size() != 0), "out_valid");
      if (out_valid) check(out_flit == q[0], "data order");
      check(wr_open == m_wr_open && rd_open == m_rd_open, "open flags");
      @(posedge clk);
      if (out_valid && out_ready) begin m_rd_open = !is_tail(q[0].ftype); void'(q.pop_front()); end
      if (in_valid && in_ready) begin q.push_back(mk(seq)); m_wr_open = !is_tail(mk(seq).ftype); seq++; end
      @(negedge clk);
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
