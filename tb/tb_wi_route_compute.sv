// tb_wi_route_compute: self-checking test of the wireless/XY routing rule.
// One routing unit per node of the 8x8 mesh; random hub connections (three
// routers per subnet), random destinations and random wired_only flags are
// checked against a model written on (x, y) coordinates. The test requires
// that wireless decisions, XY decisions, departures through Output_port_WI
// and the wired-only override all occur.
module tb_wi_route_compute;
  import winoc_pkg::*;

  logic [SUBNET_NODES-1:0] hub_sel [NUM_SUBNETS];
  node_id_t dst [NUM_NODES];
  logic     wired_only [NUM_NODES];
  dir_e     dir [NUM_NODES];
  logic     use_wi [NUM_NODES];
  int checks = 0, failures = 0, n_wi = 0, n_xy = 0, n_port = 0, n_override = 0;

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_rc
    wi_route_compute #(.NODE_ID(6'(n))) u_rc (
      .dst(dst[n]), .wired_only(wired_only[n]), .hub_sel(hub_sel),
      .dir(dir[n]), .use_wi(use_wi[n]));
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int absd(int a, int b); return a > b ? a - b : b - a; endfunction

  // nearest connected router of the subnet containing (sx, sy) to (px, py)
  function automatic void nearest(int sx, int sy, int px, int py, output int bx, output int by);
    int best;
    best = 100; bx = 0; by = 0;
    for (int ly = 0; ly < 4; ly++)
      for (int lx = 0; lx < 4; lx++) begin
        int gx, gy, d;
        gx = (sx / 4) * 4 + lx; gy = (sy / 4) * 4 + ly;
        d = absd(gx, px) + absd(gy, py);
        if (hub_sel[(sy / 4) * 2 + sx / 4][ly * 4 + lx] && d < best) begin
          best = d; bx = gx; by = gy;
        end
      end
  endfunction

  function automatic dir_e step(int cx, int cy, int tx, int ty);
    if (tx > cx) return DIR_EAST;
    if (tx < cx) return DIR_WEST;
    if (ty > cy) return DIR_SOUTH;
    if (ty < cy) return DIR_NORTH;
    return DIR_LOCAL;
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int s = 0; s < NUM_SUBNETS; s++) begin
        hub_sel[s] = '0;
        while ($countones(hub_sel[s]) < 3) hub_sel[s][$urandom_range(0, 15)] = 1'b1;
      end
      for (int n = 0; n < NUM_NODES; n++) begin
        dst[n] = 6'($urandom_range(0, 63));
        wired_only[n] = ($urandom_range(0, 4) == 0);
      end
      #1;
      for (int n = 0; n < NUM_NODES; n++) begin
        int cx, cy, dx, dy, wsx, wsy, wdx, wdy;
        logic wi;
        dir_e e;
        cx = n % 8; cy = n / 8; dx = dst[n] % 8; dy = dst[n] / 8;
        nearest(cx, cy, cx, cy, wsx, wsy);
        nearest(dx, dy, dx, dy, wdx, wdy);
        wi = ((cx / 4 != dx / 4) || (cy / 4 != dy / 4)) &&
             (absd(cx, dx) + absd(cy, dy) > absd(cx, wsx) + absd(cy, wsy) + absd(wdx, dx) + absd(wdy, dy) + 2);
        if (wi && wired_only[n]) n_override++;
        wi = wi && !wired_only[n];
        if (wi) e = (wsx == cx && wsy == cy) ? DIR_WI : step(cx, cy, wsx, wsy);
        else    e = step(cx, cy, dx, dy);
        check(use_wi[n] == wi, "wireless decision");
        check(dir[n] == e, "direction");
        if (wi) n_wi++; else n_xy++;
        if (e == DIR_WI) n_port++;
      end
    end
    check(n_wi > 0 && n_xy > 0 && n_port > 0 && n_override > 0, "all cases seen");
    $display("wireless=%0d xy=%0d wi_port=%0d override=%0d", n_wi, n_xy, n_port, n_override);
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
