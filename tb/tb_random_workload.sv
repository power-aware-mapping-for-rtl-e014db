// tb_random_workload: the two 25-node random task graphs on a 5 x 5
// reconfigurable mesh, each run on the plain mesh and on a topology built
// for it.
//
// Graph 1 has 30 communications and graph 2 has 20, between random pairs of
// the 25 cores, with random volumes of 16 to 500 Mbit/s drawn by the
// testbench. Core k sits on router k. The network holds three
// configurations:
//   0  the plain mesh, with shortest-path routes for both graphs;
//   1  a topology built for graph 1;
//   2  a topology built for graph 2.
// A topology is built the way the mapping method builds one. Communications
// are taken in falling order of volume, and each gets the cheapest path,
// with a cost of 1 per wire segment and 5 per router. A path may close free
// switch pairs or follow pairs that an earlier path closed.
//
// Each graph then sends two-flit packets, in numbers proportional to volume,
// first on the mesh and then on its own topology. The testbench checks that
// every packet is delivered intact. From the design's handshakes it counts
// router and wire-segment flit traversals, and it checks that the built
// topology sends fewer flits through routers and has the lower weighted
// cost (5 per router flit, 1 per segment flit). On a dense graph the greedy
// method can build a topology whose longer bypass paths cost more than the
// router hops they save; as in the mapping method, the testbench then keeps
// the plain mesh for that graph and checks that the costs are equal.
module tb_random_workload;
  import noc_pkg::*;

  localparam int unsigned ROWS = 5;
  localparam int unsigned COLS = 5;
  localparam int unsigned NUM_APPS = 3;
  localparam int unsigned N_NODES = ROWS * COLS;
  localparam int unsigned GR = 2 * ROWS - 1;
  localparam int unsigned GC = 2 * COLS - 1;
  localparam int unsigned N_SW = GR * GC - N_NODES;
  localparam int unsigned FLOWS = N_NODES * N_NODES;
  localparam int unsigned FLOW_W = $clog2(FLOWS);
  localparam int unsigned SW_W = $clog2(N_SW);
  localparam int unsigned APP_W = $clog2(NUM_APPS);
  localparam int unsigned ROW_W = N_NODES * 3;
  localparam int INF = 1000000;
  localparam int N_EDGES = 50;
  localparam int G_LO [2] = '{0, 30};
  localparam int G_HI [2] = '{30, 50};

  // Task graphs: source core, destination core, volume (Mbit/s); drawn below.
  int E_SRC [N_EDGES];
  int E_DST [N_EDGES];
  int E_VOL [N_EDGES];

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                cfg_sw_we, cfg_rt_we;
  logic [APP_W-1:0]    cfg_sw_app, cfg_rt_app;
  logic [SW_W-1:0]     cfg_sw_idx;
  logic [SW_CFG_W-1:0] cfg_sw_data;
  logic [FLOW_W-1:0]   cfg_rt_flow;
  logic [ROW_W-1:0]    cfg_rt_row;
  logic                reconf_start, reconf_busy, reconf_done;
  logic [APP_W-1:0]    reconf_app, active_app;
  logic [N_NODES-1:0]  core_in_valid, core_in_ready, core_out_valid, core_out_ready;
  flit_t               core_in_flit  [N_NODES];
  flit_t               core_out_flit [N_NODES];
  logic                net_busy, sw_cfg_err;

  int checks = 0, failures = 0;

  logic [5:0]       swc  [NUM_APPS][N_SW];
  logic [ROW_W-1:0] rows [NUM_APPS][FLOWS];
  int               node_of [N_NODES];          // core number -> router

  flit_t send_q [N_NODES][$];
  flit_t exp_q  [N_NODES][N_NODES][$];
  int    cur_src [N_NODES];
  int    sent = 0, delivered = 0;
  int    router_flits = 0, segment_flits = 0;

  always #2 clk = ~clk;

  reconfig_noc #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (sent %0d delivered %0d)", sent, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Activity counters from the design's handshakes.
  // A router output on N/E/S/W also drives a wire segment.
  int rf_now [GR][GC];
  int rs_now [GR][GC];
  for (genvar r = 0; r < GR; r++) begin : g_r
    for (genvar c = 0; c < GC; c++) begin : g_c
      if (r % 2 == 0 && c % 2 == 0) begin : g_rt
        always @(posedge clk) rf_now[r][c] <= $countones(
            dut.g_row[r].g_col[c].g_router.u_router.out_valid & dut.g_row[r].g_col[c].g_router.u_router.out_ready);
        always @(posedge clk) rs_now[r][c] <= $countones(
            dut.g_row[r].g_col[c].g_router.u_router.out_valid[3:0] & dut.g_row[r].g_col[c].g_router.u_router.out_ready[3:0]);
      end else begin : g_sw
        always @(posedge clk) rf_now[r][c] <= $countones(
            dut.g_row[r].g_col[c].g_switch.u_switch.out_valid & dut.g_row[r].g_col[c].g_switch.u_switch.out_ready);
      end
    end
  end
  always @(negedge clk) begin
    for (int r = 0; r < int'(GR); r++)
      for (int c = 0; c < int'(GC); c++) begin
        if (r % 2 == 0 && c % 2 == 0) begin
          router_flits += rf_now[r][c];
          segment_flits += rs_now[r][c];
        end else segment_flits += rf_now[r][c];
        rf_now[r][c] = 0;
        rs_now[r][c] = 0;
      end
  end

  // ---------------------------------------------------------------------
  // Topology construction.
  // ---------------------------------------------------------------------
  int unsigned PA [6] = '{0, 0, 0, 1, 1, 2};
  int unsigned PB [6] = '{1, 2, 3, 2, 3, 3};

  function automatic logic [5:0] join_bits(int a, int b);
    for (int k = 0; k < 6; k++)
      if ((PA[k] == a && PB[k] == b) || (PA[k] == b && PB[k] == a)) return 6'(1 << k);
    return '0;
  endfunction

  function automatic int partner_of(logic [5:0] w, int p);
    int n = 0, q = -1;
    for (int k = 0; k < 6; k++) if (w[k]) begin
      if (PA[k] == p) begin n++; q = PB[k]; end
      if (PB[k] == p) begin n++; q = PA[k]; end
    end
    return (n == 1) ? q : -1;
  endfunction

  function automatic int sw_of(int r, int c);
    int n = 0;
    for (int rr = 0; rr < int'(GR); rr++)
      for (int cc = 0; cc < int'(GC); cc++)
        if (!(rr % 2 == 0 && cc % 2 == 0)) begin
          if (rr == r && cc == c) return n;
          n++;
        end
    return -1;
  endfunction

  function automatic bit is_router(int r, int c);
    return (r % 2 == 0) && (c % 2 == 0);
  endfunction

  // Cheapest path for one communication over grid states (position, arrival
  // port), index (r*GC + c)*4 + port. The path found sets the switch pairs
  // and the routing entries of the flow.
  task automatic route_edge(input int app, input int s, input int t, input bit may_close,
                            output bit found, output int cost_out);
    localparam int NS = GR * GC * 4;
    int cost [NS];
    int prv [NS];
    int leave [NS];
    bit dn [NS];
    int sr, sc, tr, tc, best_end;
    sr = 2 * (s / int'(COLS)); sc = 2 * (s % int'(COLS));
    tr = 2 * (t / int'(COLS)); tc = 2 * (t % int'(COLS));
    for (int i = 0; i < NS; i++) begin cost[i] = INF; prv[i] = -1; leave[i] = -1; dn[i] = 0; end
    cost[(sr * int'(GC) + sc) * 4] = 0;  // start at the source router
    best_end = -1;
    for (int it = 0; it < NS; it++) begin
      int u, b, r, c, p;
      u = -1; b = INF;
      for (int i = 0; i < NS; i++) if (!dn[i] && cost[i] < b) begin u = i; b = cost[i]; end
      if (u < 0) break;
      dn[u] = 1;
      r = (u / 4) / int'(GC); c = (u / 4) % int'(GC); p = u % 4;
      if (r == tr && c == tc) begin best_end = u; break; end
      for (int q = 0; q < 4; q++) begin
        int nr, nc, v, cst;
        bit ok;
        if (is_router(r, c)) ok = (q != p || (r == sr && c == sc));
        else begin
          logic [5:0] w;
          w = swc[app][sw_of(r, c)];
          ok = (q != p) && ((partner_of(w, p) == q) ||
               (may_close && (w & (join_bits(p, 0) | join_bits(p, 1) | join_bits(p, 2) | join_bits(p, 3))) == 0 &&
                             (w & (join_bits(q, 0) | join_bits(q, 1) | join_bits(q, 2) | join_bits(q, 3))) == 0));
        end
        if (!ok) continue;
        nr = r + ((q == 0) ? -1 : (q == 2) ? 1 : 0);
        nc = c + ((q == 1) ? 1 : (q == 3) ? -1 : 0);
        if (nr < 0 || nc < 0 || nr >= int'(GR) || nc >= int'(GC)) continue;
        v = (nr * int'(GC) + nc) * 4 + (q + 2) % 4;
        cst = cost[u] + 1 + (is_router(nr, nc) ? 5 : 0);
        if (cst < cost[v]) begin cost[v] = cst; prv[v] = u; leave[v] = q; end
      end
    end
    found = (best_end >= 0);
    cost_out = found ? cost[best_end] : INF;
    if (!found) return;
    // Walk back: set switch pairs and routing entries of this flow.
    begin
      int v, u, f;
      f = s * int'(N_NODES) + t;
      rows[app][f][3*t +: 3] = 3'd4;
      v = best_end;
      while (prv[v] >= 0) begin
        int r, c, p, q;
        u = prv[v];
        q = leave[v];
        r = (u / 4) / int'(GC); c = (u / 4) % int'(GC); p = u % 4;
        if (is_router(r, c)) rows[app][f][3*((r / 2) * int'(COLS) + c / 2) +: 3] = 3'(q);
        else swc[app][sw_of(r, c)] |= join_bits(p, q);
        v = u;
      end
    end
  endtask

  // Communications the last build could not give a path, and the cost the
  // last build predicts for its packets.
  int unrouted;
  int predicted;

  task automatic build(int app, int lo, int hi);
    int order [N_EDGES];
    int n;
    for (int s = 0; s < int'(N_SW); s++) swc[app][s] = '0;
    for (int f = 0; f < int'(FLOWS); f++) rows[app][f] = {N_NODES{3'd4}};
    if (app == 0) begin
      for (int r = 0; r < int'(GR); r++)
        for (int c = 0; c < int'(GC); c++) if (!is_router(r, c)) begin
          if (r % 2 == 0) swc[app][sw_of(r, c)] = join_bits(1, 3);
          else if (c % 2 == 0) swc[app][sw_of(r, c)] = join_bits(0, 2);
        end
    end
    // Communications in falling order of volume.
    n = hi - lo;
    for (int e = 0; e < n; e++) order[e] = lo + e;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n - 1 - i; j++)
        if (E_VOL[order[j]] < E_VOL[order[j + 1]]) begin
          int tmp;
          tmp = order[j]; order[j] = order[j + 1]; order[j + 1] = tmp;
        end
    for (int i = 0; i < n; i++) begin
      int e, cst;
      bit found;
      e = order[i];
      route_edge(app, node_of[E_SRC[e]], node_of[E_DST[e]], app != 0, found, cst);
      if (!found) unrouted++;
      predicted += ((E_VOL[e] + 15) / 16) * cst;
    end
    for (int s = 0; s < int'(N_SW); s++) begin
      bit legal;
      legal = 1'b1;
      for (int p = 0; p < 4; p++)
        if (swc[app][s] != 0 && (swc[app][s] & (join_bits(p, 0) | join_bits(p, 1) | join_bits(p, 2) | join_bits(p, 3))) != 0
            && partner_of(swc[app][s], p) < 0) legal = 1'b0;
      check(legal, $sformatf("config %0d: switch %0d word legal", app, s));
    end
  endtask

  task automatic reconfigure(int app);
    @(negedge clk);
    reconf_start = 1'b1;
    reconf_app = APP_W'(app);
    @(negedge clk);
    reconf_start = 1'b0;
    while (!reconf_done) @(negedge clk);
    check(int'(active_app) == app && !sw_cfg_err, $sformatf("config %0d loaded", app));
  endtask

  // Cores.
  always @(negedge clk) begin
    for (int k = 0; k < int'(N_NODES); k++) begin
      core_in_valid[k]  = (send_q[k].size() != 0) && ($urandom_range(0, 3) == 0);
      core_in_flit[k]   = (send_q[k].size() != 0) ? send_q[k][0] : '0;
      core_out_ready[k] = 1'b1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < int'(N_NODES); k++) begin
      if (core_in_valid[k] && core_in_ready[k]) begin
        if (core_in_flit[k].head) sent++;
        void'(send_q[k].pop_front());
      end
      if (core_out_valid[k] && core_out_ready[k]) begin
        flit_t f;
        int s;
        f = core_out_flit[k];
        if (f.head) cur_src[k] = int'(f.data[15:8]);
        s = cur_src[k];
        if (s >= 0 && s < int'(N_NODES) && exp_q[s][k].size() != 0) begin
          check(f == exp_q[s][k][0], $sformatf("flit from %0d at %0d", s, k));
          void'(exp_q[s][k].pop_front());
        end else check(0, $sformatf("unexpected flit at %0d", k));
        if (f.tail) begin cur_src[k] = -1; delivered++; end
      end
    end
  end

  task automatic run_traffic(int app, int lo, int hi, output int rflits, output int sflits);
    int r0, s0, npk;
    reconfigure(app);
    r0 = router_flits;
    s0 = segment_flits;
    npk = 0;
    for (int e = lo; e < hi; e++) begin
      int s, t;
      s = node_of[E_SRC[e]];
      t = node_of[E_DST[e]];
      for (int n = 0; n < (E_VOL[e] + 15) / 16; n++) begin
        flit_t h, b;
        h = '{head: 1'b1, tail: 1'b0, data: {16'(n), 8'(s), 8'(t)}};
        b = '{head: 1'b0, tail: 1'b1, data: $urandom};
        send_q[s].push_back(h); send_q[s].push_back(b);
        exp_q[s][t].push_back(h); exp_q[s][t].push_back(b);
        npk++;
      end
    end
    for (int c = 0; c < 50000; c++) begin
      bit left;
      @(negedge clk);
      left = net_busy;
      for (int k = 0; k < int'(N_NODES); k++) if (send_q[k].size() != 0) left = 1'b1;
      if (!left) break;
    end
    repeat (4) @(negedge clk);
    for (int s = 0; s < int'(N_NODES); s++)
      for (int t = 0; t < int'(N_NODES); t++) check(exp_q[s][t].size() == 0, "every packet delivered");
    rflits = router_flits - r0;
    sflits = segment_flits - s0;
    $display("config %0d: %0d packets, %0d router flit-traversals, %0d segment flit-traversals, cost %0d",
             app, npk, rflits, sflits, 5 * rflits + sflits);
  endtask

  initial begin
    int rf0, sf0, rf1, sf1, pred_built;
    bit kept_mesh [2];
    cfg_sw_we = 1'b0; cfg_rt_we = 1'b0;
    cfg_sw_app = '0; cfg_rt_app = '0; cfg_sw_idx = '0; cfg_sw_data = '0;
    cfg_rt_flow = '0; cfg_rt_row = '0;
    reconf_start = 1'b0; reconf_app = '0;
    // A graph is drawn again until the mapping method finds a path for each
    // of its communications.
    for (int k = 0; k < int'(N_NODES); k++) node_of[k] = k;
    for (int g = 0; g < 2; g++) begin
      int draws;
      draws = 0;
      do begin
        for (int e = G_LO[g]; e < G_HI[g]; e++) begin
          bit dup;
          do begin
            E_SRC[e] = $urandom_range(0, N_NODES - 1);
            E_DST[e] = $urandom_range(0, N_NODES - 1);
            dup = (E_SRC[e] == E_DST[e]);
            for (int x = G_LO[g]; x < e; x++)
              if (E_SRC[x] == E_SRC[e] && E_DST[x] == E_DST[e]) dup = 1'b1;
          end while (dup);
          E_VOL[e] = $urandom_range(16, 500);
        end
        unrouted = 0;
        predicted = 0;
        build(g + 1, G_LO[g], G_HI[g]);
        draws++;
      end while (unrouted != 0 && draws < 200);
      check(unrouted == 0, $sformatf("graph %0d: every communication has a path", g + 1));
      $display("graph %0d: %0d communications, mapped on draw %0d", g + 1, G_HI[g] - G_LO[g], draws);
      // Like the mapping method, keep the plain mesh when the built topology
      // is predicted to cost no less.
      pred_built = predicted;
      predicted = 0;
      build(0, G_LO[g], G_HI[g]);
      kept_mesh[g] = (pred_built >= predicted);
      if (kept_mesh[g]) begin
        for (int s = 0; s < int'(N_SW); s++) swc[g + 1][s] = swc[0][s];
        for (int f = 0; f < int'(FLOWS); f++) rows[g + 1][f] = rows[0][f];
      end
      $display("graph %0d: predicted cost built %0d, mesh %0d%s", g + 1, pred_built, predicted,
               kept_mesh[g] ? " (mesh kept)" : "");
    end
    unrouted = 0;
    build(0, 0, N_EDGES);
    check(unrouted == 0, "mesh: every communication has a path");
    for (int k = 0; k < int'(N_NODES); k++) begin
      cur_src[k] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < int'(NUM_APPS); a++)
      for (int f = 0; f < int'(FLOWS); f++) begin
        cfg_rt_we = 1'b1; cfg_rt_app = APP_W'(a); cfg_rt_flow = FLOW_W'(f); cfg_rt_row = rows[a][f];
        cfg_sw_we = (f < int'(N_SW));
        if (f < int'(N_SW)) begin
          cfg_sw_app = APP_W'(a); cfg_sw_idx = SW_W'(f); cfg_sw_data = swc[a][f];
        end
        @(negedge clk);
      end
    cfg_rt_we = 1'b0; cfg_sw_we = 1'b0;

    for (int g = 0; g < 2; g++) begin
      run_traffic(0, G_LO[g], G_HI[g], rf0, sf0);
      run_traffic(g + 1, G_LO[g], G_HI[g], rf1, sf1);
      if (kept_mesh[g])
        check(5 * rf1 + sf1 == 5 * rf0 + sf0, $sformatf("graph %0d: the kept mesh costs the same", g + 1));
      else begin
        check(rf1 < rf0, $sformatf("graph %0d: the built topology passes fewer flits through routers", g + 1));
        check(5 * rf1 + sf1 < 5 * rf0 + sf0, $sformatf("graph %0d: the built topology has the lower cost", g + 1));
      end
      $display("graph %0d: cost ratio built/mesh = %0d/%0d", g + 1, 5 * rf1 + sf1, 5 * rf0 + sf0);
    end
    check(delivered == sent && sent > 0, "all packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
