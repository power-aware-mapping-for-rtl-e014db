// tb_opd_workload: the object-plane-decoder (OPD) workload on the 4 x 4
// reconfigurable mesh. Its three task graphs run first on topologies built
// for them, switching between the three stored configurations, and then on
// a plain mesh.
//
// Graph a is the base OPD graph: 16 cores and 21 communications with volumes
// in Mbit/s (v1->v2 70, v2->v3 362, ... v12->v9 16). Graphs b (23
// communications) and c (20) are the two graphs derived from it. They carry
// weights 0.5, 0.3 and 0.2. All three share one placement: core vi sits on
// the tile given by the OPD placement (tile rows 1 2 3 4 / 13 12 11 9 /
// 14 16 8 10 / 15 5 6 7).
//
// A topology is built for each graph the way the mapping method builds
// one. Communications are taken in falling order of volume, and each gets
// the cheapest path from its source router to its destination router, with
// a cost of 1 per wire segment and 5 per router. The search may close any
// switch pair not yet used by an earlier path, or follow a pair that an
// earlier path already closed. The switches of the chosen path are then
// set, and the next communication is routed. The mesh configuration holds
// shortest-path routes for all three graphs.
//
// The built topologies are stored as configurations 0, 1 and 2, and each
// graph runs on its own. The host then overwrites configuration 0 with the
// mesh, and each graph runs again. Each communication sends a number of
// two-flit packets proportional to its volume. The testbench checks that
// every packet is delivered intact. It counts, from the design's own
// handshakes, how many flits left a router and how many wire segments flits
// crossed. For every graph it checks that the built topology needs fewer
// router traversals and a lower weighted cost (5 per router flit, 1 per
// segment flit) than the mesh, and also that the cost weighted over the
// three graphs is lower.
module tb_opd_workload;
  import noc_pkg::*;

  localparam int unsigned ROWS = 4;
  localparam int unsigned COLS = 4;
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
  localparam int N_EDGES = 64;
  localparam int N_GRAPHS = 3;
  localparam int G_LO [N_GRAPHS] = '{0, 21, 44};
  localparam int G_HI [N_GRAPHS] = '{21, 44, 64};
  localparam int G_WEIGHT [N_GRAPHS] = '{5, 3, 2};  // tenths: 0.5, 0.3, 0.2
  localparam int MESH = N_GRAPHS;                    // index of the mesh configuration

  // OPD task graphs a, b and c: source core, destination core, volume (Mbit/s).
  int E_SRC [N_EDGES] = '{
    // a
     1,  2,   3,   4,   5,   6,   7,   8,   9,  10,  10,  4, 16, 11, 12,  13, 14, 15, 15, 12, 12,
    // b
     1, 16,  2,   2,   5,   6,   7,   5,   4,   4, 15, 15, 11, 12, 12, 12,   8,  10, 10,   9, 14,  13,  14,
    // c
     1,  2,  16,  4,  3,  4,   5,  5,   6,   7,   8, 10,  10, 11, 12, 11, 15,  13,  13,  14};
  int E_DST [N_EDGES] = '{
     2,  3,   4,   5,   6,   7,   8,   9,  10,   9,   8, 16,  5, 12, 13,  14, 15, 13, 11,  6,  9,
     2,  2,  3,   6,   3,   7,  10,  11,   8,  12, 11, 12, 10, 11, 13,  9,   9,   8,  9,  10, 15,  14,  16,
     2,  5,   3, 16, 15, 10,   6, 11,   7,   8,  10,  9,  11, 15,  6, 12, 13,  12,  14,  15};
  int E_VOL [N_EDGES] = '{
    70, 362, 362, 362, 357, 353, 300, 313, 313,  94, 500, 49, 27, 16, 16, 157, 16, 16, 16, 16, 16,
    70, 26, 16, 300, 300, 353, 320, 450, 250, 200, 16, 32, 64, 16, 16, 16, 313, 500, 94, 313, 16, 157, 320,
    70, 362, 27, 49, 16, 32, 200, 16, 353, 120, 500, 94, 150, 16, 16, 16, 16, 320, 157, 450};
  // Tile label at each router position, row by row.
  int TILE [N_NODES] = '{1, 2, 3, 4, 13, 12, 11, 9, 14, 16, 8, 10, 15, 5, 6, 7};

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

  logic [5:0]       swc  [N_GRAPHS + 1][N_SW];
  logic [ROW_W-1:0] rows [N_GRAPHS + 1][FLOWS];
  int               node_of [17];               // core number -> router

  flit_t send_q [N_NODES][$];
  flit_t exp_q  [N_NODES][N_NODES][$];
  int    cur_src [N_NODES];
  int    sent = 0, delivered = 0;
  int    router_flits = 0, segment_flits = 0;

  always #2 clk = ~clk;

  reconfig_noc dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic build(int app, int lo, int hi);
    int order [N_EDGES];
    int n;
    for (int s = 0; s < int'(N_SW); s++) swc[app][s] = '0;
    for (int f = 0; f < int'(FLOWS); f++) rows[app][f] = {N_NODES{3'd4}};
    if (app == MESH) begin
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
      route_edge(app, node_of[E_SRC[e]], node_of[E_DST[e]], app != MESH, found, cst);
      check(found, $sformatf("config %0d: path for v%0d->v%0d", app, E_SRC[e], E_DST[e]));
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

  // Host writes of configuration cfg into stored configuration slot.
  task automatic store(int slot, int cfg);
    for (int f = 0; f < int'(FLOWS); f++) begin
      cfg_rt_we = 1'b1; cfg_rt_app = APP_W'(slot); cfg_rt_flow = FLOW_W'(f); cfg_rt_row = rows[cfg][f];
      cfg_sw_we = (f < int'(N_SW));
      if (f < int'(N_SW)) begin
        cfg_sw_app = APP_W'(slot); cfg_sw_idx = SW_W'(f); cfg_sw_data = swc[cfg][f];
      end
      @(negedge clk);
    end
    cfg_rt_we = 1'b0; cfg_sw_we = 1'b0;
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
    int rf_built [N_GRAPHS], sf_built [N_GRAPHS], rf_mesh [N_GRAPHS], sf_mesh [N_GRAPHS];
    int wc_built, wc_mesh;
    cfg_sw_we = 1'b0; cfg_rt_we = 1'b0;
    cfg_sw_app = '0; cfg_rt_app = '0; cfg_sw_idx = '0; cfg_sw_data = '0;
    cfg_rt_flow = '0; cfg_rt_row = '0;
    reconf_start = 1'b0; reconf_app = '0;
    for (int k = 0; k < int'(N_NODES); k++) begin
      cur_src[k] = -1;
      node_of[TILE[k]] = k;
    end
    for (int g = 0; g < N_GRAPHS; g++) build(g, G_LO[g], G_HI[g]);
    build(MESH, 0, N_EDGES);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // The three built topologies go into the three stored configurations.
    for (int a = 0; a < int'(NUM_APPS); a++) store(a, a);

    // Each graph on its own topology, switching between the stored ones.
    for (int g = 0; g < N_GRAPHS; g++) run_traffic(g, G_LO[g], G_HI[g], rf_built[g], sf_built[g]);
    // The host then overwrites configuration 0 with the plain mesh, and
    // each graph runs again on it.
    store(0, MESH);
    for (int g = 0; g < N_GRAPHS; g++) run_traffic(0, G_LO[g], G_HI[g], rf_mesh[g], sf_mesh[g]);

    wc_built = 0;
    wc_mesh = 0;
    for (int g = 0; g < N_GRAPHS; g++) begin
      check(rf_built[g] < rf_mesh[g],
            $sformatf("graph %c: the built topology passes fewer flits through routers", 8'(8'h61 + g)));
      check(5 * rf_built[g] + sf_built[g] < 5 * rf_mesh[g] + sf_mesh[g],
            $sformatf("graph %c: the built topology has the lower cost", 8'(8'h61 + g)));
      $display("graph %c: cost ratio built/mesh = %0d/%0d", 8'(8'h61 + g),
               5 * rf_built[g] + sf_built[g], 5 * rf_mesh[g] + sf_mesh[g]);
      wc_built += G_WEIGHT[g] * (5 * rf_built[g] + sf_built[g]);
      wc_mesh += G_WEIGHT[g] * (5 * rf_mesh[g] + sf_mesh[g]);
    end
    check(wc_built < wc_mesh, "weighted over the three graphs, the reconfigured network costs less");
    $display("weighted cost ratio built/mesh = %0d/%0d", wc_built, wc_mesh);
    check(delivered == sent && sent > 0, "all packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
