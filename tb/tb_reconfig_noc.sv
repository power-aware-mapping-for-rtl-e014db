// tb_reconfig_noc: end-to-end test of the reconfigurable mesh at its
// default size (4 x 4 routers, 33 switch boxes, three applications).
//
// The testbench plays the design-time mapping tool and the host. For three
// topologies it writes switch-box words and routing tables into the
// configuration memory:
//   app 0  plain mesh: every switch between two routers passes straight on;
//   app 1  mesh plus two express links in switch rows 1 and 5 that join the
//          corner routers 0-3 and 12-15 with wire only, passing over the
//          routers between them (the switches they cross hold a crossing);
//   app 2  a comb-shaped tree: all router rows, joined by column 0 only.
// Routes are found by the testbench's own shortest-path search over the
// links it traces through the switch words, with a cost of 1 per wire
// segment and 5 per router, the cost model of the mapping method.
//
// Cores then send random packets of one to four flits while the host
// switches applications several times during the traffic. Every packet must
// reach its destination whole, in order per flow, with no flit lost or
// changed. Single packets on an idle network must take one cycle per wire
// segment plus one. The testbench counts each mechanism and fails if one
// never happened: reconfiguration, draining, new packets held back during a
// reconfiguration, back-pressure at a core, packets carried on a router-
// bypassing link, and a crossing switch box carrying traffic.
module tb_reconfig_noc;
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

  // Configurations worked out by the testbench.
  logic [5:0]       swc   [NUM_APPS][N_SW];
  logic [ROW_W-1:0] rows  [NUM_APPS][FLOWS];
  int               hops  [NUM_APPS][FLOWS];   // wire segments on the path
  bit               bypas [NUM_APPS][FLOWS];   // path uses a router-bypassing link

  // Traffic.
  flit_t send_q [N_NODES][$];
  flit_t exp_q  [N_NODES][N_NODES][$];         // [src][dst]
  int    cur_src [N_NODES];                    // source of the packet arriving at a core, or -1
  bit    gen_on = 1'b0;
  int    sent = 0, delivered = 0;

  // Mechanism counters.
  int n_reconf = 0, n_drain = 0, n_held = 0, n_stall = 0, n_bypass = 0, n_cross = 0, n_out_stall = 0;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (sent %0d delivered %0d)", sent, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  // Mapping tool model.
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

  // Follow the wire leaving router k in direction d through the switch boxes.
  task automatic trace(input int app, input int k, input int d0, output int dst, output int segs);
    int r, c, d, p, q;
    r = 2 * (k / int'(COLS));
    c = 2 * (k % int'(COLS));
    d = d0;
    segs = 0;
    dst = -1;
    for (int n = 0; n < 200; n++) begin
      r += (d == 0) ? -1 : (d == 2) ? 1 : 0;
      c += (d == 1) ? 1 : (d == 3) ? -1 : 0;
      segs++;
      if (r < 0 || c < 0 || r >= int'(GR) || c >= int'(GC)) return;
      if (r % 2 == 0 && c % 2 == 0) begin
        dst = (r / 2) * int'(COLS) + (c / 2);
        return;
      end
      p = (d + 2) % 4;
      q = partner_of(swc[app][sw_of(r, c)], p);
      if (q < 0 || partner_of(swc[app][sw_of(r, c)], q) != p) return;
      d = q;
    end
  endtask

  task automatic build_app(int app);
    int nb [N_NODES][4];
    int ns [N_NODES][4];
    for (int r = 0; r < int'(GR); r++)
      for (int c = 0; c < int'(GC); c++) if (!(r % 2 == 0 && c % 2 == 0)) begin
        logic [5:0] w;
        w = '0;
        if (r % 2 == 0) w = join_bits(1, 3);          // between two routers in a row
        else if (c % 2 == 0) w = join_bits(0, 2);     // between two routers in a column
        if (app == 1 && (r == 1 || r == int'(GR) - 2)) begin
          int v;
          v = (r == 1) ? 0 : 2;                       // towards the router row
          if (c == 0) w = join_bits(v, 1);
          else if (c == int'(GC) - 1) w = join_bits(v, 3);
          else if (c % 2 == 0) w = join_bits(0, 2) | join_bits(1, 3);  // crossing
          else w = join_bits(1, 3);
        end
        if (app == 2 && r % 2 == 1 && c != 0) w = '0;
        swc[app][sw_of(r, c)] = w;
      end
    for (int k = 0; k < int'(N_NODES); k++)
      for (int d = 0; d < 4; d++) trace(app, k, d, nb[k][d], ns[k][d]);
    // Shortest paths: 1 per segment, 5 per router reached.
    for (int s = 0; s < int'(N_NODES); s++) begin
      int dst_cost [N_NODES];
      int prv [N_NODES];
      int pport [N_NODES];
      int pseg [N_NODES];
      bit done_n [N_NODES];
      for (int k = 0; k < int'(N_NODES); k++) begin
        dst_cost[k] = INF; prv[k] = -1; pport[k] = 0; pseg[k] = 0; done_n[k] = 0;
      end
      dst_cost[s] = 0;
      for (int it = 0; it < int'(N_NODES); it++) begin
        int u, best;
        u = -1; best = INF;
        for (int k = 0; k < int'(N_NODES); k++) if (!done_n[k] && dst_cost[k] < best) begin u = k; best = dst_cost[k]; end
        if (u < 0) break;
        done_n[u] = 1;
        for (int d = 0; d < 4; d++) if (nb[u][d] >= 0) begin
          int v, cst;
          v = nb[u][d];
          cst = dst_cost[u] + ns[u][d] + 5;
          if (cst < dst_cost[v]) begin dst_cost[v] = cst; prv[v] = u; pport[v] = d; pseg[v] = ns[u][d]; end
        end
      end
      for (int t = 0; t < int'(N_NODES); t++) begin
        int f, v, guard;
        logic [ROW_W-1:0] row;
        f = s * int'(N_NODES) + t;
        row = '0;
        for (int k = 0; k < int'(N_NODES); k++) row[3*k +: 3] = 3'd4;
        hops[app][f] = 0;
        bypas[app][f] = 0;
        check(dst_cost[t] < INF, $sformatf("app %0d: %0d reaches %0d", app, s, t));
        v = t;
        guard = 0;
        while (v != s && prv[v] >= 0 && guard < 100) begin
          row[3*prv[v] +: 3] = 3'(pport[v]);
          hops[app][f] += pseg[v];
          if (pseg[v] > 2) bypas[app][f] = 1;
          v = prv[v];
          guard++;
        end
        rows[app][f] = row;
      end
    end
  endtask

  // ---------------------------------------------------------------------
  // Host and cores.
  // ---------------------------------------------------------------------
  task automatic reconfigure(int app);
    @(negedge clk);
    reconf_start = 1'b1;
    reconf_app = APP_W'(app);
    @(negedge clk);
    reconf_start = 1'b0;
    while (!reconf_done) @(negedge clk);
    check(int'(active_app) == app, $sformatf("application %0d active", app));
    check(!sw_cfg_err, "switch words are legal");
  endtask

  task automatic new_packet(int s, int t, int len);
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f.head = (k == 0);
      f.tail = (k == len - 1);
      f.data = (k == 0) ? {16'($urandom), 8'(s), 8'(t)} : $urandom;
      send_q[s].push_back(f);
      exp_q[s][t].push_back(f);
    end
  endtask

  // Drive the cores at each falling edge; account at the next rising edge.
  always @(negedge clk) begin
    for (int k = 0; k < int'(N_NODES); k++) begin
      if (gen_on && send_q[k].size() == 0 && $urandom_range(0, 29) == 0) begin
        int t;
        t = $urandom_range(0, N_NODES - 2);
        if (t >= k) t++;
        new_packet(k, t, $urandom_range(1, 4));
      end
      core_in_valid[k] = (send_q[k].size() != 0);
      core_in_flit[k]  = (send_q[k].size() != 0) ? send_q[k][0] : '0;
      core_out_ready[k] = ($urandom_range(0, 7) != 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (reconf_done) n_reconf++;
    if (reconf_busy && net_busy) n_drain++;
    for (int k = 0; k < int'(N_NODES); k++) begin
      if (core_in_valid[k] && core_in_flit[k].head && reconf_busy) begin
        n_held++;
        check(!core_in_ready[k], "no new packet enters during a reconfiguration");
      end
      if (core_in_valid[k] && !core_in_ready[k] && !reconf_busy) n_stall++;
      if (core_out_valid[k] && !core_out_ready[k]) n_out_stall++;
      if (core_in_valid[k] && core_in_ready[k]) begin
        flit_t f;
        f = core_in_flit[k];
        void'(send_q[k].pop_front());
        if (f.head) begin
          sent++;
          if (bypas[active_app][k * int'(N_NODES) + int'(f.data[7:0])]) n_bypass++;
        end
      end
      if (core_out_valid[k] && core_out_ready[k]) begin
        flit_t f;
        int s;
        f = core_out_flit[k];
        if (f.head) begin
          check(cur_src[k] < 0, "head inside a packet");
          check(int'(f.data[7:0]) == k, "packet reached its destination");
          cur_src[k] = int'(f.data[15:8]);
        end
        s = cur_src[k];
        if (s >= 0 && s < int'(N_NODES) && exp_q[s][k].size() != 0) begin
          check(f == exp_q[s][k][0], $sformatf("flit %h from %0d at %0d", f.data, s, k));
          void'(exp_q[s][k].pop_front());
        end else check(0, $sformatf("unexpected flit at %0d", k));
        if (f.tail) begin
          cur_src[k] = -1;
          delivered++;
        end
      end
    end
  end

  // Crossing switch boxes of app 1 with both paths busy (row 1, column 2).
  always @(posedge clk) if (rst_n && active_app == 1 && !reconf_busy) begin
    if (dut.g_row[1].g_col[2].g_switch.u_switch.out_valid[0] ||
        dut.g_row[1].g_col[2].g_switch.u_switch.out_valid[2])
      if (dut.g_row[1].g_col[2].g_switch.u_switch.out_valid[1] ||
          dut.g_row[1].g_col[2].g_switch.u_switch.out_valid[3]) n_cross++;
  end

  // Latency of one packet on the idle network: segments + 1 cycles.
  task automatic latency(int s, int t);
    int cyc, app;
    app = int'(active_app);
    new_packet(s, t, 1);
    @(posedge clk);
    while (!(core_in_valid[s] && core_in_ready[s])) @(posedge clk);
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!(core_out_valid[t] && core_out_flit[t].head) && cyc < 100);
    check(cyc == hops[app][s * int'(N_NODES) + t] + 1,
          $sformatf("app %0d latency %0d->%0d: %0d cycles, %0d segments", app, s, t, cyc, hops[app][s * int'(N_NODES) + t]));
    repeat (4) @(posedge clk);
  endtask

  initial begin
    cfg_sw_we = 1'b0; cfg_rt_we = 1'b0;
    cfg_sw_app = '0; cfg_rt_app = '0; cfg_sw_idx = '0; cfg_sw_data = '0;
    cfg_rt_flow = '0; cfg_rt_row = '0;
    reconf_start = 1'b0; reconf_app = '0;
    for (int k = 0; k < int'(N_NODES); k++) cur_src[k] = -1;
    for (int a = 0; a < int'(NUM_APPS); a++) build_app(a);
    check(bypas[1][0 * N_NODES + COLS - 1] && hops[1][0 * N_NODES + COLS - 1] == 2 * int'(COLS),
          "app 1 joins routers 0 and 3 by wire only");
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Host fills the configuration memory.
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

    reconfigure(0);
    latency(0, 1);
    latency(5, 15);
    gen_on = 1'b1;
    for (int n = 0; n < 6; n++) begin
      repeat (1500) @(negedge clk);
      reconfigure((n + 1) % NUM_APPS);
      if (n == 0) begin
        // Let app 1 carry only express traffic for a while.
        gen_on = 1'b0;
        for (int i = 0; i < 40; i++) begin
          new_packet(0, COLS - 1, 4); new_packet(COLS - 1, 0, 4);
          new_packet(N_NODES - COLS, N_NODES - 1, 4);
          new_packet(1, 1 + COLS, 4); new_packet(2 + COLS, 2, 4);
        end
        gen_on = 1'b1;
      end
    end
    gen_on = 1'b0;
    for (int c = 0; c < 20000; c++) begin
      bit left;
      left = (delivered != sent) || net_busy;
      for (int k = 0; k < int'(N_NODES); k++) if (send_q[k].size() != 0) left = 1'b1;
      if (!left) break;
      @(negedge clk);
    end
    for (int k = 0; k < int'(N_NODES); k++) check(send_q[k].size() == 0, "every core sent its packets");
    check(sent > 500 && delivered == sent, $sformatf("all packets delivered (%0d of %0d)", delivered, sent));
    // Express link latency on app 1.
    reconfigure(1);
    latency(0, COLS - 1);
    latency(N_NODES - 1, N_NODES - COLS);
    reconfigure(2);
    latency(COLS - 1, N_NODES - 1);
    for (int s = 0; s < int'(N_NODES); s++)
      for (int t = 0; t < int'(N_NODES); t++) check(exp_q[s][t].size() == 0, "nothing left undelivered");

    $display("mechanisms: reconfigurations=%0d drain_cycles=%0d held_heads=%0d core_stalls=%0d out_stalls=%0d bypass_packets=%0d crossing_cycles=%0d packets=%0d",
             n_reconf, n_drain, n_held, n_stall, n_out_stall, n_bypass, n_cross, delivered);
    check(n_reconf >= 8, "reconfigurations happened");
    check(n_drain > 0, "a reconfiguration waited for the network to drain");
    check(n_held > 0, "new packets were held back during a reconfiguration");
    check(n_stall > 0, "back-pressure stalled a core");
    check(n_out_stall > 0, "a core held off an arriving packet");
    check(n_bypass > 0, "packets used router-bypassing links");
    check(n_cross > 0, "a crossing switch box carried two paths at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
