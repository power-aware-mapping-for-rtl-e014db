// reconfig_noc: reconfigurable mesh network-on-chip (top level).
//
// ROWS x COLS routers are not wired to each other directly. They sit on a
// (2*ROWS-1) x (2*COLS-1) grid whose other positions hold programmable
// switch boxes, and every pair of neighbouring grid positions is joined by
// one wire segment (a 0.5 mm segment in the reference layout). Each router
// port reaches a switch box. Setting the switch boxes can rebuild the
// network as a plain mesh (straight connections between neighbouring
// routers), as a tree, or as an application-specific topology in which
// heavy communications run on wire-only links that bypass routers. A link
// between routers costs much less power than a router hop, which is what
// makes bypassing worthwhile.
//
// For each application the configuration memory (cfg_store) holds the
// switch-box words and the routing tables found for it at design time. A
// start request makes the reconfiguration controller (reconfig_ctrl) hold
// back new packets, wait for the network to empty and load the chosen
// application's configuration into all switch boxes and routing tables.
//
// Interface: a host writes the configuration memory (cfg_sw_* and
// cfg_rt_*, see cfg_store); reconf_start/reconf_app select an application
// and reconf_done pulses when it is loaded. Core k (router k, at grid
// position (2*(k/COLS), 2*(k%COLS))) sends on core_in_* and receives on
// core_out_*, valid/ready channels of flits (noc_pkg::flit_t). While a
// reconfiguration runs, core_in_ready is low for head flits. Timing: one
// cycle per router and one per switch box on a path.
//
// The grid layout, switch-box structure, one-flit segment buffers and the
// loading of a stored configuration per application follow the design
// description; the router's insides, flow control, the drain before
// loading and the memory organisation are this design's own choices.
module reconfig_noc
  import noc_pkg::*;
#(
  parameter int unsigned ROWS       = 4,
  parameter int unsigned COLS       = 4,
  parameter int unsigned NUM_APPS   = 3,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned N_NODES   = ROWS * COLS,
  localparam int unsigned GR        = 2 * ROWS - 1,
  localparam int unsigned GC        = 2 * COLS - 1,
  localparam int unsigned N_SW      = GR * GC - N_NODES,
  localparam int unsigned FLOWS     = N_NODES * N_NODES,
  localparam int unsigned FLOW_W    = (FLOWS > 1) ? $clog2(FLOWS) : 1,
  localparam int unsigned SW_W      = (N_SW > 1) ? $clog2(N_SW) : 1,
  localparam int unsigned APP_W     = (NUM_APPS > 1) ? $clog2(NUM_APPS) : 1,
  localparam int unsigned ROW_W     = N_NODES * PORT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // host writes into the configuration memory
  input  logic                cfg_sw_we,
  input  logic [APP_W-1:0]    cfg_sw_app,
  input  logic [SW_W-1:0]     cfg_sw_idx,
  input  logic [SW_CFG_W-1:0] cfg_sw_data,
  input  logic                cfg_rt_we,
  input  logic [APP_W-1:0]    cfg_rt_app,
  input  logic [FLOW_W-1:0]   cfg_rt_flow,
  input  logic [ROW_W-1:0]    cfg_rt_row,
  // application switch
  input  logic                reconf_start,
  input  logic [APP_W-1:0]    reconf_app,
  output logic                reconf_busy,
  output logic                reconf_done,
  output logic [APP_W-1:0]    active_app,
  // cores
  input  logic [N_NODES-1:0]  core_in_valid,
  input  flit_t               core_in_flit  [N_NODES],
  output logic [N_NODES-1:0]  core_in_ready,
  output logic [N_NODES-1:0]  core_out_valid,
  output flit_t               core_out_flit [N_NODES],
  input  logic [N_NODES-1:0]  core_out_ready,
  // status
  output logic                net_busy,
  output logic                sw_cfg_err
);

  // What each grid position drives towards its four neighbours ...
  logic [3:0] g_out_valid [GR][GC];
  flit_t      g_out_flit  [GR][GC][4];
  logic [3:0] g_in_ready  [GR][GC];
  // ... and what it receives from them.
  logic [3:0] g_in_valid  [GR][GC];
  flit_t      g_in_flit   [GR][GC][4];
  logic [3:0] g_out_ready [GR][GC];

  logic [GR*GC-1:0] pos_busy;
  logic [GR*GC-1:0] pos_err;

  logic              stop_inject;
  logic [APP_W-1:0]  rd_app;
  logic              sw_we, rt_we;
  logic [SW_W-1:0]   sw_idx;
  logic [FLOW_W-1:0] rt_flow;
  logic [SW_CFG_W-1:0] rd_sw_data;
  logic [ROW_W-1:0]  rd_rt_row;

  // ------------------------------------------------------------------
  // Wire segments between neighbouring grid positions.
  // ------------------------------------------------------------------
  for (genvar r = 0; r < GR; r++) begin : g_seg_r
    for (genvar c = 0; c < GC; c++) begin : g_seg_c
      for (genvar d = 0; d < 4; d++) begin : g_seg_d
        localparam int NR = (d == 0) ? r - 1 : (d == 2) ? r + 1 : r;
        localparam int NC = (d == 1) ? c + 1 : (d == 3) ? c - 1 : c;
        localparam int OD = (d + 2) % 4;
        if (NR >= 0 && NR < int'(GR) && NC >= 0 && NC < int'(GC)) begin : g_link
          assign g_in_valid[r][c][d]  = g_out_valid[NR][NC][OD];
          assign g_in_flit[r][c][d]   = g_out_flit[NR][NC][OD];
          assign g_out_ready[r][c][d] = g_in_ready[NR][NC][OD];
        end else begin : g_edge
          // Edge of the grid: no segment.
          assign g_in_valid[r][c][d]  = 1'b0;
          assign g_in_flit[r][c][d]   = '0;
          assign g_out_ready[r][c][d] = 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Routers at even positions, switch boxes everywhere else.
  // ------------------------------------------------------------------
  for (genvar r = 0; r < GR; r++) begin : g_row
    for (genvar c = 0; c < GC; c++) begin : g_col
      if ((r % 2 == 0) && (c % 2 == 0)) begin : g_router
        localparam int unsigned K = router_index(r, c, COLS);
        logic [4:0] rin_valid, rin_ready, rout_valid, rout_ready;
        flit_t      rin_flit  [5];
        flit_t      rout_flit [5];
        logic       hold;

        // New packets wait while a reconfiguration runs.
        assign hold = stop_inject && core_in_flit[K].head;

        assign rin_valid  = {core_in_valid[K] && !hold, g_in_valid[r][c]};
        assign rout_ready = {core_out_ready[K], g_out_ready[r][c]};
        for (genvar d = 0; d < 4; d++) begin : g_p
          assign rin_flit[d]        = g_in_flit[r][c][d];
          assign g_out_flit[r][c][d] = rout_flit[d];
        end
        assign rin_flit[4]          = core_in_flit[K];
        assign g_out_valid[r][c]    = rout_valid[3:0];
        assign g_in_ready[r][c]     = rin_ready[3:0];
        assign core_in_ready[K]     = rin_ready[4] && !hold;
        assign core_out_valid[K]    = rout_valid[4];
        assign core_out_flit[K]     = rout_flit[4];
        assign pos_err[r*GC+c]      = 1'b0;

        noc_router #(.N_NODES(N_NODES), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
          .clk      (clk),
          .rst_n    (rst_n),
          .rt_we    (rt_we),
          .rt_flow  (rt_flow),
          .rt_port  (rd_rt_row[K*PORT_W +: PORT_W]),
          .in_valid (rin_valid),
          .in_flit  (rin_flit),
          .in_ready (rin_ready),
          .out_valid(rout_valid),
          .out_flit (rout_flit),
          .out_ready(rout_ready),
          .busy     (pos_busy[r*GC+c])
        );
      end else begin : g_switch
        localparam int unsigned S = switch_index(r, c, COLS);
        logic [SW_CFG_W-1:0] cfg_now;
        flit_t sin_flit  [4];
        flit_t sout_flit [4];

        for (genvar d = 0; d < 4; d++) begin : g_p
          assign sin_flit[d]         = g_in_flit[r][c][d];
          assign g_out_flit[r][c][d] = sout_flit[d];
        end

        switch_box u_switch (
          .clk      (clk),
          .rst_n    (rst_n),
          .cfg_we   (sw_we && (sw_idx == SW_W'(S))),
          .cfg_wdata(rd_sw_data),
          .cfg      (cfg_now),
          .cfg_err  (pos_err[r*GC+c]),
          .in_valid (g_in_valid[r][c]),
          .in_flit  (sin_flit),
          .in_ready (g_in_ready[r][c]),
          .out_valid(g_out_valid[r][c]),
          .out_flit (sout_flit),
          .out_ready(g_out_ready[r][c]),
          .busy     (pos_busy[r*GC+c])
        );
      end
    end
  end

  assign net_busy   = |pos_busy;
  assign sw_cfg_err = |pos_err;

  // ------------------------------------------------------------------
  // Stored configurations and the controller that loads them.
  // ------------------------------------------------------------------
  cfg_store #(.N_NODES(N_NODES), .N_SW(N_SW), .NUM_APPS(NUM_APPS)) u_store (
    .clk       (clk),
    .wr_sw_we  (cfg_sw_we),
    .wr_sw_app (cfg_sw_app),
    .wr_sw_idx (cfg_sw_idx),
    .wr_sw_data(cfg_sw_data),
    .wr_rt_we  (cfg_rt_we),
    .wr_rt_app (cfg_rt_app),
    .wr_rt_flow(cfg_rt_flow),
    .wr_rt_row (cfg_rt_row),
    .rd_app    (rd_app),
    .rd_sw_idx (sw_idx),
    .rd_sw_data(rd_sw_data),
    .rd_flow   (rt_flow),
    .rd_rt_row (rd_rt_row)
  );

  reconfig_ctrl #(.N_NODES(N_NODES), .N_SW(N_SW), .NUM_APPS(NUM_APPS)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (reconf_start),
    .app        (reconf_app),
    .net_busy   (net_busy),
    .stop_inject(stop_inject),
    .busy       (reconf_busy),
    .done       (reconf_done),
    .active_app (active_app),
    .rd_app     (rd_app),
    .sw_we      (sw_we),
    .sw_idx     (sw_idx),
    .rt_we      (rt_we),
    .rt_flow    (rt_flow)
  );

endmodule
