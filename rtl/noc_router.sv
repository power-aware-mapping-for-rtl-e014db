// noc_router: five-port wormhole router of the reconfigurable mesh, with a
// routing table loaded per application.
//
// Ports N, E, S, W face the four neighbouring switch boxes; port L (4) is the
// tile's own core. Each input port has a FIFO_DEPTH-flit queue (flit_fifo).
// When a head flit reaches the front of a queue, the router reads its
// routing table at the packet's flow, source * N_NODES + destination, and
// gets the output port. Because the links between routers are rebuilt for
// every application, the output port is not a function of the destination
// alone; a table indexed by flow lets every communication follow the path
// chosen for it, as in the design description, where the chosen paths fill
// the routers' routing tables. Each output port has a round-robin arbiter
// (rr_arbiter) among the head flits that want it; the winner holds the port
// until its tail flit has passed (wormhole switching). Queue depth,
// wormhole switching, round-robin arbitration and the flow-indexed table are
// this design's own choices; the description only calls the router a
// typical mesh router.
//
// Interface: valid/ready channels per port (a flit moves when both are high
// at a clock edge); rt_we/rt_flow/rt_port write one table entry; busy is
// high while a flit is queued or an output is held. Timing: a flit written
// into an input queue can leave in the next cycle, so a router adds one
// cycle; an output passes one flit per cycle. The routing table has no
// reset and must be written before use.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned N_NODES    = 16,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned FLOWS     = N_NODES * N_NODES,
  localparam int unsigned FLOW_W    = (FLOWS > 1) ? $clog2(FLOWS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // routing-table write port
  input  logic                rt_we,
  input  logic [FLOW_W-1:0]   rt_flow,
  input  logic [PORT_W-1:0]   rt_port,
  // input channels
  input  logic [4:0]          in_valid,
  input  flit_t               in_flit  [5],
  output logic [4:0]          in_ready,
  // output channels
  output logic [4:0]          out_valid,
  output flit_t               out_flit [5],
  input  logic [4:0]          out_ready,
  output logic                busy
);

  logic [PORT_W-1:0] rt [FLOWS];

  logic [4:0]        q_valid, q_pop;
  flit_t             q_flit [5];
  logic [4:0]        held_q;
  logic [PORT_W-1:0] route [5];
  logic [4:0]        locked_q;
  logic [4:0]        owner_q [5];      // one-hot holder of each output
  logic [4:0]        req [5];
  logic [4:0]        gnt [5];
  logic [4:0]        sel [5];          // one-hot input each output takes
  logic [4:0]        fire;
  logic [4:0]        held_d;

  always_ff @(posedge clk) begin
    if (rt_we) rt[rt_flow] <= rt_port;
  end

  for (genvar i = 0; i < 5; i++) begin : g_in
    flit_fifo #(.DEPTH(FIFO_DEPTH)) u_q (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[i]),
      .in_flit  (in_flit[i]),
      .in_ready (in_ready[i]),
      .out_valid(q_valid[i]),
      .out_flit (q_flit[i]),
      .out_ready(q_pop[i])
    );
  end

  // Table lookup for the head flit at the front of each queue.
  function automatic logic [FLOW_W-1:0] flow_of(flit_t f);
    return FLOW_W'(32'(hdr_src(f)) * N_NODES + 32'(hdr_dst(f)));
  endfunction

  always_comb begin
    for (int i = 0; i < 5; i++) route[i] = rt[flow_of(q_flit[i])];
  end

  // Requests of unrouted head flits to free outputs.
  always_comb begin
    for (int o = 0; o < 5; o++) begin
      for (int i = 0; i < 5; i++) begin
        req[o][i] = q_valid[i] && q_flit[i].head && !held_q[i] &&
                    (route[i] == PORT_W'(o)) && !locked_q[o];
      end
    end
  end

  for (genvar o = 0; o < 5; o++) begin : g_out
    rr_arbiter #(.N(5)) u_arb (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (req[o]),
      .advance(fire[o] && !locked_q[o]),
      .grant  (gnt[o])
    );
  end

  // Crossbar: each output takes its holder or the arbitration winner,
  // selected one-hot.
  always_comb begin
    q_pop = '0;
    for (int o = 0; o < 5; o++) begin
      sel[o]       = locked_q[o] ? owner_q[o] : gnt[o];
      out_valid[o] = (sel[o] & q_valid) != '0;
      out_flit[o]  = '0;
      for (int i = 0; i < 5; i++) out_flit[o] = out_flit[o] | (q_flit[i] & {FLIT_BITS{sel[o][i]}});
      fire[o]      = out_valid[o] && out_ready[o];
      q_pop        = q_pop | (sel[o] & {5{fire[o]}});
    end
  end

  // An input is held from its head flit until its tail flit has left.
  always_comb begin
    held_d = held_q;
    for (int o = 0; o < 5; o++) begin
      if (fire[o] && !locked_q[o] && !out_flit[o].tail) held_d = held_d | sel[o];
      if (fire[o] && locked_q[o] && out_flit[o].tail)   held_d = held_d & ~sel[o];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= '0;
      held_q   <= '0;
      for (int o = 0; o < 5; o++) owner_q[o] <= '0;
    end else begin
      held_q <= held_d;
      for (int o = 0; o < 5; o++) begin
        if (fire[o]) begin
          if (!locked_q[o]) begin
            if (!out_flit[o].tail) begin
              locked_q[o] <= 1'b1;
              owner_q[o]  <= sel[o];
            end
          end else if (out_flit[o].tail) begin
            locked_q[o] <= 1'b0;
          end
        end
      end
    end
  end

  assign busy = (q_valid != '0) || (locked_q != '0);

  // A routing-table entry names one of the five ports.
  a_route_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      (q_valid[0] && q_flit[0].head && !held_q[0]) |-> route[0] <= PORT_W'(4))
    else $error("noc_router: routing table entry out of range");

endmodule
