// switch_box: the programmable switch placed between routers of the
// reconfigurable mesh.
//
// A switch box has four ports, N, E, S and W, each joined by one wire
// segment to the neighbouring router or switch box. Inside it, six small
// switches can each join one pair of ports, as in the design description
// (one switch per pair of the four ports; the circuit realises them as
// transmission gates). Closing switches builds static links that bypass
// routers. Here each segment is a pair of one-way channels, so closing the
// switch between ports a and b joins a's incoming channel to b's outgoing
// channel and b's incoming channel to a's outgoing channel.
//
// Every incoming segment ends in a one-flit buffer (flit_buf1), which
// pipelines long chained links. The configuration word cfg_q (bit order
// N-E, N-S, N-W, E-S, E-W, S-W) is written through cfg_we/cfg_wdata, one
// word per switch box, by the reconfiguration controller.
//
// A port may be joined to at most one other port. The design description
// also allows joining more than two links, which one-way channels cannot
// express; a word that joins a port to two others raises cfg_err, and then
// a port passes flits only if it and its lowest-numbered partner choose
// each other. That rule, and the channel pairing, are this design's own
// choices. Timing: one cycle per switch box, in the input buffer.
module switch_box
  import noc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                cfg_we,
  input  logic [SW_CFG_W-1:0] cfg_wdata,
  output logic [SW_CFG_W-1:0] cfg,
  output logic                cfg_err,
  // incoming half of each segment
  input  logic [3:0]          in_valid,
  input  flit_t               in_flit  [4],
  output logic [3:0]          in_ready,
  // outgoing half of each segment
  output logic [3:0]          out_valid,
  output flit_t               out_flit [4],
  input  logic [3:0]          out_ready,
  output logic                busy
);

  logic [SW_CFG_W-1:0] cfg_q;
  logic [3:0]          b_valid, b_ready, b_busy;
  flit_t               b_flit [4];
  logic [3:0]          partner [4];    // one-hot lowest-numbered partner of each port
  logic [3:0]          joined;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_q <= '0;
    else if (cfg_we) cfg_q <= cfg_wdata;
  end

  assign cfg = cfg_q;

  for (genvar p = 0; p < 4; p++) begin : g_buf
    flit_buf1 u_buf (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[p]),
      .in_flit  (in_flit[p]),
      .in_ready (in_ready[p]),
      .out_valid(b_valid[p]),
      .out_flit (b_flit[p]),
      .out_ready(b_ready[p]),
      .busy     (b_busy[p])
    );
  end

  // Lowest-numbered partner of each port, and whether it has more than one.
  always_comb begin
    cfg_err = 1'b0;
    for (int p = 0; p < 4; p++) begin
      partner[p] = '0;
      for (int q = 3; q >= 0; q--) begin
        if (q != p && cfg_q[pair_bit(p, q)]) begin
          if (partner[p] != '0) cfg_err = 1'b1;
          partner[p]    = '0;
          partner[p][q] = 1'b1;
        end
      end
    end
  end

  // A port is joined when it and its partner choose each other.
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      joined[p] = 1'b0;
      for (int q = 0; q < 4; q++) if (partner[p][q] && partner[q][p]) joined[p] = 1'b1;
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      out_valid[p] = joined[p] && ((partner[p] & b_valid) != '0);
      out_flit[p]  = '0;
      for (int q = 0; q < 4; q++) out_flit[p] = out_flit[p] | (b_flit[q] & {FLIT_BITS{partner[p][q]}});
      b_ready[p]   = joined[p] && ((partner[p] & out_ready) != '0);
    end
  end

  assign busy = |b_busy;

  // The controller writes a configuration only while the network is empty.
  property p_cfg_when_empty;
    @(posedge clk) disable iff (!rst_n) cfg_we |-> !busy;
  endproperty
  a_cfg_when_empty: assert property (p_cfg_when_empty)
    else $error("switch_box: configuration written while a flit is held");

endmodule
