// cfg_store: configuration memory holding, for each of NUM_APPS
// applications, the network configuration found for it at design time.
//
// The design description keeps the best solution of each application (its
// switch configurations and its paths) and loads it into the network when
// that application starts. This memory holds those solutions: one 6-bit
// word per switch box per application, and one routing row per flow per
// application. A routing row carries the output port (3 bits) of every
// router for one flow (source, destination); router k's entry sits at
// bits [3k+2:3k]. The host writes the memory before use through the two
// write ports; the reconfiguration controller reads it through the two
// combinational read ports. Organisation and ports are this design's own
// choice; the memory has no reset.
module cfg_store
  import noc_pkg::*;
#(
  parameter int unsigned N_NODES  = 16,
  parameter int unsigned N_SW     = 33,
  parameter int unsigned NUM_APPS = 3,
  localparam int unsigned FLOWS   = N_NODES * N_NODES,
  localparam int unsigned FLOW_W  = (FLOWS > 1) ? $clog2(FLOWS) : 1,
  localparam int unsigned SW_W    = (N_SW > 1) ? $clog2(N_SW) : 1,
  localparam int unsigned APP_W   = (NUM_APPS > 1) ? $clog2(NUM_APPS) : 1,
  localparam int unsigned ROW_W   = N_NODES * PORT_W
) (
  input  logic                clk,
  // host writes
  input  logic                wr_sw_we,
  input  logic [APP_W-1:0]    wr_sw_app,
  input  logic [SW_W-1:0]     wr_sw_idx,
  input  logic [SW_CFG_W-1:0] wr_sw_data,
  input  logic                wr_rt_we,
  input  logic [APP_W-1:0]    wr_rt_app,
  input  logic [FLOW_W-1:0]   wr_rt_flow,
  input  logic [ROW_W-1:0]    wr_rt_row,
  // controller reads
  input  logic [APP_W-1:0]    rd_app,
  input  logic [SW_W-1:0]     rd_sw_idx,
  output logic [SW_CFG_W-1:0] rd_sw_data,
  input  logic [FLOW_W-1:0]   rd_flow,
  output logic [ROW_W-1:0]    rd_rt_row
);

  logic [SW_CFG_W-1:0] sw_mem [NUM_APPS * N_SW];
  logic [ROW_W-1:0]    rt_mem [NUM_APPS * FLOWS];

  function automatic int unsigned sw_addr(logic [APP_W-1:0] app, logic [SW_W-1:0] idx);
    return int'(app) * N_SW + int'(idx);
  endfunction

  function automatic int unsigned rt_addr(logic [APP_W-1:0] app, logic [FLOW_W-1:0] flow);
    return int'(app) * FLOWS + int'(flow);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_sw_we) sw_mem[sw_addr(wr_sw_app, wr_sw_idx)] <= wr_sw_data;
    if (wr_rt_we) rt_mem[rt_addr(wr_rt_app, wr_rt_flow)] <= wr_rt_row;
  end

  assign rd_sw_data = sw_mem[sw_addr(rd_app, rd_sw_idx)];
  assign rd_rt_row  = rt_mem[rt_addr(rd_app, rd_flow)];

  a_sw_addr: assert property (@(posedge clk) wr_sw_we |-> (int'(wr_sw_app) < NUM_APPS && int'(wr_sw_idx) < N_SW))
    else $error("cfg_store: switch write out of range");
  a_rt_addr: assert property (@(posedge clk) wr_rt_we |-> (int'(wr_rt_app) < NUM_APPS))
    else $error("cfg_store: routing write out of range");

endmodule
