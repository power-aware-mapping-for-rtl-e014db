// reconfig_ctrl: loads the stored configuration of an application into the
// network when that application starts.
//
// A pulse on start with an application number begins a reconfiguration.
// The controller first raises stop_inject, which keeps the cores from
// starting new packets (packets already started run to their end), and
// waits until net_busy shows that no flit is left in any queue, buffer or
// held output. It then walks the configuration memory: one cycle per
// switch box (sw_we with sw_idx, the data coming straight from cfg_store),
// then one cycle per flow (rt_we with rt_flow; every router takes its own
// field of the routing row). Finally it records the new active application,
// pulses done and lowers stop_inject. Loading while traffic is held back
// and the drain step are this design's own choice; the description says
// only that the configuration is loaded when the application starts.
//
// Timing: after the drain, loading takes N_SW + N_NODES*N_NODES cycles. A
// start while the controller is busy is ignored.
module reconfig_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned N_NODES  = 16,
  parameter int unsigned N_SW     = 33,
  parameter int unsigned NUM_APPS = 3,
  localparam int unsigned FLOWS   = N_NODES * N_NODES,
  localparam int unsigned FLOW_W  = (FLOWS > 1) ? $clog2(FLOWS) : 1,
  localparam int unsigned SW_W    = (N_SW > 1) ? $clog2(N_SW) : 1,
  localparam int unsigned APP_W   = (NUM_APPS > 1) ? $clog2(NUM_APPS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [APP_W-1:0]  app,
  input  logic              net_busy,
  output logic              stop_inject,
  output logic              busy,
  output logic              done,
  output logic [APP_W-1:0]  active_app,
  // configuration memory read address
  output logic [APP_W-1:0]  rd_app,
  // configuration bus
  output logic              sw_we,
  output logic [SW_W-1:0]   sw_idx,
  output logic              rt_we,
  output logic [FLOW_W-1:0] rt_flow
);

  typedef enum logic [1:0] {S_IDLE, S_DRAIN, S_LOAD_SW, S_LOAD_RT} state_e;

  state_e            state_q;
  logic [APP_W-1:0]  target_q, active_q;
  logic [SW_W-1:0]   sw_q;
  logic [FLOW_W-1:0] flow_q;
  logic              done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      target_q <= '0;
      active_q <= '0;
      sw_q     <= '0;
      flow_q   <= '0;
      done_q   <= 1'b0;
    end else begin
      done_q <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          target_q <= app;
          state_q  <= S_DRAIN;
        end
        S_DRAIN: if (!net_busy) begin
          sw_q    <= '0;
          state_q <= S_LOAD_SW;
        end
        S_LOAD_SW: begin
          if (sw_q == SW_W'(N_SW - 1)) begin
            flow_q  <= '0;
            state_q <= S_LOAD_RT;
          end else begin
            sw_q <= sw_q + 1'b1;
          end
        end
        S_LOAD_RT: begin
          if (flow_q == FLOW_W'(FLOWS - 1)) begin
            active_q <= target_q;
            done_q   <= 1'b1;
            state_q  <= S_IDLE;
          end else begin
            flow_q <= flow_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign stop_inject = (state_q != S_IDLE);
  assign busy        = (state_q != S_IDLE);
  assign done        = done_q;
  assign active_app  = active_q;
  assign rd_app      = target_q;
  assign sw_we       = (state_q == S_LOAD_SW);
  assign sw_idx      = sw_q;
  assign rt_we       = (state_q == S_LOAD_RT);
  assign rt_flow     = flow_q;

  a_app_range: assert property (@(posedge clk) disable iff (!rst_n)
      (start && state_q == S_IDLE) |-> int'(app) < NUM_APPS)
    else $error("reconfig_ctrl: application number out of range");

endmodule
