// tb_reconfig_ctrl: self-checking test of the reconfiguration controller.
//
// Each round asks for an application while the network model reports busy
// for a random number of cycles. The testbench checks that stop_inject
// rises at once and stays high, that nothing is loaded while the network
// is busy, that the switch words and then the routing rows are written
// once each in order (N_SW + N_NODES*N_NODES cycles in all), that done
// pulses once and that active_app then names the requested application.
// A start during a reconfiguration must be ignored.
module tb_reconfig_ctrl;
  import noc_pkg::*;

  localparam int unsigned N_NODES = 16;
  localparam int unsigned N_SW = 33;
  localparam int unsigned NUM_APPS = 3;
  localparam int unsigned FLOWS = N_NODES * N_NODES;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start, net_busy, stop_inject, busy, done, sw_we, rt_we;
  logic [1:0] app, active_app, rd_app;
  logic [5:0] sw_idx;
  logic [7:0] rt_flow;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  reconfig_ctrl #(.N_NODES(N_NODES), .N_SW(N_SW), .NUM_APPS(NUM_APPS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    app = '0;
    net_busy = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!stop_inject && !busy && active_app == 2'd0, "idle after reset");
    for (int round = 0; round < 6; round++) begin
      int want, drain, sw_n, rt_n, cycles, dones;
      want = (round + 1) % NUM_APPS;
      drain = $urandom_range(0, 12);
      start = 1'b1;
      app = 2'(want);
      net_busy = (drain != 0);
      @(negedge clk);
      start = 1'b0;
      check(stop_inject && busy, "stop_inject right after start");
      // Draining: no loading while busy; a second start is ignored.
      for (int c = 0; c < drain; c++) begin
        if (c == 1) begin start = 1'b1; app = 2'((want + 1) % NUM_APPS); end
        else start = 1'b0;
        net_busy = (c != drain - 1);
        #1;
        check(!sw_we && !rt_we, "nothing loaded while the network is busy");
        @(negedge clk);
      end
      start = 1'b0;
      net_busy = 1'b0;
      // Loading.
      sw_n = 0; rt_n = 0; cycles = 0; dones = 0;
      while (busy && cycles < 1000) begin
        #1;
        check(stop_inject, "stop_inject held during loading");
        check(int'(rd_app) == want, "reads the requested application");
        if (sw_we) begin
          check(int'(sw_idx) == sw_n && rt_n == 0, "switch words in order, before routing rows");
          sw_n++;
        end
        if (rt_we) begin
          check(int'(rt_flow) == rt_n && sw_n == int'(N_SW), "routing rows in order");
          rt_n++;
        end
        if (sw_we || rt_we) cycles++;
        if (!sw_we && !rt_we && (sw_n + rt_n) > 0) check(0, "gap in loading");
        @(negedge clk);
        if (done) dones++;
      end
      check(sw_n == int'(N_SW) && rt_n == int'(FLOWS), "every word loaded once");
      check(cycles == int'(N_SW + FLOWS), $sformatf("loading takes N_SW+FLOWS cycles (%0d)", cycles));
      check(dones == 1, "done pulses once");
      check(int'(active_app) == want && !stop_inject, "new application active");
      @(negedge clk);
      check(!done, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
