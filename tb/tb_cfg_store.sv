// tb_cfg_store: self-checking test of the configuration memory.
//
// Writes every switch word and every routing row of all three applications
// with random values (kept in the testbench), then reads them all back in a
// random order through the read ports and compares. Also checks that a
// write to one application leaves the others unchanged.
module tb_cfg_store;
  import noc_pkg::*;

  localparam int unsigned N_NODES = 16;
  localparam int unsigned N_SW = 33;
  localparam int unsigned NUM_APPS = 3;
  localparam int unsigned FLOWS = N_NODES * N_NODES;
  localparam int unsigned ROW_W = N_NODES * 3;

  logic             clk = 1'b0;
  logic             wr_sw_we, wr_rt_we;
  logic [1:0]       wr_sw_app, wr_rt_app, rd_app;
  logic [5:0]       wr_sw_idx, rd_sw_idx;
  logic [5:0]       wr_sw_data, rd_sw_data;
  logic [7:0]       wr_rt_flow, rd_flow;
  logic [ROW_W-1:0] wr_rt_row, rd_rt_row;
  int               checks = 0, failures = 0;

  logic [5:0]       sw_m [NUM_APPS][N_SW];
  logic [ROW_W-1:0] rt_m [NUM_APPS][FLOWS];

  always #5 clk = ~clk;

  cfg_store #(.N_NODES(N_NODES), .N_SW(N_SW), .NUM_APPS(NUM_APPS)) dut (.*);

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
    wr_sw_we = 1'b0;
    wr_rt_we = 1'b0;
    wr_sw_app = '0; wr_rt_app = '0; rd_app = '0;
    wr_sw_idx = '0; rd_sw_idx = '0; wr_sw_data = '0;
    wr_rt_flow = '0; rd_flow = '0; wr_rt_row = '0;
    @(negedge clk);
    // Fill, switch words and routing rows in parallel.
    for (int k = 0; k < int'(NUM_APPS * FLOWS); k++) begin
      int a, f;
      a = k / int'(FLOWS);
      f = k % int'(FLOWS);
      rt_m[a][f] = {$urandom, $urandom};
      wr_rt_we = 1'b1;
      wr_rt_app = 2'(a);
      wr_rt_flow = 8'(f);
      wr_rt_row = rt_m[a][f];
      wr_sw_we = (f < int'(N_SW));
      if (f < int'(N_SW)) begin
        sw_m[a][f] = 6'($urandom);
        wr_sw_app = 2'(a);
        wr_sw_idx = 6'(f);
        wr_sw_data = sw_m[a][f];
      end
      @(negedge clk);
    end
    wr_rt_we = 1'b0;
    wr_sw_we = 1'b0;
    // Overwrite one entry of application 1 only.
    rt_m[1][5] = ~rt_m[1][5];
    sw_m[1][7] = ~sw_m[1][7];
    wr_rt_we = 1'b1; wr_rt_app = 2'd1; wr_rt_flow = 8'd5; wr_rt_row = rt_m[1][5];
    wr_sw_we = 1'b1; wr_sw_app = 2'd1; wr_sw_idx = 6'd7; wr_sw_data = sw_m[1][7];
    @(negedge clk);
    wr_rt_we = 1'b0;
    wr_sw_we = 1'b0;
    // Read back.
    for (int n = 0; n < 3000; n++) begin
      int a, s, f;
      a = $urandom_range(0, NUM_APPS - 1);
      s = $urandom_range(0, N_SW - 1);
      f = $urandom_range(0, FLOWS - 1);
      if (n < 3) begin a = n; s = 7; f = 5; end
      rd_app = 2'(a);
      rd_sw_idx = 6'(s);
      rd_flow = 8'(f);
      #1;
      check(rd_sw_data == sw_m[a][s], $sformatf("switch word app %0d idx %0d", a, s));
      check(rd_rt_row == rt_m[a][f], $sformatf("routing row app %0d flow %0d", a, f));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
