// tb_noc_router: self-checking test of the five-port router.
//
// The testbench writes a random routing table (keeping its own copy), then
// lets all five inputs send packets of one to four flits to random flows
// under random back-pressure. Each flit carries its input port, a packet
// number and its position, so every output can check that a packet arrives
// whole and unbroken (wormhole switching), in order per input, and on the
// port the table names. An isolated one-flit packet must leave one cycle
// after it is taken.
module tb_noc_router;
  import noc_pkg::*;

  localparam int unsigned N_NODES = 16;
  localparam int unsigned FLOWS = N_NODES * N_NODES;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        rt_we;
  logic [7:0]  rt_flow;
  logic [2:0]  rt_port;
  logic [4:0]  in_valid, in_ready, out_valid, out_ready;
  flit_t       in_flit [5];
  flit_t       out_flit [5];
  logic        busy;
  int          checks = 0, failures = 0;

  logic [2:0]  table_m [FLOWS];
  flit_t       send_q [5][$];      // flits each input still has to send
  flit_t       exp_q [5][5][$];    // [input][output] flits expected, in order
  int          cur_in [5];         // input whose packet an output is carrying, or -1
  int          delivered = 0, contended = 0;

  always #5 clk = ~clk;

  noc_router #(.N_NODES(N_NODES), .FIFO_DEPTH(4)) dut (.*);

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
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_packet(int i, int seq);
    int unsigned src, dst, len, o;
    src = $urandom_range(0, N_NODES - 1);
    dst = $urandom_range(0, N_NODES - 1);
    len = $urandom_range(1, 4);
    o   = table_m[src * N_NODES + dst];
    for (int k = 0; k < int'(len); k++) begin
      flit_t f;
      f.head = (k == 0);
      f.tail = (k == int'(len) - 1);
      if (k == 0) f.data = {4'(i), 12'(seq), 8'(src), 8'(dst)};
      else        f.data = {4'(i), 12'(seq), 8'(k), 8'hBD};
      send_q[i].push_back(f);
      exp_q[i][o].push_back(f);
    end
  endtask

  // One cycle: apply inputs, then at the sampling point update the models.
  task automatic step(bit rand_ready);
    for (int i = 0; i < 5; i++) begin
      in_valid[i] = (send_q[i].size() != 0) && ($urandom_range(0, 3) != 0);
      in_flit[i]  = (send_q[i].size() != 0) ? send_q[i][0] : '0;
    end
    out_ready = rand_ready ? 5'($urandom) : 5'h1f;
    #1;
    if (out_valid != 0 && !$onehot0(out_valid)) contended++;
    for (int o = 0; o < 5; o++) if (out_valid[o] && out_ready[o]) begin
      flit_t f = out_flit[o];
      int i = int'(f.data[31:28]);
      if (f.head) begin
        check(cur_in[o] < 0, $sformatf("out %0d: head inside a packet", o));
        cur_in[o] = i;
      end
      check(cur_in[o] == i, $sformatf("out %0d: flit of another packet", o));
      check(exp_q[i][o].size() != 0 && exp_q[i][o][0] == f,
            $sformatf("out %0d: wrong flit %h", o, f.data));
      if (exp_q[i][o].size() != 0) void'(exp_q[i][o].pop_front());
      if (f.tail) begin
        cur_in[o] = -1;
        delivered++;
      end
    end
    for (int i = 0; i < 5; i++) if (in_valid[i] && in_ready[i]) void'(send_q[i].pop_front());
    @(negedge clk);
  endtask

  initial begin
    rt_we = 1'b0;
    rt_flow = '0;
    rt_port = '0;
    in_valid = '0;
    out_ready = '1;
    for (int i = 0; i < 5; i++) begin
      in_flit[i] = '0;
      cur_in[i] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Load the routing table.
    for (int f = 0; f < int'(FLOWS); f++) begin
      table_m[f] = 3'($urandom_range(0, 4));
      rt_we = 1'b1;
      rt_flow = 8'(f);
      rt_port = table_m[f];
      @(negedge clk);
    end
    rt_we = 1'b0;

    // Latency of an isolated one-flit packet from input W to the port the table names.
    begin
      int o;
      o = table_m[3 * N_NODES + 9];
      in_valid = 5'b01000;
      in_flit[3] = '{head: 1'b1, tail: 1'b1, data: {4'd3, 12'd0, 8'd3, 8'd9}};
      @(negedge clk);
      in_valid = '0;
      check(out_valid == (5'b1 << o) && out_flit[o].data[15:0] == 16'h0309,
            "one-cycle latency through an idle router");
      @(negedge clk);
      check(!busy, "router idle again");
    end

    for (int i = 0; i < 5; i++) for (int s = 0; s < 300; s++) make_packet(i, s);
    for (int c = 0; c < 20000; c++) begin
      bit left;
      step(1'b1);
      left = 1'b0;
      for (int i = 0; i < 5; i++) if (send_q[i].size() != 0) left = 1'b1;
      if (!left) break;
    end
    for (int c = 0; c < 40; c++) step(1'b0);
    check(delivered == 5 * 300, $sformatf("all packets delivered (%0d)", delivered));
    check(contended > 0, "several outputs active at once");
    check(!busy, "router idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
