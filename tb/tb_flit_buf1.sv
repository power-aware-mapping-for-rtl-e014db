// tb_flit_buf1: self-checking test of the one-flit segment buffer.
//
// Random traffic with random back-pressure. A queue in the testbench holds
// the flits accepted; every flit that leaves must be the oldest one, must
// leave no earlier than the cycle after it arrived, and in_ready must equal
// "buffer empty". An isolated flit must appear exactly one cycle after it
// is taken.
module tb_flit_buf1;
  import noc_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid, in_ready, out_valid, out_ready, busy;
  flit_t in_flit, out_flit;
  int    checks = 0, failures = 0;
  flit_t model_q [$];
  int    held = 0;

  always #5 clk = ~clk;

  flit_buf1 dut (.*);

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

  // Scoreboard, sampled at each rising edge.
  always @(posedge clk) if (rst_n) begin
    check(in_ready == (model_q.size() == 0), "in_ready is not 'empty'");
    check(busy == (model_q.size() != 0), "busy mismatch");
    if (out_valid && out_ready) begin
      check(model_q.size() != 0, "flit out of an empty buffer");
      if (model_q.size() != 0) check(out_flit == model_q.pop_front(), "wrong flit out");
    end
    if (in_valid && in_ready) model_q.push_back(in_flit);
  end

  initial begin
    in_valid  = 1'b0;
    in_flit   = '0;
    out_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Isolated flit: valid exactly one cycle later.
    @(negedge clk);
    in_valid = 1'b1;
    in_flit  = '{head: 1'b1, tail: 1'b1, data: 32'hCAFE_0001};
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid && out_flit.data == 32'hCAFE_0001, "one-cycle latency");
    out_ready = 1'b1;
    @(negedge clk);
    check(!out_valid, "buffer empties after the flit is taken");
    // Random traffic.
    for (int i = 0; i < 5000; i++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_flit   = '{head: 1'($urandom), tail: 1'($urandom), data: $urandom};
      out_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (4) @(negedge clk);
    check(model_q.size() == 0, "buffer drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
