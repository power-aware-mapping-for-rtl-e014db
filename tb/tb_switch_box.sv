// tb_switch_box: self-checking test of the programmable switch box.
//
// For every 6-bit configuration word the testbench works out from its own
// pair table which ports are joined and whether the word is illegal (a
// port joined to two others, which must raise cfg_err). For every legal
// word it sends one flit into each joined port and expects it on the
// partner port exactly one cycle later, on no other port. A final phase
// streams random flits through a crossing (N-S and E-W closed together)
// under random back-pressure and checks order and content per output.
module tb_switch_box;
  import noc_pkg::*;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                cfg_we;
  logic [SW_CFG_W-1:0] cfg_wdata, cfg;
  logic                cfg_err;
  logic [3:0]          in_valid, in_ready, out_valid, out_ready;
  flit_t               in_flit [4];
  flit_t               out_flit [4];
  logic                busy;
  int                  checks = 0, failures = 0;

  // Pair table: bit k of the word joins PA[k] and PB[k].
  int unsigned PA [6] = '{0, 0, 0, 1, 1, 2};
  int unsigned PB [6] = '{1, 2, 3, 2, 3, 3};

  always #5 clk = ~clk;

  switch_box dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int unsigned tag);
    return '{head: 1'b1, tail: 1'b0, data: 32'hA500_0000 | tag};
  endfunction

  flit_t exp_q [4][$];

  initial begin
    int partner [4];
    int npart [4];
    cfg_we = 1'b0;
    cfg_wdata = '0;
    in_valid = '0;
    out_ready = '1;
    for (int p = 0; p < 4; p++) in_flit[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cfg == '0 && !cfg_err, "reset configuration is all open");

    for (int w = 0; w < 64; w++) begin
      bit bad;
      for (int p = 0; p < 4; p++) begin
        partner[p] = -1;
        npart[p]   = 0;
      end
      for (int k = 0; k < 6; k++) if (w[k]) begin
        partner[PA[k]] = PB[k]; npart[PA[k]]++;
        partner[PB[k]] = PA[k]; npart[PB[k]]++;
      end
      bad = 1'b0;
      for (int p = 0; p < 4; p++) if (npart[p] > 1) bad = 1'b1;
      cfg_we = 1'b1;
      cfg_wdata = 6'(w);
      @(negedge clk);
      cfg_we = 1'b0;
      check(cfg == 6'(w), "configuration word stored");
      check(cfg_err == bad, $sformatf("cfg_err for word %02h", w));
      if (bad) continue;
      for (int p = 0; p < 4; p++) begin
        if (partner[p] < 0) continue;
        in_valid = 4'b1 << p;
        in_flit[p] = mk(w * 16 + p);
        @(negedge clk);
        in_valid = '0;
        for (int q = 0; q < 4; q++) begin
          if (q == partner[p]) check(out_valid[q] && out_flit[q] == mk(w * 16 + p),
                                     $sformatf("word %02h: port %0d to port %0d", w, p, q));
          else check(!out_valid[q], $sformatf("word %02h: stray flit on port %0d", w, q));
        end
        @(negedge clk);
        check(!busy, "flit left the switch");
      end
    end

    // Crossing: N-S and E-W together, streaming with back-pressure.
    cfg_we = 1'b1;
    cfg_wdata = 6'b010010;
    @(negedge clk);
    cfg_we = 1'b0;
    check(!cfg_err, "crossing is legal");
    for (int i = 0; i < 3010; i++) begin
      for (int p = 0; p < 4; p++) begin
        in_valid[p] = (i < 3000) && 1'($urandom);
        in_flit[p]  = '{head: 1'($urandom), tail: 1'($urandom), data: $urandom};
      end
      out_ready = (i < 3000) ? 4'($urandom) : 4'hf;
      #1;
      for (int q = 0; q < 4; q++) if (out_valid[q] && out_ready[q]) begin
        check(exp_q[q].size() != 0 && out_flit[q] == exp_q[q].pop_front(), $sformatf("stream on port %0d", q));
      end
      for (int p = 0; p < 4; p++) if (in_valid[p] && in_ready[p]) exp_q[(p + 2) % 4].push_back(in_flit[p]);
      @(negedge clk);
    end
    for (int q = 0; q < 4; q++) check(exp_q[q].size() == 0, "stream drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
