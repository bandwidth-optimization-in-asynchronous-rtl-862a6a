// tb_async_router: self-checking test of the three-port router.
// Three 2-phase senders inject flits with random routes on all ports at
// once and three 2-phase receivers with random delays take them. A
// reference model works out each flit's output port from its input port
// and route MSB (bit 0 -> port (i+1)%3, bit 1 -> port (i+2)%3) and the
// rotated route it must carry. Checks: output port, route, data, order per
// input/output pair, nothing lost, the 5-cycle latency of an idle router,
// and that output contention happened.
module tb_async_router
  import noc_pkg::*;
;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic  [2:0] lr = '0, la, rr, ra = '0, contended;
  flit_t [2:0] ld = '0, rd;
  int    checks = 0, failures = 0, cyc = 0, n_cont = 0;
  flit_t exp_q [3][3][$];     // [in][out]
  int    n_rx = 0;
  bit    jitter = 1'b1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && |contended) n_cont++;

  async_router dut (.clk, .rst_n, .lr, .la, .ld, .rr, .ra, .rd, .contended);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data[31:30] = input port, rest = sequence number
  for (genvar o = 0; o < 3; o++) begin : g_rx
    initial begin
      forever begin
        @(negedge clk);
        if (rst_n && rr[o] != ra[o]) begin
          int s;
          if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
          s = int'(rd[o].data[31:30]);
          if (s > 2 || exp_q[s][o].size() == 0) check(1'b0, $sformatf("unexpected flit at port %0d", o));
          else check(rd[o] == exp_q[s][o].pop_front(), $sformatf("flit %0d->%0d contents/route/order", s, o));
          n_rx++;
          ra[o] = ~ra[o];
        end
      end
    end
  end

  task automatic send(input int i, input route_t rt, input int seq);
    int o;
    flit_t f;
    if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
    f = '{route: rt, data: data_t'((i << 30) | seq)};
    o = rt[ROUTE_W-1] ? (i + 2) % 3 : (i + 1) % 3;
    exp_q[i][o].push_back('{route: swizzle(rt), data: f.data});
    ld[i] = f;
    lr[i] = ~lr[i];
    @(negedge clk);
    while (la[i] != lr[i]) @(negedge clk);
  endtask

  for (genvar i = 0; i < 3; i++) begin : g_tx
    initial begin
      wait (rst_n && !jitter);
      wait (jitter);
      for (int k = 0; k < 300; k++) send(i, route_t'($urandom), k + 1);
    end
  end

  initial begin
    int t0;
    logic r0;
    jitter = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // idle router latency: port 0 -> port 1 (route MSB 0)
    r0 = rr[1];
    t0 = cyc;
    fork
      send(0, 8'h01, 0);
      begin
        #1;
        while (rr[1] == r0) @(posedge clk) #1;
        check(cyc - t0 == 5, "5 cycles through an idle router");
      end
    join
    repeat (4) @(negedge clk);
    jitter = 1'b1;
    wait (n_rx == 901);
    repeat (20) @(negedge clk);
    for (int i = 0; i < 3; i++)
      for (int o = 0; o < 3; o++)
        check(exp_q[i][o].size() == 0, "all flits delivered");
    check(n_cont > 0, "output contention happened");
    $display("contended cycles: %0d", n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
