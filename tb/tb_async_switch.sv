// tb_async_switch: self-checking test of the router's input switch.
// A 2-phase sender delivers flits with random routes; two 4-phase
// receivers with random delays stand for the two merge modules. A
// reference model predicts, from the route MSB, which output each flit must
// leave by and with which rotated route. Checks: output choice, rotated
// route, data, order, no flit lost, the two outputs never requested at once,
// and the 3-cycle delay from a link event to the output request of an idle
// switch.
module tb_async_switch
  import noc_pkg::*;
;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  lr = 1'b0, la, rr1, rr2, ra1 = 1'b0, ra2 = 1'b0;
  flit_t ld = '0, rd;
  int    checks = 0, failures = 0, cyc = 0;
  flit_t exp_q [2][$];
  int    n_rx [2] = '{0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  async_switch dut (.clk, .rst_n, .lr, .la, .ld, .rr1, .ra1, .rr2, .ra2, .rd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) check(!(rr1 && rr2), "one output at a time");

  // 4-phase receiver on output o (0 -> rr1, 1 -> rr2)
  for (genvar o = 0; o < 2; o++) begin : g_rx
    initial begin
      forever begin
        @(negedge clk);
        if (rst_n && (o == 0 ? rr1 : rr2)) begin
          flit_t e;
          repeat ($urandom_range(0, 3)) @(negedge clk);
          if (exp_q[o].size() == 0) begin
            check(1'b0, "unexpected flit");
          end else begin
            e = exp_q[o].pop_front();
            check(rd == e, $sformatf("output %0d flit contents/route/order", o));
          end
          n_rx[o]++;
          if (o == 0) ra1 = 1'b1; else ra2 = 1'b1;
          while (o == 0 ? rr1 : rr2) @(negedge clk);
          repeat ($urandom_range(0, 2)) @(negedge clk);
          if (o == 0) ra1 = 1'b0; else ra2 = 1'b0;
        end
      end
    end
  end

  task automatic send(input flit_t f, input bit jitter);
    int o;
    if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
    o = f.route[ROUTE_W-1];
    exp_q[o].push_back('{route: {f.route[ROUTE_W-2:0], f.route[ROUTE_W-1]}, data: f.data});
    ld = f;
    lr = ~lr;
    @(negedge clk);
    while (la != lr) @(negedge clk);
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // latency of an idle switch: event to output request
    t0 = cyc;
    fork
      send('{route: 8'b1000_0001, data: 32'h5555_0001}, 1'b0);
      begin
        while (!rr2) @(posedge clk) #1;
        check(cyc - t0 == 3, "3 cycles from link event to output request");
      end
    join
    for (int i = 0; i < 400; i++)
      send('{route: route_t'($urandom), data: data_t'($urandom)}, 1'b1);
    repeat (20) @(negedge clk);
    check(n_rx[0] + n_rx[1] == 401, "every flit delivered once");
    check(n_rx[0] > 100 && n_rx[1] > 100, "both outputs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
