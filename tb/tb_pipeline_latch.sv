// tb_pipeline_latch: self-checking test of the link pipeline latch.
// A 2-phase sender feeds numbered flits through one latch to a 2-phase
// receiver, both with random delays; the receiver compares each flit with
// the sequence sent. Checks: order and contents preserved, no flit lost or
// doubled, one cycle forward latency through an empty latch, and one flit
// per cycle when both neighbours answer within half a cycle.
module tb_pipeline_latch
  import noc_pkg::*;
;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  lr = 1'b0, la, rr, ra = 1'b0;
  flit_t ld = '0, rd;
  int    checks = 0, failures = 0, cyc = 0;
  int    n_rx = 0;
  bit    jitter = 1'b1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  pipeline_latch dut (.clk, .rst_n, .lr, .la, .ld, .rr, .ra, .rd);

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

  function automatic flit_t mk(int i);
    return '{route: route_t'(i * 37), data: data_t'(32'h1000_0000 + i * 7)};
  endfunction

  // receiver
  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && rr != ra) begin
        if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
        check(rd == mk(n_rx), "flit contents and order");
        n_rx++;
        ra = ~ra;
      end
    end
  end

  task automatic send(input int first, input int n);
    for (int i = first; i < first + n; i++) begin
      if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
      ld = mk(i);
      lr = ~lr;
      @(negedge clk);
      while (la != lr) @(negedge clk);
    end
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // forward latency through an empty latch
    jitter = 1'b0;
    ld = mk(0);
    lr = ~lr;
    @(posedge clk);
    #1 check(rr == 1'b1, "one cycle forward latency");
    while (la != lr) @(negedge clk);
    jitter = 1'b1;
    send(1, 300);
    repeat (10) @(negedge clk);
    check(n_rx == 301, "no flit lost or doubled");
    jitter = 1'b0;
    t0 = cyc;
    send(301, 50);
    while (n_rx != 351) @(negedge clk);
    $display("cycles for 50 flits: %0d", cyc - t0);
    check(cyc - t0 >= 50 && cyc - t0 <= 53, "one flit per cycle with ideal neighbours");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
