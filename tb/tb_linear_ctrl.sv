// tb_linear_ctrl: self-checking test of the 4-phase linear controller.
// A 4-phase producer on the left and a 4-phase consumer on the right run
// concurrently with random delays; a reference model counts how many flits
// the stage holds. Checks: le pulses exactly once per left request, la
// follows, the right request appears only while the stage is full, the
// stage never holds more than one flit and every loaded flit is sent once.
// With no added delays, one flit passes every 3 cycles.
module tb_linear_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr = 1'b0, la, rr, ra = 1'b0, le;
  int   checks = 0, failures = 0;
  int   n_le = 0, n_sent = 0, n_req = 0;
  int   occ = 0;
  bit   jitter = 1'b1;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  linear_ctrl dut (.clk, .rst_n, .lr, .la, .rr, .ra, .le);

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

  // occupancy reference: +1 on le, -1 on right acknowledge of a request
  always @(posedge clk) if (rst_n) begin
    if (le) n_le++;
    occ <= occ + (le ? 1 : 0) - ((rr && ra) ? 1 : 0);
  end

  always @(negedge clk) if (rst_n) begin
    check(occ >= 0 && occ <= 1, "stage holds at most one flit");
    if (rr) check(occ == 1, "rr only while full");
  end

  task automatic produce(input int n);
    for (int i = 0; i < n; i++) begin
      if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
      lr = 1'b1; n_req++;
      while (!la) @(negedge clk);
      lr = 1'b0;
      while (la) @(negedge clk);
    end
  endtask

  task automatic consume(input int n);
    for (int i = 0; i < n; i++) begin
      while (!rr) @(negedge clk);
      if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
      ra = 1'b1; n_sent++;
      while (rr) @(negedge clk);
      if (jitter) repeat ($urandom_range(0, 2)) @(negedge clk);
      ra = 1'b0;
    end
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      produce(200);
      consume(200);
    join
    repeat (5) @(negedge clk);
    check(n_le == 200, "one latch load per request");
    check(n_sent == 200, "every flit sent once");
    // throughput with no added delays
    jitter = 1'b0;
    @(negedge clk);
    t0 = cyc;
    fork
      produce(50);
      consume(50);
    join
    t1 = cyc;
    $display("cycles for 50 flits: %0d", t1 - t0);
    check((t1 - t0) >= 50 * 3 && (t1 - t0) <= 50 * 3 + 3, "3 cycles per flit with an ideal neighbour");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
