// tb_merge_ctrl: self-checking test of the merge controller. A 4-phase
// producer drives lr with random gaps and a 2-phase link receiver
// acknowledges with random delays. Checks: one latch enable and one link
// transition per 4-phase request, the latch is never reloaded while the link
// has not acknowledged (rr != ra), la returns to zero after lr, and with an
// immediately answering link one flit leaves every 2 cycles.
module tb_merge_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr = 1'b0, la, rr, ra = 1'b0, le;
  int   checks = 0, failures = 0;
  int   n_le = 0, n_ev = 0, n_req = 0, cyc = 0;
  logic rr_q = 1'b0;
  bit   jitter = 1'b1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  merge_ctrl dut (.clk, .rst_n, .lr, .la, .rr, .ra, .le);

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

  always @(posedge clk) if (rst_n) begin
    if (le) begin
      n_le++;
      if (rr != ra) begin
        failures++; checks++;
        $display("FAIL: latch reloaded before link acknowledge");
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (rr != rr_q) n_ev++;
    rr_q = rr;
  end

  // 2-phase link receiver
  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && rr != ra) begin
        if (jitter) repeat ($urandom_range(0, 4)) @(negedge clk);
        ra = rr;
      end
    end
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

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    produce(300);
    repeat (10) @(negedge clk);
    check(n_le == 300, "one latch load per request");
    check(n_ev == 300, "one link transition per request");
    check(rr == ra, "link idle at the end");
    jitter = 1'b0;
    @(negedge clk);
    t0 = cyc;
    produce(50);
    $display("cycles for 50 flits: %0d", cyc - t0);
    check(cyc - t0 >= 100 && cyc - t0 <= 103, "2 cycles per flit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
