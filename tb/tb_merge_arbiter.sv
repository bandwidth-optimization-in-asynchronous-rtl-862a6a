// tb_merge_arbiter: self-checking test of the merge arbitration circuit.
// Two 4-phase requesters with random delays compete for one 4-phase
// responder. Checks: the two acknowledges are never high together, each
// every request is
// served exactly once, a tie goes to the input not served last and is flagged on
// 'contended', and a lone request is granted in one cycle.
module tb_merge_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic r1 = 1'b0, r2 = 1'b0, am = 1'b0;
  logic a1, a2, rm, sel, contended;
  int   checks = 0, failures = 0;
  int   served1 = 0, served2 = 0, n_contended = 0;
  bit   run_resp = 1'b1;
  logic last_two = 1'b0;   // input 2 was served last

  always #5 clk = ~clk;

  merge_arbiter dut (.clk, .rst_n, .r1, .a1, .r2, .a2, .rm, .am, .sel, .contended);

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

  always @(negedge clk) if (rst_n) begin
    check(!(a1 && a2), "acknowledges mutually exclusive");
    if (a1) check(sel == 1'b0, "sel follows grant 1");
    if (a2) check(sel == 1'b1, "sel follows grant 2");
    if (contended) n_contended++;
    if (a1) last_two = 1'b0;
    if (a2) last_two = 1'b1;
  end

  // 4-phase responder on the merged channel
  initial begin
    forever begin
      @(negedge clk);
      if (run_resp && rm && !am) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        am = 1'b1;
      end else if (run_resp && !rm && am) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        am = 1'b0;
      end
    end
  end

  task automatic req1(input int n);
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      r1 = 1'b1;
      while (!a1) @(negedge clk);
      served1++;
      r1 = 1'b0;
      while (a1) @(negedge clk);
    end
  endtask

  task automatic req2(input int n);
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      r2 = 1'b1;
      while (!a2) @(negedge clk);
      served2++;
      r2 = 1'b0;
      while (a2) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // lone request: granted at the next edge
    r1 = 1'b1;
    @(negedge clk);
    check(rm && !sel, "lone request granted in one cycle");
    while (!a1) @(negedge clk);
    r1 = 1'b0;
    while (a1 || am) @(negedge clk);
    @(negedge clk);
    // ties: both request in the same cycle, winners must alternate
    for (int k = 0; k < 6; k++) begin
      logic w;
      r1 = 1'b1; r2 = 1'b1;
      @(negedge clk);
      w = sel;
      check(w != last_two, "tie goes to the input that did not win last");
      // serve both
      while (!(w ? a2 : a1)) @(negedge clk);
      if (w) r2 = 1'b0; else r1 = 1'b0;
      while (w ? a2 : a1) @(negedge clk);
      while (!(w ? a1 : a2)) @(negedge clk);
      if (w) r1 = 1'b0; else r2 = 1'b0;
      while ((w ? a1 : a2) || am) @(negedge clk);
      @(negedge clk);
    end
    check(n_contended >= 6, "contention flagged");
    // random traffic from both sides
    fork
      req1(300);
      req2(300);
    join
    check(served1 == 300 && served2 == 300, "every request served once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
