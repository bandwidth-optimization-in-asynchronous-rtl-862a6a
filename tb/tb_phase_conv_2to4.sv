// tb_phase_conv_2to4: self-checking test of the 2-to-4 phase converter.
// The testbench plays both the 2-phase link sender and the 4-phase
// controller (with random response delays) and checks that each link event
// yields exactly one 4-phase cycle, that r4 rises one cycle after the event,
// that la toggles only after a4 is seen high, and that a new event waits for
// a4 to return to zero.
module tb_phase_conv_2to4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr = 1'b0, la, r4, a4 = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  phase_conv_2to4 dut (.clk, .rst_n, .lr, .la, .r4, .a4);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_events = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!r4 && !la, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      logic la_before;
      int   wait_cyc;
      la_before = la;
      lr = ~lr;                       // 2-phase event
      n_events++;
      if (i % 7 == 3) begin
        // hold a4 high from an earlier cycle: r4 must not rise
        a4 = 1'b1;
        repeat (3) begin
          @(negedge clk);
          check(!r4, "r4 waits for a4 low");
        end
        a4 = 1'b0;
      end
      @(negedge clk);
      check(r4, "r4 one cycle after the event");
      wait_cyc = $urandom_range(0, 3);
      repeat (wait_cyc) begin
        @(negedge clk);
        check(r4 && la == la_before, "r4 held and la unchanged before a4");
      end
      a4 = 1'b1;
      @(negedge clk);
      check(!r4, "r4 returns to zero after a4");
      check(la != la_before && la == lr, "la toggled once");
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check(!r4 && la == lr, "no spurious request");
      end
      a4 = 1'b0;
      @(negedge clk);
    end
    check(n_events == 300, "event count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
