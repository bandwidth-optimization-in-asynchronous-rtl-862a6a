// tb_pl_link: self-checking test of a link with 0, 2 and 3 pipeline
// latches (the counts used in the network). For each link a 2-phase sender
// and receiver with random delays exchange numbered flits and the receiver
// checks contents and order. Then, with immediately answering neighbours,
// the forward latency (N_PL cycles) and the rate (one flit per cycle for a
// plain link, one per 2 cycles once latches are chained) are checked.
module tb_pl_link
  import noc_pkg::*;
;
  localparam int NL = 3;
  localparam int NPL [NL] = '{0, 2, 3};

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  int   done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  function automatic flit_t mk(int l, int i);
    return '{route: route_t'(i * 11 + l), data: data_t'(32'hA000_0000 + l * 65536 + i)};
  endfunction

  for (genvar l = 0; l < NL; l++) begin : g_link
    logic  lr = 1'b0, la, rr, ra = 1'b0;
    flit_t ld = '0, rd;
    int    n_rx = 0;
    bit    jitter = 1'b1;

    pl_link #(.N_PL(NPL[l])) dut (.clk, .rst_n, .lr, .la, .ld, .rr, .ra, .rd);

    initial begin : receiver
      forever begin
        @(negedge clk);
        if (rst_n && rr != ra) begin
          if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
          check(rd == mk(l, n_rx), $sformatf("link %0d flit order/contents", l));
          n_rx++;
          ra = ~ra;
        end
      end
    end

    task automatic send(input int first, input int n);
      for (int i = first; i < first + n; i++) begin
        if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
        ld = mk(l, i);
        lr = ~lr;
        @(negedge clk);
        while (la != lr) @(negedge clk);
      end
    endtask

    initial begin : sender
      int t0;
      logic r0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      // forward latency with an empty link
      jitter = 1'b0;
      r0 = rr;
      ld = mk(l, 0);
      lr = ~lr;
      t0 = cyc;
      #1;
      while (rr == r0) @(posedge clk) #1;
      check(cyc - t0 == NPL[l], $sformatf("link %0d latency %0d cycles", l, NPL[l]));
      while (la != lr) @(negedge clk);
      jitter = 1'b1;
      send(1, 200);
      while (n_rx != 201) @(negedge clk);
      jitter = 1'b0;
      t0 = cyc;
      send(201, 40);
      while (n_rx != 241) @(negedge clk);
      $display("link with %0d latches: %0d cycles for 40 flits", NPL[l], cyc - t0);
      if (NPL[l] == 0) check(cyc - t0 <= 41, "plain link: one flit per cycle");
      else check(cyc - t0 >= 80 && cyc - t0 <= 80 + NPL[l] + 2, "latched link: one flit per 2 cycles");
      done++;
    end
  end

  initial begin
    wait (done == NL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
