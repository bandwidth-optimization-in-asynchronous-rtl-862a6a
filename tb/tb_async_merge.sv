// tb_async_merge: self-checking test of the router's output merge.
// Two 4-phase senders (standing for two switches) offer tagged flits with
// random gaps; a 2-phase link receiver with random delays takes them. The
// receiver checks every flit against the sequence of the sender it came
// from (tag in the data), so contents and per-input order are checked and
// no flit may be lost, doubled or mixed with the other input's data.
// Contention between the inputs must occur and be flagged. An idle merge
// must put a flit on the link 2 cycles after the request.
module tb_async_merge
  import noc_pkg::*;
;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  lr1 = 1'b0, lr2 = 1'b0, la1, la2, rr, ra = 1'b0, contended;
  flit_t ld1 = '0, ld2 = '0, rd;
  int    checks = 0, failures = 0, cyc = 0, n_cont = 0;
  int    n_rx [2] = '{0, 0};
  bit    jitter = 1'b1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && contended) n_cont++;

  async_merge dut (.clk, .rst_n, .lr1, .la1, .ld1, .lr2, .la2, .ld2,
                   .rr, .ra, .rd, .contended);

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

  function automatic flit_t mk(int s, int i);
    return '{route: route_t'(i + s * 128), data: data_t'((s << 28) | i)};
  endfunction

  initial begin : receiver
    forever begin
      @(negedge clk);
      if (rst_n && rr != ra) begin
        int s;
        if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
        s = int'(rd.data[31:28]);
        if (s > 1) check(1'b0, "unknown sender tag");
        else begin
          check(rd == mk(s, n_rx[s]), $sformatf("input %0d contents and order", s + 1));
          n_rx[s]++;
        end
        ra = ~ra;
      end
    end
  end

  task automatic send1(input int first, input int n);
    for (int i = first; i < first + n; i++) begin
      if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
      ld1 = mk(0, i); lr1 = 1'b1;
      while (!la1) @(negedge clk);
      lr1 = 1'b0;
      while (la1) @(negedge clk);
    end
  endtask

  task automatic send2(input int first, input int n);
    for (int i = first; i < first + n; i++) begin
      if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
      ld2 = mk(1, i); lr2 = 1'b1;
      while (!la2) @(negedge clk);
      lr2 = 1'b0;
      while (la2) @(negedge clk);
    end
  endtask

  initial begin
    int t0;
    logic r0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    jitter = 1'b0;
    r0 = rr;
    t0 = cyc;
    fork
      send1(0, 1);
      begin
        #1;
        while (rr == r0) @(posedge clk) #1;
        check(cyc - t0 == 2, "2 cycles from request to link transition");
      end
    join
    jitter = 1'b1;
    fork
      send1(1, 300);
      send2(0, 300);
    join
    repeat (20) @(negedge clk);
    check(n_rx[0] == 301 && n_rx[1] == 300, "every flit delivered once");
    check(n_cont > 0, "contention occurred");
    $display("contended cycles: %0d", n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
