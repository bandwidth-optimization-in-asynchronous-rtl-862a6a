// tb_mpeg4_async_noc: end-to-end test of the MPEG4 network at its default
// configuration (20 pipeline latches on 8 links).
//
// Every core is a 2-phase sender and receiver. Traffic follows the MPEG4
// communication graph: each flit picks one of its 13 core-to-core flows
// with probability proportional to the flow's bandwidth (MB/s) and a
// random direction. Flits carry source, destination and a per-flow
// sequence number; the route is built with route_bits(). Receivers
// acknowledge after random delays and now and then stall for a long time,
// so back-pressure spreads into the network.
//
// Checks: each flit reaches its destination, in order per flow, with the
// data intact and its route rotated once per router passed; nothing is lost.
// Idle-network latency is checked for a 1-router path (5 cycles) and for
// risc -> sram2 (5 cycles plus 3 + 3 pipeline latches). Each mechanism must
// occur at least once: merge contention, a sender stalled by back-pressure,
// traffic over the pipelined links, and both steering directions.
module tb_mpeg4_async_noc
  import noc_pkg::*;
  import mpeg4_topo_pkg::*;
;
  localparam int NFLITS = 3000;
  localparam int NE = 13;
  // MPEG4 flows: endpoints and bandwidth in MB/s
  localparam int E_A [NE] = '{AU, MCPU, SRAM1, MCPU, VU, DSP, RAST, SDRAM, SRAM2, SDRAM, SRAM2, SRAM2, SRAM2};
  localparam int E_B [NE] = '{SDRAM, SRAM1, RAST, SDRAM, SDRAM, SDRAM, SDRAM, UPSAMP, UPSAMP, BABCALC, BABCALC, IDCT, RISC};
  localparam int E_W [NE] = '{1, 14, 40, 20, 64, 3, 200, 304, 224, 11, 58, 84, 167};

  logic             clk = 1'b0, rst_n = 1'b0;
  logic  [NC-1:0]   tx_req = '0, tx_ack, rx_req, rx_ack = '0;
  flit_t [NC-1:0]   tx_data = '0, rx_data;
  logic  [NR*3-1:0] contended;

  int checks = 0, failures = 0, cyc = 0;
  int n_sent = 0, n_rx = 0;
  int n_contended = 0, n_stall = 0, n_pl_flits = 0, n_bit0 = 0, n_bit1 = 0;
  int tx_seq [NC][NC];
  int rx_seq [NC][NC];
  flit_t txq [NC][$];
  bit jitter = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n) n_contended += $countones(contended);

  mpeg4_async_noc dut (
    .clk, .rst_n,
    .core_tx_req(tx_req), .core_tx_ack(tx_ack), .core_tx_data(tx_data),
    .core_rx_req(rx_req), .core_rx_ack(rx_ack), .core_rx_data(rx_data),
    .contended
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (sent %0d received %0d)", n_sent, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic route_t rotl(route_t r, int n);
    for (int k = 0; k < n; k++) r = swizzle(r);
    return r;
  endfunction

  // crosses a link that carries pipeline latches (default placement)
  function automatic bit uses_pl(int s, int d);
    bit a = (s == SRAM2 || s == RISC || d == SRAM2 || d == RISC);
    bit b = (s == SDRAM || s == UPSAMP) != (d == SDRAM || d == UPSAMP);
    return a || b;
  endfunction

  // data = {src[3:0], dst[3:0], seq[23:0]}
  function automatic flit_t mk(int s, int d, int seq);
    return '{route: route_bits(s, d), data: {4'(s), 4'(d), 24'(seq)}};
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_core
    // receiver
    initial begin
      forever begin
        @(negedge clk);
        if (rst_n && rx_req[c] != rx_ack[c]) begin
          int s, d, q;
          if (jitter) begin
            if ($urandom_range(0, 99) == 0) repeat (40) @(negedge clk);
            else repeat ($urandom_range(0, 2)) @(negedge clk);
          end
          s = int'(rx_data[c].data[31:28]);
          d = int'(rx_data[c].data[27:24]);
          q = int'(rx_data[c].data[23:0]);
          check(d == c && s < NC, $sformatf("flit for core %0d delivered to core %0d", d, c));
          if (d == c && s < NC) begin
            check(q == rx_seq[s][c], $sformatf("flow %0d->%0d in order", s, c));
            rx_seq[s][c] = q + 1;
            check(rx_data[c].route == rotl(route_bits(s, c), int'(hops(s, c))),
                  "route rotated once per router");
            if (uses_pl(s, c)) n_pl_flits++;
          end
          n_rx++;
          rx_ack[c] = ~rx_ack[c];
        end
      end
    end
    // sender
    initial begin
      forever begin
        @(negedge clk);
        if (jitter && txq[c].size() > 0) begin
          int w;
          w = 0;
          tx_data[c] = txq[c].pop_front();
          tx_req[c]  = ~tx_req[c];
          n_sent++;
          @(negedge clk);
          while (tx_ack[c] != tx_req[c]) begin
            w++;
            @(negedge clk);
          end
          if (w >= 10) n_stall++;
          repeat ($urandom_range(0, 4)) @(negedge clk);
        end
      end
    end
  end

  task automatic idle_latency(input int s, input int d, input int expect_cyc);
    int t0;
    logic r0;
    r0 = rx_req[d];
    tx_data[s] = mk(s, d, tx_seq[s][d]);
    tx_seq[s][d]++;
    tx_req[s] = ~tx_req[s];
    n_sent++;
    t0 = cyc;
    #1;
    while (rx_req[d] == r0) @(posedge clk) #1;
    check(cyc - t0 == expect_cyc,
          $sformatf("idle latency %0d->%0d: %0d cycles, expected %0d", s, d, cyc - t0, expect_cyc));
    while (rx_ack[d] != rx_req[d] || tx_ack[s] != tx_req[s]) @(negedge clk);
  endtask

  initial begin
    int total_w = 0;
    for (int e = 0; e < NE; e++) total_w += E_W[e];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    idle_latency(SDRAM, UPSAMP, 5);
    idle_latency(RISC, SRAM2, 5 + 3 + 3);
    idle_latency(AU, IDCT, 5 * int'(hops(AU, IDCT)));
    // generate MPEG4 traffic
    for (int i = 0; i < NFLITS; i++) begin
      int x, e, s, d;
      x = $urandom_range(0, total_w - 1);
      e = 0;
      while (x >= E_W[e]) begin
        x -= E_W[e];
        e++;
      end
      if ($urandom_range(0, 1) == 1) begin s = E_A[e]; d = E_B[e]; end
      else begin s = E_B[e]; d = E_A[e]; end
      txq[s].push_back(mk(s, d, tx_seq[s][d]));
      tx_seq[s][d]++;
      if (route_bits(s, d)[ROUTE_W-1]) n_bit1++; else n_bit0++;
    end
    jitter = 1'b1;
    wait (n_rx == n_sent && n_sent == NFLITS + 3);
    repeat (50) @(negedge clk);
    for (int s = 0; s < NC; s++)
      for (int d = 0; d < NC; d++)
        check(rx_seq[s][d] == tx_seq[s][d], $sformatf("flow %0d->%0d complete", s, d));
    $display("flits %0d, contended cycles %0d, stalled sends %0d, flits over pipelined links %0d, first-bit 0/1 %0d/%0d, cycles %0d",
             n_rx, n_contended, n_stall, n_pl_flits, n_bit0, n_bit1, cyc);
    check(n_contended > 0, "merge contention happened");
    check(n_stall > 0, "back-pressure stalled a sender");
    check(n_pl_flits > 0, "traffic over pipelined links");
    check(n_bit0 > 0 && n_bit1 > 0, "both steering directions used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
