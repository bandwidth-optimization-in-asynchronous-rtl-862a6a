// tb_link_bandwidth: shows the link-bandwidth effect the network is built
// on. A router output (merge module) drives a long link into a router input
// (switch module). The link's wire has a total flight time of WIRE cycles
// each way. Without latches one 2-phase handshake loop spans the whole
// wire; with N pipeline latches spread evenly, each loop spans WIRE/(N+1).
//
// For N = 0, 1, 3 the test streams flits through merge -> link -> switch,
// checks that every flit arrives intact and in order, measures the cycles
// per flit, and checks that (a) more latches give strictly more bandwidth,
// (b) the unlatched link needs at least the 2*WIRE cycles of two wire
// flights per flit, and (c) in every case the cycle time is the cycle time
// of a zero-length link (the controllers' own limit, 4 cycles in this
// clocked model) plus two flights over the longest segment.
module tb_link_bandwidth
  import noc_pkg::*;
;
  localparam int WIRE = 12;
  localparam int NCFG = 4;
  localparam int NPL  [NCFG] = '{0, 1, 3, 0};
  localparam int SEGD [NCFG] = '{WIRE, WIRE / 2, WIRE / 4, 0};  // last: zero-length link
  localparam int NF = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0, done = 0;
  int   period [NCFG];

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
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int N = NPL[g];
    // merge input side (4-phase from the test)
    logic  m_lr = 1'b0, m_la;
    flit_t m_ld = '0;
    logic  unused_la2;
    // segments: seg k from node k to node k+1; node 0 = merge output,
    // node N+1 = switch input; latches sit between segments
    logic  s_lr [N+1], s_la [N+1], s_rr [N+1], s_ra [N+1];
    flit_t s_ld [N+1], s_rd [N+1];
    // switch outputs (4-phase to the test)
    logic  w_rr1, w_rr2, w_ra1 = 1'b0;
    flit_t w_rd;
    int    n_rx = 0;
    logic  [2:0] unused_c;

    async_merge u_mg (
      .clk, .rst_n,
      .lr1(m_lr), .la1(m_la), .ld1(m_ld),
      .lr2(1'b0), .la2(unused_la2), .ld2('0),
      .rr(s_lr[0]), .ra(s_la[0]), .rd(s_ld[0]), .contended(unused_c[0])
    );

    for (genvar k = 0; k <= N; k++) begin : g_seg
      wire_delay #(.D(SEGD[g])) u_w (
        .clk, .lr(s_lr[k]), .ld(s_ld[k]), .la(s_la[k]),
        .rr(s_rr[k]), .rd(s_rd[k]), .ra(s_ra[k])
      );
      if (k < N) begin : g_pl
        pipeline_latch u_pl (
          .clk, .rst_n,
          .lr(s_rr[k]), .la(s_ra[k]), .ld(s_rd[k]),
          .rr(s_lr[k+1]), .ra(s_la[k+1]), .rd(s_ld[k+1])
        );
      end
    end

    async_switch u_sw (
      .clk, .rst_n,
      .lr(s_rr[N]), .la(s_ra[N]), .ld(s_rd[N]),
      .rr1(w_rr1), .ra1(w_ra1), .rr2(w_rr2), .ra2(1'b0), .rd(w_rd)
    );

    function automatic flit_t mk(int i);
      return '{route: 8'h00, data: data_t'(32'hC000_0000 + g * 4096 + i)};
    endfunction

    // 4-phase receiver behind the switch (answers at once)
    initial begin
      forever begin
        @(negedge clk);
        if (w_rr1) begin
          check(w_rd == mk(n_rx), $sformatf("config %0d flit order/contents", g));
          n_rx++;
          w_ra1 = 1'b1;
          while (w_rr1) @(negedge clk);
          w_ra1 = 1'b0;
        end
        check(!w_rr2, "route MSB 0 never leaves by the second output");
      end
    end

    // 4-phase sender into the merge (as fast as the merge accepts)
    initial begin
      int t0;
      wait (rst_n);
      @(negedge clk);
      for (int i = 0; i < NF; i++) begin
        if (i == 10) t0 = cyc;
        m_ld = mk(i);
        m_lr = 1'b1;
        while (!m_la) @(negedge clk);
        m_lr = 1'b0;
        while (m_la) @(negedge clk);
      end
      while (n_rx != NF) @(negedge clk);
      period[g] = (cyc - t0) / (NF - 10);
      $display("latches %0d, segment flight %0d cycles: %0d cycles per flit", N, SEGD[g], period[g]);
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done == NCFG);
    check(period[0] >= 2 * WIRE, "unlatched link: two wire flights per flit");
    check(period[1] < period[0], "one latch raises the link bandwidth");
    check(period[2] < period[1], "three latches raise it further");
    for (int g = 0; g < NCFG; g++)
      check(period[g] == 2 * SEGD[g] + period[3],
            $sformatf("config %0d: cycle = 2 x segment flight + controller time", g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
