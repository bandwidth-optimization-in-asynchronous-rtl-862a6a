// tb_mpeg4_load: runs the MPEG4 traffic at offered loads 1x, 3x, 5x and 7x
// on two versions of the network side by side: the pipelined one (default
// latch placement, "ASYNC_PL") and one with no latches ("ASYNC"). Both get
// exactly the same flits at the same cycles.
//
// Each of the 13 flows injects a flit in a given cycle with probability
// LOAD x bandwidth / 20000 (bandwidth in MB/s), in a random direction. So 1x
// offers about 0.06 flits per cycle to the whole network and 7x about 0.42,
// which brings the sdram links close to their limit of one flit per 4
// cycles. Senders have unbounded queues. Latency is counted in cycles from
// the cycle a flit is created to its delivery, so it includes time queued
// at the sender.
//
// Checks: every flit arrives at the right core, in order per flow, on both
// networks; average latency rises with load on both; and at 1x the
// pipelined network is slower than the plain one, since at light load the
// latches only add forward delay. Wire delay is not modelled here, so the
// bandwidth gain of the latches does not show in this test (see
// tb_link_bandwidth).
module tb_mpeg4_load
  import noc_pkg::*;
  import mpeg4_topo_pkg::*;
;
  localparam int NE = 13;
  localparam int E_A [NE] = '{AU, MCPU, SRAM1, MCPU, VU, DSP, RAST, SDRAM, SRAM2, SDRAM, SRAM2, SRAM2, SRAM2};
  localparam int E_B [NE] = '{SDRAM, SRAM1, RAST, SDRAM, SDRAM, SDRAM, SDRAM, UPSAMP, UPSAMP, BABCALC, BABCALC, IDCT, RISC};
  localparam int E_W [NE] = '{1, 14, 40, 20, 64, 3, 200, 304, 224, 11, 58, 84, 167};
  localparam int NLOAD = 4;
  localparam int LOADS [NLOAD] = '{1, 3, 5, 7};
  localparam int GEN_CYCLES = 3000;
  localparam int NNET = 2;   // 0: pipelined (default), 1: no latches

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  bit   gen_on = 1'b0;
  int   n_gen = 0;
  int   cur_load = 0;
  int   n_rx      [NNET];
  longint lat_sum [NNET];
  real  avg_lat   [NNET][NLOAD];

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data = {src[3:0], dst[3:0], seq[23:0]}; creation cycle kept aside
  function automatic flit_t mk(int s, int d, int seq);
    return '{route: route_bits(s, d), data: {4'(s), 4'(d), 24'(seq)}};
  endfunction

  // precomputed routes (route_bits is slow to evaluate per flit)
  route_t rt_tab [NC][NC];

  typedef struct {
    flit_t f;
    int    born;
  } pkt_t;

  pkt_t txq [NNET][NC][$];
  int   tx_seq [NC][NC];

  for (genvar n = 0; n < NNET; n++) begin : g_net
    logic             [NC-1:0] tx_req = '0, tx_ack, rx_req, rx_ack = '0;
    flit_t            [NC-1:0] tx_data = '0, rx_data;
    logic             [NR*3-1:0] contended;
    int               rx_seq [NC][NC];
    int               born_q [NC][NC][$];

    if (n == 0) begin : g_pl
      mpeg4_async_noc dut (
        .clk, .rst_n,
        .core_tx_req(tx_req), .core_tx_ack(tx_ack), .core_tx_data(tx_data),
        .core_rx_req(rx_req), .core_rx_ack(rx_ack), .core_rx_data(rx_data),
        .contended
      );
    end else begin : g_nopl
      mpeg4_async_noc #(.PL_OUT('0), .PL_CORE('0)) dut (
        .clk, .rst_n,
        .core_tx_req(tx_req), .core_tx_ack(tx_ack), .core_tx_data(tx_data),
        .core_rx_req(rx_req), .core_rx_ack(rx_ack), .core_rx_data(rx_data),
        .contended
      );
    end

    for (genvar c = 0; c < NC; c++) begin : g_core
      initial begin : receiver
        forever begin
          @(negedge clk);
          if (rst_n && rx_req[c] != rx_ack[c]) begin
            int s, d, q;
            s = int'(rx_data[c].data[31:28]);
            d = int'(rx_data[c].data[27:24]);
            q = int'(rx_data[c].data[23:0]);
            if (d != c || s >= NC) begin
              check(1'b0, $sformatf("net %0d: flit for %0d delivered to %0d", n, d, c));
            end else begin
              if (q != rx_seq[s][c]) check(1'b0, $sformatf("net %0d: flow %0d->%0d out of order", n, s, c));
              rx_seq[s][c] = q + 1;
              lat_sum[n] += cyc - born_q[s][c].pop_front();
            end
            n_rx[n]++;
            rx_ack[c] = ~rx_ack[c];
          end
        end
      end
      initial begin : sender
        forever begin
          @(negedge clk);
          if (txq[n][c].size() > 0) begin
            pkt_t p;
            p = txq[n][c].pop_front();
            born_q[c][int'(p.f.data[27:24])].push_back(p.born);
            tx_data[c] = p.f;
            tx_req[c]  = ~tx_req[c];
            @(negedge clk);
            while (tx_ack[c] != tx_req[c]) @(negedge clk);
          end
        end
      end
    end
  end

  // traffic generator, shared by both networks
  always @(negedge clk) begin
    if (gen_on) begin
      for (int e = 0; e < NE; e++) begin
        if ($urandom_range(0, 19999) < cur_load * E_W[e]) begin
          int s, d;
          pkt_t p;
          if ($urandom_range(0, 1) == 1) begin s = E_A[e]; d = E_B[e]; end
          else begin s = E_B[e]; d = E_A[e]; end
          p.f    = '{route: rt_tab[s][d], data: {4'(s), 4'(d), 24'(tx_seq[s][d])}};
          p.born = cyc;
          tx_seq[s][d]++;
          for (int n = 0; n < NNET; n++) txq[n][s].push_back(p);
          n_gen++;
        end
      end
    end
  end


  initial begin
    for (int s = 0; s < NC; s++)
      for (int d = 0; d < NC; d++)
        rt_tab[s][d] = (s == d) ? '0 : route_bits(s, d);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < NLOAD; l++) begin
      for (int n = 0; n < NNET; n++) begin
        n_rx[n] = 0;
        lat_sum[n] = 0;
      end
      n_gen = 0;
      cur_load = LOADS[l];
      gen_on = 1'b1;
      repeat (GEN_CYCLES) @(negedge clk);
      gen_on = 1'b0;
      wait (n_rx[0] == n_gen && n_rx[1] == n_gen);
      repeat (20) @(negedge clk);
      for (int n = 0; n < NNET; n++) begin
        avg_lat[n][l] = real'(lat_sum[n]) / real'(n_gen);
        check(n_rx[n] == n_gen, "all flits delivered");
      end
      $display("load %0dx: %0d flits, average latency ASYNC_PL %0.2f cycles, ASYNC %0.2f cycles",
               LOADS[l], n_gen, avg_lat[0][l], avg_lat[1][l]);
    end
    for (int n = 0; n < NNET; n++) begin
      check(avg_lat[n][NLOAD-1] > avg_lat[n][0], $sformatf("net %0d: latency rises with load", n));
      for (int s = 0; s < NC; s++)
        for (int d = 0; d < NC; d++)
          if (n == 0) check(g_net[0].rx_seq[s][d] == tx_seq[s][d], "pipelined network: every flow complete");
          else        check(g_net[1].rx_seq[s][d] == tx_seq[s][d], "plain network: every flow complete");
    end
    check(avg_lat[0][0] > avg_lat[1][0], "at 1x the latches only add delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
