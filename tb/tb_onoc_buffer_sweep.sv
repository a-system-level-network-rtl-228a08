// tb_onoc_buffer_sweep: the buffer-size workload.
//
// The network is evaluated for input buffer sizes of 1, 2, 3, 4, 5 and 10
// flits under priority-based round-robin scheduling. This testbench builds
// six 4x4 meshes, one per size, and drives them with identical traffic: every
// node injects 120 flits in the uniform pattern (one flit every 5 cycles,
// every third flit High) to random destinations. It runs until every flit
// is delivered, and prints the mean High, Mid and Low latency of each size.
// Checks per size: every flit delivered exactly once (the consumer counts add
// up); High traffic has a lower mean latency than Low traffic, which is the
// purpose of the priority classes; and the High mean latency stays below a
// bound of 40 cycles per hop, taking the worst hop count of six. Across sizes
// it reports whether the Low latency grows with the buffer size.
module tb_onoc_buffer_sweep;
  import onoc_pkg::*;

  localparam int NN = 16;
  localparam int NS = 6;
  localparam int PER_NODE = 120;
  localparam int SIZES [NS] = '{1, 2, 3, 4, 5, 10};

  logic      clk = 1'b0;
  logic      rst_n;
  prod_cfg_t prod_cfg [NN];
  // Totals per buffer size, summed from each mesh's outputs.
  int          sent_tot [NS];
  int          cnt_tot  [NS][3];
  longint      lat_tot  [NS][3];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_size
    logic [PAYLOAD_W-1:0] pl  [NN];
    logic [COORD_W-1:0]   sx  [NN];
    logic [COORD_W-1:0]   sy  [NN];
    prio_e                pr  [NN];
    logic [TS_W-1:0]      lat [NN];
    logic                 pv  [NN];
    logic [TS_W-1:0]      tnow;
    logic [15:0]          snt [NN];
    lat_stat_t            st  [NN][3];

    always_comb begin
      sent_tot[s] = 0;
      for (int i = 0; i < NN; i++) sent_tot[s] += int'(snt[i]);
      for (int c = 0; c < 3; c++) begin
        cnt_tot[s][c] = 0;
        lat_tot[s][c] = 0;
        for (int i = 0; i < NN; i++) begin
          cnt_tot[s][c] += int'(st[i][c].count);
          lat_tot[s][c] += longint'(st[i][c].lat_sum);
        end
      end
    end

    onoc_mesh #(.IB_DEPTH(SIZES[s])) u_mesh (
      .clk                (clk),
      .rst_n              (rst_n),
      .prod_cfg           (prod_cfg),
      .flits_sent         (snt),
      .cons_payload       (pl),
      .cons_src_x         (sx),
      .cons_src_y         (sy),
      .cons_prio          (pr),
      .cons_latency       (lat),
      .cons_payload_valid (pv),
      .cons_stats         (st),
      .time_now           (tnow)
    );
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int delivered(int s);
    return cnt_tot[s][0] + cnt_tot[s][1] + cnt_tot[s][2];
  endfunction

  function automatic bit all_done();
    for (int s = 0; s < NS; s++) if (delivered(s) < NN * PER_NODE) return 0;
    return 1;
  endfunction

  int mean [NS][3];
  int cyc;

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < NN; i++) begin
      prod_cfg[i] = '0;
      prod_cfg[i].enable     = 1'b1;
      prod_cfg[i].pattern    = DIST_UNIFORM;
      prod_cfg[i].interval   = 8'd5;
      prod_cfg[i].dst_random = 1'b1;
      prod_cfg[i].max_flits  = 16'(PER_NODE);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc = 0;
    while (!all_done() && cyc < 250000) begin
      @(posedge clk);
      cyc++;
    end
    repeat (3) @(posedge clk);
    $display("all six meshes drained after %0d cycles", cyc);
    $display("buffer size | mean latency High  Mid  Low");
    for (int s = 0; s < NS; s++) begin
      int sent_total;
      sent_total = sent_tot[s];
      for (int c = 0; c < 3; c++)
        mean[s][c] = (cnt_tot[s][c] > 0) ? int'(lat_tot[s][c] / longint'(cnt_tot[s][c])) : 0;
      $display("%11d | %17d %4d %4d", SIZES[s], mean[s][0], mean[s][1], mean[s][2]);
      if (sent_total != NN * PER_NODE || delivered(s) != sent_total)
        $display("size %0d: sent %0d delivered %0d", SIZES[s], sent_total, delivered(s));
      check(sent_total == NN * PER_NODE, "all flits injected");
      check(delivered(s) == sent_total, "all flits delivered once");
      check(mean[s][0] < mean[s][2], "High latency below Low latency");
      check(mean[s][0] < 6 * 40, "High latency bounded");
    end
    $display("Low latency %s with buffer size (1 -> 10: %0d -> %0d cycles)",
             (mean[NS-1][2] > mean[0][2]) ? "grows" : "does not grow", mean[0][2], mean[NS-1][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
