// tb_onoc_mesh: end-to-end test of the complete 4x4 network at its default
// parameters.
//
// Phase 1 sends one flit across the idle mesh from corner (0,0) to corner
// (3,3). It must arrive at the right consumer with latency 1 + 4 * 7 = 29
// cycles: one cycle in the producer, then four cycles in each of the seven
// nodes on the X-then-Y path. Phases 2 to 4 run the three traffic patterns
// (uniform, Bernoulli, exponential) from all sixteen producers to random
// destinations, each with a fixed number of flits, until every flit has been
// delivered. For every delivered flit the test checks:
//   - the consumer's latency equals its own time minus the flit's time stamp;
//   - the flit reached a node other than its source;
//   - per (source, consumer, class), sequence numbers only increase;
//   - nothing is lost or duplicated: the per-class counts add up.
// The test also counts the documented mechanisms and fails if one never
// happened: High served ahead of waiting Mid/Low requests, a grant refused
// because the output buffer was full (no confirm), an input buffer that filled
// up (buffAvail low), and a producer held back by its input buffer. A
// watchdog ends a hung run.
module tb_onoc_mesh;
  import onoc_pkg::*;

  localparam int NN = 16;

  logic                 clk = 1'b0;
  logic                 rst_n;
  prod_cfg_t            prod_cfg           [NN];
  logic [15:0]          flits_sent         [NN];
  logic [PAYLOAD_W-1:0] cons_payload       [NN];
  logic [COORD_W-1:0]   cons_src_x         [NN];
  logic [COORD_W-1:0]   cons_src_y         [NN];
  prio_e                cons_prio          [NN];
  logic [TS_W-1:0]      cons_latency       [NN];
  logic                 cons_payload_valid [NN];
  lat_stat_t            cons_stats         [NN][3];
  logic [TS_W-1:0]      time_now;

  int checks = 0;
  int failures = 0;

  onoc_mesh dut (
    .clk                (clk),
    .rst_n              (rst_n),
    .prod_cfg           (prod_cfg),
    .flits_sent         (flits_sent),
    .cons_payload       (cons_payload),
    .cons_src_x         (cons_src_x),
    .cons_src_y         (cons_src_y),
    .cons_prio          (cons_prio),
    .cons_latency       (cons_latency),
    .cons_payload_valid (cons_payload_valid),
    .cons_stats         (cons_stats),
    .time_now           (time_now)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---------------- mechanism counters, one slot per node ----------------
  int n_hi_over  [NN];
  int n_refused  [NN];
  int n_ib_full  [NN];
  int n_prod_wait[NN];

  for (genvar y = 0; y < 4; y++) begin : g_mon_r
    for (genvar x = 0; x < 4; x++) begin : g_mon_c
      localparam int ID = y * 4 + x;
      initial begin
        n_hi_over[ID] = 0; n_refused[ID] = 0; n_ib_full[ID] = 0; n_prod_wait[ID] = 0;
      end
      always @(posedge clk) if (rst_n) begin
        if (|dut.g_row[y].g_col[x].u_node.grant_fast && |dut.g_row[y].g_col[x].u_node.data_req)
          n_hi_over[ID]++;
        if (dut.g_row[y].g_col[x].u_node.out_port_valid &&
            dut.g_row[y].g_col[x].u_node.confirm == '0)
          n_refused[ID]++;
        if (dut.g_row[y].g_col[x].u_node.buff_avail_in[PORT_N:PORT_W] != '1 ||
            !dut.g_row[y].g_col[x].u_node.buff_avail_in[PORT_NI])
          n_ib_full[ID]++;
        if (dut.g_row[y].g_col[x].u_prod.data_out_valid &&
            !dut.g_row[y].g_col[x].u_prod.buff_avail)
          n_prod_wait[ID]++;
      end
    end
  end

  // ---------------- delivery checks ----------------
  int last_seq [NN][NN][3];   // [src][dst][class]
  int delivered[3];
  int total_delivered;
  int lat_sum_tb [3];

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NN; d++)
      if (cons_payload_valid[d]) begin
        int s, c;
        s = int'(cons_src_y[d]) * 4 + int'(cons_src_x[d]);
        c = int'(cons_prio[d]);
        check(s != d, "flit delivered to a node other than its source");
        check(int'(cons_payload[d]) > last_seq[s][d][c], "in-order delivery per source, destination and class");
        last_seq[s][d][c] = int'(cons_payload[d]);
        delivered[c]++;
        total_delivered++;
        lat_sum_tb[c] += int'(cons_latency[d]);
      end
  end

  task automatic clear_run();
    foreach (last_seq[s, d, c]) last_seq[s][d][c] = -1;
    delivered = '{0, 0, 0};
    lat_sum_tb = '{0, 0, 0};
    total_delivered = 0;
  endtask

  task automatic start(prod_cfg_t c);
    rst_n = 1'b0;
    for (int i = 0; i < NN; i++) prod_cfg[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    clear_run();
    @(negedge clk);
    for (int i = 0; i < NN; i++) prod_cfg[i] = c;
  endtask

  function automatic int sum_sent();
    int s = 0;
    for (int i = 0; i < NN; i++) s += int'(flits_sent[i]);
    return s;
  endfunction

  task automatic run_to_completion(string name, int per_node);
    int sent, cnt_stats, sum_stats[3], mx;
    int guard;
    guard = 0;
    while ((sum_sent() < NN * per_node || total_delivered < NN * per_node) && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    repeat (5) @(posedge clk);
    sent = sum_sent();
    check(sent == NN * per_node, {name, ": all flits injected"});
    check(total_delivered == sent, {name, ": every injected flit delivered once"});
    cnt_stats = 0;
    sum_stats = '{0, 0, 0};
    mx = 0;
    for (int i = 0; i < NN; i++)
      for (int c = 0; c < 3; c++) begin
        cnt_stats += int'(cons_stats[i][c].count);
        sum_stats[c] += int'(cons_stats[i][c].lat_sum);
      end
    check(cnt_stats == sent, {name, ": consumer counts add up"});
    for (int c = 0; c < 3; c++)
      check(sum_stats[c] == lat_sum_tb[c], {name, ": consumer latency sums"});
    $display("%s: %0d flits in %0d cycles; mean latency High=%0d Mid=%0d Low=%0d (counts %0d/%0d/%0d)",
             name, sent, guard, lat_sum_tb[0] / (delivered[0] > 0 ? delivered[0] : 1),
             lat_sum_tb[1] / (delivered[1] > 0 ? delivered[1] : 1),
             lat_sum_tb[2] / (delivered[2] > 0 ? delivered[2] : 1),
             delivered[0], delivered[1], delivered[2]);
    for (int c = 0; c < 3; c++) check(delivered[c] > 0, {name, ": every class delivered"});
  endtask

  prod_cfg_t c;
  int tot_hi_over, tot_refused, tot_ib_full, tot_prod_wait;

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < NN; i++) prod_cfg[i] = '0;
    clear_run();

    // Phase 1: one flit (0,0) -> (3,3) through the idle mesh.
    c = '0;
    start(c);
    prod_cfg[0].enable = 1; prod_cfg[0].pattern = DIST_UNIFORM; prod_cfg[0].interval = 8'd1;
    prod_cfg[0].dst_x = 2'd3; prod_cfg[0].dst_y = 2'd3; prod_cfg[0].max_flits = 16'd1;
    while (!cons_payload_valid[15]) @(posedge clk);
    #1;
    check(cons_latency[15] == 16'd29, "corner-to-corner latency 1 + 4 * 7 cycles");
    check(cons_src_x[15] == 0 && cons_src_y[15] == 0 && cons_prio[15] == PRI_MID, "corner flit header");
    $display("corner-to-corner latency: %0d cycles", cons_latency[15]);

    // Phase 2: uniform, every node, one flit every 6 cycles.
    c = '0;
    c.enable = 1; c.pattern = DIST_UNIFORM; c.interval = 8'd6; c.dst_random = 1;
    c.max_flits = 16'd150;
    start(c);
    run_to_completion("uniform", 150);

    // Phase 3: Bernoulli, p = 40/256 per cycle.
    c.pattern = DIST_BERNOULLI; c.rate = 8'd40;
    start(c);
    run_to_completion("bernoulli", 150);

    // Phase 4: exponential, mean gap 5 cycles.
    c.pattern = DIST_EXPONENTIAL; c.interval = 8'd5;
    start(c);
    run_to_completion("exponential", 150);

    tot_hi_over = 0; tot_refused = 0; tot_ib_full = 0; tot_prod_wait = 0;
    for (int i = 0; i < NN; i++) begin
      tot_hi_over   += n_hi_over[i];
      tot_refused   += n_refused[i];
      tot_ib_full   += n_ib_full[i];
      tot_prod_wait += n_prod_wait[i];
    end
    $display("mechanisms: high-before-waiting-slow=%0d refused=%0d ib-full-cycles=%0d producer-waits=%0d",
             tot_hi_over, tot_refused, tot_ib_full, tot_prod_wait);
    check(tot_hi_over > 0, "High served while Mid/Low waited");
    check(tot_refused > 0, "grant refused for a full output buffer");
    check(tot_ib_full > 0, "input buffer filled up");
    check(tot_prod_wait > 0, "producer held back by its input buffer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
