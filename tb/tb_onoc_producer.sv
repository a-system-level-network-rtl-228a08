// tb_onoc_producer: self-checking test of the traffic producer.
//
// Uniform pattern: a flit every `interval` cycles; the priorities repeat
// Mid, Low, High; the sequence number, addresses and time stamp are checked
// for every flit; generation stops at max_flits; a held flit stays unchanged
// while buff_avail is 0. Bernoulli pattern: the number of flits in a long run
// matches the rate, and random destinations stay inside the mesh and never
// point at the producer's own node. Exponential pattern: the mean gap is close
// to `interval`, and the gaps vary.
module tb_onoc_producer;
  import onoc_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [COORD_W-1:0] node_x = 2'd1, node_y = 2'd2;
  prod_cfg_t          cfg;
  logic [TS_W-1:0]    time_now;
  flit_t              data_out;
  logic               data_out_valid, buff_avail;
  logic [15:0]        flits_sent;

  int checks = 0;
  int failures = 0;

  onoc_producer #(.MESH_X(4), .MESH_Y(4)) dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .node_x         (node_x),
    .node_y         (node_y),
    .cfg            (cfg),
    .time_now       (time_now),
    .data_out       (data_out),
    .data_out_valid (data_out_valid),
    .buff_avail     (buff_avail),
    .flits_sent     (flits_sent)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) time_now <= '0;
    else        time_now <= time_now + 1'b1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
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

  task automatic reset_with(prod_cfg_t c);
    rst_n = 1'b0;
    cfg = c;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  prod_cfg_t c;
  int        n, last_t, gap_sum, gap_min, gap_max, cnt[3];
  logic [15:0] held_ts;
  flit_t     held;

  initial begin
    buff_avail = 1'b1;
    c = '0;

    // ---------------- uniform ----------------
    c.enable = 1; c.pattern = DIST_UNIFORM; c.interval = 8'd5;
    c.dst_random = 0; c.dst_x = 2'd3; c.dst_y = 2'd0; c.max_flits = 16'd9;
    reset_with(c);
    n = 0; last_t = -1;
    for (int cyc = 0; cyc < 80; cyc++) begin
      @(negedge clk);
      if (data_out_valid) begin
        prio_e exp_p;
        exp_p = (n % 3 == 0) ? PRI_MID : (n % 3 == 1) ? PRI_LOW : PRI_HIGH;
        check(data_out.hdr.prio == exp_p, "uniform priority pattern");
        check(data_out.payload == 16'(n), "sequence number");
        check(data_out.hdr.src_x == node_x && data_out.hdr.src_y == node_y, "source address");
        check(data_out.hdr.dst_x == 2'd3 && data_out.hdr.dst_y == 2'd0, "fixed destination");
        check(data_out.hdr.timestamp == time_now - 1'b1, "time stamp at generation");
        if (last_t >= 0) check(cyc - last_t == 5, "uniform gap of `interval` cycles");
        last_t = cyc;
        n++;
      end
    end
    check(n == 9 && flits_sent == 16'd9, "stops after max_flits");

    // ---------------- back-pressure ----------------
    c.max_flits = 0; c.interval = 8'd2;
    reset_with(c);
    buff_avail = 1'b0;
    @(negedge clk);
    while (!data_out_valid) @(negedge clk);
    held = data_out;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      check(data_out_valid && data_out == held, "held flit stable without room");
    end
    check(flits_sent == 0, "nothing sent without room");
    buff_avail = 1'b1;
    @(negedge clk);
    check(flits_sent == 1, "held flit sent when room appears");

    // ---------------- Bernoulli ----------------
    c.pattern = DIST_BERNOULLI; c.rate = 8'd64; c.dst_random = 1;
    reset_with(c);
    n = 0; cnt = '{0, 0, 0};
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      if (data_out_valid) begin
        n++;
        cnt[data_out.hdr.prio]++;
        check(!(data_out.hdr.dst_x == node_x && data_out.hdr.dst_y == node_y),
              "random destination is not the own node");
        check(data_out.hdr.prio inside {PRI_HIGH, PRI_MID, PRI_LOW}, "legal priority");
      end
    end
    // p = 1/4 per free cycle, one busy cycle per flit: 8000 * p / (1 + p) = 1600
    $display("bernoulli flits=%0d high=%0d mid=%0d low=%0d", n, cnt[0], cnt[1], cnt[2]);
    check(n > 1350 && n < 1850, "Bernoulli rate");
    check(cnt[0] > n / 5 && cnt[1] > n / 5 && cnt[2] > n / 5, "all classes drawn");

    // ---------------- exponential ----------------
    c.pattern = DIST_EXPONENTIAL; c.interval = 8'd20; c.dst_random = 0;
    reset_with(c);
    n = 0; last_t = -1; gap_sum = 0; gap_min = 1 << 30; gap_max = 0;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      if (data_out_valid) begin
        if (last_t >= 0) begin
          gap_sum += cyc - last_t;
          if (cyc - last_t < gap_min) gap_min = cyc - last_t;
          if (cyc - last_t > gap_max) gap_max = cyc - last_t;
          n++;
        end
        last_t = cyc;
      end
    end
    $display("exponential gaps=%0d mean=%0d min=%0d max=%0d", n, gap_sum / n, gap_min, gap_max);
    check(gap_sum / n >= 16 && gap_sum / n <= 26, "exponential mean gap");
    check(gap_min <= 5 && gap_max >= 60, "exponential spread");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
