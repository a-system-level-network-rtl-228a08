// tb_onoc_consumer: self-checking test of the consumer.
//
// Random flits of all classes, each with a time stamp a random number of
// cycles in the past, are delivered in random cycles. The test checks the
// stripped payload, the source and latency of each flit in the following
// cycle, and the per-class count, latency sum and maximum against totals
// kept in the testbench.
module tb_onoc_consumer;
  import onoc_pkg::*;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic [TS_W-1:0]      time_now;
  flit_t                data_in;
  logic                 data_in_valid, buff_avail, payload_valid;
  logic [PAYLOAD_W-1:0] payload;
  logic [COORD_W-1:0]   src_x, src_y;
  prio_e                prio;
  logic [TS_W-1:0]      latency;
  lat_stat_t            stats [3];

  int checks = 0;
  int failures = 0;

  onoc_consumer dut (
    .clk             (clk),
    .rst_n           (rst_n),
    .time_now        (time_now),
    .data_in         (data_in),
    .data_in_valid   (data_in_valid),
    .buff_avail      (buff_avail),
    .payload         (payload),
    .payload_src_x   (src_x),
    .payload_src_y   (src_y),
    .payload_prio    (prio),
    .payload_latency (latency),
    .payload_valid   (payload_valid),
    .stats           (stats)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  int    m_cnt[3], m_sum[3], m_max[3];
  flit_t f;
  int    lat;

  initial begin
    rst_n = 1'b0;
    time_now = 16'd1000;
    data_in = '0; data_in_valid = 0;
    m_cnt = '{0, 0, 0}; m_sum = '{0, 0, 0}; m_max = '{0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      bit v;
      @(negedge clk);
      time_now = time_now + 1'b1;
      v = ($urandom_range(0, 99) < 60);
      f = flit_t'({$urandom, $urandom});
      f.hdr.prio = prio_e'($urandom_range(0, 2));
      lat = $urandom_range(0, 900);
      f.hdr.timestamp = time_now - 16'(lat);
      data_in = f;
      data_in_valid = v;
      #1 check(buff_avail, "always ready");
      @(posedge clk); #1;
      check(payload_valid == v, "payload_valid follows a delivered flit");
      if (v) begin
        int c;
        c = int'(f.hdr.prio);
        m_cnt[c]++;
        m_sum[c] += lat;
        if (lat > m_max[c]) m_max[c] = lat;
        check(payload == f.payload, "payload stripped of header");
        check(src_x == f.hdr.src_x && src_y == f.hdr.src_y && prio == f.hdr.prio, "source and class");
        check(int'(latency) == lat, "latency = now - time stamp");
        for (int k = 0; k < 3; k++) begin
          check(int'(stats[k].count) == m_cnt[k], "class count");
          check(int'(stats[k].lat_sum) == m_sum[k], "class latency sum");
          check(int'(stats[k].lat_max) == m_max[k], "class latency max");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
