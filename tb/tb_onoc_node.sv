// tb_onoc_node: self-checking test of one node, placed at (1,1) of a 4x4 mesh.
//
// The testbench plays the four neighbours and the local network interface.
//  1. Latency: one flit through an idle node leaves four cycles after the
//     cycle in which it entered.
//  2. Priority and flow control: with the East output blocked, two Low flits
//     fill the East output buffer, a third Low flit is refused (no confirm)
//     and stays queued, and a High flit that arrives after it is sent first
//     once East opens.
//  3. Random traffic on all five inputs with random back-pressure on all
//     five outputs. Every flit must leave exactly once, unchanged, on its
//     X-then-Y port. Flits of one class that share an input and an output
//     must keep their order.
//  4. Throughput: with every input busy and every output free, the node moves
//     one flit every three cycles.
module tb_onoc_node;
  import onoc_pkg::*;

  localparam logic [COORD_W-1:0] NX = 2'd1, NY = 2'd1;

  logic              clk = 1'b0;
  logic              rst_n;
  flit_t             link_in  [NPORTS];
  flit_t             link_out [NPORTS];
  logic [NPORTS-1:0] link_in_valid, buff_avail_in, link_out_valid, buff_avail_out;

  int checks = 0;
  int failures = 0;

  onoc_node #(.IB_DEPTH(4), .OB_DEPTH(2)) dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .node_x         (NX),
    .node_y         (NY),
    .link_in        (link_in),
    .link_in_valid  (link_in_valid),
    .buff_avail_in  (buff_avail_in),
    .link_out       (link_out),
    .link_out_valid (link_out_valid),
    .buff_avail_out (buff_avail_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int xy_port(flit_t f);
    if (f.hdr.dst_x > NX) return 1;
    if (f.hdr.dst_x < NX) return 3;
    if (f.hdr.dst_y > NY) return 2;
    if (f.hdr.dst_y < NY) return 0;
    return 4;
  endfunction

  // Expected flits per (input, output, class), in order.
  flit_t exp_q [NPORTS][NPORTS][3][$];
  int    in_flight = 0;
  int    received  = 0;
  int    refusals  = 0;
  int    out_log [$];        // payloads seen at the East port (directed test)
  bit    log_east = 0;

  // Source queues of the testbench neighbours.
  flit_t src_q [NPORTS][$];

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      link_in_valid[p] = (src_q[p].size() > 0);
      link_in[p]       = (src_q[p].size() > 0) ? src_q[p][0] : '0;
    end

  always @(posedge clk) if (rst_n) begin
    // flits entering the node
    for (int p = 0; p < NPORTS; p++)
      if (link_in_valid[p] && buff_avail_in[p]) begin
        flit_t f;
        f = src_q[p].pop_front();
        exp_q[p][xy_port(f)][int'(f.hdr.prio)].push_back(f);
        in_flight++;
      end
    // flits leaving the node
    for (int o = 0; o < NPORTS; o++)
      if (link_out_valid[o] && buff_avail_out[o]) begin
        bit found;
        found = 0;
        for (int i = 0; i < NPORTS && !found; i++)
          for (int c = 0; c < 3 && !found; c++)
            if (exp_q[i][o][c].size() > 0 && exp_q[i][o][c][0] == link_out[o]) begin
              void'(exp_q[i][o][c].pop_front());
              found = 1;
            end
        check(found, "flit leaves on its XY port, in class order, unchanged");
        in_flight--;
        received++;
        if (log_east && o == 1) out_log.push_back(int'(link_out[o].payload));
      end
    if (dut.out_port_valid && dut.confirm == '0) refusals++;
  end

  function automatic flit_t mk(prio_e p, int dx, int dy, int tag);
    flit_t f;
    f = '0;
    f.hdr.prio  = p;
    f.hdr.dst_x = COORD_W'(dx);
    f.hdr.dst_y = COORD_W'(dy);
    f.hdr.src_x = COORD_W'($urandom);
    f.hdr.src_y = COORD_W'($urandom);
    f.hdr.timestamp = 16'($urandom);
    f.payload   = 16'(tag);
    return f;
  endfunction

  int tag = 0;
  int t_in, t_out, moved;

  initial begin
    rst_n = 1'b0;
    buff_avail_out = '1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1. Latency through an idle node: West in, South out.
    @(negedge clk);
    src_q[3].push_back(mk(PRI_MID, 1, 3, tag++));
    t_in = 0;
    @(posedge clk); #1;     // handshake happened at this edge
    while (!link_out_valid[2]) begin @(posedge clk); #1; t_in++; end
    check(t_in == 3, "four cycles from entry to output (3 edges after the entry edge)");
    $display("idle-node latency: entry edge + %0d edges", t_in + 1);
    repeat (3) @(posedge clk);

    // 2. Priority overtaking and refusal while East is blocked.
    @(negedge clk);
    buff_avail_out[1] = 1'b0;
    log_east = 1;
    src_q[3].push_back(mk(PRI_LOW, 3, 1, 100));
    src_q[3].push_back(mk(PRI_LOW, 3, 1, 101));
    src_q[3].push_back(mk(PRI_LOW, 3, 1, 102));
    repeat (20) @(posedge clk);
    src_q[3].push_back(mk(PRI_HIGH, 2, 0, 103));
    repeat (20) @(posedge clk);
    check(refusals > 0, "refusal while the output buffer is full");
    @(negedge clk);
    buff_avail_out[1] = 1'b1;
    repeat (40) @(posedge clk);
    check(out_log.size() == 4, "four flits out of East");
    if (out_log.size() == 4)
      check(out_log[0] == 100 && out_log[1] == 101 && out_log[2] == 103 && out_log[3] == 102,
            "High flit overtakes the queued Low flit");
    log_east = 0;

    // 3. Random traffic with random back-pressure.
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        if (src_q[p].size() < 2 && $urandom_range(0, 99) < 12)
          src_q[p].push_back(mk(prio_e'($urandom_range(0, 2)),
                                $urandom_range(0, 3), $urandom_range(0, 3), tag++));
        buff_avail_out[p] = ($urandom_range(0, 99) < 70);
      end
    end
    @(negedge clk);
    buff_avail_out = '1;
    while (in_flight > 0 || src_q[0].size() + src_q[1].size() + src_q[2].size() +
                            src_q[3].size() + src_q[4].size() > 0)
      @(posedge clk);
    check(in_flight == 0, "all flits delivered");
    check(received > 3000, "random phase moved traffic");
    $display("node: %0d flits delivered, %0d refusals", received, refusals);

    // 4. Throughput under saturation.
    @(negedge clk);
    for (int p = 0; p < NPORTS; p++)
      for (int k = 0; k < 100; k++)
        src_q[p].push_back(mk(PRI_LOW, (p + k) % 4, (p * 3 + k) % 4, tag++));
    repeat (20) @(posedge clk);
    moved = received;
    repeat (300) @(posedge clk);
    moved = received - moved;
    check(moved == 100, "one flit per three cycles at saturation");
    $display("saturated node: %0d flits in 300 cycles", moved);
    while (in_flight > 0 || src_q[0].size() + src_q[1].size() + src_q[2].size() +
                            src_q[3].size() + src_q[4].size() > 0)
      @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
