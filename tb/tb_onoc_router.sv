// tb_onoc_router: self-checking test of the router.
//
// For every node position of a 4x4 mesh and every destination, a flit is
// handed to the router. The test checks that the output port appears exactly
// two cycles after the grant cycle and that it is the X-then-Y port. The
// expected port is worked out here from the coordinates, independently of the
// router. A confirm must write the flit, unchanged, to that port's output
// buffer and to no other. Without a confirm nothing may be written. The router
// must be idle again in the next cycle.
module tb_onoc_router;
  import onoc_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [COORD_W-1:0] node_x, node_y;
  flit_t              data_in, data_out;
  logic               data_in_valid, output_port_valid;
  port_e              output_port;
  logic [NPORTS-1:0]  confirm, data_out_valid;

  int checks = 0;
  int failures = 0;

  onoc_router dut (
    .clk               (clk),
    .rst_n             (rst_n),
    .node_x            (node_x),
    .node_y            (node_y),
    .data_in           (data_in),
    .data_in_valid     (data_in_valid),
    .output_port       (output_port),
    .output_port_valid (output_port_valid),
    .confirm           (confirm),
    .data_out          (data_out),
    .data_out_valid    (data_out_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic int expected_port(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? 1 : 3;    // East / West
    if (dy != y) return (dy > y) ? 2 : 0;    // South / North
    return 4;                                // local NI
  endfunction

  task automatic one_flit(int x, int y, int dx, int dy, bit do_confirm);
    flit_t f;
    int    exp_p;
    f = flit_t'({$urandom, $urandom});
    f.hdr.dst_x = COORD_W'(dx);
    f.hdr.dst_y = COORD_W'(dy);
    node_x = COORD_W'(x);
    node_y = COORD_W'(y);
    exp_p = expected_port(x, y, dx, dy);
    data_in = f;
    data_in_valid = 1'b1;          // grant cycle
    #1 check(!output_port_valid, "no route in grant cycle");
    @(posedge clk); #1;
    data_in_valid = 1'b0;
    data_in = '0;
    check(!output_port_valid, "no route in Data state");
    @(posedge clk); #1;
    check(output_port_valid, "route valid two cycles after grant");
    check(int'(output_port) == exp_p, "XY output port");
    confirm = '0;
    if (do_confirm) confirm[$urandom_range(0, NPORTS - 1)] = 1'b1;
    #1;
    if (do_confirm) begin
      check(data_out_valid == NPORTS'(1 << exp_p), "write to routed output buffer only");
      check(data_out == f, "flit forwarded unchanged");
    end else begin
      check(data_out_valid == '0, "no write without confirm");
    end
    @(posedge clk); #1;
    confirm = '0;
    check(!output_port_valid && data_out_valid == '0, "back to Idle");
  endtask

  initial begin
    rst_n = 1'b0;
    node_x = '0; node_y = '0; data_in = '0; data_in_valid = 0; confirm = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int dx = 0; dx < 4; dx++)
          for (int dy = 0; dy < 4; dy++)
            one_flit(x, y, dx, dy, ((x + y + dx + dy) % 4) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
