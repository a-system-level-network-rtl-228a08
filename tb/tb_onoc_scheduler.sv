// tb_onoc_scheduler: self-checking test of the PBRR scheduler.
//
// The testbench plays the five input buffers and the router. The router
// answers each grant two cycles later with an output port. The test first
// checks directed cases: High before Mid/Low; rotation over the ports
// within a class; a confirm only when the output buffer of the reported port
// has room; and after a refused High grant, a waiting Mid/Low request is
// served next. It also checks the rate of one grant every three cycles when
// requests are always present. A random phase then compares every grant and
// confirm with a reference model of the same rules, kept in the testbench.
module tb_onoc_scheduler;
  import onoc_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [NPORTS-1:0] short_req, data_req, grant_fast, grant_slow, confirm, avail;
  port_e             out_port;
  logic              out_port_valid;

  int checks = 0;
  int failures = 0;

  onoc_scheduler dut (
    .clk                (clk),
    .rst_n              (rst_n),
    .short_data_in_buff (short_req),
    .data_in_buff       (data_req),
    .node_grant_fast    (grant_fast),
    .node_grant_slow    (grant_slow),
    .confirm            (confirm),
    .buff_avail_node    (avail),
    .output_port        (out_port),
    .output_port_valid  (out_port_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
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

  // Reference model state.
  int m_rr_hi = NPORTS - 1, m_rr_lo = NPORTS - 1;
  bit m_refused = 0;

  function automatic int rr(logic [NPORTS-1:0] req, int last);
    for (int k = 1; k <= NPORTS; k++)
      if (req[(last + k) % NPORTS]) return (last + k) % NPORTS;
    return -1;
  endfunction

  // One transaction: set requests, expect the grant in this cycle, answer
  // with `port` two cycles later, expect confirm iff `room`.
  // Returns the granted port (or -1) and whether the grant was fast.
  task automatic transaction(logic [NPORTS-1:0] hi, logic [NPORTS-1:0] lo,
                             int port, bit room, output int gp, output bit gfast);
    int ph, pl;
    bit sh;
    short_req = hi;
    data_req  = lo;
    ph = rr(hi, m_rr_hi);
    pl = rr(lo, m_rr_lo);
    sh = (ph >= 0) && !(m_refused && pl >= 0);
    #1;
    gp = -1;
    gfast = 0;
    if (sh) begin
      check(grant_fast == NPORTS'(1 << ph) && grant_slow == '0, "fast grant as model");
      gp = ph; gfast = 1; m_rr_hi = ph;
    end else if (pl >= 0) begin
      check(grant_slow == NPORTS'(1 << pl) && grant_fast == '0, "slow grant as model");
      gp = pl; gfast = 0; m_rr_lo = pl;
    end else begin
      check(grant_fast == '0 && grant_slow == '0, "no grant without requests");
    end
    @(posedge clk); #1;
    if (gp < 0) return;
    m_refused = 0;
    check(grant_fast == '0 && grant_slow == '0, "grant is one cycle");
    // Router Data state: output buffer availability settles for the lookup.
    avail = '1;
    avail[port] = room;
    @(posedge clk); #1;
    check(confirm == '0, "no confirm before route");
    out_port       = port_e'(port);
    out_port_valid = 1'b1;
    #1;
    if (room) check(confirm == NPORTS'(1 << gp), "confirm to granted buffer");
    else      check(confirm == '0, "refused when output buffer full");
    @(posedge clk); #1;
    out_port_valid = 1'b0;
    if (!room && gfast) m_refused = 1;
  endtask

  int gp, t0, grants;
  bit gf;
  logic [NPORTS-1:0] seen;

  initial begin
    rst_n = 1'b0;
    short_req = '0; data_req = '0; avail = '1; out_port = PORT_N; out_port_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // High before Mid/Low.
    transaction(5'b00100, 5'b11011, 1, 1, gp, gf);
    check(gf && gp == 2, "High request served first");
    // Rotation within the High class: all five ports, each once.
    seen = '0;
    for (int i = 0; i < NPORTS; i++) begin
      transaction('1, '1, 4, 1, gp, gf);
      check(gf, "High while High requests wait");
      if (gp >= 0) seen[gp] = 1'b1;
    end
    check(seen == '1, "round robin visits all five ports");
    // Refused High lets a Mid/Low request through next.
    transaction(5'b00001, 5'b01000, 2, 0, gp, gf);
    check(gf && gp == 0, "High granted");
    transaction(5'b00001, 5'b01000, 2, 1, gp, gf);
    check(!gf && gp == 3, "Mid/Low served after refused High");
    transaction(5'b00001, 5'b01000, 2, 1, gp, gf);
    check(gf && gp == 0, "High again after that");

    // Rate: with requests always present, every transaction starts with a
    // grant in its first cycle, so grants come every three cycles.
    grants = 0;
    t0 = int'($time);
    for (int i = 0; i < 20; i++) begin
      transaction('0, '1, 1, 1, gp, gf);
      if (gp >= 0) grants++;
    end
    check(grants == 20 && (int'($time) - t0) == 20 * 3 * 10, "one grant per three cycles");

    // Random phase.
    for (int n = 0; n < 3000; n++) begin
      transaction(NPORTS'($urandom) & NPORTS'($urandom), NPORTS'($urandom),
                  $urandom_range(0, NPORTS - 1), $urandom_range(0, 99) < 70, gp, gf);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
