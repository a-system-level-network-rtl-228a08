// tb_onoc_input_buffer: self-checking test of the input buffer.
//
// A directed part checks the documented rules one by one: High flits are
// offered first, Mid before Low, a flit stays until it is confirmed, a
// refused flit is offered again, and buff_avail drops when the buffer is
// full. A random part then runs thousands of cycles of writes, grants,
// confirms and refusals, and compares every output with a queue model
// written in the testbench. A watchdog ends the run if it hangs.
module tb_onoc_input_buffer;
  import onoc_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic  clk = 1'b0;
  logic  rst_n;
  flit_t data_in;
  logic  data_in_valid;
  logic  buff_avail, short_req, data_req;
  logic  grant_fast, grant_slow, confirm;
  flit_t data_out;

  int checks = 0;
  int failures = 0;

  onoc_input_buffer #(.DEPTH(DEPTH)) dut (
    .clk                (clk),
    .rst_n              (rst_n),
    .data_in            (data_in),
    .data_in_valid      (data_in_valid),
    .buff_avail         (buff_avail),
    .short_data_in_buff (short_req),
    .data_in_buff       (data_req),
    .node_grant_fast    (grant_fast),
    .node_grant_slow    (grant_slow),
    .confirm            (confirm),
    .data_out           (data_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic flit_t mk(prio_e p, logic [15:0] tag);
    flit_t f;
    f = '0;
    f.hdr.prio  = p;
    f.hdr.dst_x = tag[1:0];
    f.hdr.dst_y = tag[3:2];
    f.payload   = tag;
    return f;
  endfunction

  // Reference model.
  flit_t q[$];
  int    sel = -1;

  function automatic int first_of(prio_e p);
    foreach (q[i]) if (q[i].hdr.prio == p) return i;
    return -1;
  endfunction

  function automatic int slow_pick();
    int m;
    m = first_of(PRI_MID);
    return (m >= 0) ? m : first_of(PRI_LOW);
  endfunction

  // Apply inputs for one cycle (model updated inside).
  task automatic drive(bit wr, flit_t f, bit gf, bit gs, bit cf);
    bit   was_avail;
    int   old_sel;
    data_in       = f;
    data_in_valid = wr;
    grant_fast    = gf;
    grant_slow    = gs;
    confirm       = cf;
    #1;
    was_avail = (q.size() < DEPTH);
    check(buff_avail == was_avail, "buff_avail");
    check(short_req == (first_of(PRI_HIGH) >= 0), "shortDataInBuff");
    check(data_req == (slow_pick() >= 0), "dataInBuff");
    old_sel = sel;
    if (gf) begin
      check(data_out == q[first_of(PRI_HIGH)], "fast granted flit");
      sel = first_of(PRI_HIGH);
    end
    if (gs) begin
      check(data_out == q[slow_pick()], "slow granted flit");
      sel = slow_pick();
    end
    @(posedge clk);
    if (cf && old_sel >= 0) begin
      q.delete(old_sel);
      sel = -1;
    end
    if (wr && was_avail) q.push_back(f);
    #1;
    data_in_valid = 1'b0;
    grant_fast    = 1'b0;
    grant_slow    = 1'b0;
    confirm       = 1'b0;
  endtask

  flit_t none;
  flit_t fa, fb, fc, fd, fe;
  int    outstanding;

  initial begin
    none = '0;
    rst_n = 1'b0;
    data_in = '0; data_in_valid = 0; grant_fast = 0; grant_slow = 0; confirm = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // Directed: fill with L, M, H, L.
    fa = mk(PRI_LOW, 16'h0A01); fb = mk(PRI_MID, 16'h0B02);
    fc = mk(PRI_HIGH, 16'h0C03); fd = mk(PRI_LOW, 16'h0D04);
    fe = mk(PRI_MID, 16'h0E05);
    check(!short_req && !data_req && buff_avail, "empty after reset");
    drive(1, fa, 0, 0, 0);
    drive(1, fb, 0, 0, 0);
    drive(1, fc, 0, 0, 0);
    drive(1, fd, 0, 0, 0);
    #1 check(!buff_avail, "full after DEPTH writes");
    check(short_req && data_req, "both requests raised");
    // A write while full is ignored.
    drive(1, fe, 0, 0, 0);
    check(q.size() == DEPTH, "model full");
    // High first.
    drive(0, none, 1, 0, 0);
    drive(0, none, 0, 0, 1);
    #1 check(!short_req, "High flit removed on confirm");
    check(buff_avail, "room after removal");
    // Mid before the older Low; refused grant keeps it.
    drive(0, none, 0, 1, 0);
    drive(0, none, 0, 0, 0);  // no confirm
    drive(0, none, 0, 1, 0);
    drive(0, none, 0, 0, 1);
    // Oldest Low next; a Mid written between grant and confirm must not be
    // the one that is removed.
    drive(0, none, 0, 1, 0);
    drive(1, fe, 0, 0, 0);
    drive(0, none, 0, 0, 1);
    check(q.size() == 2 && q[0] == fd && q[1] == fe, "model after mixed sequence");
    drive(0, none, 0, 1, 0);  // must give fe (Mid) before fd (Low)
    drive(0, none, 0, 0, 1);
    drive(0, none, 0, 1, 0);
    drive(0, none, 0, 0, 1);
    #1 check(!short_req && !data_req && q.size() == 0, "empty at end of directed part");

    // Random part.
    outstanding = 0;
    for (int n = 0; n < 6000; n++) begin
      bit    wr, gf, gs, cf;
      flit_t f;
      wr = ($urandom_range(0, 99) < 45);
      f  = mk(prio_e'($urandom_range(0, 2)), 16'($urandom));
      gf = 0; gs = 0; cf = 0;
      if (outstanding > 0) begin
        outstanding--;
        if (outstanding == 0) cf = ($urandom_range(0, 99) < 75);
      end else if ($urandom_range(0, 99) < 50) begin
        if (first_of(PRI_HIGH) >= 0 && $urandom_range(0, 1)) gf = 1;
        else if (slow_pick() >= 0) gs = 1;
        if (gf || gs) outstanding = $urandom_range(1, 3);
      end
      drive(wr, f, gf, gs, cf);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
