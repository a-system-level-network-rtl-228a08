// tb_onoc_output_buffer: self-checking test of the output buffer.
//
// The router side writes random flits whenever buff_avail allows. The next
// node's side signals room at random. A queue model checks that flits leave
// in order, unchanged and exactly once. It also checks buff_avail and
// data_out_valid against the model's occupancy. A directed start checks that
// the buffer fills after DEPTH writes and that a flit written into an empty
// buffer is offered in the next cycle.
module tb_onoc_output_buffer;
  import onoc_pkg::*;

  localparam int unsigned DEPTH = 3;

  logic  clk = 1'b0;
  logic  rst_n;
  flit_t data_in, data_out;
  logic  data_in_valid, buff_avail, data_out_valid, out_buff_avail;

  int checks = 0;
  int failures = 0;

  onoc_output_buffer #(.DEPTH(DEPTH)) dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .data_in        (data_in),
    .data_in_valid  (data_in_valid),
    .buff_avail     (buff_avail),
    .data_out       (data_out),
    .data_out_valid (data_out_valid),
    .out_buff_avail (out_buff_avail)
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

  flit_t q[$];
  int    sent = 0;

  task automatic step(bit wr, bit rdy);
    flit_t f;
    bit    push, pop;
    f = flit_t'({$urandom, $urandom});
    data_in        = f;
    data_in_valid  = wr && (q.size() < DEPTH);
    out_buff_avail = rdy;
    #1;
    check(buff_avail == (q.size() < DEPTH), "buff_avail");
    check(data_out_valid == (q.size() > 0), "data_out_valid");
    if (q.size() > 0) check(data_out == q[0], "data_out order");
    push = data_in_valid;
    pop  = rdy && q.size() > 0;
    @(posedge clk);
    if (pop) begin
      void'(q.pop_front());
      sent++;
    end
    if (push) q.push_back(f);
    #1;
  endtask

  initial begin
    rst_n = 1'b0;
    data_in = '0; data_in_valid = 0; out_buff_avail = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    step(1, 0);
    #1 check(data_out_valid, "offered in the cycle after the write");
    for (int i = 1; i < DEPTH; i++) step(1, 0);
    #1 check(!buff_avail, "full after DEPTH writes");
    step(0, 1);
    #1 check(buff_avail, "room after one send");
    for (int n = 0; n < 8000; n++)
      step($urandom_range(0, 99) < 60, $urandom_range(0, 99) < 55);
    while (q.size() > 0) step(0, 1);
    check(sent > 3000, "flits moved");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
