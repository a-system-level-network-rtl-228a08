// onoc_output_buffer: the output buffer at one port of a node.
//
// What it does: the router writes flits into it, and it forwards them, oldest
// first, to the input buffer of the next node. As documented, it consists of
// two state machines that run at the same time. The input side accepts flits
// while there is room and signals the room on buff_avail. The output side
// sends the oldest flit whenever the next node's input buffer signals room on
// out_buff_avail.
//
// How it works: a circular FIFO of DEPTH entries. The write pointer belongs to
// the input side and the read pointer to the output side. An occupancy count
// is shared by the two sides. A write and a send can happen in the same cycle.
//
// Interface and timing:
//   data_in/data_in_valid   a write from the router, taken in a cycle where
//                           buff_avail is 1. buff_avail is registered state:
//                           it is low from the cycle after the write that
//                           filled the buffer.
//   data_out/data_out_valid the oldest flit. data_out_valid is 1 while the
//                           FIFO holds a flit.
//   out_buff_avail          room in the next input buffer. A flit leaves in
//                           every cycle where data_out_valid and
//                           out_buff_avail are both 1.
// The FIFO organisation and the count are this design's choices. The depth is
// not given in the documentation. The documented "init" input is the reset.
module onoc_output_buffer
  import onoc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the router (input state machine)
  input  flit_t data_in,
  input  logic  data_in_valid,
  output logic  buff_avail,
  // towards the next node (output state machine)
  output flit_t data_out,
  output logic  data_out_valid,
  input  logic  out_buff_avail
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  flit_t            mem [DEPTH];
  logic [IDX_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] count;
  logic             push, pop;

  assign buff_avail     = (count < CNT_W'(DEPTH));
  assign data_out_valid = (count != '0);
  assign data_out       = mem[rd_ptr];
  assign push           = data_in_valid && buff_avail;
  assign pop            = data_out_valid && out_buff_avail;

  function automatic logic [IDX_W-1:0] next_ptr(input logic [IDX_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  // Input state machine: store while there is room.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push) begin
      mem[wr_ptr] <= data_in;
      wr_ptr      <= next_ptr(wr_ptr);
    end
  end

  // Output state machine: send while the next input buffer has room.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_ptr <= '0;
    else if (pop) rd_ptr <= next_ptr(rd_ptr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + CNT_W'(push) - CNT_W'(pop);
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                         data_in_valid |-> buff_avail);

endmodule
