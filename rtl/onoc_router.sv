// onoc_router: the data part of a node.
//
// What it does: the router takes the flit that the scheduler granted, works
// out the output port by dimension-order (XY) routing, reports the port to
// the scheduler on output_port, and, if the scheduler confirms, writes the flit
// into that port's output buffer. X is resolved first, then Y. A flit that
// has reached its destination column never turns back into X. This
// turn prohibition keeps the mesh free of deadlock. A flit for this node goes
// to the local network interface port.
//
// How it works: a state machine with the three documented states.
//   IDLE          waits for a granted flit (data_in_valid) and latches it into
//                 `buffer`.
//   DATA          extracts the destination into `destination`.
//   COMPUTE_ROUTE drives output_port/output_port_valid for one cycle. If any
//                 confirm is 1 in that cycle, the flit is written to the
//                 output buffer of output_port. Either way the machine
//                 returns to IDLE. An unconfirmed flit is still in its input
//                 buffer and will be granted again later.
//
// Interface and timing: data_in is sampled in the grant cycle. output_port is
// valid two cycles later. confirm[i] must arrive in that same cycle, and the
// write to the output buffer (data_out_valid) happens in it. One flit takes
// three cycles. The node coordinates are inputs, so every node of a mesh
// shares one module. The state names and the routing rule follow the
// documentation. The cycle-level timing is this design's choice.
module onoc_router
  import onoc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  // granted flit from one of the input buffers
  input  flit_t              data_in,
  input  logic               data_in_valid,
  // to / from the scheduler
  output port_e              output_port,
  output logic               output_port_valid,
  input  logic [NPORTS-1:0]  confirm,
  // to the output buffers, indexed by port_e
  output flit_t              data_out,
  output logic [NPORTS-1:0]  data_out_valid
);

  typedef enum logic [1:0] {
    S_IDLE          = 2'd0,
    S_DATA          = 2'd1,
    S_COMPUTE_ROUTE = 2'd2
  } state_e;

  state_e             current_state;
  flit_t              buffer;
  logic [COORD_W-1:0] dest_x, dest_y;

  // Dimension-order route of the latched destination.
  always_comb begin
    if (dest_x > node_x)      output_port = PORT_E;
    else if (dest_x < node_x) output_port = PORT_W;
    else if (dest_y > node_y) output_port = PORT_S;
    else if (dest_y < node_y) output_port = PORT_N;
    else                      output_port = PORT_NI;
  end

  assign output_port_valid = (current_state == S_COMPUTE_ROUTE);
  assign data_out          = buffer;

  always_comb begin
    data_out_valid = '0;
    if (current_state == S_COMPUTE_ROUTE && |confirm)
      data_out_valid[output_port] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      current_state <= S_IDLE;
      buffer        <= '0;
      dest_x        <= '0;
      dest_y        <= '0;
    end else begin
      unique case (current_state)
        S_IDLE: if (data_in_valid) begin
          buffer        <= data_in;
          current_state <= S_DATA;
        end
        S_DATA: begin
          dest_x        <= buffer.hdr.dst_x;
          dest_y        <= buffer.hdr.dst_y;
          current_state <= S_COMPUTE_ROUTE;
        end
        default: current_state <= S_IDLE;
      endcase
    end
  end

  a_grant_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                      data_in_valid |-> current_state == S_IDLE);
  a_confirm_in_route: assert property (@(posedge clk) disable iff (!rst_n)
                                       |confirm |-> current_state == S_COMPUTE_ROUTE);

endmodule
