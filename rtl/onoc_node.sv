// onoc_node: one node of the mesh.
//
// What it does: five input buffers (North, East, South, West and the local
// network interface) feed one router through a scheduler that allocates the
// router to one flit at a time. The router writes each confirmed flit into
// one of five output buffers, which send it on to the neighbouring node or to
// the local consumer.
//
// How it works: each input buffer raises its two requests to the scheduler.
// The scheduler grants one of them. The node ORs the granted buffer's data_out
// onto the router's single data input. The router reports the output port,
// and the scheduler confirms when the output buffer of that port has room.
// The confirm goes to the granted input buffer, which then drops the flit,
// and to the router, which then writes the flit into the output buffer. This
// is the documented structure of a node, with data (router) and control
// (scheduler) kept apart.
//
// Interface and timing: every port, indexed by port_e (N, E, S, W, NI), has
// an incoming link (link_in, link_in_valid, and buff_avail_in back to the
// sender) and an outgoing link (link_out, link_out_valid, and buff_avail_out
// from the receiver). A flit crosses a link in a cycle where valid and the
// receiver's buff_avail are both 1. A node moves at most one flit every three
// cycles. Through an idle node, link_out_valid rises four cycles after the
// cycle of the link_in handshake: one cycle in the input buffer before the
// grant, three in the router, then the flit is in the output buffer.
module onoc_node
  import onoc_pkg::*;
#(
  parameter int unsigned IB_DEPTH = 4,
  parameter int unsigned OB_DEPTH = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  // incoming links
  input  flit_t              link_in        [NPORTS],
  input  logic [NPORTS-1:0]  link_in_valid,
  output logic [NPORTS-1:0]  buff_avail_in,
  // outgoing links
  output flit_t              link_out       [NPORTS],
  output logic [NPORTS-1:0]  link_out_valid,
  input  logic [NPORTS-1:0]  buff_avail_out
);

  logic [NPORTS-1:0] short_req, data_req, grant_fast, grant_slow, confirm;
  logic [NPORTS-1:0] ob_avail, ob_write;
  flit_t             ib_data [NPORTS];
  flit_t             rt_in, rt_out;
  logic              rt_in_valid;
  port_e             out_port;
  logic              out_port_valid;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    onoc_input_buffer #(.DEPTH(IB_DEPTH)) u_ib (
      .clk                (clk),
      .rst_n              (rst_n),
      .data_in            (link_in[p]),
      .data_in_valid      (link_in_valid[p]),
      .buff_avail         (buff_avail_in[p]),
      .short_data_in_buff (short_req[p]),
      .data_in_buff       (data_req[p]),
      .node_grant_fast    (grant_fast[p]),
      .node_grant_slow    (grant_slow[p]),
      .confirm            (confirm[p]),
      .data_out           (ib_data[p])
    );

    onoc_output_buffer #(.DEPTH(OB_DEPTH)) u_ob (
      .clk            (clk),
      .rst_n          (rst_n),
      .data_in        (rt_out),
      .data_in_valid  (ob_write[p]),
      .buff_avail     (ob_avail[p]),
      .data_out       (link_out[p]),
      .data_out_valid (link_out_valid[p]),
      .out_buff_avail (buff_avail_out[p])
    );
  end

  // Granted input buffer onto the router's data input.
  always_comb begin
    rt_in = '0;
    for (int p = 0; p < NPORTS; p++)
      if (grant_fast[p] || grant_slow[p]) rt_in = ib_data[p];
  end
  assign rt_in_valid = |{grant_fast, grant_slow};

  onoc_scheduler u_sched (
    .clk                (clk),
    .rst_n              (rst_n),
    .short_data_in_buff (short_req),
    .data_in_buff       (data_req),
    .node_grant_fast    (grant_fast),
    .node_grant_slow    (grant_slow),
    .confirm            (confirm),
    .buff_avail_node    (ob_avail),
    .output_port        (out_port),
    .output_port_valid  (out_port_valid)
  );

  onoc_router u_router (
    .clk               (clk),
    .rst_n             (rst_n),
    .node_x            (node_x),
    .node_y            (node_y),
    .data_in           (rt_in),
    .data_in_valid     (rt_in_valid),
    .output_port       (out_port),
    .output_port_valid (out_port_valid),
    .confirm           (confirm),
    .data_out          (rt_out),
    .data_out_valid    (ob_write)
  );

endmodule
