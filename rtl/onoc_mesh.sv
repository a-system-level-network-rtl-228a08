// onoc_mesh: the complete network, a MESH_X x MESH_Y mesh of nodes.
//
// What it does: this is the top level. Each mesh position holds a node, a
// producer that injects flits through the node's NI input buffer, and a
// consumer that takes the flits arriving at the node's NI output buffer. The
// nodes are linked to their four neighbours. A flit crosses the mesh by
// dimension-order routing, X first and then Y, and is served at every node by
// priority-based round robin. The 4x4 size is the documented example
// network. The documented example puts producers and latency displays at a
// few positions only. Here every position has both, and a producer that is
// not enabled injects nothing.
//
// How it works: node (x, y) has index y*MESH_X + x. X grows to the East and Y
// to the South. Port E of node (x, y) is joined to port W of node (x+1, y),
// and port S to port N of node (x, y+1), in both directions. At the mesh edge
// the unused ports see no incoming flits and no room downstream. Dimension-
// order routing never selects them for a destination inside the mesh. A free-
// running counter, time_now, provides the time stamps.
//
// Interface and timing: prod_cfg[i] configures producer i at run time.
// flits_sent[i] counts its injected flits. cons_stats[i][c] holds the latency
// statistics of consumer i for class c (0 High, 1 Mid, 2 Low). cons_payload*
// show each delivered flit for one cycle. All latencies are in clock cycles.
module onoc_mesh
  import onoc_pkg::*;
#(
  parameter int unsigned MESH_X   = 4,
  parameter int unsigned MESH_Y   = 4,
  parameter int unsigned IB_DEPTH = 4,
  parameter int unsigned OB_DEPTH = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  prod_cfg_t            prod_cfg           [MESH_X*MESH_Y],
  output logic [15:0]          flits_sent         [MESH_X*MESH_Y],
  output logic [PAYLOAD_W-1:0] cons_payload       [MESH_X*MESH_Y],
  output logic [COORD_W-1:0]   cons_src_x         [MESH_X*MESH_Y],
  output logic [COORD_W-1:0]   cons_src_y         [MESH_X*MESH_Y],
  output prio_e                cons_prio          [MESH_X*MESH_Y],
  output logic [TS_W-1:0]      cons_latency       [MESH_X*MESH_Y],
  output logic                 cons_payload_valid [MESH_X*MESH_Y],
  output lat_stat_t            cons_stats         [MESH_X*MESH_Y][3],
  output logic [TS_W-1:0]      time_now
);

  localparam int unsigned NN = MESH_X * MESH_Y;

  initial begin
    assert (MESH_X >= 1 && MESH_X <= (1 << COORD_W) &&
            MESH_Y >= 1 && MESH_Y <= (1 << COORD_W))
      else $error("mesh size exceeds the coordinate width of the flit header");
  end

  flit_t             link_in        [NN][NPORTS];
  logic [NPORTS-1:0] link_in_valid  [NN];
  logic [NPORTS-1:0] buff_avail_in  [NN];
  flit_t             link_out       [NN][NPORTS];
  logic [NPORTS-1:0] link_out_valid [NN];
  logic [NPORTS-1:0] buff_avail_out [NN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) time_now <= '0;
    else        time_now <= time_now + 1'b1;
  end

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned ID = y * MESH_X + x;
      localparam int unsigned IDN = (y > 0)          ? ID - MESH_X : ID;
      localparam int unsigned IDS = (y < MESH_Y - 1) ? ID + MESH_X : ID;
      localparam int unsigned IDE = (x < MESH_X - 1) ? ID + 1      : ID;
      localparam int unsigned IDW = (x > 0)          ? ID - 1      : ID;

      // Neighbour links: my input at port P is the neighbour's output at the
      // opposite port, and my room goes back to it.
      if (y > 0) begin : g_n
        assign link_in[ID][PORT_N]       = link_out[IDN][PORT_S];
        assign link_in_valid[ID][PORT_N] = link_out_valid[IDN][PORT_S];
        assign buff_avail_out[ID][PORT_N] = buff_avail_in[IDN][PORT_S];
      end else begin : g_n_edge
        assign link_in[ID][PORT_N]       = '0;
        assign link_in_valid[ID][PORT_N] = 1'b0;
        assign buff_avail_out[ID][PORT_N] = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign link_in[ID][PORT_S]       = link_out[IDS][PORT_N];
        assign link_in_valid[ID][PORT_S] = link_out_valid[IDS][PORT_N];
        assign buff_avail_out[ID][PORT_S] = buff_avail_in[IDS][PORT_N];
      end else begin : g_s_edge
        assign link_in[ID][PORT_S]       = '0;
        assign link_in_valid[ID][PORT_S] = 1'b0;
        assign buff_avail_out[ID][PORT_S] = 1'b0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign link_in[ID][PORT_E]       = link_out[IDE][PORT_W];
        assign link_in_valid[ID][PORT_E] = link_out_valid[IDE][PORT_W];
        assign buff_avail_out[ID][PORT_E] = buff_avail_in[IDE][PORT_W];
      end else begin : g_e_edge
        assign link_in[ID][PORT_E]       = '0;
        assign link_in_valid[ID][PORT_E] = 1'b0;
        assign buff_avail_out[ID][PORT_E] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign link_in[ID][PORT_W]       = link_out[IDW][PORT_E];
        assign link_in_valid[ID][PORT_W] = link_out_valid[IDW][PORT_E];
        assign buff_avail_out[ID][PORT_W] = buff_avail_in[IDW][PORT_E];
      end else begin : g_w_edge
        assign link_in[ID][PORT_W]       = '0;
        assign link_in_valid[ID][PORT_W] = 1'b0;
        assign buff_avail_out[ID][PORT_W] = 1'b0;
      end

      onoc_node #(.IB_DEPTH(IB_DEPTH), .OB_DEPTH(OB_DEPTH)) u_node (
        .clk            (clk),
        .rst_n          (rst_n),
        .node_x         (COORD_W'(x)),
        .node_y         (COORD_W'(y)),
        .link_in        (link_in[ID]),
        .link_in_valid  (link_in_valid[ID]),
        .buff_avail_in  (buff_avail_in[ID]),
        .link_out       (link_out[ID]),
        .link_out_valid (link_out_valid[ID]),
        .buff_avail_out (buff_avail_out[ID])
      );

      onoc_producer #(
        .MESH_X (MESH_X),
        .MESH_Y (MESH_Y),
        .SEED   (16'hACE1 + 16'(ID) * 16'h1F3D)
      ) u_prod (
        .clk            (clk),
        .rst_n          (rst_n),
        .node_x         (COORD_W'(x)),
        .node_y         (COORD_W'(y)),
        .cfg            (prod_cfg[ID]),
        .time_now       (time_now),
        .data_out       (link_in[ID][PORT_NI]),
        .data_out_valid (link_in_valid[ID][PORT_NI]),
        .buff_avail     (buff_avail_in[ID][PORT_NI]),
        .flits_sent     (flits_sent[ID])
      );

      onoc_consumer u_cons (
        .clk             (clk),
        .rst_n           (rst_n),
        .time_now        (time_now),
        .data_in         (link_out[ID][PORT_NI]),
        .data_in_valid   (link_out_valid[ID][PORT_NI]),
        .buff_avail      (buff_avail_out[ID][PORT_NI]),
        .payload         (cons_payload[ID]),
        .payload_src_x   (cons_src_x[ID]),
        .payload_src_y   (cons_src_y[ID]),
        .payload_prio    (cons_prio[ID]),
        .payload_latency (cons_latency[ID]),
        .payload_valid   (cons_payload_valid[ID]),
        .stats           (cons_stats[ID])
      );
    end
  end

endmodule
