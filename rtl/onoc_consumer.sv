// onoc_consumer: traffic sink and network interface of one node.
//
// What it does: it accepts every flit that the node's local output buffer
// delivers, strips the header and passes the payload on to the local
// computing resource (payload/payload_valid). It also measures each flit's
// latency as the current time minus the time stamp set by the producer, and
// keeps per-class statistics of that latency: count, sum and maximum. These
// statistics stand in for the latency display of each node in the documented
// mesh. Stripping the header follows the documentation. The statistics
// registers and the always-ready input are this design's choices.
//
// How it works: buff_avail is tied to 1, so a flit is taken in every cycle
// where data_in_valid is 1. In that cycle the latency is computed, modulo
// 2^TS_W, and the class's statistics are updated at the clock edge. The
// payload, its source coordinates and its latency are registered and shown
// for one cycle on payload_valid.
//
// Interface and timing: stats[c] is indexed by prio_e (0 High, 1 Mid, 2 Low)
// and is valid from the cycle after the flit was taken. The sums saturate at
// 2^32-1 and the counts at 2^16-1.
module onoc_consumer
  import onoc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TS_W-1:0]      time_now,
  input  flit_t                data_in,
  input  logic                 data_in_valid,
  output logic                 buff_avail,
  // towards the computing resource
  output logic [PAYLOAD_W-1:0] payload,
  output logic [COORD_W-1:0]   payload_src_x,
  output logic [COORD_W-1:0]   payload_src_y,
  output prio_e                payload_prio,
  output logic [TS_W-1:0]      payload_latency,
  output logic                 payload_valid,
  // latency statistics per class
  output lat_stat_t            stats [3]
);

  logic [TS_W-1:0] latency;
  logic [1:0]      cls;

  assign buff_avail = 1'b1;
  assign latency    = time_now - data_in.hdr.timestamp;
  assign cls        = (data_in.hdr.prio == PRI_HIGH) ? 2'd0 :
                      (data_in.hdr.prio == PRI_MID)  ? 2'd1 : 2'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      payload         <= '0;
      payload_src_x   <= '0;
      payload_src_y   <= '0;
      payload_prio    <= PRI_HIGH;
      payload_latency <= '0;
      payload_valid   <= 1'b0;
      for (int c = 0; c < 3; c++) stats[c] <= '0;
    end else begin
      payload_valid <= data_in_valid;
      if (data_in_valid) begin
        payload         <= data_in.payload;
        payload_src_x   <= data_in.hdr.src_x;
        payload_src_y   <= data_in.hdr.src_y;
        payload_prio    <= data_in.hdr.prio;
        payload_latency <= latency;
        if (stats[cls].count != 16'hFFFF)
          stats[cls].count <= stats[cls].count + 1'b1;
        if (stats[cls].lat_sum <= 32'hFFFF_FFFF - 32'(latency))
          stats[cls].lat_sum <= stats[cls].lat_sum + 32'(latency);
        else
          stats[cls].lat_sum <= 32'hFFFF_FFFF;
        if (16'(latency) > stats[cls].lat_max)
          stats[cls].lat_max <= 16'(latency);
      end
    end
  end

endmodule
