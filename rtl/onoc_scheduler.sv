// onoc_scheduler: the control part of a node.
//
// What it does: the scheduler arbitrates the requests of the node's five input
// buffers and gives the single router datapath to one of them at a time. It
// uses priority-based round robin (PBRR). Requests for High flits
// (short_data_in_buff) are served before requests for Mid/Low flits
// (data_in_buff). Within each class a separate round-robin pointer rotates
// over the five ports. A request is granted with node_grant_fast or
// node_grant_slow. The router then reports the flit's output port. The
// scheduler asserts confirm to the granted buffer only if that port's output
// buffer has room. This is the credit flow control between input and output
// buffers.
//
// How it works: two states. In ARB the scheduler reads the request table,
// picks a winner and pulses its grant. In WAIT it waits for
// output_port_valid from the router. It then looks the port up in the output
// path availability table and confirms or refuses. The request table is kept
// as two vectors, one per class, as the separate request memories of PBRR
// require. The availability table is a register copy of the five
// buff_avail_node inputs, refreshed every cycle. It is never stale when read,
// because a write into an output buffer is at least three cycles before the
// next lookup. If a High grant is refused because its output buffer is full,
// the next arbitration serves a waiting Mid/Low request first. Without this
// rule, a blocked High flit would keep the datapath from all other traffic.
//
// Interface and timing: grants are one-cycle pulses, at most one per
// transaction. confirm is a one-cycle pulse in the cycle where
// output_port_valid is 1. A transaction takes three cycles (ARB, then two
// cycles of WAIT). The class order, the round robin and the tables follow the
// documentation. The cycle timing, the table refresh and the rule for a
// refused High grant are this design's choices.
module onoc_scheduler
  import onoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // request table inputs, one bit per input buffer (port_e order)
  input  logic [NPORTS-1:0] short_data_in_buff,
  input  logic [NPORTS-1:0] data_in_buff,
  output logic [NPORTS-1:0] node_grant_fast,
  output logic [NPORTS-1:0] node_grant_slow,
  output logic [NPORTS-1:0] confirm,
  // output path availability, one bit per output buffer
  input  logic [NPORTS-1:0] buff_avail_node,
  // route from the router
  input  port_e             output_port,
  input  logic              output_port_valid
);

  typedef enum logic {S_ARB = 1'b0, S_WAIT = 1'b1} state_e;

  state_e            state;
  logic [NPORTS-1:0] avail_tbl;
  logic [PORT_IDX_W-1:0] rr_hi, rr_lo;     // last port served in each class
  logic [PORT_IDX_W-1:0] gnt_port;
  logic              gnt_fast;
  logic              hi_refused;

  // Round-robin pick: the first requesting port after `last`.
  function automatic logic [PORT_IDX_W:0] rr_pick(input logic [NPORTS-1:0] req,
                                              input logic [PORT_IDX_W-1:0] last);
    logic [PORT_IDX_W:0] res;
    int unsigned     idx;
    res = '0;
    for (int k = NPORTS; k >= 1; k--) begin
      idx = (int'(last) + k) % NPORTS;
      if (req[idx]) res = {1'b1, PORT_IDX_W'(idx)};
    end
    return res;
  endfunction

  logic [PORT_IDX_W:0] pick_hi, pick_lo;
  logic            serve_hi, serve_lo;

  assign pick_hi  = rr_pick(short_data_in_buff, rr_hi);
  assign pick_lo  = rr_pick(data_in_buff, rr_lo);
  assign serve_hi = pick_hi[PORT_IDX_W] && !(hi_refused && pick_lo[PORT_IDX_W]);
  assign serve_lo = !serve_hi && pick_lo[PORT_IDX_W];

  always_comb begin
    node_grant_fast = '0;
    node_grant_slow = '0;
    confirm         = '0;
    if (state == S_ARB) begin
      if (serve_hi)      node_grant_fast[pick_hi[PORT_IDX_W-1:0]] = 1'b1;
      else if (serve_lo) node_grant_slow[pick_lo[PORT_IDX_W-1:0]] = 1'b1;
    end else if (output_port_valid && avail_tbl[output_port]) begin
      confirm[gnt_port] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_ARB;
      avail_tbl  <= '0;
      rr_hi      <= PORT_IDX_W'(NPORTS - 1);
      rr_lo      <= PORT_IDX_W'(NPORTS - 1);
      gnt_port   <= '0;
      gnt_fast   <= 1'b0;
      hi_refused <= 1'b0;
    end else begin
      avail_tbl <= buff_avail_node;
      unique case (state)
        S_ARB: begin
          if (serve_hi) begin
            rr_hi      <= pick_hi[PORT_IDX_W-1:0];
            gnt_port   <= pick_hi[PORT_IDX_W-1:0];
            gnt_fast   <= 1'b1;
            hi_refused <= 1'b0;
            state      <= S_WAIT;
          end else if (serve_lo) begin
            rr_lo      <= pick_lo[PORT_IDX_W-1:0];
            gnt_port   <= pick_lo[PORT_IDX_W-1:0];
            gnt_fast   <= 1'b0;
            hi_refused <= 1'b0;
            state      <= S_WAIT;
          end
        end
        default: begin
          if (output_port_valid) begin
            hi_refused <= gnt_fast && !avail_tbl[output_port];
            state      <= S_ARB;
          end
        end
      endcase
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({node_grant_fast, node_grant_slow}));
  a_confirm_only_granted: assert property (@(posedge clk) disable iff (!rst_n)
                                           $onehot0(confirm));

endmodule
