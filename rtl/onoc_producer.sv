// onoc_producer: traffic source and network interface of one node.
//
// What it does: it generates flits in one of three statistical patterns,
// stamps each with the time of its generation, fills in the source and
// destination addresses and the priority, and hands it to the node's local
// input buffer when that buffer signals room (buff_avail). The three
// patterns follow the documentation (uniform, exponential, Bernoulli), and
// so do the run-time choices of rate, priority and addresses. How each
// pattern is realised in hardware is this design's choice:
//   uniform      one flit every cfg.interval cycles. Flit numbers 0, 1, 2 of
//                every group of three are Mid, Low, High, so every third
//                flit is High, as the documentation's example says.
//   exponential  gaps drawn from an approximate exponential distribution with
//                mean cfg.interval. With u a 16-bit uniform number, the gap is
//                (leading zeros of u, plus a uniform fraction) times ln 2,
//                scaled by cfg.interval. The priority is drawn uniformly from
//                the three classes.
//   Bernoulli    in every cycle a flit is generated with probability
//                cfg.rate/256. The priority is drawn uniformly.
// The destination is cfg.dst_x/dst_y, or with cfg.dst_random uniform over
// all other nodes. The payload is the producer's flit sequence number.
//
// How it works: a 16-bit Galois LFSR, seeded from SEED and the node
// coordinates, supplies the random numbers. The producer holds one generated
// flit. While that flit waits for room no new flit is generated: a flit that
// falls due meanwhile is generated (and time-stamped) once the held flit has
// left, so the offered load falls when the network pushes back. Generation stops after
// cfg.max_flits flits when that is not zero.
//
// Interface and timing: data_out/data_out_valid form a valid/ready link with
// buff_avail. A flit leaves in a cycle where both are 1. time_now is the global
// cycle counter used for time stamps. flits_sent counts the flits delivered
// to the network.
module onoc_producer
  import onoc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter logic [15:0] SEED   = 16'hACE1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] node_x,
  input  logic [COORD_W-1:0] node_y,
  input  prod_cfg_t          cfg,
  input  logic [TS_W-1:0]    time_now,
  output flit_t              data_out,
  output logic               data_out_valid,
  input  logic               buff_avail,
  output logic [15:0]        flits_sent
);

  logic [15:0] lfsr;
  logic [15:0] gen_count;   // flits generated so far
  logic [15:0] wait_cnt;    // cycles until the next uniform/exponential flit
  logic        pending;
  flit_t       flit_q;

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
  endfunction

  function automatic logic [4:0] lzc16(input logic [15:0] v);
    logic [4:0] n;
    n = 5'd16;
    for (int i = 0; i <= 15; i++) if (v[i]) n = 5'(15 - i);
    return n;
  endfunction

  // Exponential gap: (lz + frac) * ln2 * interval, ln2 ~ 177/256.
  logic [15:0] rnd_a, rnd_b;
  logic [12:0] e_fix;       // (lz + frac) in 1/256 units
  logic [20:0] e_ln2;       // times 177
  logic [28:0] exp_gap_full;
  logic [15:0] exp_gap, uni_gap, next_gap;

  assign rnd_a        = lfsr;
  assign rnd_b        = lfsr_next(lfsr);
  assign e_fix        = {lzc16(rnd_a), rnd_b[7:0]};
  assign e_ln2        = 21'(e_fix) * 21'd177;
  assign exp_gap_full = 29'(e_ln2[20:8]) * 29'(cfg.interval);
  assign exp_gap      = (exp_gap_full[28:8] == '0) ? 16'd1 :
                        (|exp_gap_full[28:24]) ? 16'hFFFF : exp_gap_full[23:8];
  assign uni_gap      = (cfg.interval == '0) ? 16'd1 : 16'(cfg.interval);
  assign next_gap     = (cfg.pattern == DIST_EXPONENTIAL) ? exp_gap : uni_gap;

  // Is a flit generated in this cycle?
  logic quota_left, gen_event;
  assign quota_left = (cfg.max_flits == '0) || (gen_count < cfg.max_flits);
  always_comb begin
    gen_event = 1'b0;
    if (cfg.enable && quota_left && !pending) begin
      if (cfg.pattern == DIST_BERNOULLI) gen_event = (rnd_a[7:0] < cfg.rate);
      else                            gen_event = (wait_cnt == '0);
    end
  end

  // Fields of the new flit.
  prio_e              new_prio;
  logic [1:0]         cls3;
  logic [COORD_W-1:0] rx, ry, new_dx, new_dy;
  logic [9:0]         rx_full, ry_full, cls_full;

  always_comb begin
    cls_full = 10'(rnd_a[15:8]) * 10'd3;
    if (cfg.pattern == DIST_UNIFORM) cls3 = 2'(gen_count % 3);
    else                          cls3 = cls_full[9:8];
    unique case (cls3)
      2'd0:    new_prio = PRI_MID;
      2'd1:    new_prio = PRI_LOW;
      default: new_prio = PRI_HIGH;
    endcase

    rx_full = 10'(rnd_b[15:8]) * 10'(MESH_X);
    ry_full = 10'(rnd_b[7:0])  * 10'(MESH_Y);
    rx      = rx_full[COORD_W+7:8];
    ry      = ry_full[COORD_W+7:8];
    if (cfg.dst_random) begin
      new_dx = rx;
      new_dy = ry;
      if (rx == node_x && ry == node_y)
        new_dx = (int'(rx) == MESH_X - 1) ? '0 : rx + 1'b1;
    end else begin
      new_dx = cfg.dst_x;
      new_dy = cfg.dst_y;
    end
  end

  assign data_out       = flit_q;
  assign data_out_valid = pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr       <= SEED ^ 16'({node_y, node_x}) ^ 16'({node_x, 4'h0, node_y, 8'h00});
      gen_count  <= '0;
      wait_cnt   <= '0;
      pending    <= 1'b0;
      flit_q     <= '0;
      flits_sent <= '0;
    end else begin
      lfsr <= lfsr_next(rnd_b);
      if (lfsr == '0) lfsr <= SEED;

      if (pending && buff_avail) begin
        pending    <= 1'b0;
        flits_sent <= flits_sent + 1'b1;
      end

      if (cfg.enable && cfg.pattern != DIST_BERNOULLI && wait_cnt != '0)
        wait_cnt <= wait_cnt - 1'b1;

      if (gen_event) begin
        pending                <= 1'b1;
        gen_count              <= gen_count + 1'b1;
        wait_cnt               <= next_gap - 1'b1;
        flit_q.hdr.prio        <= new_prio;
        flit_q.hdr.timestamp   <= time_now;
        flit_q.hdr.src_x       <= node_x;
        flit_q.hdr.src_y       <= node_y;
        flit_q.hdr.dst_x       <= new_dx;
        flit_q.hdr.dst_y       <= new_dy;
        flit_q.payload         <= gen_count;
      end
    end
  end

endmodule
