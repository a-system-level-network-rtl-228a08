// onoc_input_buffer: the input buffer at one port of a node.
//
// What it does: flits of all three priorities share one store of DEPTH
// entries, as the documented input buffer does. buff_avail tells the sender
// that at least one entry is free. short_data_in_buff is raised while a High
// flit is stored, and data_in_buff while a Mid or Low flit is stored. These
// are the two requests to the scheduler. When node_grant_fast comes, the
// oldest High flit is driven on data_out. When node_grant_slow comes, the
// oldest Mid flit is driven, or the oldest Low flit if no Mid flit is stored.
// The granted entry stays in the buffer until confirm arrives. Without a
// confirm it remains queued and will request again.
//
// How it works: the entries are kept in arrival order, with entry 0 the
// oldest, and valid entries packed at the bottom. A removal shifts the
// entries above it down by one. A write lands just above the last valid entry.
// On a grant the buffer latches the index of the entry it drove. A later
// confirm removes exactly that entry, even if flits arrived in between.
//
// Interface and timing:
//   data_in/data_in_valid  one write per cycle. A flit is taken in a cycle
//                          where data_in_valid and buff_avail are both 1
//                          (a valid/ready handshake).
//   node_grant_*           one-cycle pulses. data_out is combinational and is
//                          valid in the cycle of the grant.
//   confirm                one-cycle pulse, some cycles after the grant. The
//                          entry is gone from the next cycle on.
// The common buffer, the request/grant/confirm signals and the High-first
// order follow the documentation. The packed arrival-order store and the
// latched index are this design's choices. The documented "init" input, which
// sets the free space, is the reset here: the buffer starts empty with DEPTH
// free entries.
module onoc_input_buffer
  import onoc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // upstream link
  input  flit_t data_in,
  input  logic  data_in_valid,
  output logic  buff_avail,
  // scheduler handshake
  output logic  short_data_in_buff,
  output logic  data_in_buff,
  input  logic  node_grant_fast,
  input  logic  node_grant_slow,
  input  logic  confirm,
  // towards the router
  output flit_t data_out
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  flit_t             mem   [DEPTH];
  logic [CNT_W-1:0]  count;
  logic [IDX_W-1:0]  sel_idx;
  logic              sel_valid;

  // Oldest entry of each class.
  logic              hi_found, mid_found, low_found;
  logic [IDX_W-1:0]  hi_idx, mid_idx, low_idx, slow_idx;

  always_comb begin
    hi_found  = 1'b0;
    mid_found = 1'b0;
    low_found = 1'b0;
    hi_idx    = '0;
    mid_idx   = '0;
    low_idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (i < int'(count)) begin
        unique case (mem[i].hdr.prio)
          PRI_HIGH: begin hi_found  = 1'b1; hi_idx  = IDX_W'(i); end
          PRI_MID:  begin mid_found = 1'b1; mid_idx = IDX_W'(i); end
          default:  begin low_found = 1'b1; low_idx = IDX_W'(i); end
        endcase
      end
    end
    slow_idx = mid_found ? mid_idx : low_idx;
  end

  assign buff_avail         = (count < CNT_W'(DEPTH));
  assign short_data_in_buff = hi_found;
  assign data_in_buff       = mid_found | low_found;
  assign data_out           = mem[node_grant_fast ? hi_idx : slow_idx];

  logic             do_remove, do_write;
  logic [CNT_W-1:0] count_after_remove;

  assign do_remove          = confirm && sel_valid;
  assign do_write           = data_in_valid && buff_avail;
  assign count_after_remove = do_remove ? count - 1'b1 : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      sel_idx   <= '0;
      sel_valid <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_remove) begin
        for (int i = 0; i < DEPTH - 1; i++)
          if (i >= int'(sel_idx)) mem[i] <= mem[i+1];
      end
      if (do_write) mem[count_after_remove[IDX_W-1:0]] <= data_in;
      count <= count_after_remove + CNT_W'(do_write);

      if (node_grant_fast || node_grant_slow) begin
        sel_idx   <= node_grant_fast ? hi_idx : slow_idx;
        sel_valid <= 1'b1;
      end else if (confirm) begin
        sel_valid <= 1'b0;
      end
    end
  end

  // A grant is only given for a class that is requesting.
  a_grant_fast: assert property (@(posedge clk) disable iff (!rst_n)
                                 node_grant_fast |-> short_data_in_buff);
  a_grant_slow: assert property (@(posedge clk) disable iff (!rst_n)
                                 node_grant_slow |-> data_in_buff);
  a_confirm_after_grant: assert property (@(posedge clk) disable iff (!rst_n)
                                          confirm |-> sel_valid);

endmodule
