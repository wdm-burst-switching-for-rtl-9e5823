// iom_ctrl: control section of one input/output module (IOM).
//
// Inbound, a header cell received on the external link's control channel
// has its destination address looked up in the routing table; the output
// port number found there is written into the cell, which is then passed to
// the first-stage switch element. Outbound, cells from the last-stage
// element are passed on to the external link. This follows the document.
// In addition, inbound cells are stamped with the absolute arrival time of
// their burst (now + offset), and outbound cells get their offset
// recomputed from that time as they leave, so time spent waiting in the
// switch is accounted for.
//
// This design's choices: the routing table is direct-indexed by the low
// RT_AW bits of the destination address (2^RT_AW entries), written through
// the rt_wr_* port, and comes out of reset holding entry a -> port a (a
// default route per address). Each direction has a one-entry register with
// valid/ready; the inbound lookup is done as the cell is registered, so a
// cell reaches the switch element one cycle after it is accepted, and each
// direction carries one cell per cycle.
module iom_ctrl
  import burst_pkg::*;
#(
  parameter int unsigned RT_AW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  time_t             now,
  // routing table write
  input  logic              rt_wr_en,
  input  logic [RT_AW-1:0]  rt_wr_idx,
  input  logic [PORT_W-1:0] rt_wr_port,
  // external link, inbound
  input  logic              link_in_valid,
  input  bhc_t              link_in_bhc,
  output logic              link_in_ready,
  // to the first-stage switch element
  output logic              to_bse_valid,
  output bhc_t              to_bse_bhc,
  input  logic              to_bse_ready,
  // from the last-stage switch element
  input  logic              from_bse_valid,
  input  bhc_t              from_bse_bhc,
  output logic              from_bse_ready,
  // external link, outbound
  output logic              link_out_valid,
  output bhc_t              link_out_bhc,
  input  logic              link_out_ready
);

  logic [PORT_W-1:0] rt [2**RT_AW];
  bhc_t              out_q;

  always_comb begin
    link_out_bhc        = out_q;
    link_out_bhc.offset = (out_q.t_arr > now) ? OFF_W'(out_q.t_arr - now) : '0;
  end

  assign link_in_ready  = !to_bse_valid || to_bse_ready;
  assign from_bse_ready = !link_out_valid || link_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < 2**RT_AW; a++) rt[a] <= PORT_W'(a);
      to_bse_valid   <= 1'b0;
      to_bse_bhc     <= '0;
      link_out_valid <= 1'b0;
      out_q          <= '0;
    end else begin
      if (rt_wr_en) rt[rt_wr_idx] <= rt_wr_port;
      if (link_in_ready) begin
        to_bse_valid <= link_in_valid;
        if (link_in_valid) begin
          to_bse_bhc          <= link_in_bhc;
          to_bse_bhc.out_port <= rt[link_in_bhc.dest_addr[RT_AW-1:0]];
          to_bse_bhc.t_arr    <= now + time_t'(link_in_bhc.offset);
        end
      end
      if (from_bse_ready) begin
        link_out_valid <= from_bse_valid;
        if (from_bse_valid) out_q <= from_bse_bhc;
      end
    end
  end

endmodule
