// ctrl_ring: local control ring of one burst switch element.
//
// The burst processors and the burst storage manager of a switch element
// exchange short messages over a ring. The document only names the ring; this
// design makes it a slotted unidirectional ring of NODES nodes with one
// message register per node. Node i reads the slot register of node i-1. A
// message addressed to node i is delivered there (rx_valid for one cycle;
// the receiver must take it) and frees the slot. A node may insert its own
// message (tx_valid/tx_ready) into a slot that is empty or that it has just
// emptied; the ring stamps src with the node number. Each hop takes one
// clock cycle, so a message from node a to node b arrives (b - a) mod NODES
// cycles after the edge that inserted it. Messages in transit have priority
// over new ones, so nothing is ever dropped.
module ctrl_ring
  import burst_pkg::*;
#(
  parameter int unsigned NODES = 9
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tx_valid [NODES],
  input  ring_msg_t tx_msg   [NODES],
  output logic      tx_ready [NODES],
  output logic      rx_valid [NODES],
  output ring_msg_t rx_msg   [NODES]
);

  ring_msg_t slot    [NODES];
  ring_msg_t slot_nx [NODES];

  ring_msg_t inc [NODES];
  logic      dlv [NODES];

  always_comb begin
    for (int unsigned i = 0; i < NODES; i++) begin
      inc[i]      = slot[(i + NODES - 1) % NODES];
      dlv[i]      = inc[i].valid && (inc[i].dst == NODE_W'(i));
      rx_valid[i] = dlv[i];
      rx_msg[i]   = inc[i];
      tx_ready[i] = !inc[i].valid || dlv[i];
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NODES; i++) begin
      if (tx_ready[i] && tx_valid[i]) begin
        slot_nx[i]       = tx_msg[i];
        slot_nx[i].valid = 1'b1;
        slot_nx[i].src   = NODE_W'(i);
      end else if (tx_ready[i]) begin
        slot_nx[i] = '0;
      end else begin
        slot_nx[i] = inc[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NODES; i++) slot[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NODES; i++) slot[i] <= slot_nx[i];
    end
  end

endmodule
