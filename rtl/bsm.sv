// bsm: burst storage manager of one switch element.
//
// When a burst processor cannot send a burst straight to its output link it
// asks the manager for a storage location of the shared burst storage unit
// (BSU). The request names the time the burst enters storage (t_in) and the
// time it has completely left it again (t_out). The manager keeps, for each
// of BSU_LOCS locations, the time until which it is booked, grants the lowest
// numbered location that is free from t_in on, and books it until t_out; if
// none is free it refuses. Booking by future time, rather than by explicit
// release messages, is this design's choice, in line with the look-ahead
// resource management the document calls for.
//
// Interface: a ring node. A request arrives on rx_valid/rx_msg; the reply
// (GRANT with loc, or DENY) leaves on tx_valid/tx_msg in the same cycle,
// addressed to the requester, taking the ring slot the request freed. The
// booking takes effect at the next edge. Reset frees every location.
module bsm
  import burst_pkg::*;
#(
  parameter int unsigned BSU_LOCS = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rx_valid,
  input  ring_msg_t rx_msg,
  output logic      tx_valid,
  output ring_msg_t tx_msg
);

  time_t busy_until [BSU_LOCS];

  logic             found;
  logic [LOC_W-1:0] loc;
  logic             is_req;

  assign is_req = rx_valid && rx_msg.kind == MSG_REQ;

  always_comb begin
    found = 1'b0;
    loc   = '0;
    for (int unsigned k = 0; k < BSU_LOCS; k++) begin
      if (!found && busy_until[k] <= rx_msg.t_in) begin
        found = 1'b1;
        loc   = LOC_W'(k);
      end
    end
    tx_valid     = is_req;
    tx_msg       = rx_msg;
    tx_msg.valid = is_req;
    tx_msg.dst   = rx_msg.src;
    tx_msg.kind  = found ? MSG_GRANT : MSG_DENY;
    tx_msg.loc   = loc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < BSU_LOCS; k++) busy_until[k] <= '0;
    end else if (is_req && found) begin
      busy_until[int'(loc)] <= rx_msg.t_out;
    end
  end

endmodule
