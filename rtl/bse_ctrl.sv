// bse_ctrl: control section of one burst switch element (BSE).
//
// Arranged as in the document's description of a switch element's control:
// a D-port cell switch (ase) hands each arriving header cell to the burst
// processor (burst_processor) of the output link it must use; each of the D
// processors schedules bursts for its link; and when a processor must delay
// a burst it obtains a storage location of the shared burst storage unit
// from the burst storage manager (bsm), over a local control ring
// (ctrl_ring) with the D processors as nodes 0..D-1 and the manager as node
// D. The optical parts of the element, crossbar and storage unit, are not
// logic: the processors' crossbar commands are brought out instead.
//
// DIST and DIGIT select the role of the element in the network (see ase).
// All ports are valid/ready except the crossbar commands and the event
// pulses, which are valid for one cycle.
module bse_ctrl
  import burst_pkg::*;
#(
  parameter int unsigned D         = 8,
  parameter bit          DIST      = 1'b1,
  parameter int unsigned DIGIT     = 0,
  parameter int unsigned CHANNELS  = 512,
  parameter int unsigned SLOTS     = 256,
  parameter int unsigned DELTA     = 2,
  parameter int unsigned RSQ_DEPTH = 16,
  parameter int unsigned BSU_LOCS  = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  time_t     now,
  input  logic      in_valid   [D],
  input  bhc_t      in_bhc     [D],
  output logic      in_ready   [D],
  output logic      out_valid  [D],
  output bhc_t      out_bhc    [D],
  input  logic      out_ready  [D],
  output logic      xbar_valid [D],
  output xbar_cmd_t xbar_cmd   [D],
  output logic      ev_direct  [D],
  output logic      ev_stored  [D],
  output logic      ev_drop    [D]
);

  logic      a_valid [D];
  bhc_t      a_bhc   [D];
  logic      a_ready [D];

  logic      tx_valid [D+1];
  ring_msg_t tx_msg   [D+1];
  logic      tx_ready [D+1];
  logic      rx_valid [D+1];
  ring_msg_t rx_msg   [D+1];

  ase #(.D(D), .DIST(DIST), .DIGIT(DIGIT)) u_ase (
    .clk, .rst_n,
    .in_valid, .in_bhc, .in_ready,
    .out_valid(a_valid), .out_bhc(a_bhc), .out_ready(a_ready)
  );

  for (genvar p = 0; p < D; p++) begin : g_bp
    burst_processor #(
      .CHANNELS(CHANNELS), .SLOTS(SLOTS), .DELTA(DELTA), .RSQ_DEPTH(RSQ_DEPTH),
      .NODE_ID(p), .BSM_NODE(D)
    ) u_bp (
      .clk, .rst_n, .now,
      .in_valid(a_valid[p]), .in_bhc(a_bhc[p]), .in_ready(a_ready[p]),
      .out_valid(out_valid[p]), .out_bhc(out_bhc[p]), .out_ready(out_ready[p]),
      .tx_valid(tx_valid[p]), .tx_msg(tx_msg[p]), .tx_ready(tx_ready[p]),
      .rx_valid(rx_valid[p]), .rx_msg(rx_msg[p]),
      .xbar_valid(xbar_valid[p]), .xbar_cmd(xbar_cmd[p]),
      .ev_direct(ev_direct[p]), .ev_stored(ev_stored[p]), .ev_drop(ev_drop[p])
    );
  end

  ctrl_ring #(.NODES(D + 1)) u_ring (
    .clk, .rst_n,
    .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg
  );

  bsm #(.BSU_LOCS(BSU_LOCS)) u_bsm (
    .clk, .rst_n,
    .rx_valid(rx_valid[D]), .rx_msg(rx_msg[D]),
    .tx_valid(tx_valid[D]), .tx_msg(tx_msg[D])
  );

endmodule
