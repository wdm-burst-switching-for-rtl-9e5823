// diff_search_tree: link usage curve of one output link, kept as a
// differential search tree.
//
// The curve gives, for every future time slot, how many of the link's
// channels are already booked. As in the document, the tree stores in each
// node a Delta-buf field such that the usage of a slot is the sum of Delta-buf
// over the leaf and all its ancestors, and a Delta-max field such that the
// largest usage below a node is Delta-max plus the Delta-buf sum from that
// node to the root. Adding one burst then touches only the few nodes that
// exactly cover its interval, and a range maximum is read from the same few
// nodes.
//
// This design's own choices: the tree is a complete binary tree (a legal 2-3
// tree shape) over a circular window of SLOTS fixed time slots, one leaf per
// slot, instead of a tree keyed by the breakpoints of the curve; Delta-max is
// derived combinationally from Delta-buf rather than stored; all nodes are
// evaluated in parallel so every operation takes one cycle.
//
// Window: slot time t lives in leaf t mod SLOTS. Valid times are
// now .. now+SLOTS-2. In every cycle the leaf of time now-1 is retired: the
// Delta-buf values on its path are pushed down to the side branches and the
// path is zeroed, so that leaf becomes the empty slot now+SLOTS-1 and all
// fields stay between 0 and CHANNELS.
//
// Interface: one range (r_start, r_len with 1 <= r_len <= SLOTS-1, inside
// the window). q_max, q_full and q_last_full describe the range with the
// contents before this cycle's edge (combinational): the largest usage, and
// the latest slot whose usage has reached CHANNELS. add_en books one more
// channel over the range at the clock edge. The caller keeps usage at or
// below CHANNELS.
module diff_search_tree
  import burst_pkg::*;
#(
  parameter int unsigned SLOTS    = 256,   // power of two
  parameter int unsigned CHANNELS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  time_t             now,
  input  time_t             r_start,
  input  logic [LEN_W-1:0]  r_len,
  input  logic              add_en,
  output logic [$clog2(CHANNELS+1):0] q_max,
  output logic              q_full,
  output time_t             q_last_full
);

  localparam int unsigned LOG   = $clog2(SLOTS);
  localparam int unsigned NODES = 2 * SLOTS;       // heap index 1..2*SLOTS-1
  localparam int unsigned UW    = $clog2(CHANNELS+1) + 1;
  typedef logic [UW-1:0]  u_t;
  typedef logic [LOG-1:0] idx_t;

  u_t   dbuf    [NODES];   // stored Delta-buf fields
  u_t   dmax    [NODES];   // Delta-max, derived
  u_t   path    [NODES];   // Delta-buf sum from node to root
  logic covered [NODES];
  logic onpath  [NODES];   // ancestor of the retiring leaf (or the leaf)
  u_t   dbuf_nx [NODES];

  idx_t s_idx, e_idx;
  assign s_idx = r_start[LOG-1:0];
  assign e_idx = idx_t'(now - time_t'(1));

  always_comb begin
    // Delta-max bottom-up, path sums top-down
    for (int unsigned i = SLOTS; i < NODES; i++) dmax[i] = '0;
    for (int unsigned i = SLOTS - 1; i >= 1; i--) begin
      dmax[i] = (dbuf[2*i] + dmax[2*i] > dbuf[2*i+1] + dmax[2*i+1])
              ? dbuf[2*i] + dmax[2*i] : dbuf[2*i+1] + dmax[2*i+1];
    end
    dmax[0] = '0;
    path[0] = '0;
    path[1] = dbuf[1];
    for (int unsigned i = 2; i < NODES; i++) path[i] = path[i/2] + dbuf[i];

    // node coverage of the circular range and of the retiring leaf's path
    covered[0] = 1'b0;
    onpath[0]  = 1'b0;
    for (int unsigned d = 0; d <= LOG; d++) begin
      for (int unsigned k = 0; k < (1 << d); k++) begin
        automatic int unsigned i    = (1 << d) + k;
        automatic int unsigned size = SLOTS >> d;
        automatic idx_t        rel  = idx_t'(k * size) - s_idx;
        covered[i] = (32'(rel) + size <= 32'(r_len));
        onpath[i]  = ((32'(e_idx) >> (LOG - d)) == k);
      end
    end

    // range results
    q_max       = '0;
    q_full      = 1'b0;
    q_last_full = r_start;
    for (int unsigned i = 1; i < NODES; i++)
      if (covered[i] && dmax[i] + path[i] > u_t'(q_max))
        q_max = dmax[i] + path[i];
    for (int unsigned j = 0; j < SLOTS; j++) begin
      automatic idx_t rel = idx_t'(j) - s_idx;
      if (covered[SLOTS + j] && path[SLOTS + j] >= u_t'(CHANNELS)) begin
        if (!q_full || r_start + time_t'(rel) > q_last_full)
          q_last_full = r_start + time_t'(rel);
        q_full = 1'b1;
      end
    end

    // next Delta-buf: push the retiring path down, then book the range
    dbuf_nx[0] = '0;
    for (int unsigned i = 1; i < NODES; i++) begin
      dbuf_nx[i] = onpath[i] ? '0 : dbuf[i];
      if (i > 1 && !onpath[i] && onpath[i/2]) dbuf_nx[i] = dbuf_nx[i] + path[i/2];
      if (add_en && covered[i] && (i == 1 || !covered[i/2])) dbuf_nx[i] = dbuf_nx[i] + u_t'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NODES; i++) dbuf[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NODES; i++) dbuf[i] <= dbuf_nx[i];
    end
  end

endmodule
