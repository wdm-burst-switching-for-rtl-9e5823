// burst_processor: control of one output link of a switch element, using
// split processing.
//
// Processing of a burst is split in two steps, as the document proposes.
// (1) Burst scheduling, when the header cell arrives: the processor reads the
// link usage curve (diff_search_tree) over the burst's interval. If some
// channel stays free throughout, the burst goes out as it arrives. If not,
// it is delayed to start one slot after the link horizon, the latest slot in
// which all channels are booked; that needs a storage location, which is
// requested from the storage manager over the control ring. The burst is
// then booked in the usage curve, the link horizon is moved forward if the
// booking filled the link, and the header cell, with its arrival time and
// offset rewritten for the new start time, is passed on at once to the next
// stage. The burst's arrival is taken from the cell's t_arr field.
// (2) Channel assignment, shortly before the burst goes out: a resequencing
// buffer (reseq_buf) releases bookings in start-time order DELTA slots before
// the start, and a horizon scheduler (horizon_sched) picks the channel. The
// result is a crossbar command for the optical data path.
//
// Choices of this design: a burst that does not fit in the usage-curve
// window (now .. now+SLOTS-2) or has already begun, whose length is zero,
// or for which no storage
// location is free, is dropped and reported on ev_drop. A burst whose
// channel is not free at its start (possible only when bookings conflict
// with the order of assignment) is still commanded, with 'late' set.
//
// Timing: the scheduling step takes 4 cycles for a burst sent directly
// (accept, query, book, update horizon) plus the handshake with the next
// stage, and in addition the ring round trip for a delayed one. in_ready is
// high only in the idle state. The crossbar command follows the release from
// the resequencing buffer by one cycle.
module burst_processor
  import burst_pkg::*;
#(
  parameter int unsigned CHANNELS  = 512,
  parameter int unsigned SLOTS     = 256,
  parameter int unsigned DELTA     = 2,
  parameter int unsigned RSQ_DEPTH = 16,
  parameter int unsigned NODE_ID   = 0,
  parameter int unsigned BSM_NODE  = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  time_t     now,
  // header cells from the ASE
  input  logic      in_valid,
  input  bhc_t      in_bhc,
  output logic      in_ready,
  // header cells to the next stage
  output logic      out_valid,
  output bhc_t      out_bhc,
  input  logic      out_ready,
  // control ring
  output logic      tx_valid,
  output ring_msg_t tx_msg,
  input  logic      tx_ready,
  input  logic      rx_valid,
  input  ring_msg_t rx_msg,
  // channel assignments
  output logic      xbar_valid,
  output xbar_cmd_t xbar_cmd,
  // event pulses
  output logic      ev_direct,
  output logic      ev_stored,
  output logic      ev_drop
);

  typedef enum logic [2:0] {S_IDLE, S_QUERY, S_REQ, S_WAIT, S_ADD, S_HZ, S_FWD} state_e;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [IPRT_W-1:0] in_port;
    logic [LEN_W-1:0]  length;
    logic              via_bsu;
    logic [LOC_W-1:0]  bsu_loc;
  } rsq_data_t;

  state_e           state;
  bhc_t             bhc;
  time_t            t_arr, t_start, hzn;
  logic             via;
  logic [LOC_W-1:0] loc;

  // usage curve
  time_t                       r_start;
  logic                        add_en;
  logic [$clog2(CHANNELS+1):0] q_max;
  logic                        q_full;
  time_t                       q_last_full;

  // resequencing buffer and channel assignment
  logic      rsq_in_valid, rsq_in_ready, rsq_out_valid;
  time_t     rsq_out_key;
  rsq_data_t rsq_in_data, rsq_out_data, hs_data;
  logic [$clog2(RSQ_DEPTH+1)-1:0] rsq_count;
  logic              hs_valid, hs_delayed;
  logic [CHAN_W-1:0] hs_channel;
  time_t             hs_start;

  time_t win_end;                 // last usable slot + 1
  time_t dly_start;
  assign win_end   = now + time_t'(SLOTS - 1);
  assign dly_start = (hzn + time_t'(1) > t_arr) ? hzn + time_t'(1) : t_arr;

  assign r_start = (state == S_QUERY) ? t_arr : t_start;
  assign add_en  = (state == S_ADD) && (t_start >= now) &&
                   (t_start + time_t'(bhc.length) <= win_end);

  diff_search_tree #(.SLOTS(SLOTS), .CHANNELS(CHANNELS)) u_dst (
    .clk, .rst_n, .now,
    .r_start, .r_len(bhc.length), .add_en,
    .q_max, .q_full, .q_last_full
  );

  assign in_ready = (state == S_IDLE) && (32'(rsq_count) < RSQ_DEPTH);

  assign rsq_in_valid = (state == S_HZ);
  assign rsq_in_data  = '{id: bhc.id, in_port: bhc.in_port, length: bhc.length,
                          via_bsu: via, bsu_loc: loc};

  reseq_buf #(.DEPTH(RSQ_DEPTH), .DATA_W($bits(rsq_data_t)), .DELTA(DELTA)) u_rsq (
    .clk, .rst_n, .now,
    .in_valid(rsq_in_valid), .in_ready(rsq_in_ready), .in_key(t_start), .in_data(rsq_in_data),
    .out_valid(rsq_out_valid), .out_ready(1'b1), .out_key(rsq_out_key), .out_data(rsq_out_data),
    .count(rsq_count)
  );

  horizon_sched #(.CHANNELS(CHANNELS)) u_hs (
    .clk, .rst_n,
    .req_valid(rsq_out_valid), .req_start(rsq_out_key), .req_len(rsq_out_data.length),
    .res_valid(hs_valid), .res_channel(hs_channel), .res_start(hs_start), .res_delayed(hs_delayed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hs_data <= '0;
    else if (rsq_out_valid) hs_data <= rsq_out_data;
  end

  assign xbar_valid = hs_valid;
  assign xbar_cmd   = '{id: hs_data.id, in_port: hs_data.in_port, channel: hs_channel,
                        start: hs_start, length: hs_data.length, via_bsu: hs_data.via_bsu,
                        bsu_loc: hs_data.bsu_loc, late: hs_delayed};

  // ring request
  assign tx_valid = (state == S_REQ);
  always_comb begin
    tx_msg       = '0;
    tx_msg.valid = 1'b1;
    tx_msg.src   = NODE_W'(NODE_ID);
    tx_msg.dst   = NODE_W'(BSM_NODE);
    tx_msg.kind  = MSG_REQ;
    tx_msg.t_in  = t_arr;
    tx_msg.t_out = t_start + time_t'(bhc.length);
  end

  // next stage
  assign out_valid = (state == S_FWD);
  always_comb begin
    out_bhc        = bhc;
    out_bhc.t_arr  = t_start;
    out_bhc.offset = (t_start > now) ? OFF_W'(t_start - now) : '0;
  end

  logic rx_mine;
  assign rx_mine = rx_valid && (rx_msg.kind == MSG_GRANT || rx_msg.kind == MSG_DENY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bhc       <= '0;
      t_arr     <= '0;
      t_start   <= '0;
      hzn       <= '0;
      via       <= 1'b0;
      loc       <= '0;
      ev_direct <= 1'b0;
      ev_stored <= 1'b0;
      ev_drop   <= 1'b0;
    end else begin
      ev_direct <= 1'b0;
      ev_stored <= 1'b0;
      ev_drop   <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid && in_ready) begin
          bhc   <= in_bhc;
          t_arr <= in_bhc.t_arr;
          via   <= 1'b0;
          loc   <= '0;
          if (in_bhc.length == '0 || in_bhc.t_arr < now ||
              in_bhc.t_arr + time_t'(in_bhc.length) > win_end) begin
            ev_drop <= 1'b1;
          end else begin
            state <= S_QUERY;
          end
        end
        S_QUERY: begin
          if (32'(q_max) < CHANNELS) begin
            t_start <= t_arr;
            state   <= S_ADD;
          end else if (dly_start + time_t'(bhc.length) > win_end) begin
            ev_drop <= 1'b1;
            state   <= S_IDLE;
          end else begin
            t_start <= dly_start;
            via     <= 1'b1;
            state   <= S_REQ;
          end
        end
        S_REQ: if (tx_ready) state <= S_WAIT;
        S_WAIT: if (rx_mine) begin
          if (rx_msg.kind == MSG_GRANT) begin
            loc   <= rx_msg.loc;
            state <= S_ADD;
          end else begin
            ev_drop <= 1'b1;
            state   <= S_IDLE;
          end
        end
        S_ADD: begin
          if (add_en) begin
            state <= S_HZ;
          end else begin
            ev_drop <= 1'b1;
            state   <= S_IDLE;
          end
        end
        S_HZ: begin
          if (q_full && q_last_full > hzn) hzn <= q_last_full;
          ev_direct <= !via;
          ev_stored <= via;
          state     <= S_FWD;
        end
        S_FWD: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk) if (rst_n && rsq_in_valid) assert (rsq_in_ready)
    else $error("burst_processor: resequencing buffer overflow");
`endif

endmodule
