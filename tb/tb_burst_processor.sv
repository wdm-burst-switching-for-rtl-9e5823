// tb_burst_processor: self-checking test of one burst processor with its
// storage manager on a two-node control ring.
//
// Header cells are offered one at a time; time stands still while a cell is
// being scheduled and advances between cells. An independent model (usage
// per absolute slot, link horizon, storage bookings) predicts for every cell
// whether it goes out directly, is delayed through storage to one slot after
// the horizon, or is dropped (outside the window, or no storage free), and
// the offset of the forwarded cell. A monitor checks every crossbar command:
// the booked start time, a channel with no overlap on it, no late flag, and
// that it is issued between start-DELTA and start. Every outcome must occur.
module tb_burst_processor;
  import burst_pkg::*;

  localparam int unsigned CH = 4, SLOTS = 64, DELTA = 2, RSQ = 8, LOCS = 2;

  logic clk = 0, rst_n = 0;
  time_t now = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  bhc_t in_bhc = '0, out_bhc;
  logic xbar_valid, ev_direct, ev_stored, ev_drop;
  xbar_cmd_t xbar_cmd;
  logic      r_txv [2], r_txr [2], r_rxv [2];
  ring_msg_t r_txm [2], r_rxm [2];

  int checks = 0, failures = 0;
  int n_direct = 0, n_stored = 0, n_drop_win = 0, n_drop_bsu = 0, n_cmd = 0;

  burst_processor #(.CHANNELS(CH), .SLOTS(SLOTS), .DELTA(DELTA), .RSQ_DEPTH(RSQ),
                    .NODE_ID(0), .BSM_NODE(1)) dut (
    .clk, .rst_n, .now, .in_valid, .in_bhc, .in_ready, .out_valid, .out_bhc, .out_ready,
    .tx_valid(r_txv[0]), .tx_msg(r_txm[0]), .tx_ready(r_txr[0]),
    .rx_valid(r_rxv[0]), .rx_msg(r_rxm[0]),
    .xbar_valid, .xbar_cmd, .ev_direct, .ev_stored, .ev_drop);
  ctrl_ring #(.NODES(2)) u_ring (.clk, .rst_n, .tx_valid(r_txv), .tx_msg(r_txm), .tx_ready(r_txr),
                                 .rx_valid(r_rxv), .rx_msg(r_rxm));
  bsm #(.BSU_LOCS(LOCS)) u_bsm (.clk, .rst_n, .rx_valid(r_rxv[1]), .rx_msg(r_rxm[1]),
                                .tx_valid(r_txv[1]), .tx_msg(r_txm[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s @now=%0d", what, now); end
  endtask

  // model state
  int    usage [time_t];
  time_t hzn = 0;
  time_t loc_busy [LOCS];
  time_t exp_start [int];
  bit    exp_via [int];
  time_t ch_end [CH];

  function automatic int u(time_t t);
    return usage.exists(t) ? usage[t] : 0;
  endfunction

  // crossbar command monitor
  int id;
  always @(posedge clk) if (rst_n && xbar_valid) begin
    id = int'(xbar_cmd.id);
    n_cmd++;
    check(exp_start.exists(id), "command for a booked burst");
    if (exp_start.exists(id)) begin
      check(xbar_cmd.start == exp_start[id] && xbar_cmd.via_bsu == exp_via[id], "command start and storage use");
      check(!xbar_cmd.late, "channel free at start");
      check(32'(xbar_cmd.channel) < CH && xbar_cmd.start >= ch_end[xbar_cmd.channel], "no overlap on channel");
      check(now + DELTA >= xbar_cmd.start && now <= xbar_cmd.start, "issued between start-DELTA and start");
      ch_end[xbar_cmd.channel] = xbar_cmd.start + time_t'(xbar_cmd.length);
      exp_start.delete(id);
    end
  end

  initial begin
    time_t a, st, win_end;
    int len, mx, loc, kind;   // kind: 0 direct, 1 stored, 2 drop
    bit got, seen_out;
    foreach (loc_busy[k]) loc_busy[k] = 0;
    foreach (ch_end[c]) ch_end[c] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    now = 10;
    for (int n = 1; n <= 3000; n++) begin
      // next cell; bursts of heavy load alternate with light load
      in_bhc        = '0;
      in_bhc.id     = ID_W'(n);
      in_bhc.length = LEN_W'((n % 500 < 300) ? $urandom_range(4, 24) : $urandom_range(1, 6));
      in_bhc.offset = OFF_W'($urandom_range(DELTA + 10, (n % 50 == 0) ? SLOTS + 8 : SLOTS / 2));
      in_bhc.in_port = IPRT_W'($urandom_range(0, 7));
      in_bhc.t_arr  = now + time_t'(in_bhc.offset);
      in_valid = 1;
      while (1) begin
        #1;
        if (in_ready) break;
        @(negedge clk);
        now++;
        in_bhc.t_arr = now + time_t'(in_bhc.offset);
      end
      // model the scheduling step with the time of acceptance
      a = in_bhc.t_arr;
      len = int'(in_bhc.length);
      win_end = now + SLOTS - 1;
      mx = 0;
      for (int k = 0; k < len; k++) if (u(a + k) > mx) mx = u(a + k);
      loc = -1;
      if (a + len > win_end || a < now) kind = 2;
      else if (mx < CH) begin kind = 0; st = a; end
      else begin
        st = (hzn + 1 > a) ? hzn + 1 : a;
        if (st + len > win_end) kind = 2;
        else begin
          for (int k = LOCS - 1; k >= 0; k--) if (loc_busy[k] <= a) loc = k;
          kind = (loc >= 0) ? 1 : 2;
        end
      end
      @(negedge clk);
      in_valid = 0;
      // wait for the outcome with time frozen
      got = 0;
      seen_out = 0;
      for (int w = 0; w < 40 && !got; w++) begin
        out_ready = 1'($urandom_range(0, 1));
        #1;
        if (ev_drop) begin
          check(kind == 2, $sformatf("cell %0d dropped, model kind %0d", n, kind));
          if (loc < 0 && a + len <= win_end && mx >= CH) n_drop_bsu++; else n_drop_win++;
          got = 1;
        end
        if (ev_direct || ev_stored) check(ev_stored == (kind == 1) && ev_direct == (kind == 0),
                                          $sformatf("cell %0d outcome, model kind %0d", n, kind));
        if (out_valid && !seen_out) begin
          seen_out = 1;
          if (kind == 0) check(w == 3, $sformatf("direct cell forwarded 4 cycles after acceptance (w=%0d)", w));
        end
        if (out_valid && out_ready) begin
          check(kind != 2 && out_bhc.id == in_bhc.id, "forwarded cell");
          check(time_t'(out_bhc.offset) == st - now && out_bhc.t_arr == st, "forwarded arrival time and offset");
          got = 1;
        end
        @(negedge clk);
      end
      check(got, "cell finished scheduling");
      out_ready = 0;
      if (kind != 2) begin
        for (int k = 0; k < len; k++) usage[st + k] = u(st + k) + 1;
        for (int k = 0; k < len; k++) if (u(st + k) >= CH && st + k > hzn) hzn = st + k;
        exp_start[n] = st;
        exp_via[n]   = (kind == 1);
        if (kind == 1) begin loc_busy[loc] = st + len; n_stored++; end
        else n_direct++;
      end
      // let time pass
      repeat ($urandom_range(0, 3)) begin @(negedge clk); now++; end
    end
    repeat (SLOTS * 2) begin @(negedge clk); now++; end
    check(exp_start.size() == 0, "every booked burst got a channel");
    check(n_direct > 100 && n_stored > 20 && n_drop_win > 10 && n_drop_bsu > 10, "all outcomes seen");
    $display("direct=%0d stored=%0d drop_window=%0d drop_storage=%0d commands=%0d",
             n_direct, n_stored, n_drop_win, n_drop_bsu, n_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
