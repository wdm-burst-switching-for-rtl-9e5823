// tb_burst_switch_top_full: the burst switch control at its default size
// (8-port elements, 64 links, 512 channels per link), taken through one
// complete operation.
//
// One header cell enters on every input link at the same time, with the
// reset routing tables (address a -> port a); the addresses form a
// permutation, so every output link receives exactly one cell. Each cell
// must leave on its port with an offset matching its burst's arrival time,
// and every burst must get a crossbar command in each of the three stages,
// with the same start time throughout since nothing competes for channels.
// Then a second round sends 600 bursts, all to output 0 in the same time
// period, 4 new bursts of 150 slots every slot, so about 600 overlap on
// that link's 512 channels. Time is slowed to one slot per 64 cycles so the
// control keeps ahead of the bursts. Some bursts must be delayed through
// storage and, once the 8 storage locations are booked, some dropped;
// every burst scheduled in the last stage must leave on link 0, and every
// burst must be either scheduled there or dropped exactly once.
module tb_burst_switch_top_full;
  import burst_pkg::*;

  localparam int unsigned D = 8, L = D * D;

  logic clk = 0, rst_n = 0, tick = 1;
  time_t now;
  logic rt_wr_en = 0;
  logic [PORT_W-1:0] rt_wr_link = 0, rt_wr_port = 0;
  logic [7:0] rt_wr_idx = 0;
  logic ext_in_valid [L], ext_in_ready [L], ext_out_valid [L], ext_out_ready [L];
  bhc_t ext_in_bhc [L], ext_out_bhc [L];
  logic xbar_valid [3][D][D], ev_direct [3][D][D], ev_stored [3][D][D], ev_drop [3][D][D];
  xbar_cmd_t xbar_cmd [3][D][D];

  int checks = 0, failures = 0, n_out = 0, n_stored = 0, n_drop = 0, n_last = 0, n_drop2 = 0, n_out2 = 0;
  int n_cmd [int];
  time_t cmd_start [int];
  int exp_port [int];

  burst_switch_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s @now=%0d", what, now); end
  endtask

  int cid;
  bit round2 = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 3; s++) for (int b = 0; b < D; b++) for (int p = 0; p < D; p++) begin
      if (xbar_valid[s][b][p]) begin
        cid = int'(xbar_cmd[s][b][p].id);
        if (cid < 1000) begin
          n_cmd[cid] = n_cmd.exists(cid) ? n_cmd[cid] + 1 : 1;
          if (cmd_start.exists(cid)) check(cmd_start[cid] == xbar_cmd[s][b][p].start, "same start in every stage");
          cmd_start[cid] = xbar_cmd[s][b][p].start;
        end
      end
      if (ev_stored[s][b][p]) n_stored++;
      if (ev_drop[s][b][p])   n_drop++;
      if (round2 && s == 2 && (ev_direct[s][b][p] || ev_stored[s][b][p])) n_last++;
      if (ev_drop[s][b][p] && round2) n_drop2++;
    end
    for (int l = 0; l < L; l++) if (ext_out_valid[l] && ext_out_ready[l] && ext_out_bhc[l].id >= 1000) begin
      n_out2++;
      check(l == 0, "overload burst leaves on link 0");
    end
  end

  initial begin
    int id, sent, cyc2;
    bit acc [L];
    time_t t0;
    for (int l = 0; l < L; l++) begin
      ext_in_valid[l] = 0; ext_in_bhc[l] = '0; ext_out_ready[l] = 1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // round 1: a permutation, one cell per link
    for (int l = 0; l < L; l++) begin
      ext_in_valid[l]         = 1;
      ext_in_bhc[l].id        = ID_W'(l);
      ext_in_bhc[l].dest_addr = (l * 5 + 3) % L;
      ext_in_bhc[l].offset    = 120;
      ext_in_bhc[l].length    = 10;
      exp_port[l]             = (l * 5 + 3) % L;
    end
    @(negedge clk);
    for (int l = 0; l < L; l++) begin
      check(ext_in_ready[l], "input accepted");
      ext_in_valid[l] = 0;
    end
    for (int cyc = 0; cyc < 200; cyc++) begin
      #1;
      for (int l = 0; l < L; l++) if (ext_out_valid[l]) begin
        id = int'(ext_out_bhc[l].id);
        check(exp_port.exists(id) && exp_port[id] == l, "cell on its output port");
        check(time_t'(ext_out_bhc[l].offset) + now == ext_out_bhc[l].t_arr, "offset matches arrival");
        exp_port.delete(id);
        n_out++;
      end
      @(negedge clk);
    end
    check(n_out == L, "every cell delivered");
    for (int l = 0; l < L; l++) check(n_cmd.exists(l) && n_cmd[l] == 3, "three crossbar commands per burst");
    // round 2: overload output 0. Time advances one slot per 64 cycles; on
    // each slot 4 bursts of 150 slots start 3 slots ahead, so about 600
    // bursts overlap on a link of 512 channels.
    round2 = 1;
    sent = 0;
    cyc2 = 0;
    while (sent < 600) begin
      tick = (cyc2 % 64 == 0);
      if (cyc2 % 64 == 1) for (int k = 0; k < 4; k++) begin
        ext_in_valid[(sent + k) % L]         = 1;
        ext_in_bhc[(sent + k) % L]           = '0;
        ext_in_bhc[(sent + k) % L].id        = ID_W'(1000 + sent + k);
        ext_in_bhc[(sent + k) % L].dest_addr = 0;
        ext_in_bhc[(sent + k) % L].offset    = 3;
        ext_in_bhc[(sent + k) % L].length    = 150;
      end
      if (cyc2 % 64 == 1) sent += 4;
      cyc2++;
      #1;
      for (int l = 0; l < L; l++) acc[l] = ext_in_valid[l] && ext_in_ready[l];
      for (int l = 0; l < L; l++) if (ext_in_valid[l]) check(acc[l], "input accepted at once");
      @(negedge clk);
      for (int l = 0; l < L; l++) ext_in_valid[l] = 0;
    end
    for (int w = 0; w < 20 * 64; w++) begin
      tick = (cyc2 % 64 == 0);
      cyc2++;
      @(negedge clk);
    end
    tick = 1;
    repeat (50) @(negedge clk);
    check(n_out2 == n_last, "every burst scheduled in the last stage leaves the switch");
    check(n_last + n_drop2 == 600, "every burst either leaves or is dropped, once");
    check(n_stored > 0 && n_drop > 0, "overload of one link: bursts delayed through storage and dropped");
    $display("round1 delivered=%0d round2 out=%0d stored=%0d dropped=%0d", n_out, n_out2, n_stored, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
