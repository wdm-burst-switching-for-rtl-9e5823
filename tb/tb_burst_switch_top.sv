// tb_burst_switch_top: end-to-end test of the three-stage burst switch
// control at reduced size (D=2: four links, four channels per link).
//
// The routing tables are programmed so that address a on input link l goes
// to output port (a + l) mod 4. Random header cells enter on all links
// under heavy load while time advances every cycle. Checks: every cell
// leaves at most once, on the port its table entry names, unless a stage
// dropped it, and cells in = cells out + drops; every delivered burst got a
// crossbar command in each of the three stages, with start times that
// never decrease from stage to stage, and the start at the output matches
// the offset of the cell leaving the switch. Counts, and requires at least
// once: table lookup with a rewritten entry, direct pass, delay through
// storage, drop, spreading of one destination over both middle elements,
// and back-pressure from an output link.
module tb_burst_switch_top;
  import burst_pkg::*;

  localparam int unsigned D = 2, L = D * D, CH = 4, SLOTS = 64, AW = 4;

  logic clk = 0, rst_n = 0, tick = 1;
  time_t now;
  logic rt_wr_en = 0;
  logic [PORT_W-1:0] rt_wr_link = 0, rt_wr_port = 0;
  logic [AW-1:0] rt_wr_idx = 0;
  logic ext_in_valid [L], ext_in_ready [L], ext_out_valid [L], ext_out_ready [L];
  bhc_t ext_in_bhc [L], ext_out_bhc [L];
  logic xbar_valid [3][D][D], ev_direct [3][D][D], ev_stored [3][D][D], ev_drop [3][D][D];
  xbar_cmd_t xbar_cmd [3][D][D];

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_drop = 0, n_direct = 0, n_stored = 0, n_bp = 0, n_rewritten = 0;
  int exp_port [int];
  bit rewritten [int];
  int n_cmd [int];
  time_t last_start [int];
  time_t out_start [int];
  bit mid_used [L][D];

  burst_switch_top #(.D(D), .CHANNELS(CH), .SLOTS(SLOTS), .DELTA(2), .RSQ_DEPTH(8),
                     .BSU_LOCS(2), .RT_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s @now=%0d", what, now); end
  endtask

  // crossbar commands of all stages
  int cid;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 3; s++) for (int b = 0; b < D; b++) for (int p = 0; p < D; p++) begin
      if (xbar_valid[s][b][p]) begin
        cid = int'(xbar_cmd[s][b][p].id);
        n_cmd[cid] = n_cmd.exists(cid) ? n_cmd[cid] + 1 : 1;
        if (last_start.exists(cid))
          check(xbar_cmd[s][b][p].start >= last_start[cid], "start never earlier than in the stage before");
        last_start[cid] = xbar_cmd[s][b][p].start;
        if (s == 2) out_start[cid] = xbar_cmd[s][b][p].start;
        check(!xbar_cmd[s][b][p].late, "no late channel");
        if (s == 0 && exp_port.exists(cid)) mid_used[exp_port[cid]][p] = 1;
      end
      if (ev_drop[s][b][p])   n_drop++;
      if (ev_direct[s][b][p]) n_direct++;
      if (ev_stored[s][b][p]) n_stored++;
    end
  end

  initial begin
    bit acc [L];
    int id, tag, spread;
    int tbl [L][2**AW];
    time_t delivered_start [int];
    tag = 1;
    for (int l = 0; l < L; l++) begin
      ext_in_valid[l] = 0; ext_in_bhc[l] = '0; ext_out_ready[l] = 1;
      for (int a = 0; a < 2**AW; a++) tbl[l][a] = a % L;   // reset contents of the tables
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // program entries 0..7 of every table: port (a + l) mod L
    for (int l = 0; l < L; l++) for (int a = 0; a < 8; a++) begin
      rt_wr_en = 1; rt_wr_link = PORT_W'(l); rt_wr_idx = AW'(a); rt_wr_port = PORT_W'((a + l) % L);
      tbl[l][a] = (a + l) % L;
      @(negedge clk);
    end
    rt_wr_en = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      for (int l = 0; l < L; l++) begin
        if (!ext_in_valid[l] && cyc < 19000 && $urandom_range(0, 3) == 0) begin
          ext_in_valid[l]            = 1;
          ext_in_bhc[l]              = '0;
          ext_in_bhc[l].id           = ID_W'(tag++);
          ext_in_bhc[l].dest_addr    = $urandom_range(0, 15);
          ext_in_bhc[l].offset       = OFF_W'($urandom_range(30, 45));
          ext_in_bhc[l].length       = LEN_W'($urandom_range(4, 30));
        end
        ext_out_ready[l] = (cyc % 2000 < 100) ? 1'b0 : 1'b1;
      end
      #1;
      for (int l = 0; l < L; l++) begin
        if (ext_out_valid[l] && !ext_out_ready[l]) n_bp++;
        if (ext_out_valid[l] && ext_out_ready[l]) begin
          id = int'(ext_out_bhc[l].id);
          check(exp_port.exists(id) && exp_port[id] == l, "cell leaves once, on its table's port");
          if (rewritten.exists(id)) n_rewritten++;
          delivered_start[id] = ext_out_bhc[l].t_arr;
          check(time_t'(ext_out_bhc[l].offset) == ((ext_out_bhc[l].t_arr > now) ? ext_out_bhc[l].t_arr - now : 0),
                "offset on the output link matches arrival time");
          exp_port.delete(id);
          n_out++;
        end
        acc[l] = ext_in_valid[l] && ext_in_ready[l];
        if (acc[l]) begin
          id = int'(ext_in_bhc[l].id);
          exp_port[id] = tbl[l][ext_in_bhc[l].dest_addr[AW-1:0]];
          if (ext_in_bhc[l].dest_addr < 8 && exp_port[id] != int'(ext_in_bhc[l].dest_addr) % L) rewritten[id] = 1;
          n_in++;
        end
      end
      @(negedge clk);
      for (int l = 0; l < L; l++) if (acc[l]) ext_in_valid[l] = 0;
    end
    repeat (200) @(negedge clk);
    check(n_in == n_out + n_drop && exp_port.size() == n_drop, "cells in = cells out + drops");
    foreach (delivered_start[i]) begin
      check(n_cmd.exists(i) && n_cmd[i] == 3, "three crossbar commands per delivered burst");
      check(out_start.exists(i) && out_start[i] == delivered_start[i], "output start as announced");
    end
    spread = 0;
    for (int l = 0; l < L; l++) if (mid_used[l][0] && mid_used[l][1]) spread++;
    check(n_rewritten > 0, "lookup with a rewritten entry");
    check(n_direct > 0, "direct pass");
    check(n_stored > 0, "delay through storage");
    check(n_drop > 0, "drop");
    check(spread > 0, "one destination spread over both middle elements");
    check(n_bp > 0, "back-pressure from an output link");
    $display("in=%0d out=%0d drop=%0d direct=%0d stored=%0d rewritten=%0d spread=%0d backpressure=%0d",
             n_in, n_out, n_drop, n_direct, n_stored, n_rewritten, spread, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
