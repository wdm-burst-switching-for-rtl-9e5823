// tb_bse_ctrl: self-checking test of a switch element's control section.
//
// A routing-stage element (D=4, output = low digit of out_port) receives
// random header cells on all inputs under heavy load, while time advances
// every cycle. Every cell must either be dropped (one ev_drop pulse) or be
// forwarded exactly once on the output its out_port selects, with its
// in_port set. Every forwarded cell must later get exactly one crossbar
// command on that output, for the start time its forwarded offset
// announced, on a channel not in use then, with in_port of the input.
// Direct, stored (through the shared storage manager) and dropped bursts
// must all occur.
module tb_bse_ctrl;
  import burst_pkg::*;

  localparam int unsigned D = 4, CH = 4, SLOTS = 64, DELTA = 2;

  logic clk = 0, rst_n = 0;
  time_t now = 0;
  logic in_valid [D], in_ready [D], out_valid [D], out_ready [D];
  bhc_t in_bhc [D], out_bhc [D];
  logic xbar_valid [D], ev_direct [D], ev_stored [D], ev_drop [D];
  xbar_cmd_t xbar_cmd [D];

  int checks = 0, failures = 0, n_in = 0, n_fwd = 0, n_drop = 0, n_cmd = 0;
  int n_direct = 0, n_stored = 0;
  int cell_out [int], cell_in [int];
  time_t fwd_start [int];
  time_t early [int];
  time_t ch_end [D][CH];

  bse_ctrl #(.D(D), .DIST(1'b0), .DIGIT(0), .CHANNELS(CH), .SLOTS(SLOTS), .DELTA(DELTA),
             .RSQ_DEPTH(8), .BSU_LOCS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s @now=%0d", what, now); end
  endtask

  initial begin
    bit acc [D];
    int id, tag;
    tag = 1;
    for (int p = 0; p < D; p++) begin
      in_valid[p] = 0; in_bhc[p] = '0; out_ready[p] = 0;
      for (int c = 0; c < CH; c++) ch_end[p][c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      now++;
      for (int p = 0; p < D; p++) begin
        if (!in_valid[p] && cyc < 19000 && $urandom_range(0, 3) == 0) begin
          in_valid[p]         = 1;
          in_bhc[p]           = '0;
          in_bhc[p].id        = ID_W'(tag++);
          in_bhc[p].out_port  = PORT_W'($urandom_range(0, 15));
          in_bhc[p].offset    = OFF_W'($urandom_range(16, 40));
          in_bhc[p].length    = LEN_W'($urandom_range(4, 30));
          in_bhc[p].t_arr     = now + time_t'(in_bhc[p].offset);
        end
        out_ready[p] = 1'($urandom_range(0, 3) != 0);
      end
      #1;
      for (int p = 0; p < D; p++) begin
        if (ev_drop[p]) n_drop++;
        if (ev_direct[p]) n_direct++;
        if (ev_stored[p]) n_stored++;
        if (out_valid[p] && out_ready[p]) begin
          id = int'(out_bhc[p].id);
          check(cell_out.exists(id) && cell_out[id] == p, "cell forwarded once on its output");
          check(cell_in.exists(id) && out_bhc[p].in_port == IPRT_W'(cell_in[id]), "in_port of forwarded cell");
          fwd_start[id] = out_bhc[p].t_arr;
          if (early.exists(id)) begin
            check(early[id] == fwd_start[id], "early command start as announced downstream");
            early.delete(id);
            fwd_start.delete(id);
          end
          check(time_t'(out_bhc[p].offset) == ((out_bhc[p].t_arr > now) ? out_bhc[p].t_arr - now : 0), $sformatf("forwarded offset matches arrival time off=%0d t_arr=%0d now=%0d", out_bhc[p].offset, out_bhc[p].t_arr, now));
          cell_out.delete(id);
          n_fwd++;
        end
        if (xbar_valid[p]) begin
          id = int'(xbar_cmd[p].id);
          n_cmd++;
          // a burst starting very soon can be commanded before its cell is forwarded
          if (!fwd_start.exists(id)) begin
            check(!early.exists(id) && cell_in.exists(id), "one command per burst");
            early[id] = xbar_cmd[p].start;
          end
          check(!xbar_cmd[p].late && xbar_cmd[p].start >= ch_end[p][xbar_cmd[p].channel], "channel free");
          ch_end[p][xbar_cmd[p].channel] = xbar_cmd[p].start + time_t'(xbar_cmd[p].length);
          if (fwd_start.exists(id)) begin
            check(xbar_cmd[p].start == fwd_start[id], "command start as announced downstream");
            check(xbar_cmd[p].in_port == IPRT_W'(cell_in[id]), "command in_port");
            fwd_start.delete(id);
          end
        end
        acc[p] = in_valid[p] && in_ready[p];
        if (acc[p]) begin
          cell_out[int'(in_bhc[p].id)] = int'(in_bhc[p].out_port) % D;
          cell_in[int'(in_bhc[p].id)]  = p;
          n_in++;
        end
      end
      @(negedge clk);
      for (int p = 0; p < D; p++) if (acc[p]) in_valid[p] = 0;
    end
    check(cell_out.size() == n_drop, "every cell forwarded or dropped");
    check(fwd_start.size() == 0 && early.size() == 0, "every forwarded burst commanded");
    check(n_direct > 100 && n_stored > 20 && n_drop > 20, "direct, stored and dropped bursts seen");
    $display("in=%0d fwd=%0d direct=%0d stored=%0d drop=%0d cmd=%0d", n_in, n_fwd, n_direct, n_stored, n_drop, n_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
