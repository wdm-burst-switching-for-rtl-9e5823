// tb_ctrl_ring: self-checking test of the control ring.
//
// Every node sends random messages to random other nodes. Each message must
// arrive exactly once, at its destination, with the sender stamped in src,
// after (dst - src) mod NODES cycles when it found a free slot, and no later
// than that plus the time it waited for one. Slot contention must occur.
module tb_ctrl_ring;
  import burst_pkg::*;

  localparam int unsigned N = 5;

  logic clk = 0, rst_n = 0;
  logic tx_valid [N], tx_ready [N], rx_valid [N];
  ring_msg_t tx_msg [N], rx_msg [N];

  int checks = 0, failures = 0, sent = 0, got = 0, blocked = 0;
  int cyc = 0;
  int sent_at [int];    // message tag -> cycle inserted

  ctrl_ring #(.NODES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int tag = 1;
  bit acc [N];

  initial begin
    int t, hops;
    for (int i = 0; i < N; i++) begin tx_valid[i] = 0; tx_msg[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 6000; cyc++) begin
      // receive what arrives this cycle
      for (int i = 0; i < N; i++) if (rx_valid[i]) begin
        t    = int'(rx_msg[i].t_in);
        hops = (i + N - int'(rx_msg[i].src)) % N;
        check(rx_msg[i].dst == NODE_W'(i), "delivered to destination");
        check(sent_at.exists(t), $sformatf("message known and delivered once t=%0d src=%0d i=%0d cyc=%0d", t, rx_msg[i].src, i, cyc));
        if (sent_at.exists(t)) begin
          check(cyc - sent_at[t] == hops, $sformatf("latency %0d hops %0d", cyc - sent_at[t], hops));
          check(rx_msg[i].t_out == time_t'(rx_msg[i].src), "src stamped");
          sent_at.delete(t);
        end
        got++;
      end
      // offer new messages; keep an unaccepted one unchanged
      for (int i = 0; i < N; i++) begin
        if (!tx_valid[i] && $urandom_range(0, 1) == 1 && cyc < 5500) begin
          tx_valid[i]     = 1;
          tx_msg[i]       = '0;
          tx_msg[i].dst   = NODE_W'((i + $urandom_range(1, N - 1)) % N);
          tx_msg[i].kind  = MSG_REQ;
          tx_msg[i].t_in  = time_t'(tag++);
          tx_msg[i].t_out = time_t'(i);
        end
      end
      #1;
      for (int i = 0; i < N; i++) begin
        acc[i] = tx_valid[i] && tx_ready[i];
        if (acc[i]) begin sent_at[int'(tx_msg[i].t_in)] = cyc; sent++; end
        else if (tx_valid[i]) blocked++;
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) if (acc[i]) tx_valid[i] = 0;
    end
    check(sent_at.size() == 0, "all messages delivered");
    check(sent == got && sent > 1000 && blocked > 100, "traffic and contention seen");
    $display("sent=%0d got=%0d blocked=%0d", sent, got, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
