// tb_bsm: self-checking test of the burst storage manager.
//
// Random storage requests (entry and exit times) are sent straight to the
// manager. A model of the per-location booking predicts the reply, which
// must come in the same cycle: GRANT of the lowest location free from the
// entry time on, or DENY. Both outcomes must occur.
module tb_bsm;
  import burst_pkg::*;

  localparam int unsigned LOCS = 4;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_valid;
  ring_msg_t rx_msg = '0, tx_msg;

  int checks = 0, failures = 0, grants = 0, denies = 0;
  time_t busy [LOCS];

  bsm #(.BSU_LOCS(LOCS)) dut (.*);

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
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    time_t t = 100;
    int exp_loc;
    foreach (busy[k]) busy[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      t += $urandom_range(0, 3);
      rx_valid     = ($urandom_range(0, 3) != 0);
      rx_msg       = '0;
      rx_msg.valid = 1;
      rx_msg.src   = NODE_W'($urandom_range(0, 7));
      rx_msg.dst   = 8;
      rx_msg.kind  = MSG_REQ;
      rx_msg.t_in  = t;
      rx_msg.t_out = t + $urandom_range(1, 40);
      #1;
      exp_loc = -1;
      for (int k = LOCS - 1; k >= 0; k--) if (busy[k] <= rx_msg.t_in) exp_loc = k;
      check(tx_valid == rx_valid, "reply exactly for a request");
      if (rx_valid) begin
        check(tx_msg.valid && tx_msg.dst == rx_msg.src, "reply addressed to requester");
        if (exp_loc >= 0) begin
          check(tx_msg.kind == MSG_GRANT && tx_msg.loc == LOC_W'(exp_loc),
                $sformatf("grant exp %0d got kind %0d loc %0d", exp_loc, tx_msg.kind, tx_msg.loc));
          busy[exp_loc] = rx_msg.t_out;
          grants++;
        end else begin
          check(tx_msg.kind == MSG_DENY, "deny when all booked");
          denies++;
        end
      end
    end
    check(grants > 100 && denies > 100, "grants and denies seen");
    $display("grants=%0d denies=%0d", grants, denies);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
