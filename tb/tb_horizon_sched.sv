// tb_horizon_sched: self-checking test of the horizon channel scheduler.
//
// A reference model keeps its own horizon per channel and applies the rule
// "latest horizon not after the start, else smallest horizon with delay".
// A directed case in the spirit of the horizon-schedule example (several
// channels free, the best fit must be picked) is followed by random
// requests. Every result must appear exactly one cycle after its request.
module tb_horizon_sched;
  import burst_pkg::*;

  localparam int unsigned CH = 8;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  time_t req_start = 0;
  logic [LEN_W-1:0] req_len = 0;
  logic res_valid, res_delayed;
  logic [CHAN_W-1:0] res_channel;
  time_t res_start;

  int checks = 0, failures = 0;
  time_t ref_hz [CH];

  horizon_sched #(.CHANNELS(CH)) dut (.*);

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
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one request; returns after checking its result
  task automatic request(time_t st, int unsigned len);
    int fit = -1, mn = 0;
    time_t exp_start;
    for (int c = 0; c < CH; c++) begin
      if (ref_hz[c] <= st && (fit < 0 || ref_hz[c] > ref_hz[fit])) fit = c;
      if (ref_hz[c] < ref_hz[mn]) mn = c;
    end
    @(negedge clk);
    req_valid = 1; req_start = st; req_len = LEN_W'(len);
    @(negedge clk);
    req_valid = 0;
    check(res_valid, "result one cycle after request");
    if (fit >= 0) begin
      exp_start = st;
      check(res_channel == CHAN_W'(fit) && !res_delayed && res_start == st,
            $sformatf("fit st=%0d exp ch %0d got ch %0d dly %0d", st, fit, res_channel, res_delayed));
      ref_hz[fit] = st + len;
    end else begin
      exp_start = ref_hz[mn];
      check(res_channel == CHAN_W'(mn) && res_delayed && res_start == exp_start,
            $sformatf("delay st=%0d exp ch %0d@%0d got ch %0d@%0d", st, mn, exp_start, res_channel, res_start));
      ref_hz[mn] = exp_start + len;
    end
    @(negedge clk);
    check(!res_valid, "result valid for one cycle only");
  endtask

  initial begin
    for (int c = 0; c < CH; c++) ref_hz[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: stagger horizons, then a burst that fits several channels
    for (int c = 0; c < CH; c++) request(time_t'(c), 10 + 3 * c);
    // horizons now 10,14,...,31; a burst at 22 fits those <= 22 -> latest is 22 (c=4)
    request(22, 5);
    // a burst at 5 fits nothing -> smallest horizon, delayed
    request(5, 4);
    // random traffic
    for (int n = 0; n < 3000; n++)
      request(time_t'(20 + n / 2 + $urandom_range(0, 40)), $urandom_range(1, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
