// tb_diff_search_tree: self-checking test of the link usage curve.
//
// A plain array model holds the usage of every absolute slot. Random ranges
// inside the moving window are queried (largest usage, latest full slot)
// and, while the link has room, booked. Time advances every other cycle, so
// ranges wrap around the circular window many times and the retiring of old
// slots is exercised. First a directed case fills one slot completely.
module tb_diff_search_tree;
  import burst_pkg::*;

  localparam int unsigned SLOTS = 16, CH = 4;

  logic clk = 0, rst_n = 0;
  time_t now = 0, r_start = 0;
  logic [LEN_W-1:0] r_len = 1;
  logic add_en = 0;
  logic [$clog2(CH+1):0] q_max;
  logic q_full;
  time_t q_last_full;

  int checks = 0, failures = 0, adds = 0, fulls = 0;
  int usage [time_t];

  diff_search_tree #(.SLOTS(SLOTS), .CHANNELS(CH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s @now=%0d", what, now); end
  endtask

  function automatic int u(time_t t);
    return usage.exists(t) ? usage[t] : 0;
  endfunction

  // query (and maybe book) one range in the current cycle
  task automatic op(time_t s, int unsigned len, bit want_add);
    int mx = 0; bit full = 0; time_t last = s;
    for (int unsigned k = 0; k < len; k++) begin
      if (u(s + k) > mx) mx = u(s + k);
      if (u(s + k) >= CH) begin full = 1; last = s + k; end
    end
    r_start = s; r_len = LEN_W'(len);
    add_en  = want_add && (mx < CH);
    #1;
    check(32'(q_max) == mx, $sformatf("q_max [%0d,+%0d) exp %0d got %0d", s, len, mx, q_max));
    check(q_full == full, "q_full");
    if (full) begin check(q_last_full == last, "q_last_full"); fulls++; end
    if (add_en) begin
      for (int unsigned k = 0; k < len; k++) usage[s + k] = u(s + k) + 1;
      adds++;
    end
  endtask

  initial begin
    int unsigned len;
    time_t st;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // directed: book slot 5..7 four times, the fifth query sees it full
    for (int n = 0; n < 4; n++) begin @(negedge clk); op(5, 3, 1); end
    @(negedge clk); op(3, 6, 1);
    check(q_full && q_last_full == 7 && !add_en, "directed full range");
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      add_en = 0;
      if (cyc % 2 == 1) begin
        usage.delete(now);
        now++;
      end
      len = $urandom_range(1, SLOTS - 2);
      st  = now + $urandom_range(0, SLOTS - 1 - len);
      op(st, len, 1'($urandom_range(0, 1)));
    end
    check(adds > 1000 && fulls > 1000, "booked and full ranges seen");
    $display("adds=%0d full=%0d", adds, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
