// tb_reseq_buf: self-checking test of the resequencing buffer.
//
// Random pushes with random start times (keys) and a random consumer. A
// queue model kept sorted by key, stable for equal keys, predicts in every
// cycle whether an entry is offered (head key <= now + DELTA), which one,
// and whether the buffer is full. Also checks that filling the buffer makes
// in_ready drop.
module tb_reseq_buf;
  import burst_pkg::*;

  localparam int unsigned DEPTH = 8, DELTA = 3, DW = 16;

  logic clk = 0, rst_n = 0;
  time_t now = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  time_t in_key = 0, out_key;
  logic [DW-1:0] in_data = 0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0, pops = 0, fulls = 0;
  typedef struct { time_t k; logic [DW-1:0] d; } ent_t;
  ent_t q[$];

  reseq_buf #(.DEPTH(DEPTH), .DATA_W(DW), .DELTA(DELTA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @now=%0d", what, now); end
  endtask

  initial begin
    logic exp_v, acc;
    int pos;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (cyc % 2 == 1) now++;
      // drive this cycle
      in_valid  = ($urandom_range(0, 2) != 0);
      in_key    = now + time_t'($urandom_range(0, 30));
      in_data   = DW'($urandom);
      out_ready = (cyc % 4000 < 1000) ? 1'b0 : ($urandom_range(0, 3) != 0);
      #1;
      exp_v = (q.size() > 0) && (q[0].k <= now + DELTA);
      check(out_valid == exp_v, "out_valid");
      if (exp_v) check(out_key == q[0].k && out_data == q[0].d, "head entry");
      check(32'(count) == q.size(), "count");
      check(in_ready == (q.size() < DEPTH || (exp_v && out_ready)), "in_ready");
      if (q.size() == DEPTH) fulls++;
      acc = in_valid && in_ready;
      @(posedge clk);
      if (exp_v && out_ready) begin void'(q.pop_front()); pops++; end
      if (acc) begin
        pos = q.size();
        for (int i = 0; i < q.size(); i++) if (q[i].k > in_key) begin pos = i; break; end
        q.insert(pos, '{k: in_key, d: in_data});
      end
    end
    check(pops > 1000 && fulls > 0, "traffic reached pops and full buffer");
    $display("pops=%0d full_cycles=%0d", pops, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
