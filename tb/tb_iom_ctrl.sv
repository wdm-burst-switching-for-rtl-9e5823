// tb_iom_ctrl: self-checking test of the IOM control section.
//
// Checks the reset contents of the routing table (entry a -> port a), then
// rewrites entries and checks that inbound cells leave with the port of the
// entry selected by the low address bits, one cycle after acceptance, in
// order, under random back-pressure. Outbound cells must pass unchanged.
module tb_iom_ctrl;
  import burst_pkg::*;

  localparam int unsigned AW = 4;

  logic clk = 0, rst_n = 0;
  time_t now = 100;
  logic rt_wr_en = 0;
  logic [AW-1:0] rt_wr_idx = 0;
  logic [PORT_W-1:0] rt_wr_port = 0;
  logic link_in_valid = 0, link_in_ready, to_bse_valid, to_bse_ready = 0;
  logic from_bse_valid = 0, from_bse_ready, link_out_valid, link_out_ready = 0;
  bhc_t link_in_bhc = '0, to_bse_bhc, from_bse_bhc = '0, link_out_bhc;

  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  logic [PORT_W-1:0] table_m [2**AW];
  bhc_t q_in [$], q_out [$];

  iom_ctrl #(.RT_AW(AW)) dut (.*);

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

  initial begin
    bit a_in, a_out, first;
    bhc_t e;
    for (int a = 0; a < 2**AW; a++) table_m[a] = PORT_W'(a);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    first = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      now++;
      // sinks: check what leaves this cycle
      to_bse_ready   = 1'($urandom_range(0, 3) != 0);
      link_out_ready = 1'($urandom_range(0, 3) != 0);
      if (!link_in_valid && $urandom_range(0, 1) == 1) begin
        link_in_valid = 1;
        link_in_bhc = '0;
        link_in_bhc.id = ID_W'(cyc);
        link_in_bhc.dest_addr = $urandom;
        link_in_bhc.offset = OFF_W'($urandom);
      end
      if (!from_bse_valid && $urandom_range(0, 1) == 1) begin
        from_bse_valid = 1;
        from_bse_bhc = bhc_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        from_bse_bhc.t_arr = now + $urandom_range(0, 40);
      end
      // table writes after the first phase
      rt_wr_en   = (cyc > 2000) && $urandom_range(0, 7) == 0;
      rt_wr_idx  = AW'($urandom);
      rt_wr_port = PORT_W'($urandom);
      #1;
      if (to_bse_valid && to_bse_ready) begin
        check(q_in.size() > 0 && to_bse_bhc == q_in[0], "inbound cell with looked-up port");
        if (q_in.size() > 0) void'(q_in.pop_front());
        n_in++;
      end
      if (link_out_valid && link_out_ready) begin
        if (q_out.size() > 0) begin
          e = q_out[0];
          e.offset = (e.t_arr > now) ? OFF_W'(e.t_arr - now) : '0;
        end
        check(q_out.size() > 0 && link_out_bhc == e, "outbound cell, offset from arrival time");
        if (q_out.size() > 0) void'(q_out.pop_front());
        n_out++;
      end
      check(!(to_bse_valid && q_in.size() == 0 && !(to_bse_ready)), "no spurious inbound cell");
      a_in  = link_in_valid && link_in_ready;
      a_out = from_bse_valid && from_bse_ready;
      if (a_in) begin
        e = link_in_bhc;
        e.out_port = table_m[link_in_bhc.dest_addr[AW-1:0]];
        e.t_arr    = now + time_t'(link_in_bhc.offset);
        q_in.push_back(e);
      end
      if (a_out) q_out.push_back(from_bse_bhc);
      if (rt_wr_en) table_m[rt_wr_idx] = rt_wr_port;
      @(negedge clk);
      if (a_in) begin
        check(to_bse_valid && to_bse_bhc == q_in[q_in.size()-1], "inbound latency one cycle");
        link_in_valid = 0;
      end
      if (a_out) from_bse_valid = 0;
    end
    check(n_in > 1000 && n_out > 1000, "traffic seen");
    $display("in=%0d out=%0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
