// tb_ase: self-checking test of the cell switch in both of its roles.
//
// Two instances: a routing one (DIST=0, DIGIT=1, output = bits [3:2] of
// out_port for D=4) and a distribution one (DIST=1, the k-th cell of input i
// must leave on output (i+k) mod D). Random cells and random back-pressure.
// Every cell must leave exactly once, on the expected output, with in_port
// set to its input, and in order per input/output pair. A final phase with
// a conflict-free pattern and no back-pressure checks one cell per output
// per cycle.
module tb_ase;
  import burst_pkg::*;

  localparam int unsigned D = 4;

  logic clk = 0, rst_n = 0;
  logic iv [2][D], ir [2][D], ov [2][D], ordy [2][D];
  bhc_t ib [2][D], ob [2][D];

  int checks = 0, failures = 0, moved = 0, stalls = 0;
  int exp_out [int];
  int k_in [2][D];
  int last_id [2][D][D];

  ase #(.D(D), .DIST(1'b0), .DIGIT(1)) dut_r (.clk, .rst_n,
    .in_valid(iv[0]), .in_bhc(ib[0]), .in_ready(ir[0]), .out_valid(ov[0]), .out_bhc(ob[0]), .out_ready(ordy[0]));
  ase #(.D(D), .DIST(1'b1), .DIGIT(0)) dut_d (.clk, .rst_n,
    .in_valid(iv[1]), .in_bhc(ib[1]), .in_ready(ir[1]), .out_valid(ov[1]), .out_bhc(ob[1]), .out_ready(ordy[1]));

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
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int tag = 1;

  task automatic new_cell(int m, int i, bit conflict_free, int cyc);
    ib[m][i] = '0;
    ib[m][i].id = ID_W'(tag++);
    ib[m][i].out_port = conflict_free ? PORT_W'(i << 2) : PORT_W'($urandom_range(0, 15));
    iv[m][i] = 1;
  endtask

  initial begin
    bit acc [2][D];
    int full_rate, id, src;
    bit phase2;
    for (int m = 0; m < 2; m++) for (int i = 0; i < D; i++) begin
      iv[m][i] = 0; ib[m][i] = '0; ordy[m][i] = 0; k_in[m][i] = 0;
      for (int o = 0; o < D; o++) last_id[m][i][o] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      phase2 = cyc >= 6000;
      for (int m = 0; m < 2; m++) for (int i = 0; i < D; i++) begin
        if (!iv[m][i] && (phase2 || $urandom_range(0, 1) == 1) && cyc < 7900) new_cell(m, i, phase2, cyc);
        ordy[m][i] = phase2 ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      end
      #1;
      full_rate = 0;
      for (int m = 0; m < 2; m++) for (int o = 0; o < D; o++) if (ov[m][o] && ordy[m][o]) begin
        id  = int'(ob[m][o].id);
        src = int'(ob[m][o].in_port);
        check(exp_out.exists(id), "cell known and delivered once");
        if (exp_out.exists(id)) begin
          check(exp_out[id] == o, $sformatf("m%0d cell %0d on output %0d, expected %0d", m, id, o, exp_out[id]));
          check(id > last_id[m][src][o], "order per input and output");
          last_id[m][src][o] = id;
          exp_out.delete(id);
        end
        moved++;
        if (phase2 && m == 0) full_rate++;
      end
      if (phase2 && cyc > 6010 && cyc < 7890) check(full_rate == D, "one cell per output per cycle");
      for (int m = 0; m < 2; m++) for (int i = 0; i < D; i++) begin
        acc[m][i] = iv[m][i] && ir[m][i];
        if (acc[m][i]) begin
          exp_out[int'(ib[m][i].id)] = (m == 0) ? int'(ib[m][i].out_port[3:2]) : (i + k_in[m][i]) % D;
          k_in[m][i]++;
        end else if (iv[m][i]) stalls++;
      end
      @(negedge clk);
      for (int m = 0; m < 2; m++) for (int i = 0; i < D; i++) if (acc[m][i]) iv[m][i] = 0;
    end
    repeat (5) @(negedge clk);
    check(exp_out.size() == 0, "all cells delivered");
    check(moved > 5000 && stalls > 100, "traffic and contention seen");
    $display("moved=%0d stalls=%0d", moved, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
