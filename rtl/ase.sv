// ase: the D-port cell switch inside a switch element's control section.
//
// Every header cell that arrives on one of the D input links must reach the
// burst processor of the output link it will use. In a routing stage that
// output is one base-D digit of the cell's output port number (digit DIGIT,
// D a power of two). In a distribution stage (DIST = 1), which in a
// three-stage network is the first stage, any output will do; the document
// asks for a dynamic, burst-by-burst choice that balances the load, and this
// design lets each input rotate round-robin over the outputs, starting at
// its own index, after every cell it sends.
//
// Structure (this design's choice): each output has a one-entry register
// and a round-robin arbiter over the inputs that want it. The input port
// index is written into the cell's in_port field for the crossbar command.
//
// Interface and timing: valid/ready on every input and output. A cell
// accepted at an edge is offered on its output from the next cycle on; an
// output register can be refilled in the cycle it is emptied, so each output
// carries one cell per cycle.
module ase
  import burst_pkg::*;
#(
  parameter int unsigned D     = 8,
  parameter bit          DIST  = 1'b1,
  parameter int unsigned DIGIT = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid  [D],
  input  bhc_t in_bhc    [D],
  output logic in_ready  [D],
  output logic out_valid [D],
  output bhc_t out_bhc   [D],
  input  logic out_ready [D]
);

  localparam int unsigned LOGD = (D > 1) ? $clog2(D) : 1;
  typedef logic [LOGD-1:0] port_t;

  port_t rr_in  [D];   // next output of each input (distribution)
  port_t rr_out [D];   // arbiter priority of each output
  port_t target [D];
  logic  grant  [D];
  port_t winner [D];
  logic  win_v  [D];
  logic  load   [D];

  always_comb begin
    for (int unsigned i = 0; i < D; i++)
      target[i] = DIST ? rr_in[i] : port_t'(in_bhc[i].out_port >> (DIGIT * LOGD));
    for (int unsigned o = 0; o < D; o++) begin
      load[o]   = !out_valid[o] || out_ready[o];
      win_v[o]  = 1'b0;
      winner[o] = '0;
      for (int unsigned k = 0; k < D; k++) begin
        automatic port_t i = port_t'((32'(rr_out[o]) + k) % D);
        if (!win_v[o] && in_valid[i] && target[i] == port_t'(o)) begin
          win_v[o]  = 1'b1;
          winner[o] = i;
        end
      end
    end
    for (int unsigned i = 0; i < D; i++)
      grant[i] = in_valid[i] && load[target[i]] && win_v[target[i]] &&
                 winner[target[i]] == port_t'(i);
  end

  assign in_ready = grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < D; o++) begin
        out_valid[o] <= 1'b0;
        out_bhc[o]   <= '0;
        rr_out[o]    <= '0;
        rr_in[o]     <= port_t'(o);
      end
    end else begin
      for (int unsigned o = 0; o < D; o++) begin
        if (load[o]) begin
          out_valid[o] <= win_v[o];
          if (win_v[o]) begin
            out_bhc[o]         <= in_bhc[winner[o]];
            out_bhc[o].in_port <= IPRT_W'(winner[o]);
            rr_out[o]          <= port_t'((32'(winner[o]) + 1) % D);
          end
        end
      end
      for (int unsigned i = 0; i < D; i++)
        if (grant[i]) rr_in[i] <= port_t'((32'(rr_in[i]) + 1) % D);
    end
  end

endmodule
