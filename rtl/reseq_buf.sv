// reseq_buf: resequencing buffer ordered by burst start time.
//
// Scheduling requests arrive in the order their header cells arrived; the
// buffer hands them on in the order the bursts themselves will go out, each
// one no earlier than DELTA slots ahead its start time. Holding requests
// back until shortly ahead the burst keeps the horizon scheduler behind it
// from committing a channel ahead a header for an earlier burst can still
// arrive. The ordering and the release at (start - DELTA) follow the
// document; the structure, a sorted register array with shift-insert, is
// this design's choice (the document points to ATM resequencers).
//
// Interface: push (in_valid/in_ready, key in_key, payload in_data); the
// entry with the smallest key is offered on out_* once out_key <= now +
// DELTA and leaves on out_valid & out_ready. Equal keys leave in arrival
// order. Push and pop may happen in the same cycle; in_ready is low only
// when all DEPTH entries are full. An entry written at edge n can leave in
// the cycle after edge n.
module reseq_buf
  import burst_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned DELTA  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  time_t             now,
  input  logic              in_valid,
  output logic              in_ready,
  input  time_t             in_key,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output time_t             out_key,
  output logic [DATA_W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  logic              v   [DEPTH];
  time_t             key [DEPTH];
  logic [DATA_W-1:0] dat [DEPTH];

  logic pop, push;
  // after a pop the array shifts down by one; positions refer to that view
  logic              sv  [DEPTH];
  time_t             sk  [DEPTH];
  logic [DATA_W-1:0] sd  [DEPTH];
  logic              ahead [DEPTH];  // entry stays ahead of the new one

  assign in_ready  = !v[DEPTH-1] || pop;
  assign out_valid = v[0] && (key[0] <= now + time_t'(DELTA));
  assign out_key   = key[0];
  assign out_data  = dat[0];
  assign pop       = out_valid && out_ready;
  assign push      = in_valid && in_ready;

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (pop) begin
        sv[i] = (i + 1 < DEPTH) ? v[i+1]   : 1'b0;
        sk[i] = (i + 1 < DEPTH) ? key[i+1] : '0;
        sd[i] = (i + 1 < DEPTH) ? dat[i+1] : '0;
      end else begin
        sv[i] = v[i];
        sk[i] = key[i];
        sd[i] = dat[i];
      end
      ahead[i] = sv[i] && (sk[i] <= in_key);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        v[i]   <= 1'b0;
        key[i] <= '0;
        dat[i] <= '0;
      end
    end else begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        if (!push || ahead[i]) begin
          v[i]   <= sv[i];
          key[i] <= sk[i];
          dat[i] <= sd[i];
        end else if (i == 0 || ahead[i-1]) begin
          v[i]   <= 1'b1;            // the new entry lands here
          key[i] <= in_key;
          dat[i] <= in_data;
        end else begin
          v[i]   <= sv[i-1];         // shifted up behind the new entry
          key[i] <= sk[i-1];
          dat[i] <= sd[i-1];
        end
      end
    end
  end

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < DEPTH; i++) count += v[i];
  end

`ifndef SYNTHESIS
  // entries stay sorted
  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i + 1 < DEPTH; i++)
      if (rst_n && v[i+1]) assert (v[i] && key[i] <= key[i+1])
        else $error("reseq_buf: order lost at %0d", i);
  end
`endif

endmodule
