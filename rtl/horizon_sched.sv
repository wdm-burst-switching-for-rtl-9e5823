// horizon_sched: horizon channel scheduler for one output link.
//
// Keeps, for each of the link's CHANNELS channels, a horizon: the earliest
// time after which nothing is planned on that channel. A burst that starts at
// req_start and lasts req_len slots goes to the channel whose horizon is the
// latest one not after req_start (the best fit, leaving the earlier-free
// channels for others). If every horizon lies after req_start the burst goes
// to the channel with the smallest horizon and starts when that channel
// frees up; res_delayed tells the caller the burst must wait in storage.
// That rule is the document's. Horizons are stored as exclusive end times, so
// "earlier than the arrival" is tested as horizon <= start; ties go to the
// lowest channel index; both are this design's choices.
//
// Timing: a request is taken in any cycle with req_valid (no back-pressure);
// the result appears one clock later on res_* (res_valid high one cycle),
// and the horizon is updated at the same edge. The search is a single
// combinational pass over all horizons. Reset clears all horizons to zero.
module horizon_sched
  import burst_pkg::*;
#(
  parameter int unsigned CHANNELS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  time_t             req_start,
  input  logic [LEN_W-1:0]  req_len,
  output logic              res_valid,
  output logic [CHAN_W-1:0] res_channel,
  output time_t             res_start,
  output logic              res_delayed
);

  time_t hz [CHANNELS];

  logic              fit_found;
  logic [CHAN_W-1:0] fit_ch, min_ch, sel_ch;
  time_t             fit_hz, min_hz, sel_start;

  always_comb begin
    fit_found = 1'b0;
    fit_ch    = '0;
    fit_hz    = '0;
    min_ch    = '0;
    min_hz    = hz[0];
    for (int unsigned c = 0; c < CHANNELS; c++) begin
      if (hz[c] <= req_start && (!fit_found || hz[c] > fit_hz)) begin
        fit_found = 1'b1;
        fit_ch    = CHAN_W'(c);
        fit_hz    = hz[c];
      end
      if (hz[c] < min_hz) begin
        min_ch = CHAN_W'(c);
        min_hz = hz[c];
      end
    end
    sel_ch    = fit_found ? fit_ch : min_ch;
    sel_start = fit_found ? req_start : min_hz;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < CHANNELS; c++) hz[c] <= '0;
      res_valid   <= 1'b0;
      res_channel <= '0;
      res_start   <= '0;
      res_delayed <= 1'b0;
    end else begin
      res_valid <= req_valid;
      if (req_valid) begin
        hz[int'(sel_ch)] <= sel_start + time_t'(req_len);
        res_channel <= sel_ch;
        res_start   <= sel_start;
        res_delayed <= !fit_found;
      end
    end
  end

endmodule
